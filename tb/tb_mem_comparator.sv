// tb_mem_comparator: every relation on random and boundary operand pairs,
// against results computed with SystemVerilog's signed integer compares.
module tb_mem_comparator;
  import msa_pkg::*;
  logic [31:0] a, b;
  rel_e rel;
  logic result;
  mem_comparator #(.DW(32)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int sa, sb;
    logic e;
    for (int k = 0; k < 3000; k++) begin
      a = (k % 7 == 0) ? 32'h8000_0000 : $urandom;
      b = (k % 5 == 0) ? a : ((k % 3 == 0) ? 32'h7fff_ffff : $urandom);
      rel = rel_e'(k % 6);
      sa = int'(a); sb = int'(b);
      case (k % 6)
        0: e = sa > sb;  1: e = sa >= sb; 2: e = sa == sb;
        3: e = sa != sb; 4: e = sa < sb;  default: e = sa <= sb;
      endcase
      #1;
      checks++; if (result !== e) begin failures++; $display("FAIL rel %0d a=%0d b=%0d", k % 6, sa, sb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
