// tb_instr_cache: writes random parcels, reads them back and checks the
// one-cycle read latency and that the read register holds when rd_en is low.
module tb_instr_cache;
  logic clk = 0;
  logic rd_en = 0, wr_en = 0;
  logic [5:0] rd_addr = 0, wr_addr = 0;
  logic [31:0] rd_data, wr_data = 0;
  logic [31:0] model [64];
  instr_cache #(.AW(6)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); wr_en = 1; wr_addr = 6'(i); wr_data = $urandom; model[i] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    for (int k = 0; k < 300; k++) begin
      logic [5:0] a;
      logic [31:0] held;
      a = 6'($urandom);
      @(negedge clk); rd_en = 1; rd_addr = a;
      @(negedge clk); rd_en = 0; rd_addr = ~a;
      checks++; if (rd_data !== model[a]) begin failures++; $display("FAIL read %0d", a); end
      held = rd_data;
      @(negedge clk);
      checks++; if (rd_data !== held) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
