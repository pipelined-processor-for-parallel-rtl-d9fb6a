// tb_data_cache: random reads and writes on both ports against an array
// model (the two ports never touch the same word in one cycle); checks the
// one-cycle read latency of each port.
module tb_data_cache;
  logic clk = 0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [7:0] a_addr = 0, b_addr = 0;
  logic [31:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [31:0] model [256];
  data_cache #(.AW(8), .DW(32)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); a_en = 1; a_we = 1; a_addr = 8'(i); a_wdata = $urandom; model[i] = a_wdata;
    end
    for (int k = 0; k < 1000; k++) begin
      logic ra, rb;
      @(negedge clk);
      a_en = 1; b_en = 1;
      a_we = $urandom % 2; b_we = $urandom % 2;
      a_addr = 8'($urandom); b_addr = 8'($urandom);
      if (b_addr == a_addr) b_addr = a_addr + 1;
      a_wdata = $urandom; b_wdata = $urandom;
      ra = !a_we; rb = !b_we;
      @(negedge clk);
      a_en = 0; b_en = 0;
      if (ra) begin checks++; if (a_rdata !== model[a_addr]) begin failures++; $display("FAIL a %0d", a_addr); end end
      else model[a_addr] = a_wdata;
      if (rb) begin checks++; if (b_rdata !== model[b_addr]) begin failures++; $display("FAIL b %0d", b_addr); end end
      else model[b_addr] = b_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
