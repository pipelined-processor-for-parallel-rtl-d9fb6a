// tb_display_regs: checks the reset values, then random writes to the 16
// display registers, HIGHMEM and CURDISP against an array model, reading
// every display register back.
module tb_display_regs;
  logic clk = 0, rst_n = 0;
  logic [3:0] rd_idx = 0, dr_idx = 0, cd_wdata = 0, curdisp;
  logic [23:0] rd_base, dr_wdata = 0, hm_wdata = 0, highmem;
  logic dr_we = 0, hm_we = 0, cd_we = 0;
  display_regs #(.AW(24), .HIGHMEM_INIT(24'h100000)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [23:0] m [16];
  logic [23:0] mh = 24'h100000;
  logic [3:0] mc = 0;
  task automatic compare;
    for (int i = 0; i < 16; i++) begin
      rd_idx = 4'(i); #1;
      checks++; if (rd_base !== m[i]) begin failures++; $display("FAIL DR.%0d", i + 1); end
    end
    checks++; if (highmem !== mh || curdisp !== mc) begin failures++; $display("FAIL HIGHMEM/CURDISP"); end
  endtask
  initial begin
    repeat (3000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 16; i++) m[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); compare();
    for (int k = 0; k < 200; k++) begin
      @(negedge clk);
      dr_we = $urandom % 2; hm_we = $urandom % 2; cd_we = $urandom % 2;
      dr_idx = 4'($urandom); dr_wdata = 24'($urandom); hm_wdata = 24'($urandom); cd_wdata = 4'($urandom);
      @(posedge clk); #1;
      if (dr_we) m[dr_idx] = dr_wdata;
      if (hm_we) mh = hm_wdata;
      if (cd_we) mc = cd_wdata;
      dr_we = 0; hm_we = 0; cd_we = 0;
      @(negedge clk); compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
