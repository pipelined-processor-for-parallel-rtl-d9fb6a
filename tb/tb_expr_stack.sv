// tb_expr_stack: random push, pop and pop-two-push-one operations against a
// queue model; checks the top two items, the depth and the error flag.
module tb_expr_stack;
  localparam int DEPTH = 5;
  logic clk = 0, rst_n = 0, push = 0, pop2_push = 0, pop = 0, err;
  logic [31:0] din = 0, t0, t1;
  logic [2:0] depth;
  expr_stack #(.DW(32), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [31:0] model[$];
  logic exp_err = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 1500; k++) begin
      int r;
      @(negedge clk);
      checks++;
      if (int'(depth) != model.size() || err != exp_err ||
          (model.size() > 0 && t0 != model[$]) || (model.size() > 1 && t1 != model[$-1])) begin
        failures++; $display("FAIL k=%0d depth=%0d/%0d", k, depth, model.size());
      end
      r = $urandom % 3; push = (r == 0); pop2_push = (r == 1); pop = (r == 2); din = $urandom;
      @(posedge clk); #1;
      if (push) begin if (model.size() == DEPTH) exp_err = 1; else model.push_back(din); end
      if (pop2_push) begin
        if (model.size() < 2) exp_err = 1;
        else begin void'(model.pop_back()); void'(model.pop_back()); model.push_back(din); end
      end
      if (pop) begin if (model.size() == 0) exp_err = 1; else void'(model.pop_back()); end
      push = 0; pop2_push = 0; pop = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
