// tb_control_stack: random pushes and pops against a queue model, including
// overflow and underflow (which must set err and change nothing).
module tb_control_stack;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, empty, err;
  logic [11:0] push_data = 0, top;
  control_stack #(.AW(12), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [11:0] model[$];
  logic exp_err = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      checks++;
      if (empty != (model.size() == 0) || err != exp_err || (model.size() > 0 && top != model[$])) begin
        failures++; $display("FAIL k=%0d size=%0d top=%h err=%b", k, model.size(), top, err);
      end
      push = $urandom % 2; pop = !push && ($urandom % 2); push_data = 12'($urandom);
      @(posedge clk); #1;
      if (push) begin if (model.size() == DEPTH) exp_err = 1; else model.push_back(push_data); end
      if (pop)  begin if (model.size() == 0) exp_err = 1; else void'(model.pop_back()); end
      push = 0; pop = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
