// tb_msa_ackermann: runs the recursive Ackermann function on the complete
// MSA at its default sizes. It exercises procedure calls: deep recursion
// through CALL and RETN, with every activation on the same display level
// (DR.1) and its own data-stack frame.
//
// Calling convention (the program's own): the caller puts the arguments in
// global words GM and GN and calls with a two-word frame; the procedure
// copies them into its locals (frame offsets 1 and 2) and leaves the result
// in the global word GRES:
//   A(m, n) = n + 1                  if m = 0
//           = A(m-1, 1)              if n = 0
//           = A(m-1, A(m, n-1))      otherwise
// The host runs several argument pairs one after the other by writing GM
// and GN and pulsing start. Each result is compared with a reference
// evaluation. The testbench also checks the following for every run:
//   - the deepest nesting of calls reached, against the reference;
//   - HIGHMEM is back at its reset value once all frames are gone;
//   - the control stack never overflowed.
// The largest case nests 16 calls, which fills the 16-entry control stack
// exactly.
module tb_msa_ackermann;
  import msa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done;
  logic ic_wr_en = 1'b0;
  logic [11:0] ic_wr_addr = '0;
  logic [31:0] ic_wr_data = '0;
  logic dc_b_en = 1'b0, dc_b_we = 1'b0;
  logic [23:0] dc_b_addr = '0;
  logic [31:0] dc_b_wdata = '0, dc_b_rdata;
  logic cs_err, stack_err;
  logic ev_redirect, ev_loop_wait, ev_loop_taken, ev_q_stall, ev_call, ev_retn;
  logic ev_second_access, ev_xmq_wait, ev_mem_out_stall, ev_frame, ev_mxq_wait, ev_xmq_stall;

  msa_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, $signed(got), $signed(exp));
    end
  endtask

  // watchdog
  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- program builder ---------------------------------------
  logic [31:0] prog [4096];
  int pc = 0;
  function automatic logic [23:0] v(input int d, input int off);
    return {4'(d), 20'(off)};
  endfunction
  task automatic L(input logic [7:0] op, input logic [23:0] arg);
    prog[pc] = {op, arg}; pc++;
  endtask
  task automatic D(input logic [3:0] minor, input logic [27:0] f);
    prog[pc] = {minor, f}; pc++;
  endtask
  function automatic logic [27:0] val_oper(input logic [23:0] x, input logic [3:0] o);
    return {x, o};
  endfunction

  localparam int GM = 1, GN = 2, GRES = 3;   // globals (display 0)
  localparam int LM = 1, LN = 2;             // locals (display 1)
  localparam int PROC = 16;                  // procedure entry
  localparam logic [23:0] CALL_A = {4'd1, 8'd2, 12'(PROC)};
  localparam logic [23:0] RETN_A = {4'd1, 4'd0, 16'h0};

  // reference
  int ref_depth;
  function automatic int ack(input int m, input int n, input int d);
    if (d > ref_depth) ref_depth = d;
    if (m == 0) return n + 1;
    if (n == 0) return ack(m - 1, 1, d + 1);
    return ack(m - 1, ack(m, n - 1, d + 1), d + 1);
  endfunction

  // call nesting seen on the hardware
  int depth = 0, max_depth = 0, n_calls = 0;
  always @(posedge clk) begin
    if (ev_call) begin
      n_calls <= n_calls + 1;
      depth   <= depth + 1;
      if (depth + 1 > max_depth) max_depth <= depth + 1;
    end else if (ev_retn) depth <= depth - 1;
  end

  task automatic dc_write(input int a, input logic [31:0] d);
    @(negedge clk);
    dc_b_en = 1'b1; dc_b_we = 1'b1; dc_b_addr = 24'(a); dc_b_wdata = d;
    @(negedge clk);
    dc_b_en = 1'b0; dc_b_we = 1'b0;
  endtask
  task automatic dc_read(input int a, output logic [31:0] d);
    @(negedge clk);
    dc_b_en = 1'b1; dc_b_we = 1'b0; dc_b_addr = 24'(a);
    @(negedge clk);
    dc_b_en = 1'b0;
    d = dc_b_rdata;
  endtask

  int cases_m [5] = '{1, 2, 2, 3, 2};
  int cases_n [5] = '{3, 2, 3, 1, 6};

  initial begin
    logic [31:0] got;
    int fix_m0, fix_n0, exp_v, t0;

    // main: A(GM, GN); halt
    L(C_CALL, CALL_A);
    L(C_HALT, 24'h0);
    // procedure
    pc = PROC;
    L(C_PSVR, v(0, GM)); L(C_ASGV, v(1, LM));
    L(C_PSVR, v(0, GN)); L(C_ASGV, v(1, LN));
    L(C_CMR0, v(1, LM)); fix_m0 = pc; L(C_LOOP, 24'h0);
    L(C_CMR0, v(1, LN)); fix_n0 = pc; L(C_LOOP, 24'h0);
    // A(m, n-1)
    L(C_PSVR, v(1, LM)); L(C_ASGV, v(0, GM));
    L(C_PSVR, v(1, LN)); D(M_PVLO, val_oper(24'd1, OP_SUB)); L(C_ASGV, v(0, GN));
    L(C_CALL, CALL_A);
    // A(m-1, result)
    L(C_PSVR, v(1, LM)); D(M_PVLO, val_oper(24'd1, OP_SUB)); L(C_ASGV, v(0, GM));
    L(C_PSVR, v(0, GRES)); L(C_ASGV, v(0, GN));
    L(C_CALL, CALL_A);
    L(C_RETN, RETN_A);
    // m = 0: result n + 1
    prog[fix_m0][23:0] = 24'(pc);
    L(C_PSVR, v(1, LN)); D(M_PVLO, val_oper(24'd1, OP_ADD)); L(C_ASGV, v(0, GRES));
    L(C_RETN, RETN_A);
    // n = 0: A(m-1, 1)
    prog[fix_n0][23:0] = 24'(pc);
    L(C_PSVR, v(1, LM)); D(M_PVLO, val_oper(24'd1, OP_SUB)); L(C_ASGV, v(0, GM));
    L(C_ASLV, v(0, GN)); D(M_ASLD, 28'(1));
    L(C_CALL, CALL_A);
    L(C_RETN, RETN_A);

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < pc; i++) begin
      @(negedge clk);
      ic_wr_en = 1'b1; ic_wr_addr = 12'(i); ic_wr_data = (i < 2 || i >= PROC) ? prog[i] : 32'h0;
    end
    @(negedge clk) ic_wr_en = 1'b0;

    foreach (cases_m[c]) begin
      ref_depth = 0;
      exp_v = ack(cases_m[c], cases_n[c], 1);
      dc_write(GM, 32'(cases_m[c])); dc_write(GN, 32'(cases_n[c])); dc_write(GRES, 0);
      @(negedge clk) begin depth = 0; max_depth = 0; n_calls = 0; start = 1'b1; end
      t0 = $time / 10;
      @(negedge clk) start = 1'b0;
      wait (done);
      dc_read(GRES, got);
      $display("A(%0d,%0d) = %0d: %0d calls, nesting %0d, %0d cycles",
               cases_m[c], cases_n[c], $signed(got), n_calls, max_depth, $time / 10 - t0);
      check($sformatf("A(%0d,%0d)", cases_m[c], cases_n[c]), got, 32'(exp_v));
      check($sformatf("A(%0d,%0d) nesting", cases_m[c], cases_n[c]), 32'(max_depth), 32'(ref_depth));
      check("HIGHMEM back at its reset value", 32'(dut.u_mem.highmem), 32'(1 << 20));
      check("control stack error", {31'h0, cs_err}, 0);
      check("expression stack error", {31'h0, stack_err}, 0);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
