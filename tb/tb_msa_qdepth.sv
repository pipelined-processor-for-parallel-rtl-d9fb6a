// tb_msa_qdepth: the same program on five copies of the MSA whose queues
// are 1, 2, 3, 4 and 10 words deep. Depth 1 is the unbuffered baseline
// arrangement; depth 3 is the default. The program is Livermore kernels 1, 3
// and 5 in 32-bit integer form, with loop length n = 201:
//   kernel 1: x[k]  = q + y[k] * (r * z[k+10] + t * z[k+11])
//   kernel 3: q3    = q3 + z[k] * x[k]
//   kernel 5: x5[i] = z[i] * (y[i] - x5[i-1])
// All copies are loaded together by the host. Every copy's results are
// compared with a reference evaluation. The cycle count of each depth is
// printed, so the gain from deeper queues can be seen. The testbench
// checks that no copy is slower than a copy with shallower queues, and
// that depth 3 is faster than depth 1.
module tb_msa_qdepth;
  import msa_pkg::*;

  localparam int N = 201;
  localparam int NQ = 5;
  localparam int QD [NQ] = '{1, 2, 3, 4, 10};

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [NQ-1:0] done;
  logic ic_wr_en = 1'b0;
  logic [11:0] ic_wr_addr = '0;
  logic [31:0] ic_wr_data = '0;
  logic dc_b_en = 1'b0, dc_b_we = 1'b0;
  logic [23:0] dc_b_addr = '0;
  logic [31:0] dc_b_wdata = '0;
  logic [31:0] dc_b_rdata [NQ];
  logic [NQ-1:0] cs_err, stack_err, ev_loop_taken, ev_q_stall;
  int cyc = 0;
  int t_done [NQ];
  int n_loop_taken [NQ];
  int n_q_stall [NQ];

  for (genvar g = 0; g < NQ; g++) begin : g_dut
    logic ev_redirect, ev_loop_wait, ev_call, ev_retn;
    logic ev_second_access, ev_xmq_wait, ev_mem_out_stall, ev_frame, ev_mxq_wait, ev_xmq_stall;
    msa_top #(.Q_DEPTH(QD[g])) dut (
      .clk, .rst_n, .start, .done(done[g]),
      .ic_wr_en, .ic_wr_addr, .ic_wr_data,
      .dc_b_en, .dc_b_we, .dc_b_addr, .dc_b_wdata, .dc_b_rdata(dc_b_rdata[g]),
      .cs_err(cs_err[g]), .stack_err(stack_err[g]),
      .ev_redirect, .ev_loop_wait, .ev_loop_taken(ev_loop_taken[g]), .ev_q_stall(ev_q_stall[g]),
      .ev_call, .ev_retn, .ev_second_access, .ev_xmq_wait, .ev_mem_out_stall, .ev_frame,
      .ev_mxq_wait, .ev_xmq_stall
    );
    always @(posedge clk) begin
      n_loop_taken[g] <= n_loop_taken[g] + int'(ev_loop_taken[g]);
      n_q_stall[g]    <= n_q_stall[g] + int'(ev_q_stall[g]);
    end
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: got %0d expected %0d", what, $signed(got), $signed(exp));
    end
  endtask

  // watchdog
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- program builder ---------------------------------------
  logic [31:0] prog [4096];
  int pc = 0;
  function automatic logic [23:0] v(input int off);
    return {4'd0, 20'(off)};
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
  // var := var + 1
  task automatic inc(input int a);
    L(C_PSVR, v(a)); D(M_PVLO, val_oper(24'd1, OP_ADD)); L(C_ASGV, v(a));
  endtask

  // ---------------- data layout (display 0, absolute words) ---------------
  localparam int B  = 4096;        // base of the array region
  localparam int OY = 0, OZ = 1100, OX = 2200, OX5 = 3300;  // array offsets
  // scalars
  localparam int Q = 1, R = 2, T = 3, Q3 = 4;
  localparam int IY = 10, IZ = 11, IZ1 = 12, IX = 13;           // kernel 1
  localparam int KZ = 14, KX = 15;                              // kernel 3
  localparam int JY = 16, JZ = 17, JX1 = 18, JX = 19;           // kernel 5

  task automatic dc_write(input int a, input logic [31:0] d);
    @(negedge clk);
    dc_b_en = 1'b1; dc_b_we = 1'b1; dc_b_addr = 24'(a); dc_b_wdata = d;
    @(negedge clk);
    dc_b_en = 1'b0; dc_b_we = 1'b0;
  endtask
  task automatic dc_read(input int a, output logic [31:0] d [NQ]);
    @(negedge clk);
    dc_b_en = 1'b1; dc_b_we = 1'b0; dc_b_addr = 24'(a);
    @(negedge clk);
    dc_b_en = 1'b0;
    d = dc_b_rdata;
  endtask

  // reference data
  int y [N], z [N+11], x [N], x5 [N];
  int q, r, t, q3, q3_init;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    logic [31:0] got [NQ];
    int t_start;
    int top;

    // ---- kernel 1 -------------------------------------------------------
    top = pc;
    // y[k] z[k+10] r * z[k+11] t * + * q +   (y and z through base B)
    L(C_PAVR, v(B)); D(M_PAOV, {S_PAOV, v(IY)}); D(M_PAOV, {S_PAOV, v(IZ)});
    D(M_PVRO, val_oper(v(R), OP_MUL)); D(M_PAOV, {S_PAOV, v(IZ1)});
    D(M_PVRO, val_oper(v(T), OP_MUL)); D(M_POPP, {OP_ADD, OP_MUL, 20'h0});
    D(M_PVRO, val_oper(v(Q), OP_ADD));
    L(C_ASAR, v(B)); D(M_ASOV, 28'(v(IX)));
    inc(IY); inc(IZ); inc(IZ1); inc(IX);
    L(C_RLS1, v(IY)); D(M_RLOP, {REL_LT, 24'(N)});
    L(C_LOOP, 24'(top));

    // ---- kernel 3 -------------------------------------------------------
    top = pc;
    // q3 z[k] x[k] * +
    L(C_PAVR, v(B)); D(M_PVAR, 28'(v(Q3))); D(M_PAOV, {S_PAOV, v(KZ)}); D(M_PAOV, {S_PAOV, v(KX)});
    D(M_POPP, {OP_MUL, OP_ADD, 20'h0});
    L(C_ASGV, v(Q3));
    inc(KZ); inc(KX);
    L(C_RLS1, v(KX)); D(M_RLOP, {REL_LT, 24'(OX + N)});
    L(C_LOOP, 24'(top));

    // ---- kernel 5 -------------------------------------------------------
    top = pc;
    // z[i] y[i] x5[i-1] - *
    L(C_PAVR, v(B)); D(M_PAOV, {S_PAOV, v(JZ)}); D(M_PAOV, {S_PAOV, v(JY)}); D(M_PAOV, {S_PAOV, v(JX1)});
    D(M_POPP, {OP_SUB, OP_MUL, 20'h0});
    L(C_ASAR, v(B)); D(M_ASOV, 28'(v(JX)));
    inc(JY); inc(JZ); inc(JX1); inc(JX);
    L(C_RLS1, v(JY)); D(M_RLOP, {REL_LT, 24'(N)});
    L(C_LOOP, 24'(top));
    L(C_HALT, 24'h0);

    // ---- data and reference ---------------------------------------------
    q = int'($urandom_range(0, 2000)) - 1000;
    r = int'($urandom_range(0, 200)) - 100;
    t = int'($urandom_range(0, 200)) - 100;
    q3_init = int'($urandom_range(0, 100));
    q3 = q3_init;
    foreach (y[i]) y[i] = int'($urandom_range(0, 2000)) - 1000;
    foreach (z[i]) z[i] = int'($urandom_range(0, 2000)) - 1000;
    x5[0] = int'($urandom_range(0, 20));
    for (int k = 0; k < N; k++) x[k] = q + y[k] * (r * z[k+10] + t * z[k+11]);
    for (int k = 0; k < N; k++) q3 = q3 + z[k] * x[k];
    for (int i = 1; i < N; i++) x5[i] = z[i] * (y[i] - x5[i-1]);

    // ---- reset, load program and data -----------------------------------
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < pc; i++) begin
      @(negedge clk);
      ic_wr_en = 1'b1; ic_wr_addr = 12'(i); ic_wr_data = prog[i];
    end
    @(negedge clk) ic_wr_en = 1'b0;
    for (int i = 0; i < N; i++) dc_write(B + OY + i, y[i]);
    for (int i = 0; i < N + 11; i++) dc_write(B + OZ + i, z[i]);
    dc_write(B + OX5, x5[0]);
    dc_write(Q, q); dc_write(R, r); dc_write(T, t);
    dc_write(IY, OY); dc_write(IZ, OZ + 10); dc_write(IZ1, OZ + 11); dc_write(IX, OX);
    dc_write(Q3, q3_init); dc_write(KZ, OZ); dc_write(KX, OX);
    dc_write(JY, 1); dc_write(JZ, OZ + 1); dc_write(JX1, OX5); dc_write(JX, OX5 + 1);

    // ---- run -------------------------------------------------------------
    foreach (t_done[g]) t_done[g] = -1;
    @(negedge clk) start = 1'b1;
    t_start = cyc;
    @(negedge clk) start = 1'b0;
    while (!(&done)) begin
      @(negedge clk);
      foreach (QD[g]) if (done[g] && t_done[g] < 0) t_done[g] = cyc;
    end
    foreach (QD[g])
      $display("queue depth %2d: %0d cycles, %0d queue-full stall cycles",
               QD[g], t_done[g] - t_start, n_q_stall[g]);

    // ---- check -------------------------------------------------------------
    for (int k = 0; k < N; k++) begin
      dc_read(B + OX + k, got);
      foreach (QD[g]) check($sformatf("depth %0d kernel 1 x[%0d]", QD[g], k), got[g], 32'(x[k]));
    end
    dc_read(Q3, got);
    foreach (QD[g]) check($sformatf("depth %0d kernel 3 q3", QD[g]), got[g], 32'(q3));
    for (int i = 1; i < N; i++) begin
      dc_read(B + OX5 + i, got);
      foreach (QD[g]) check($sformatf("depth %0d kernel 5 x5[%0d]", QD[g], i), got[g], 32'(x5[i]));
    end
    foreach (QD[g]) if (t_done[g] < 0) t_done[g] = cyc;
    foreach (QD[g]) begin
      check($sformatf("depth %0d LOOP back-edges", QD[g]), 32'(n_loop_taken[g]), 32'(3 * (N - 1) - 1));
      check($sformatf("depth %0d stack errors", QD[g]), {30'h0, cs_err[g], stack_err[g]}, 0);
      if (g > 0) begin
        checks++;
        if (t_done[g] > t_done[g-1]) begin
          failures++;
          $display("FAIL depth %0d slower than depth %0d", QD[g], QD[g-1]);
        end
      end
    end
    checks++;
    if (!(t_done[2] < t_done[0])) begin
      failures++;
      $display("FAIL depth 3 not faster than depth 1");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
