// tb_msa_livermore: runs the first five Livermore kernels, in 32-bit
// integer form, on the complete MSA at its default sizes, with the loop
// length n = 1001:
//   kernel 1 (hydro fragment)   x[k]  = q + y[k] * (r * z[k+10] + t * z[k+11])
//   kernel 2 (ICCG excerpt)     passes of halving length ii = n, n/2, ..., 1:
//                               x2[i] = x2[k] - v[k]*x2[k-1] - v[k+1]*x2[k+1],
//                               k = ipnt+1, ipnt+3, ... < ipntp, i counting up
//                               from ipntp (an inner loop that may run zero
//                               times, tested at its head)
//   kernel 3 (inner product)    q3    = q3 + z[k] * x[k]
//   kernel 4 (banded linear)    k = 6, 6+m, ... < n with m = (n-7)/2:
//                               temp = x4[k-1] - sum over j = 4, 9, ... < n of
//                               x4[lw] * y[j], lw counting up from k-6;
//                               x4[k-1] = y[4] * temp (x4 has n+200 elements,
//                               as lw runs past n in the last pass)
//   kernel 5 (tridiagonal)      x5[i] = z[i] * (y[i] - x5[i-1]),  i = 1..n-1
// Kernels 2 and 4 are nested loops.
// The arrays share one data region, so each expression names its elements
// as structured operands (one base, variable offsets held in index
// variables). Kernel 3 reads the x[] that kernel 1 wrote, and kernel 5
// reads back in each iteration the element it stored in the previous one,
// so the ordering of stores and loads through the queues is tested as well
// as the arithmetic. Each loop closes with a relation and a LOOP. The
// results are compared with a reference evaluation in the testbench, and
// the cycles per iteration are reported. The kernels are normally floating
// point; this machine has integer operators, so integer data are used.
module tb_msa_livermore;
  import msa_pkg::*;

  localparam int N = 1001;

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
  // var := var + 2
  task automatic add2(input int a);
    L(C_PSVR, v(a)); D(M_PVLO, val_oper(24'd2, OP_ADD)); L(C_ASGV, v(a));
  endtask

  // ---------------- data layout (display 0, absolute words) ---------------
  localparam int B  = 4096;        // base of the array region
  localparam int OY = 0, OZ = 1100, OX = 2200, OX5 = 3300;  // array offsets
  localparam int OX2 = 4400, OV2 = 6600, OX4 = 8800;
  // scalars
  localparam int Q = 1, R = 2, T = 3, Q3 = 4;
  localparam int IY = 10, IZ = 11, IZ1 = 12, IX = 13;           // kernel 1
  localparam int KZ = 14, KX = 15;                              // kernel 3
  localparam int JY = 16, JZ = 17, JX1 = 18, JX = 19;           // kernel 5
  localparam int II = 20, IPNT = 21, IPNTP = 22, LIMX = 23, XI = 24;  // kernel 2
  localparam int XK = 25, VK = 26, XKM = 27, VK1 = 28, XKP = 29;
  localparam int K4 = 30, LW = 31, TMP = 32, J4 = 33;           // kernel 4
  localparam int M4 = (N - 7) / 2;

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

  // reference data
  int y [N], z [N+11], x [N], x5 [N], x2 [2*N+2], v2 [2*N+2], x4 [N+200];
  int x2_init [2*N+2], x4_init [N+200];
  int q, r, t, q3, q3_init, exp_taken;

  // marks for the cycle count of each kernel
  int cyc = 0, t_k1 = -1, t_k2 = -1, t_k3 = -1, t_k4 = -1, t_k5 = -1, t_end = -1;
  int k1_pc, k2_pc, k3_pc, k4_pc, k5_pc, end_pc;
  int n_loop_taken = 0, n_loop_wait = 0, n_second = 0, n_mxq_wait = 0, n_xmq_wait = 0;
  always @(posedge clk) begin
    cyc++;
    n_loop_taken += int'(ev_loop_taken);
    n_loop_wait  += int'(ev_loop_wait);
    n_second     += int'(ev_second_access);
    n_mxq_wait   += int'(ev_mxq_wait);
    n_xmq_wait   += int'(ev_xmq_wait);
    if (dut.u_ctl.fetch) begin
      if (int'(dut.u_ctl.pc) == k1_pc  && t_k1  < 0) t_k1  = cyc;
      if (int'(dut.u_ctl.pc) == k2_pc  && t_k2  < 0) t_k2  = cyc;
      if (int'(dut.u_ctl.pc) == k3_pc  && t_k3  < 0) t_k3  = cyc;
      if (int'(dut.u_ctl.pc) == k4_pc  && t_k4  < 0) t_k4  = cyc;
      if (int'(dut.u_ctl.pc) == k5_pc  && t_k5  < 0) t_k5  = cyc;
      if (int'(dut.u_ctl.pc) == end_pc && t_end < 0) t_end = cyc;
    end
  end

  initial begin
    logic [31:0] got;
    int top, inner, fix_goto;
    int ii, ipnt, ipntp, i2, lw, temp;

    // ---- kernel 1 -------------------------------------------------------
    k1_pc = pc; top = pc;
    // y[k] z[k+10] r * z[k+11] t * + * q +   (y and z through base B)
    L(C_PAVR, v(B)); D(M_PAOV, {S_PAOV, v(IY)}); D(M_PAOV, {S_PAOV, v(IZ)});
    D(M_PVRO, val_oper(v(R), OP_MUL)); D(M_PAOV, {S_PAOV, v(IZ1)});
    D(M_PVRO, val_oper(v(T), OP_MUL)); D(M_POPP, {OP_ADD, OP_MUL, 20'h0});
    D(M_PVRO, val_oper(v(Q), OP_ADD));
    L(C_ASAR, v(B)); D(M_ASOV, 28'(v(IX)));
    inc(IY); inc(IZ); inc(IZ1); inc(IX);
    L(C_RLS1, v(IY)); D(M_RLOP, {REL_LT, 24'(N)});
    L(C_LOOP, 24'(top));

    // ---- kernel 2 -------------------------------------------------------
    // the index variables hold array offsets from B: XI = OX2+i,
    // XK = OX2+k, VK = OV2+k, XKM = OX2+k-1, VK1 = OV2+k+1, XKP = OX2+k+1
    k2_pc = pc; top = pc;
    L(C_PSVR, v(IPNTP)); L(C_ASGV, v(IPNT));
    L(C_PSVR, v(IPNTP)); D(M_PVRO, val_oper(v(II), OP_ADD)); L(C_ASGV, v(IPNTP));
    L(C_PSVR, v(II)); D(M_PVLO, val_oper(24'd1, OP_SRA)); L(C_ASGV, v(II));
    L(C_PSVR, v(IPNTP)); D(M_PVLO, val_oper(24'(OX2 - 1), OP_ADD)); L(C_ASGV, v(XI));
    L(C_PSVR, v(IPNTP)); D(M_PVLO, val_oper(24'(OX2), OP_ADD)); L(C_ASGV, v(LIMX));
    L(C_PSVR, v(IPNT)); D(M_PVLO, val_oper(24'(OX2 + 1), OP_ADD)); L(C_ASGV, v(XK));
    L(C_PSVR, v(IPNT)); D(M_PVLO, val_oper(24'(OV2 + 1), OP_ADD)); L(C_ASGV, v(VK));
    L(C_PSVR, v(IPNT)); D(M_PVLO, val_oper(24'(OX2), OP_ADD)); L(C_ASGV, v(XKM));
    L(C_PSVR, v(IPNT)); D(M_PVLO, val_oper(24'(OV2 + 2), OP_ADD)); L(C_ASGV, v(VK1));
    L(C_PSVR, v(IPNT)); D(M_PVLO, val_oper(24'(OX2 + 2), OP_ADD)); L(C_ASGV, v(XKP));
    fix_goto = pc; L(C_GOTO, 24'h0);
    inner = pc;
    inc(XI);
    // x2[k] v[k] x2[k-1] * - v[k+1] x2[k+1] * -
    L(C_PAVR, v(B)); D(M_PAOV, {S_PAOV, v(XK)}); D(M_PAOV, {S_PAOV, v(VK)});
    D(M_PAOV, {S_PAOV, v(XKM)}); D(M_POPP, {OP_MUL, OP_SUB, 20'h0});
    D(M_PAOV, {S_PAOV, v(VK1)}); D(M_PAOV, {S_PAOV, v(XKP)}); D(M_POPP, {OP_MUL, OP_SUB, 20'h0});
    L(C_ASAR, v(B)); D(M_ASOV, 28'(v(XI)));
    add2(XK); add2(VK); add2(XKM); add2(VK1); add2(XKP);
    prog[fix_goto][23:0] = 24'(pc);
    L(C_RLS2, v(XK)); D(M_RLOP, {REL_LT, v(LIMX)});
    L(C_LOOP, 24'(inner));
    L(C_RLS1, v(II)); D(M_RLOP, {REL_GT, 24'd0});
    L(C_LOOP, 24'(top));

    // ---- kernel 3 -------------------------------------------------------
    k3_pc = pc; top = pc;
    // q3 z[k] x[k] * +
    L(C_PAVR, v(B)); D(M_PVAR, 28'(v(Q3))); D(M_PAOV, {S_PAOV, v(KZ)}); D(M_PAOV, {S_PAOV, v(KX)});
    D(M_POPP, {OP_MUL, OP_ADD, 20'h0});
    L(C_ASGV, v(Q3));
    inc(KZ); inc(KX);
    L(C_RLS1, v(KX)); D(M_RLOP, {REL_LT, 24'(OX + N)});
    L(C_LOOP, 24'(top));

    // ---- kernel 4 -------------------------------------------------------
    // K4 = OX4+k-1, LW = OX4+lw, J4 = OY+j
    k4_pc = pc; top = pc;
    L(C_PSVR, v(K4)); D(M_PVLO, val_oper(24'd5, OP_SUB)); L(C_ASGV, v(LW));
    L(C_PAVR, v(B)); D(M_PAOV, {S_PAOV, v(K4)}); L(C_ASGV, v(TMP));
    L(C_ASLV, v(J4)); D(M_ASLD, 28'(OY + 4));
    inner = pc;
    // temp x4[lw] y[j] * -
    L(C_PAVR, v(B)); D(M_PVAR, 28'(v(TMP))); D(M_PAOV, {S_PAOV, v(LW)}); D(M_PAOV, {S_PAOV, v(J4)});
    D(M_POPP, {OP_MUL, OP_SUB, 20'h0});
    L(C_ASGV, v(TMP));
    inc(LW);
    L(C_PSVR, v(J4)); D(M_PVLO, val_oper(24'd5, OP_ADD)); L(C_ASGV, v(J4));
    L(C_RLS1, v(J4)); D(M_RLOP, {REL_LT, 24'(OY + N)});
    L(C_LOOP, 24'(inner));
    // x4[k-1] = y[4] * temp
    L(C_PAVR, v(B)); D(M_PAOD, {S_PAOD, 24'(OY + 4)}); D(M_PVRO, val_oper(v(TMP), OP_MUL));
    L(C_ASAR, v(B)); D(M_ASOV, 28'(v(K4)));
    L(C_PSVR, v(K4)); D(M_PVLO, val_oper(24'(M4), OP_ADD)); L(C_ASGV, v(K4));
    L(C_RLS1, v(K4)); D(M_RLOP, {REL_LT, 24'(OX4 + N - 1)});
    L(C_LOOP, 24'(top));

    // ---- kernel 5 -------------------------------------------------------
    k5_pc = pc; top = pc;
    // z[i] y[i] x5[i-1] - *
    L(C_PAVR, v(B)); D(M_PAOV, {S_PAOV, v(JZ)}); D(M_PAOV, {S_PAOV, v(JY)}); D(M_PAOV, {S_PAOV, v(JX1)});
    D(M_POPP, {OP_SUB, OP_MUL, 20'h0});
    L(C_ASAR, v(B)); D(M_ASOV, 28'(v(JX)));
    inc(JY); inc(JZ); inc(JX1); inc(JX);
    L(C_RLS1, v(JY)); D(M_RLOP, {REL_LT, 24'(N)});
    L(C_LOOP, 24'(top));
    end_pc = pc;
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
    foreach (x2[i]) x2[i] = int'($urandom_range(0, 200)) - 100;
    foreach (v2[i]) v2[i] = int'($urandom_range(0, 20)) - 10;
    foreach (x4[i]) x4[i] = int'($urandom_range(0, 2000)) - 1000;
    x2_init = x2;
    x4_init = x4;
    // the LOOP back-edges each kernel takes, counted in the reference
    exp_taken = 0;
    for (int k = 0; k < N; k++) x[k] = q + y[k] * (r * z[k+10] + t * z[k+11]);
    exp_taken += N - 1;
    ii = N; ipntp = 0;
    do begin
      ipnt = ipntp; ipntp += ii; ii /= 2; i2 = ipntp - 1;
      for (int k = ipnt + 1; k < ipntp; k += 2) begin
        i2++;
        x2[i2] = x2[k] - v2[k] * x2[k-1] - v2[k+1] * x2[k+1];
        exp_taken++;
      end
      if (ii > 0) exp_taken++;
    end while (ii > 0);
    for (int k = 0; k < N; k++) q3 = q3 + z[k] * x[k];
    exp_taken += N - 1;
    for (int k = 6; k < N; k += M4) begin
      lw = k - 6; temp = x4[k-1];
      for (int j = 4; j < N; j += 5) begin
        temp -= x4[lw] * y[j]; lw++;
        if (j + 5 < N) exp_taken++;
      end
      x4[k-1] = y[4] * temp;
      if (k + M4 < N) exp_taken++;
    end
    for (int i = 1; i < N; i++) x5[i] = z[i] * (y[i] - x5[i-1]);
    exp_taken += N - 2;

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
    for (int i = 0; i < 2 * N + 2; i++) dc_write(B + OX2 + i, x2_init[i]);
    for (int i = 0; i < 2 * N + 2; i++) dc_write(B + OV2 + i, v2[i]);
    for (int i = 0; i < N + 200; i++) dc_write(B + OX4 + i, x4_init[i]);
    dc_write(II, N); dc_write(IPNTP, 0); dc_write(K4, OX4 + 5);
    dc_write(Q, q); dc_write(R, r); dc_write(T, t);
    dc_write(IY, OY); dc_write(IZ, OZ + 10); dc_write(IZ1, OZ + 11); dc_write(IX, OX);
    dc_write(Q3, q3_init); dc_write(KZ, OZ); dc_write(KX, OX);
    dc_write(JY, 1); dc_write(JZ, OZ + 1); dc_write(JX1, OX5); dc_write(JX, OX5 + 1);

    // ---- run -------------------------------------------------------------
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (done);

    $display("kernel 1: %0d cycles for %0d iterations", t_k2 - t_k1, N);
    $display("kernel 2: %0d cycles", t_k3 - t_k2);
    $display("kernel 3: %0d cycles for %0d iterations", t_k4 - t_k3, N);
    $display("kernel 4: %0d cycles", t_k5 - t_k4);
    $display("kernel 5: %0d cycles for %0d iterations", t_end - t_k5, N - 1);
    $display("LOOP taken %0d, LOOP wait cycles %0d, second accesses %0d, MXQ waits %0d, XMQ waits %0d",
             n_loop_taken, n_loop_wait, n_second, n_mxq_wait, n_xmq_wait);

    // ---- check -------------------------------------------------------------
    for (int k = 0; k < N; k++) begin
      dc_read(B + OX + k, got);
      check($sformatf("kernel 1 x[%0d]", k), got, 32'(x[k]));
    end
    for (int i = 0; i < 2 * N + 2; i++) begin
      dc_read(B + OX2 + i, got);
      check($sformatf("kernel 2 x2[%0d]", i), got, 32'(x2[i]));
    end
    dc_read(Q3, got);
    check("kernel 3 q3", got, 32'(q3));
    for (int i = 0; i < N; i++) begin
      dc_read(B + OX4 + i, got);
      check($sformatf("kernel 4 x4[%0d]", i), got, 32'(x4[i]));
    end
    for (int i = 1; i < N; i++) begin
      dc_read(B + OX5 + i, got);
      check($sformatf("kernel 5 x5[%0d]", i), got, 32'(x5[i]));
    end
    check("LOOP back-edges", 32'(n_loop_taken), 32'(exp_taken));
    check("control stack error", {31'h0, cs_err}, 0);
    check("expression stack error", {31'h0, stack_err}, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
