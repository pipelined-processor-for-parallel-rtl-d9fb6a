// tb_msa_top: end-to-end test of the pipelined MSA at its default sizes.
// A host loads a program of controller parcels into the instruction cache
// and initial data into the data cache, starts the machine, waits for done
// and then reads back data words whose values were worked out by hand from
// the instruction semantics. The program uses every parcel family
// (Polish-expression parcels with literal, variable, indirect and
// structured operands, stores, store-immediate, relations, compares with
// 0/1), LOOP taken and not taken, GOTO, CALL and RETN with a local frame.
// It also counts each pipeline event and fails if one of the hazard
// mechanisms never occurred. The GOTO penalty is checked on the cycle: the
// target parcel is fetched two cycles after the GOTO is fetched (one
// discarded parcel). The shortest LOOP wait, for a relation directly
// before the LOOP, is checked to be 7 cycles.
module tb_msa_top;
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
      $display("FAIL %s: got %0d (0x%h) expected %0d (0x%h)", what, $signed(got), got, $signed(exp), exp);
    end
  endtask

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- tiny assembler ----------------------------------------
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
  // dependent field layouts
  function automatic logic [27:0] oper_val(input logic [3:0] o, input logic [23:0] x);
    return {o, x};
  endfunction
  function automatic logic [27:0] val_oper(input logic [23:0] x, input logic [3:0] o);
    return {x, o};
  endfunction

  int goto_pc, goto_target, call_ret;

  // ---------------- counters ----------------------------------------------
  int n_redirect = 0, n_loop_wait = 0, n_loop_taken = 0, n_q_stall = 0, n_call = 0, n_retn = 0;
  int n_second = 0, n_xmq_wait = 0, n_mem_out = 0, n_frame = 0, n_mxq_wait = 0, n_xmq_stall = 0;
  int n_relations = 0, cycles = 0;
  logic running_cnt = 1'b0;
  always @(posedge clk) if (running_cnt) begin
    cycles++;
    n_redirect   += int'(ev_redirect);
    n_loop_wait  += int'(ev_loop_wait);
    n_loop_taken += int'(ev_loop_taken);
    n_q_stall    += int'(ev_q_stall);
    n_call       += int'(ev_call);
    n_retn       += int'(ev_retn);
    n_second     += int'(ev_second_access);
    n_xmq_wait   += int'(ev_xmq_wait);
    n_mem_out    += int'(ev_mem_out_stall);
    n_frame      += int'(ev_frame);
    n_mxq_wait   += int'(ev_mxq_wait);
    n_xmq_stall  += int'(ev_xmq_stall);
    n_relations  += int'(dut.mcq_rd_en);
  end

  // LOOP waits: length of each run of wait cycles, and the shortest one
  int wait_run = 0, min_wait = 1 << 30;
  always @(posedge clk) begin
    if (ev_loop_wait) wait_run++;
    else if (wait_run > 0) begin
      if (wait_run < min_wait) min_wait = wait_run;
      wait_run = 0;
    end
  end

  // GOTO penalty: cycle of fetching GOTO vs cycle of fetching its target
  int t_goto = -1, t_target = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.u_ctl.fetch && int'(dut.u_ctl.pc) == goto_pc && t_goto < 0) t_goto = cyc;
    if (dut.u_ctl.fetch && int'(dut.u_ctl.pc) == goto_target && t_goto >= 0 && t_target < 0) t_target = cyc;
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

  localparam int FRAME = 1 << 20;  // reset value of HIGHMEM

  initial begin
    logic [31:0] r;
    int loop_top, proc_at;
    int fix_skip1, fix_skip2, fix_skip3, fix_call;
    // ---- program --------------------------------------------------------
    L(C_ASLV, v(0,10)); D(M_ASLD, 28'(5));
    L(C_ASLV, v(0,11)); D(M_ASLD, 28'(7));
    // x12 = (x10 + x11) * 3 - 100
    L(C_PSVR, v(0,10)); D(M_PVRO, val_oper(v(0,11), OP_ADD));
    D(M_PVLO, val_oper(24'd3, OP_MUL)); D(M_PVLO, val_oper(24'd100, OP_SUB));
    L(C_ASGV, v(0,12));
    // *x21 = *x20 * 2 ... : [7] [7,2] [14,7] [14,7,5] [14,2] [16]
    L(C_PSVI, v(0,20)); D(M_PVAL, 28'(2)); D(M_POVI, oper_val(OP_MUL, v(0,20)));
    D(M_PVAR, 28'(v(0,10))); D(M_POPP, {OP_SUB, OP_ADD, 20'h0});
    L(C_ASGI, v(0,21));
    // A at 40: A[4] = A[2] + (A[x13] - x10 - 4)
    L(C_PAVR, v(0,40)); D(M_PAOD, {S_PAOD, 24'd2}); D(M_PAOV, {S_PAOV, v(0,13)});
    D(M_PVRO, val_oper(v(0,10), OP_SUB)); D(M_PVAL, 28'(4)); D(M_POPP, {OP_SUB, OP_ADD, 20'h0});
    L(C_ASAR, v(0,40)); D(M_ASOD, 28'(4));
    // A[x13] = -9
    L(C_PSVL, 24'hFFFFF7); L(C_ASAR, v(0,40)); D(M_ASOV, 28'(v(0,13)));
    // x66 = A[1] + *x20 + (6 - 12): PVRI and POVL after a PAVR leading parcel
    // [101] [101,7] [108,6] [108,6,12] [108,-6] [102]
    L(C_PAVR, v(0,40)); D(M_PAOD, {S_PAOD, 24'd1}); D(M_PVRI, {S_PVRI, v(0,20)});
    D(M_POVL, oper_val(OP_ADD, 24'd6)); D(M_PVAL, 28'(12)); D(M_POPP, {OP_SUB, OP_ADD, 20'h0});
    L(C_ASGV, v(0,66));
    // x65: [10] [10,6] [4,3] [4,12] [48,5] [48,10] [48,10,3] [48,7] [55]
    L(C_PSVL, 24'd10); D(M_PVAL, 28'(6)); D(M_POVL, oper_val(OP_SUB, 24'd3));
    D(M_PVLO, val_oper(24'd2, OP_SHL)); D(M_POVR, oper_val(OP_MUL, v(0,10)));
    D(M_PVLO, val_oper(24'd1, OP_SHL)); D(M_PVAL, 28'(3)); D(M_POPP, {OP_SUB, OP_OR, 20'h0});
    L(C_ASGV, v(0,65));
    // *x20 = 77 (store immediate indirect)
    L(C_ASLI, v(0,20)); D(M_ASLD, 28'(77));
    // do { x51 += x50; x50 -= 1; } while (x50 > 0)
    loop_top = pc;
    L(C_PSVR, v(0,51)); D(M_PVRO, val_oper(v(0,50), OP_ADD)); L(C_ASGV, v(0,51));
    L(C_PSVR, v(0,50)); D(M_PVLO, val_oper(24'd1, OP_SUB)); L(C_ASGV, v(0,50));
    L(C_RLS1, v(0,50)); D(M_RLOP, {REL_GT, 24'd0});
    L(C_LOOP, 24'(loop_top));
    // if (x51 == x52) skip x60 = 999
    L(C_RLS2, v(0,51)); D(M_RLOP, {REL_EQ, v(0,52)});
    fix_skip1 = pc; L(C_LOOP, 24'h0);
    L(C_ASLV, v(0,60)); D(M_ASLD, 28'(999));
    prog[fix_skip1][23:0] = 24'(pc);
    // if (x50 == 0) skip HALT
    L(C_CMR0, v(0,50));
    fix_skip2 = pc; L(C_LOOP, 24'h0);
    L(C_HALT, 24'h0);
    prog[fix_skip2][23:0] = 24'(pc);
    // if (*x22 == 1) skip x61 = 1234  (not taken)
    L(C_CMI1, v(0,22));
    fix_skip3 = pc; L(C_LOOP, 24'h0);
    L(C_ASLV, v(0,61)); D(M_ASLD, 28'(1234));
    prog[fix_skip3][23:0] = 24'(pc);
    // GOTO over a HALT
    goto_pc = pc; L(C_GOTO, 24'(pc + 2));
    goto_target = pc + 1;
    L(C_HALT, 24'h0);
    // CALL procedure at 200 with display level 1, frame of 4 words
    proc_at = 200;
    fix_call = pc; L(C_CALL, {4'd1, 8'd4, 12'(proc_at)});
    call_ret = pc;
    L(C_PSVR, v(1,63)); L(C_ASGV, v(0,64));
    L(C_HALT, 24'h0);
    // procedure: local1 = 21; x63 = local1 + x11; return
    pc = proc_at;
    L(C_ASLV, v(1,1)); D(M_ASLD, 28'(21));
    L(C_PSVR, v(1,1)); D(M_PVRO, val_oper(v(0,11), OP_ADD)); L(C_ASGV, v(0,63));
    L(C_RETN, {4'd1, 4'd0, 16'h0});

    // ---- reset and load --------------------------------------------------
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      ic_wr_en = 1'b1; ic_wr_addr = 12'(i); ic_wr_data = (i < pc) ? prog[i] : 32'h0;
    end
    @(negedge clk) ic_wr_en = 1'b0;
    dc_write(13, 3);  dc_write(20, 11); dc_write(21, 30); dc_write(22, 24); dc_write(24, 5);
    for (int i = 0; i < 5; i++) dc_write(40 + i, 32'(100 + i));
    dc_write(50, 5); dc_write(51, 0); dc_write(52, 15); dc_write(60, 0); dc_write(61, 0);
    dc_write(30, 0); dc_write(63, 0); dc_write(64, 0); dc_write(65, 0); dc_write(66, 0);

    // ---- run -------------------------------------------------------------
    @(negedge clk) start = 1'b1; running_cnt = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (done);
    running_cnt = 1'b0;
    $display("program finished in %0d cycles", cycles);

    // ---- results ---------------------------------------------------------
    dc_read(10, r); check("x10", r, 5);
    dc_read(11, r); check("x11 (store immediate indirect)", r, 77);
    dc_read(12, r); check("x12 expression", r, -32'sd64);
    dc_read(30, r); check("*x21 indirect expression", r, 16);
    dc_read(42, r); check("A[2] untouched", r, 102);
    dc_read(44, r); check("A[4] structured store", r, 196);
    dc_read(43, r); check("A[x13] variable-offset store", r, -32'sd9);
    dc_read(65, r); check("x65 operator parcels", r, 55);
    dc_read(66, r); check("x66 (PVRI, POVL after PAVR)", r, 102);
    dc_read(50, r); check("loop counter", r, 0);
    dc_read(51, r); check("loop sum", r, 15);
    dc_read(60, r); check("skipped store (taken LOOP)", r, 0);
    dc_read(61, r); check("not-taken LOOP store", r, 1234);
    dc_read(63, r); check("procedure result", r, 98);
    dc_read(64, r); check("after return, DR.1 restored", r, 98);
    dc_read(FRAME, r); check("frame word 0 = saved DR.1", r, 0);
    dc_read(FRAME + 1, r); check("frame local 1", r, 21);
    check("HIGHMEM back after RETN", 32'(dut.u_mem.highmem), FRAME);
    check("no stack errors", {30'h0, cs_err, stack_err}, 0);
    check("GOTO penalty: target fetched 2 cycles after GOTO", 32'(t_target - t_goto), 2);
    // A relation whose last parcel directly precedes the LOOP: one cycle in
    // SEND, five in the memory unit (IF ID AG MEM END), and the LOOP sees
    // the MCQ word in the cycle after END: 7 wait cycles at the least.
    $display("shortest LOOP wait: %0d cycles", min_wait);
    check("shortest LOOP wait (relation right before LOOP)", 32'(min_wait), 7);
    check("relation results consumed", 32'(n_relations), 8);

    // ---- mechanisms ------------------------------------------------------
    $display("events: redirect=%0d loop_wait=%0d loop_taken=%0d q_stall=%0d call=%0d retn=%0d",
             n_redirect, n_loop_wait, n_loop_taken, n_q_stall, n_call, n_retn);
    $display("        second_access=%0d xmq_wait=%0d mem_out_stall=%0d frame=%0d mxq_wait=%0d xmq_stall=%0d",
             n_second, n_xmq_wait, n_mem_out, n_frame, n_mxq_wait, n_xmq_stall);
    check("LOOP taken count (4 back-edges + 2 skips)", 32'(n_loop_taken), 6);
    check("CALL count", 32'(n_call), 1);
    check("RETN count", 32'(n_retn), 1);
    check("frames made and deleted", 32'(n_frame), 2);
    check("redirects (GOTO, CALL, RETN, taken LOOPs)", 32'(n_redirect), 9);
    checks++; if (n_loop_wait == 0) begin failures++; $display("FAIL no LOOP wait"); end
    checks++; if (n_q_stall == 0)   begin failures++; $display("FAIL no full-queue stall"); end
    checks++; if (n_second == 0)    begin failures++; $display("FAIL no second access"); end
    checks++; if (n_xmq_wait == 0)  begin failures++; $display("FAIL no XMQ wait"); end
    checks++; if (n_mxq_wait == 0)  begin failures++; $display("FAIL no MXQ wait"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
