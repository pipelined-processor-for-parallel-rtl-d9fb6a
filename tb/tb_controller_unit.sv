// tb_controller_unit: runs a small controller program and compares the
// instruction streams written to the CMQ and the CEQ with the streams
// expected from the parcel semantics. Queue models with room for three
// words are drained at random, so the controller sees full queues. The
// memory unit is modelled by answering each relational instruction on the
// MCQ a few cycles after it is sent. Checked on the cycle: GOTO, CALL and
// RETN each cost one discarded parcel (target fetched two cycles after the
// transfer parcel), and LOOP waits in ID until the MCQ answer arrives.
module tb_controller_unit;
  import msa_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy;
  logic ic_wr_en = 0;
  logic [7:0] ic_wr_addr = 0;
  logic [31:0] ic_wr_data = 0;
  logic cmq_wr_en, cmq_full;
  uinstr_t cmq_wr_data;
  logic [1:0] ceq_wr_en;
  uinstr_t [1:0] ceq_wr_data;
  logic [1:0] ceq_count, ceq_depth;
  logic mcq_rd_en, mcq_rd_data, mcq_empty;
  logic ev_redirect, ev_loop_wait, ev_loop_taken, ev_q_stall, ev_call, ev_retn, cs_err;

  controller_unit #(.AW(8), .CS_DEPTH(4), .QCW(2)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  uinstr_t cmq[$], ceq[$], cmq_log[$], ceq_log[$];
  logic mcq[$];
  logic answers[$];         // MCQ answers, in relation order
  int   pending[$];         // cycle at which each answer is due
  int cyc = 0, n_qstall = 0, n_wait = 0;
  int fetch_cyc[int];
  bit stall_at[int];
  // fetch-to-fetch distance with the cycles lost to full queues removed
  function automatic int gap(input int a, input int b);
    int g;
    g = fetch_cyc[b] - fetch_cyc[a];
    for (int c = fetch_cyc[a] + 1; c <= fetch_cyc[b]; c++) if (stall_at.exists(c)) g--;
    return g;
  endfunction

  assign ceq_depth = 2'd3;
  assign ceq_count = 2'(ceq.size());
  assign cmq_full  = cmq.size() >= 3;
  assign mcq_empty = mcq.size() == 0;
  assign mcq_rd_data = mcq.size() ? mcq[0] : 1'b0;

  always @(posedge clk) cyc++;
  always @(negedge clk) begin
    logic p_m;
    uinstr_t w[$], w2[$];
    #4;
    w.delete(); w2.delete();
    p_m = mcq_rd_en;
    if (dut.fetch) fetch_cyc[int'(dut.pc)] = cyc + 1;
    n_qstall += int'(ev_q_stall);
    if (ev_q_stall) stall_at[cyc + 1] = 1'b1; n_wait += int'(ev_loop_wait);
    if (cmq_wr_en) begin
      w.push_back(cmq_wr_data);
      cmq_log.push_back(cmq_wr_data);
      if (cmq_wr_data.op inside {M_RLGT, M_ACMVR0}) pending.push_back(cyc + 6);
    end
    for (int i = 0; i < 2; i++) if (ceq_wr_en[i]) begin ceq_log.push_back(ceq_wr_data[i]); w2.push_back(ceq_wr_data[i]); end
    @(posedge clk); #1;
    if (p_m) void'(mcq.pop_front());
    foreach (w[i]) cmq.push_back(w[i]);
    foreach (w2[i]) ceq.push_back(w2[i]);
    // consumers drain at random
    if (cmq.size() && $urandom % 2) void'(cmq.pop_front());
    if (ceq.size() && $urandom % 2) void'(ceq.pop_front());
    if (pending.size() && pending[0] <= cyc) begin void'(pending.pop_front()); mcq.push_back(answers.pop_front()); end
  end

  function automatic logic [23:0] v(input int d, input int off);
    return {4'(d), 20'(off)};
  endfunction
  logic [31:0] prog [256];
  task automatic expect_stream(input string nm, input uinstr_t got[$], input uinstr_t exp[$]);
    checks++;
    if (got.size() != exp.size()) begin failures++; $display("FAIL %s: %0d words, expected %0d", nm, got.size(), exp.size()); end
    foreach (exp[i]) begin
      checks++;
      if (i >= got.size() || got[i] !== exp[i]) begin
        failures++; $display("FAIL %s word %0d: %h expected %h", nm, i, i < got.size() ? got[i] : '0, exp[i]);
      end
    end
  endtask

  initial begin repeat (3000) @(posedge clk); failures++; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    uinstr_t ecmq[$], eceq[$];
    for (int i = 0; i < 256; i++) prog[i] = {C_HALT, 24'h0};
    prog[0]  = {C_PSVR, v(0,1)};
    prog[1]  = {M_PVRO, v(0,2), OP_ADD};
    prog[2]  = {M_POPP, OP_SUB, OP_MUL, 20'h0};
    prog[3]  = {C_ASGV, v(0,3)};
    prog[4]  = {C_GOTO, 24'd6};
    prog[5]  = {C_PSVL, 24'd66};          // skipped
    prog[6]  = {C_RLS1, v(0,4)};
    prog[7]  = {M_RLOP, REL_GT, 24'd5};
    prog[8]  = {C_LOOP, 24'd11};          // answered 1: taken
    prog[9]  = {C_PSVL, 24'd99};          // skipped
    prog[11] = {C_CMR0, v(0,4)};
    prog[12] = {C_LOOP, 24'd40};          // answered 0: not taken
    prog[13] = {C_CALL, 4'd1, 8'd2, 12'd30};
    prog[14] = {C_PSVL, 24'd5};
    prog[15] = {C_HALT, 24'h0};
    prog[30] = {C_PSVL, 24'd7};
    prog[31] = {C_RETN, 4'd1, 4'd0, 16'h0};
    answers = '{1'b1, 1'b0};
    ecmq = '{'{M_SNVR, v(0,1)}, '{M_SNVR, v(0,2)}, '{M_STQV, v(0,3)}, '{M_ARLSL, v(0,4)},
             '{M_RLGT, 24'd5}, '{M_ACMVR0, v(0,4)}, '{M_CALL, {4'd1, 8'd2, 12'd30}},
             '{M_RETN, {4'd1, 4'd0, 16'h0}}};
    eceq = '{'{X_QVAL, 24'd0}, '{X_QVAL, 24'd0}, '{X_OPER, 24'(OP_ADD)}, '{X_OPER, 24'(OP_SUB)},
             '{X_OPER, 24'(OP_MUL)}, '{X_SEND, 24'd0}, '{X_IVAL, 24'd7}, '{X_IVAL, 24'd5}};
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); ic_wr_en = 1; ic_wr_addr = 8'(i); ic_wr_data = prog[i];
    end
    @(negedge clk) ic_wr_en = 0; start = 1;
    @(negedge clk) start = 0;
    repeat (5) @(negedge clk);
    while (busy) begin
      @(negedge clk);
    end
    expect_stream("CMQ", cmq_log, ecmq);
    expect_stream("CEQ", ceq_log, eceq);
    checks++; if (gap(4, 6) != 2) begin failures++; $display("FAIL GOTO penalty"); end
    checks++; if (gap(13, 30) != 2) begin failures++; $display("FAIL CALL penalty"); end
    checks++; if (gap(31, 14) != 2) begin failures++; $display("FAIL RETN penalty"); end
    checks++; if (fetch_cyc.exists(5) || fetch_cyc.exists(9)) begin
      failures++; $display("FAIL skipped parcel fetched"); end
    checks++; if (n_wait < 3) begin failures++; $display("FAIL LOOP waited only %0d cycles", n_wait); end
    checks++; if (cs_err) begin failures++; $display("FAIL control stack error"); end
    checks++; if (n_qstall == 0) begin failures++; $display("FAIL no full-queue stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
