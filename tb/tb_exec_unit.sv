// tb_exec_unit: feeds the execution unit random Polish expressions through
// a CEQ model, supplies QVAL operands through an MXQ model that is
// sometimes empty, collects SEND results from an XMQ model that is
// sometimes full, and compares each result with a reference evaluation.
// It also checks the four-stage latency: with all queues ready, the result
// of IVAL, IVAL, OPER, SEND is written to the XMQ 6 cycles after the first
// instruction is popped (SEND enters IF 3 cycles after it, then ID, EX,
// SEND).
module tb_exec_unit;
  import msa_pkg::*;
  logic clk = 0, rst_n = 0;
  logic busy, ceq_rd_en, ceq_empty, mxq_rd_en, mxq_empty, xmq_wr_en, xmq_full, stack_err;
  logic ev_mxq_wait, ev_xmq_stall;
  uinstr_t ceq_rd_data;
  logic [31:0] mxq_rd_data, xmq_wr_data;
  exec_unit #(.STACK_DEPTH(8)) dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  uinstr_t ceq[$];
  logic [31:0] mxq[$], expect_q[$];
  logic mxq_gate = 1, xmq_block = 0;
  int n_out = 0, n_mxq_wait = 0, n_xmq_stall = 0, cyc = 0, t_first = -1, t_out = -1;

  assign ceq_empty   = ceq.size() == 0;
  assign ceq_rd_data = ceq_empty ? '0 : ceq[0];
  assign mxq_empty   = mxq.size() == 0 || !mxq_gate;
  assign mxq_rd_data = mxq.size() ? mxq[0] : '0;
  assign xmq_full    = xmq_block;

  // the queue models sample the unit's requests just before each rising
  // edge and update just after it
  always @(posedge clk) cyc++;
  always @(negedge clk) begin
    logic p_ceq, p_mxq;
    #4;
    p_ceq = ceq_rd_en; p_mxq = mxq_rd_en;
    if (ceq_rd_en && t_first < 0) t_first = cyc + 1;
    if (xmq_wr_en && t_out < 0) t_out = cyc + 1;
    n_mxq_wait  += int'(ev_mxq_wait);
    n_xmq_stall += int'(ev_xmq_stall);
    if (xmq_wr_en) begin
      checks++;
      if (expect_q.size() == 0 || xmq_wr_data !== expect_q[0]) begin
        failures++; $display("FAIL result %0d: got %0d expected %0d", n_out, $signed(xmq_wr_data),
                             expect_q.size() ? $signed(expect_q[0]) : 0);
      end
      if (expect_q.size()) void'(expect_q.pop_front());
      n_out++;
    end
    @(posedge clk); #1;
    if (p_ceq) void'(ceq.pop_front());
    if (p_mxq) void'(mxq.pop_front());
  end

  function automatic logic [31:0] ref_op(input logic [3:0] o, input logic [31:0] a, input logic [31:0] b);
    case (o)
      0: return a + b;  1: return a - b;  2: return a * b;  3: return a & b;
      4: return a | b;  5: return a ^ b;  6: return a << b[4:0];
      default: return 32'($signed(a) >>> b[4:0]);
    endcase
  endfunction

  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // latency probe: 3 + 4 -> 7
    @(negedge clk);
    ceq.push_back('{X_IVAL, 24'd3}); ceq.push_back('{X_IVAL, 24'd4});
    ceq.push_back('{X_OPER, 24'(OP_ADD)}); ceq.push_back('{X_SEND, 24'd0});
    expect_q.push_back(7);
    repeat (12) @(posedge clk);
    checks++; if (t_out - t_first != 6) begin failures++; $display("FAIL latency %0d", t_out - t_first); end
    // random expressions
    for (int e = 0; e < 200; e++) begin
      logic [31:0] st[$];
      int len;
      @(negedge clk);
      len = 1 + $urandom % 10;
      for (int i = 0; i < len || st.size() > 1; i++) begin
        int choice;
        choice = $urandom % 3;
        if (st.size() >= 7) choice = 2;
        if (st.size() < 2 && choice == 2) choice = $urandom % 2;
        if (i >= len) choice = 2;
        if (choice == 0) begin
          logic [23:0] v;
          v = 24'($urandom);
          ceq.push_back('{X_IVAL, v}); st.push_back(sext24(v));
        end else if (choice == 1) begin
          logic [31:0] v;
          v = $urandom;
          ceq.push_back('{X_QVAL, 24'd0}); mxq.push_back(v); st.push_back(v);
        end else begin
          logic [3:0] o;
          logic [31:0] a, b;
          o = 4'($urandom % 8);
          b = st.pop_back(); a = st.pop_back();
          ceq.push_back('{X_OPER, 24'(o)}); st.push_back(ref_op(o, a, b));
        end
        if ($urandom % 4 == 0) ceq.push_back('{X_NOP, 24'd0});
      end
      ceq.push_back('{X_SEND, 24'd0});
      expect_q.push_back(st.pop_back());
      // random gating of the MXQ and the XMQ while it drains
      while (ceq.size() > 0) begin
        @(negedge clk);
        mxq_gate = ($urandom % 4 != 0);
        xmq_block = ($urandom % 4 == 0);
      end
    end
    @(negedge clk); mxq_gate = 1; xmq_block = 0;
    repeat (20) @(posedge clk);
    checks++; if (n_out != 201) begin failures++; $display("FAIL %0d results", n_out); end
    checks++; if (stack_err) begin failures++; $display("FAIL stack error"); end
    checks++; if (n_mxq_wait == 0 || n_xmq_stall == 0) begin failures++; $display("FAIL no waits seen"); end
    checks++; if (busy) begin failures++; $display("FAIL still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
