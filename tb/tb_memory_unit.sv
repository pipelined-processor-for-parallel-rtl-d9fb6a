// tb_memory_unit: drives the memory unit with memory instructions through
// a CMQ model, supplies store data through an XMQ model, and collects what
// it sends to the MXQ and the MCQ, with random back-pressure on both. A
// small data cache is attached. The instruction list covers plain,
// indirect and structured loads and stores, store-immediate (direct and
// indirect), all compares, relations with literal and variable second
// operands, and a CALL/RETN frame on display level 2. The expected MXQ and
// MCQ streams and final memory words are worked out by hand.
// Cycle checks: SNVR's value reaches the MXQ 4 cycles after the instruction
// is popped (IF, ID, AG, MEM, then END writes); SNVI takes one more (the
// "1 cycle" pipe delay of an indirect operand).
module tb_memory_unit;
  import msa_pkg::*;
  logic clk = 0, rst_n = 0, busy;
  logic cmq_rd_en, cmq_empty, xmq_rd_en, xmq_empty, mxq_wr_en, mxq_full, mcq_wr_en, mcq_wr_data, mcq_full;
  uinstr_t cmq_rd_data;
  logic [31:0] xmq_rd_data, mxq_wr_data;
  logic dc_en, dc_we;
  logic [11:0] dc_addr;
  logic [31:0] dc_wdata, dc_rdata;
  logic ev_second_access, ev_xmq_wait, ev_out_stall, ev_frame;
  logic b_en = 0, b_we = 0;
  logic [11:0] b_addr = 0;
  logic [31:0] b_wdata = 0, b_rdata;

  memory_unit #(.AW(12), .HIGHMEM_INIT(12'h800)) dut (.*);
  data_cache #(.AW(12), .DW(32)) u_dc (
    .clk, .a_en(dc_en), .a_we(dc_we), .a_addr(dc_addr), .a_wdata(dc_wdata), .a_rdata(dc_rdata),
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata
  );
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  uinstr_t cmq[$];
  logic [31:0] xmq[$], mxq_got[$];
  logic mcq_got[$];
  logic block = 0, xgate = 1;
  int cyc = 0, t_pop = -1, t_out = -1, n_second = 0, n_xwait = 0, n_ostall = 0, n_frame = 0;

  assign cmq_empty   = cmq.size() == 0;
  assign cmq_rd_data = cmq_empty ? '0 : cmq[0];
  assign xmq_empty   = xmq.size() == 0 || !xgate;
  assign xmq_rd_data = xmq.size() ? xmq[0] : '0;
  assign mxq_full    = block;
  assign mcq_full    = block;

  always @(posedge clk) cyc++;
  always @(negedge clk) begin
    logic p_c, p_x;
    #4;
    p_c = cmq_rd_en; p_x = xmq_rd_en;
    if (cmq_rd_en && t_pop < 0) t_pop = cyc + 1;
    if (mxq_wr_en) begin mxq_got.push_back(mxq_wr_data); if (t_out < 0) t_out = cyc + 1; end
    if (mcq_wr_en) mcq_got.push_back(mcq_wr_data);
    n_second += int'(ev_second_access); n_xwait += int'(ev_xmq_wait);
    n_ostall += int'(ev_out_stall); n_frame += int'(ev_frame);
    @(posedge clk); #1;
    if (p_c) void'(cmq.pop_front());
    if (p_x) void'(xmq.pop_front());
  end

  function automatic logic [23:0] v(input int d, input int off);
    return {4'(d), 20'(off)};
  endfunction
  task automatic I(input logic [7:0] op, input logic [23:0] arg);
    cmq.push_back('{op, arg});
  endtask
  task automatic poke(input int a, input logic [31:0] d);
    @(negedge clk); b_en = 1; b_we = 1; b_addr = 12'(a); b_wdata = d;
    @(negedge clk); b_en = 0; b_we = 0;
  endtask
  task automatic peek(input int a, input logic [31:0] exp, input string what);
    @(negedge clk); b_en = 1; b_we = 0; b_addr = 12'(a);
    @(negedge clk); b_en = 0;
    checks++; if (b_rdata !== exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, $signed(b_rdata), $signed(exp)); end
  endtask
  task automatic drain;
    int n;
    n = 0;
    @(negedge clk);
    while (cmq.size() > 0 || busy) begin
      @(negedge clk);
      n++;
      block = ($urandom % 3 == 0);
      xgate = (n > 30) && ($urandom % 3 != 0);  // stores must wait at first
    end
    block = 0; xgate = 1;
    repeat (3) @(negedge clk);
  endtask

  initial begin repeat (20000) @(posedge clk); failures++; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    logic [31:0] exp_mxq[$];
    logic exp_mcq[$];
    repeat (2) @(posedge clk); rst_n = 1;
    poke(5, 42); poke(7, 6); poke(8, 3); poke(9, 0); poke(10, 11); poke(11, 1);
    for (int i = 0; i < 4; i++) poke(16 + i, 32'(116 + i));
    poke(12, 13); poke(13, 4242);

    // latency: SNVR then, separately, SNVI
    @(negedge clk); I(M_SNVR, v(0,5));
    repeat (10) @(negedge clk);
    checks++; if (t_out - t_pop != 4) begin failures++; $display("FAIL SNVR latency %0d", t_out - t_pop); end
    t_pop = -1; t_out = -1;
    @(negedge clk); I(M_SNVI, v(0,12));
    repeat (10) @(negedge clk);
    checks++; if (t_out - t_pop != 5) begin failures++; $display("FAIL SNVI latency %0d", t_out - t_pop); end
    exp_mxq = '{42, 4242};

    // main sequence (store data held back at first)
    xgate = 0;
    @(negedge clk);
    I(M_STIV, v(0,5)); I(M_STID, 24'd43);             // x5 = 43
    I(M_SNVR, v(0,5));                                // -> 43
    I(M_CALL, {4'd2, 8'd3, 12'd0});                   // frame at 0x800, DR.2 = 0x800
    I(M_STIV, v(2,1)); I(M_STID, 24'hFFFFFD);         // local1 = -3
    I(M_SNVR, v(2,1));                                // -> -3
    I(M_STQV, v(0,6)); xmq.push_back(1000);           // x6 = 1000
    I(M_SNVI, v(0,7));                                // *x7 = x6 -> 1000
    I(M_STQI, v(0,7)); xmq.push_back(55);             // x6 = 55
    I(M_SNVR, v(0,6));                                // -> 55
    I(M_SNAR, v(0,16)); I(M_SNOD, 24'd2);             // -> A[2] = 118
    I(M_SNAR, v(0,16)); I(M_SNOV, v(0,8));            // -> A[3] = 119
    I(M_STAR, v(0,16)); I(M_STOD, 24'd1); xmq.push_back(7);   // A[1] = 7
    I(M_STAR, v(0,16)); I(M_STOV, v(0,8)); xmq.push_back(9);  // A[3] = 9
    I(M_SNAR, v(0,16)); I(M_SNOD, 24'd3);             // -> 9
    I(M_STII, v(0,7)); I(M_STID, 24'd77);             // x6 = 77
    I(M_SNVR, v(0,6));                                // -> 77
    I(M_ACMVR0, v(0,9));  I(M_ACMVR1, v(0,9));        // 1, 0
    I(M_ACMVI1, v(0,10)); I(M_ACMVI0, v(0,10));       // 1, 0
    I(M_ARLSL, v(0,5)); I(M_RLGT, 24'd41);            // 43 > 41 : 1
    I(M_ARLSL, v(0,5)); I(M_RLLT, 24'hFFFFFF);        // 43 < -1 : 0
    I(M_ARLSV, v(0,5)); I(M_RLEQ, v(0,6));            // 43 == 77 : 0
    I(M_ARLSV, v(0,5)); I(M_RLLE, v(0,6));            // 43 <= 77 : 1
    I(M_ARLSL, v(0,5)); I(M_RLGE, 24'd43);            // 1
    I(M_ARLSL, v(0,5)); I(M_RLNE, 24'd43);            // 0
    I(M_RETN, {4'd2, 4'd0, 16'h0});                   // DR.2 back to 0
    I(M_SNVR, v(2,5));                                // DR.2 = 0: -> x5 = 43
    drain();
    exp_mxq = '{42, 4242, 43, -3, 1000, 55, 118, 119, 9, 77, 43};
    exp_mcq = '{1, 0, 1, 0, 1, 0, 0, 1, 1, 0};

    checks++;
    if (mxq_got.size() != exp_mxq.size()) begin failures++; $display("FAIL %0d MXQ words", mxq_got.size()); end
    else foreach (exp_mxq[i]) if (++checks > 0 && mxq_got[i] !== exp_mxq[i]) begin
      failures++; $display("FAIL MXQ word %0d: %0d expected %0d", i, $signed(mxq_got[i]), $signed(exp_mxq[i]));
    end
    checks++;
    if (mcq_got.size() != exp_mcq.size()) begin failures++; $display("FAIL %0d MCQ bits", mcq_got.size()); end
    else foreach (exp_mcq[i]) if (++checks > 0 && mcq_got[i] !== exp_mcq[i]) begin
      failures++; $display("FAIL MCQ bit %0d: %b", i, mcq_got[i]);
    end
    peek(5, 43, "x5"); peek(6, 77, "x6"); peek(17, 7, "A[1]"); peek(19, 9, "A[3]");
    peek(12'h800, 0, "saved DR.2"); peek(12'h801, -32'sd3, "frame local 1");
    checks++; if (dut.highmem !== 12'h800) begin failures++; $display("FAIL HIGHMEM %h", dut.highmem); end
    checks++; if (n_second == 0 || n_xwait == 0 || n_ostall == 0 || n_frame != 2) begin
      failures++; $display("FAIL events second=%0d xwait=%0d ostall=%0d frame=%0d", n_second, n_xwait, n_ostall, n_frame);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
