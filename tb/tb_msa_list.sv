// tb_msa_list: inserts data items into a sorted doubly linked list on the
// complete MSA at its default sizes. This is a pointer-chasing, memory-unit
// heavy load with a shallow call depth.
//
// A list node at address p holds its value at p, its successor at p+1 and
// its predecessor at p+2. The list runs between two sentinel nodes, S and
// T, holding the smallest and the largest value. A field is read or
// written as a structured variable: the base is the field offset (0, 1 or
// 2) and the variable offset is the word holding the node's address. A
// node's value is read through an indirect variable.
//
// The main loop, for each new node N:
//   VV := *N;
//   CALL insert;
//   N := N + 3;
//   repeat while nodes remain.
//
// The insert procedure:
//   P := S;
//   loop: Q := next(P); QV := *Q; if QV >= VV goto link; P := Q; goto loop
//   link: next(N) := Q; prev(N) := P; next(P) := N; prev(Q) := N; return
//
// Afterwards the host walks the list forwards and backwards and compares
// it with the sorted reference.
module tb_msa_list;
  import msa_pkg::*;

  localparam int K = 40;  // items inserted

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
    repeat (500000) @(posedge clk);
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
  // dst := field f of the node whose address is in ptr
  task automatic get_field(input int dst, input int f, input int ptr);
    L(C_PAVR, v(f)); D(M_PAOV, {S_PAOV, v(ptr)}); L(C_ASGV, v(dst));
  endtask
  // field f of the node whose address is in ptr := src
  task automatic set_field(input int f, input int ptr, input int src);
    L(C_PSVR, v(src)); L(C_ASAR, v(f)); D(M_ASOV, 28'(v(ptr)));
  endtask

  localparam int P = 1, Q = 2, QV = 3, VV = 4, NN = 5, CNT = 6;  // variables
  localparam int S = 100, T = 103, NODES = 200;                   // nodes
  localparam int F_VAL = 0, F_NEXT = 1, F_PREV = 2;
  localparam int INS = 64;                                         // procedure

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

  int n_call = 0, n_second = 0, n_loop_wait = 0, cycles = 0;
  always @(posedge clk) begin
    cycles      <= cycles + 1;
    n_call      <= n_call + int'(ev_call);
    n_second    <= n_second + int'(ev_second_access);
    n_loop_wait <= n_loop_wait + int'(ev_loop_wait);
  end

  int vals [K];
  int sorted [$];

  initial begin
    logic [31:0] got, prev_node, node;
    int top, lp, fix_link, t0;

    // ---- main -------------------------------------------------------------
    top = pc;
    L(C_PSVI, v(NN)); L(C_ASGV, v(VV));
    L(C_CALL, {4'd1, 8'd0, 12'(INS)});
    L(C_PSVR, v(NN)); D(M_PVLO, val_oper(24'd3, OP_ADD)); L(C_ASGV, v(NN));
    L(C_PSVR, v(CNT)); D(M_PVLO, val_oper(24'd1, OP_SUB)); L(C_ASGV, v(CNT));
    L(C_RLS1, v(CNT)); D(M_RLOP, {REL_GT, 24'd0});
    L(C_LOOP, 24'(top));
    L(C_HALT, 24'h0);
    // ---- insert -----------------------------------------------------------
    pc = INS;
    L(C_ASLV, v(P)); D(M_ASLD, 28'(S));
    lp = pc;
    get_field(Q, F_NEXT, P);
    L(C_PSVI, v(Q)); L(C_ASGV, v(QV));
    L(C_RLS2, v(QV)); D(M_RLOP, {REL_GE, v(VV)});
    fix_link = pc; L(C_LOOP, 24'h0);
    L(C_PSVR, v(Q)); L(C_ASGV, v(P));
    L(C_GOTO, 24'(lp));
    prog[fix_link][23:0] = 24'(pc);
    set_field(F_NEXT, NN, Q);
    set_field(F_PREV, NN, P);
    set_field(F_NEXT, P, NN);
    set_field(F_PREV, Q, NN);
    L(C_RETN, {4'd1, 4'd0, 16'h0});

    // ---- data -----------------------------------------------------------------
    // reference order, by a signed insertion sort
    foreach (vals[i]) begin
      int j;
      vals[i] = int'($urandom_range(0, 20000)) - 10000;
      j = 0;
      while (j < sorted.size() && sorted[j] < vals[i]) j++;
      sorted.insert(j, vals[i]);
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < pc; i++) begin
      @(negedge clk);
      ic_wr_en = 1'b1; ic_wr_addr = 12'(i); ic_wr_data = prog[i];
    end
    @(negedge clk) ic_wr_en = 1'b0;
    dc_write(S + F_VAL, 32'h8000_0000); dc_write(S + F_NEXT, T); dc_write(S + F_PREV, 0);
    dc_write(T + F_VAL, 32'h7fff_ffff); dc_write(T + F_NEXT, 0); dc_write(T + F_PREV, S);
    foreach (vals[i]) dc_write(NODES + 3 * i, vals[i]);
    dc_write(NN, NODES); dc_write(CNT, K);

    @(negedge clk) start = 1'b1;
    t0 = cycles;
    @(negedge clk) start = 1'b0;
    wait (done);
    $display("%0d insertions in %0d cycles: %0d calls, %0d second accesses, %0d LOOP wait cycles",
             K, cycles - t0, n_call, n_second, n_loop_wait);

    // ---- walk forwards, then backwards -----------------------------------
    node = S;
    for (int i = 0; i < K; i++) begin
      prev_node = node;
      dc_read(int'(node) + F_NEXT, node);
      dc_read(int'(node) + F_VAL, got);
      check($sformatf("item %0d in order", i), got, 32'(sorted[i]));
      dc_read(int'(node) + F_PREV, got);
      check($sformatf("item %0d back link", i), got, prev_node);
    end
    dc_read(int'(node) + F_NEXT, got);
    check("last item links to the tail sentinel", got, T);
    dc_read(T + F_PREV, got);
    check("tail sentinel links back to the last item", got, node);
    check("calls", 32'(n_call), K);
    check("control stack error", {31'h0, cs_err}, 0);
    check("expression stack error", {31'h0, stack_err}, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
