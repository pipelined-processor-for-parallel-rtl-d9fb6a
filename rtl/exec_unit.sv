// exec_unit: the pipelined execution processor of the MSA. It evaluates
// the Polish expressions the controller splits out of PEXPR instructions,
// on an expression stack, and sends results back to the memory unit.
//
// Pipeline (four stages, as the document gives them):
//   IF   : the head of the controller-to-execution queue (CEQ) is popped
//          into the execution instruction register; an empty CEQ yields a
//          NOP.
//   ID   : decode.
//   EX   : IVAL pushes its 24-bit literal (sign-extended); QVAL pushes the
//          head of the memory-to-execution queue (MXQ), waiting while it is
//          empty; OPER applies the operator to the top two items (a op b,
//          b on top) and leaves the result on top; SEND pops the top item
//          into the result register RESREG.
//   SEND : RESREG is written into the execution-to-memory queue (XMQ),
//          holding the pipeline while the XMQ is full.
// The instruction set follows the document. The operator codes and the set
// of integer operators (add, sub, mul, and, or, xor, shift left, arithmetic
// shift right) are this design's choice; the document does not list them.
// Stack operations all happen in EX, in order, so there are no hazards.
module exec_unit
  import msa_pkg::*;
#(
  parameter int unsigned STACK_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              busy,
  // CEQ read side
  output logic              ceq_rd_en,
  input  uinstr_t           ceq_rd_data,
  input  logic              ceq_empty,
  // MXQ read side
  output logic              mxq_rd_en,
  input  logic [DATA_W-1:0] mxq_rd_data,
  input  logic              mxq_empty,
  // XMQ write side
  output logic              xmq_wr_en,
  output logic [DATA_W-1:0] xmq_wr_data,
  input  logic              xmq_full,
  // status
  output logic              stack_err,
  output logic              ev_mxq_wait,   // QVAL waiting for the MXQ
  output logic              ev_xmq_stall   // SEND held by a full XMQ
);
  logic    xir_v, id_v, sd_v;
  uinstr_t xir, idr;
  logic [DATA_W-1:0] resreg;

  // stalls
  logic send_stall, ex_stall, ex_adv, id_free, if_free;
  assign send_stall = sd_v && xmq_full;
  assign ex_stall   = id_v && ((idr.op == X_QVAL && mxq_empty) ||
                               (idr.op == X_SEND && send_stall));
  assign ex_adv     = id_v && !ex_stall;
  assign id_free    = !id_v || ex_adv;
  assign if_free    = !xir_v || id_free;
  assign ceq_rd_en  = if_free && !ceq_empty;

  // EX: expression stack
  logic [DATA_W-1:0] t0, t1, alu, push_val;
  logic              s_push, s_op, s_pop;
  logic [$clog2(STACK_DEPTH+1)-1:0] depth;

  always_comb begin
    unique case (oper_e'(idr.arg[3:0]))
      OP_ADD: alu = t1 + t0;
      OP_SUB: alu = t1 - t0;
      OP_MUL: alu = t1 * t0;
      OP_AND: alu = t1 & t0;
      OP_OR:  alu = t1 | t0;
      OP_XOR: alu = t1 ^ t0;
      OP_SHL: alu = t1 << t0[4:0];
      OP_SRA: alu = $unsigned($signed(t1) >>> t0[4:0]);
      default: alu = t0;
    endcase
  end

  assign s_push    = ex_adv && (idr.op == X_IVAL || idr.op == X_QVAL);
  assign s_op      = ex_adv && idr.op == X_OPER;
  assign s_pop     = ex_adv && idr.op == X_SEND;
  assign push_val  = (idr.op == X_QVAL) ? mxq_rd_data : (s_op ? alu : sext24(idr.arg));
  assign mxq_rd_en = ex_adv && idr.op == X_QVAL;

  expr_stack #(.DW(DATA_W), .DEPTH(STACK_DEPTH)) u_stack (
    .clk, .rst_n, .push(s_push), .pop2_push(s_op), .pop(s_pop), .din(push_val),
    .t0, .t1, .depth, .err(stack_err)
  );

  assign xmq_wr_en   = sd_v && !xmq_full;
  assign xmq_wr_data = resreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xir_v <= 1'b0; id_v <= 1'b0; sd_v <= 1'b0;
      xir <= '0; idr <= '0; resreg <= '0;
    end else begin
      if (if_free) begin
        xir_v <= !ceq_empty;
        xir   <= ceq_empty ? '0 : ceq_rd_data;
      end
      if (id_free) begin
        id_v <= xir_v;
        idr  <= xir;
      end
      if (!send_stall) sd_v <= 1'b0;
      if (s_pop) begin
        sd_v   <= 1'b1;
        resreg <= t0;
      end
    end
  end

  assign busy         = xir_v || id_v || sd_v || !ceq_empty;
  assign ev_mxq_wait  = id_v && idr.op == X_QVAL && mxq_empty;
  assign ev_xmq_stall = send_stall;
endmodule
