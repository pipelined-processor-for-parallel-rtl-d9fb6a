// controller_unit: the pipelined controller of the MSA. It fetches one
// 32-bit instruction parcel per cycle and turns each into at most one
// memory-unit instruction and two execution-unit instructions, which it
// writes into the controller-to-memory queue (CMQ) and the controller-to-
// execution queue (CEQ). It also executes the control transfers itself.
//
// Pipeline (four stages, as the document gives them):
//   IF   : the instruction cache is read at PC into the instruction
//          register IR (the cache's read register).
//   ID   : the decode register DR is loaded: with the whole major opcode
//          for a leading parcel (bit 31 = 0), or, for a dependent parcel,
//          DR keeps its upper nibble and takes the parcel's 4-bit minor
//          opcode in its lower nibble. GOTO, LOOP, CALL, RETN and HALT
//          are recognised here.
//   IFRM : the PLA decodes DR; ADREG, EXREG1 and EXREG2 are loaded with
//          the PLA's opcodes and the operand fields copied from the parcel.
//   SEND : the non-empty ADREG, EXREG1 and EXREG2 are written into the CMQ
//          (one write port) and the CEQ (two write ports).
//
// Control hazards: GOTO, CALL and RETN are resolved in ID; the parcel then
// in IF is discarded, a one-cycle penalty as the document states. LOOP
// waits in ID (IF and ID held, bubbles into IFRM) until the result of the
// last relational instruction arrives on the memory-to-controller queue
// (MCQ); it branches when that result is 1 (this polarity is this design's
// choice) and costs one more cycle when taken. A full CMQ or CEQ holds the
// whole pipeline; the parts that fit are written meanwhile. CALL pushes the return address on the control stack and
// RETN pops it; both also pass a frame instruction to the memory unit.
//
// Operand formats of the control transfers (this design's choice):
//   GOTO/LOOP target in [AW-1:0]; CALL {m[3:0], frame[7:0], target[11:0]};
//   RETN {m[3:0], caller[3:0], 16'h0}.
// The program starts at PC 0 when start is pulsed and ends at HALT.
module controller_unit
  import msa_pkg::*;
#(
  parameter int unsigned AW       = 12,  // instruction cache address width
  parameter int unsigned CS_DEPTH = 16,  // control stack depth
  parameter int unsigned QCW      = 2    // width of the queue counts
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  output logic            busy,
  // host program load
  input  logic            ic_wr_en,
  input  logic [AW-1:0]   ic_wr_addr,
  input  logic [31:0]     ic_wr_data,
  // CMQ write side
  output logic            cmq_wr_en,
  output uinstr_t         cmq_wr_data,
  input  logic            cmq_full,
  // CEQ write side (two ports)
  output logic [1:0]      ceq_wr_en,
  output uinstr_t [1:0]   ceq_wr_data,
  input  logic [QCW-1:0]  ceq_count,
  input  logic [QCW-1:0]  ceq_depth,
  // MCQ read side
  output logic            mcq_rd_en,
  input  logic            mcq_rd_data,
  input  logic            mcq_empty,
  // events, one pulse per occurrence (for performance counting)
  output logic            ev_redirect,   // a fetched parcel was discarded
  output logic            ev_loop_wait,  // LOOP waiting for the MCQ
  output logic            ev_loop_taken,
  output logic            ev_q_stall,    // CMQ/CEQ full
  output logic            ev_call,
  output logic            ev_retn,
  output logic            cs_err
);
  // ---------------- state ------------------------------------------------
  logic          running;
  logic [AW-1:0] pc;
  logic          ir_v;        // IR holds a valid parcel (ID stage)
  logic [AW-1:0] id_pc;
  logic [31:0]   ir;
  logic [7:0]    dr;
  logic          fm_v;        // IFRM stage valid
  logic [31:0]   fm_ir;
  logic          sd_ad_v, sd_ex1_v, sd_ex2_v;
  uinstr_t       adreg, exreg1, exreg2;

  // ---------------- SEND stage -------------------------------------------
  // Each part goes out as soon as its queue has room; the stage (and with
  // it the whole pipeline) holds until every part has been written. EXREG1
  // always goes before EXREG2, so a one-word CEQ still works.
  logic [QCW-1:0] ceq_free;
  logic           w_ad, w_ex1, w_ex2, stall_all;
  assign ceq_free  = ceq_depth - ceq_count;
  assign w_ad      = sd_ad_v && !cmq_full;
  assign w_ex1     = sd_ex1_v && (32'(ceq_free) >= 32'd1);
  assign w_ex2     = sd_ex2_v && (32'(ceq_free) >= (sd_ex1_v ? 32'd2 : 32'd1));
  assign stall_all = (sd_ad_v && !w_ad) || (sd_ex1_v && !w_ex1) || (sd_ex2_v && !w_ex2);

  assign cmq_wr_en   = w_ad;
  assign cmq_wr_data = adreg;
  always_comb begin
    ceq_wr_en   = '0;
    ceq_wr_data = '{default: '0};
    if (w_ex1) begin
      ceq_wr_en[0]   = 1'b1;
      ceq_wr_data[0] = exreg1;
      if (w_ex2) begin
        ceq_wr_en[1]   = 1'b1;
        ceq_wr_data[1] = exreg2;
      end
    end else if (w_ex2) begin
      ceq_wr_en[0]   = 1'b1;
      ceq_wr_data[0] = exreg2;
    end
  end

  // ---------------- ID stage: control transfers --------------------------
  logic [7:0]    id_op;
  logic          id_lead;
  logic          is_goto, is_loop, is_call, is_retn, is_halt;
  logic          loop_wait, redirect;
  logic [AW-1:0] target;
  logic [AW-1:0] cs_top;
  logic          cs_empty;

  assign id_lead = !ir[31];
  assign id_op   = ir[31:24];
  assign is_goto = ir_v && id_lead && id_op == C_GOTO;
  assign is_loop = ir_v && id_lead && id_op == C_LOOP;
  assign is_call = ir_v && id_lead && id_op == C_CALL;
  assign is_retn = ir_v && id_lead && id_op == C_RETN;
  assign is_halt = ir_v && id_lead && id_op == C_HALT;

  assign loop_wait = is_loop && mcq_empty;
  assign mcq_rd_en = is_loop && !mcq_empty && !stall_all;
  assign redirect  = !stall_all &&
                     (is_goto || is_call || is_retn || (mcq_rd_en && mcq_rd_data));
  always_comb begin
    target = ir[AW-1:0];
    if (is_call) target = AW'(ir[11:0]);
    if (is_retn) target = cs_top;
  end

  control_stack #(.AW(AW), .DEPTH(CS_DEPTH)) u_cs (
    .clk, .rst_n,
    .push(is_call && !stall_all), .push_data(id_pc + 1'b1),
    .pop(is_retn && !stall_all), .top(cs_top), .empty(cs_empty), .err(cs_err)
  );

  // hold IF and ID while LOOP waits or a queue is full
  logic hold_id, fetch;
  assign hold_id = stall_all || loop_wait;
  assign fetch   = running && !hold_id && !redirect && !is_halt;

  instr_cache #(.AW(AW)) u_ic (
    .clk, .rd_en(fetch), .rd_addr(pc), .rd_data(ir),
    .wr_en(ic_wr_en), .wr_addr(ic_wr_addr), .wr_data(ic_wr_data)
  );

  // parcels that go on to IFRM: all but the controller-only transfers
  logic id_pass;
  assign id_pass = ir_v && !hold_id && !is_goto && !is_loop && !is_halt;

  // ---------------- IFRM stage: PLA and instruction forming --------------
  pla_out_t pla;
  ctl_pla u_pla (.dr(dr), .sub(fm_ir[27:24]), .out(pla));

  function automatic uinstr_t form(input pla_field_t fld, input logic [31:0] p);
    uinstr_t u;
    u.op  = fld.op;
    u.arg = pick_arg(p, fld.src);
    return u;
  endfunction

  // ---------------- sequential -------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      pc       <= '0;
      ir_v     <= 1'b0;
      id_pc    <= '0;
      dr       <= '0;
      fm_v     <= 1'b0;
      fm_ir    <= '0;
      sd_ad_v  <= 1'b0;
      sd_ex1_v <= 1'b0;
      sd_ex2_v <= 1'b0;
      adreg    <= '0;
      exreg1   <= '0;
      exreg2   <= '0;
    end else begin
      if (start && !running) begin
        running <= 1'b1;
        pc      <= '0;
      end else if (!stall_all) begin
        // IF / PC
        if (is_halt) running <= 1'b0;
        if (redirect) pc <= target;
        else if (fetch) pc <= pc + 1'b1;
        if (!hold_id) begin
          ir_v  <= fetch;
          id_pc <= pc;
        end
      end
      if (stall_all) begin
        // drop the parts already written
        sd_ad_v  <= sd_ad_v && !w_ad;
        sd_ex1_v <= sd_ex1_v && !w_ex1;
        sd_ex2_v <= sd_ex2_v && !w_ex2;
      end else begin
        // ID -> IFRM
        fm_v <= id_pass;
        if (id_pass) begin
          dr    <= id_lead ? ir[31:24] : {dr[7:4], ir[31:28]};
          fm_ir <= ir;
        end
        // IFRM -> SEND
        sd_ad_v  <= fm_v && pla.ad.v;
        sd_ex1_v <= fm_v && pla.ex1.v;
        sd_ex2_v <= fm_v && pla.ex2.v;
        adreg    <= form(pla.ad, fm_ir);
        if (pla.ad.op == 8'h20 && pla.ad.v) adreg.op <= {4'h2, fm_ir[27:24]};
        exreg1   <= form(pla.ex1, fm_ir);
        exreg2   <= form(pla.ex2, fm_ir);
      end
    end
  end

  assign busy = running || ir_v || fm_v || sd_ad_v || sd_ex1_v || sd_ex2_v;

  assign ev_redirect   = redirect;
  assign ev_loop_wait  = loop_wait && !stall_all;
  assign ev_loop_taken = mcq_rd_en && mcq_rd_data;
  assign ev_q_stall    = stall_all;
  assign ev_call       = is_call && !stall_all;
  assign ev_retn       = is_retn && !stall_all;
endmodule
