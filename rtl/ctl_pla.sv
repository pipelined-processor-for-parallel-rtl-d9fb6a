// ctl_pla: the controller's PLA. It decodes the 8-bit decode register (DR)
// into up to three instruction fields: one for the address (memory) unit
// and two for the execution unit, each with an opcode and the place in the
// instruction parcel its argument is copied from. For a leading parcel DR
// holds the major opcode; for a dependent parcel DR holds the upper nibble
// of the leading parcel's major opcode and the parcel's own 4-bit minor
// opcode (the "working opcode"). Dependent parcels that carry a single
// 24-bit operand share minor codes D (PVAL, PAOD) and E (PVAR, PVRI, PAOV);
// the parcel's free bits [27:24] (sub) tell them apart, so every parcel of
// the expression families is available after any leading parcel of the
// expression. GOTO, LOOP and HALT produce no fields: the
// controller handles them itself. CALL and RETN also send a frame
// instruction to the memory unit.
//
// The split of each parcel into memory and execution instructions follows
// the semantics of the document's parcel and instruction tables; the
// numeric codes are this design's (see msa_pkg). Combinational.
module ctl_pla
  import msa_pkg::*;
(
  input  logic [7:0] dr,
  input  logic [3:0] sub,   // parcel bits [27:24]: sub-code of minor D and E
  output pla_out_t   out
);
  function automatic pla_field_t f(input logic [7:0] op, input src_e s);
    return '{v: 1'b1, op: op, src: s};
  endfunction

  localparam pla_field_t NONE = '{v: 1'b0, op: 8'h00, src: SRC_NONE};

  always_comb begin
    out = '{ad: NONE, ex1: NONE, ex2: NONE};
    case (dr)
      // PEXPR leading parcels
      C_PSVR: begin out.ad = f(M_SNVR, SRC_LO24); out.ex1 = f(X_QVAL, SRC_NONE); end
      C_PSVI: begin out.ad = f(M_SNVI, SRC_LO24); out.ex1 = f(X_QVAL, SRC_NONE); end
      C_PSVL: out.ex1 = f(X_IVAL, SRC_LO24);
      C_PAVR: out.ad = f(M_SNAR, SRC_LO24);
      // PEXPR dependent parcels: one table for both expression families
      {4'h1, M_POVL}, {4'h2, M_POVL}: begin out.ex1 = f(X_OPER, SRC_NIBH); out.ex2 = f(X_IVAL, SRC_LO24); end
      {4'h1, M_PVLO}, {4'h2, M_PVLO}: begin out.ex1 = f(X_IVAL, SRC_HI24); out.ex2 = f(X_OPER, SRC_NIBL); end
      {4'h1, M_POVR}, {4'h2, M_POVR}: begin
        out.ex1 = f(X_OPER, SRC_NIBH); out.ad = f(M_SNVR, SRC_LO24); out.ex2 = f(X_QVAL, SRC_NONE);
      end
      {4'h1, M_PVRO}, {4'h2, M_PVRO}: begin
        out.ad = f(M_SNVR, SRC_HI24); out.ex1 = f(X_QVAL, SRC_NONE); out.ex2 = f(X_OPER, SRC_NIBL);
      end
      {4'h1, M_POVI}, {4'h2, M_POVI}: begin
        out.ex1 = f(X_OPER, SRC_NIBH); out.ad = f(M_SNVI, SRC_LO24); out.ex2 = f(X_QVAL, SRC_NONE);
      end
      {4'h1, M_PVAL}, {4'h2, M_PVAL}:  // also PAOD
        case (sub)
          S_PVAL:  out.ex1 = f(X_IVAL, SRC_LO24);
          S_PAOD:  begin out.ad = f(M_SNOD, SRC_LO24); out.ex1 = f(X_QVAL, SRC_NONE); end
          default: ;
        endcase
      {4'h1, M_PVAR}, {4'h2, M_PVAR}:  // also PVRI and PAOV
        case (sub)
          S_PVAR:  begin out.ad = f(M_SNVR, SRC_LO24); out.ex1 = f(X_QVAL, SRC_NONE); end
          S_PVRI:  begin out.ad = f(M_SNVI, SRC_LO24); out.ex1 = f(X_QVAL, SRC_NONE); end
          S_PAOV:  begin out.ad = f(M_SNOV, SRC_LO24); out.ex1 = f(X_QVAL, SRC_NONE); end
          default: ;
        endcase
      {4'h1, M_POPP}, {4'h2, M_POPP}: begin out.ex1 = f(X_OPER, SRC_NIBH); out.ex2 = f(X_OPER, SRC_NIB2); end
      // stores
      C_ASGV: begin out.ex1 = f(X_SEND, SRC_NONE); out.ad = f(M_STQV, SRC_LO24); end
      C_ASGI: begin out.ex1 = f(X_SEND, SRC_NONE); out.ad = f(M_STQI, SRC_LO24); end
      C_ASLV: out.ad = f(M_STIV, SRC_LO24);
      C_ASLI: out.ad = f(M_STII, SRC_LO24);
      C_ASAR: begin out.ex1 = f(X_SEND, SRC_NONE); out.ad = f(M_STAR, SRC_LO24); end
      {4'h3, M_ASLD}: out.ad = f(M_STID, SRC_LO24);
      {4'h3, M_ASOD}: out.ad = f(M_STOD, SRC_LO24);
      {4'h3, M_ASOV}: out.ad = f(M_STOV, SRC_LO24);
      // relations
      C_RLS1: out.ad = f(M_ARLSL, SRC_LO24);
      C_RLS2: out.ad = f(M_ARLSV, SRC_LO24);
      C_CMR0: out.ad = f(M_ACMVR0, SRC_LO24);
      C_CMI0: out.ad = f(M_ACMVI0, SRC_LO24);
      C_CMR1: out.ad = f(M_ACMVR1, SRC_LO24);
      C_CMI1: out.ad = f(M_ACMVI1, SRC_LO24);
      {4'h4, M_RLOP}: out.ad = '{v: 1'b1, op: 8'h20, src: SRC_LO24};  // relation code ORed in by the controller
      // procedure frames
      C_CALL: out.ad = f(M_CALL, SRC_LO24);
      C_RETN: out.ad = f(M_RETN, SRC_LO24);
      default: ;
    endcase
  end
endmodule
