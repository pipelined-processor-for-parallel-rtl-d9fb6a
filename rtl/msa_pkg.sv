// msa_pkg: widths, opcodes and instruction formats shared by the three
// processors of the pipelined Minimally Synchronized Architecture (MSA).
//
// All instructions are 32 bits. A controller parcel is either leading
// (bit 31 = 0: 8-bit major opcode in [31:24], 24-bit operand in [23:0]) or
// dependent (bit 31 = 1: 4-bit minor opcode in [31:28], operand fields in
// [27:0]). The 32-bit parcel, the 8-bit major and 4-bit minor opcodes, the
// 4-bit operator and the 24-bit literal/address fields follow the document;
// the choice of bit 31 as the leading/dependent flag, every numeric opcode
// value and the operator and relation codes are this design's own.
//
// Memory and execution unit instructions use one format: an 8-bit opcode
// and a 24-bit argument. A variable address is a 4-bit display number and a
// 20-bit offset, as the document gives.
package msa_pkg;

  localparam int unsigned PARCEL_W = 32;
  localparam int unsigned DATA_W   = 32;  // data word width (assumed)
  localparam int unsigned ARG_W    = 24;
  localparam int unsigned DISP_W   = 4;
  localparam int unsigned OFF_W    = 20;
  localparam int unsigned N_DISP   = 16;  // DR.1 .. DR.16

  // ---------------- controller major opcodes (leading parcels) -----------
  typedef enum logic [7:0] {
    C_NOP  = 8'h00,
    C_PSVR = 8'h10,  // PEXPR leading: variable operand
    C_PSVI = 8'h11,  // PEXPR leading: indirect variable operand
    C_PSVL = 8'h12,  // PEXPR leading: literal operand
    C_PAVR = 8'h20,  // PEXPR leading: structured variable (base)
    C_ASGV = 8'h30,  // store expression result into variable
    C_ASGI = 8'h31,  // store expression result, indirect
    C_ASLV = 8'h32,  // store immediate into variable (value in next parcel)
    C_ASLI = 8'h33,  // store immediate, indirect
    C_ASAR = 8'h34,  // store expression result into structured variable
    C_RLS1 = 8'h40,  // relation VAR REL VAL, leading
    C_RLS2 = 8'h41,  // relation VAR REL VAR, leading
    C_CMR0 = 8'h44,  // variable == 0
    C_CMI0 = 8'h45,  // indirect variable == 0
    C_CMR1 = 8'h46,  // variable == 1
    C_CMI1 = 8'h47,  // indirect variable == 1
    C_GOTO = 8'h50,
    C_LOOP = 8'h51,  // branch to operand when the last relation was true
    C_CALL = 8'h52,  // operand {m[3:0], frame[7:0], target[11:0]}
    C_RETN = 8'h53,  // operand {m[3:0], caller[3:0], 16'h0}
    C_HALT = 8'h70
  } ctl_op_e;

  // Leading opcodes keep bit 3 clear so that they never equal a working
  // opcode {family nibble, 1mmm} formed for a dependent parcel.
  // Dependent parcel minor opcodes (bit 3 is the dependent flag). The
  // expression families (after PSVR/PSVI/PSVL and after PAVR) share one
  // table. Parcels with a single 24-bit operand leave [27:24] free; that
  // nibble (the sub-code) tells apart the parcels sharing minor D or E.
  localparam logic [3:0] M_POVL = 4'h8;  // OPER [27:24], VAL [23:0]
  localparam logic [3:0] M_PVLO = 4'h9;  // VAL [27:4], OPER [3:0]
  localparam logic [3:0] M_POVR = 4'hA;  // OPER [27:24], VAR [23:0]
  localparam logic [3:0] M_PVRO = 4'hB;  // VAR [27:4], OPER [3:0]
  localparam logic [3:0] M_POVI = 4'hC;  // OPER [27:24], @VAR [23:0]
  localparam logic [3:0] M_PVAL = 4'hD;  // sub 0, VAL [23:0]
  localparam logic [3:0] M_PAOD = 4'hD;  // sub 1, literal offset [23:0]
  localparam logic [3:0] M_PVAR = 4'hE;  // sub 0, VAR [23:0]
  localparam logic [3:0] M_PVRI = 4'hE;  // sub 1, @VAR [23:0]
  localparam logic [3:0] M_PAOV = 4'hE;  // sub 2, variable offset [23:0]
  localparam logic [3:0] M_POPP = 4'hF;  // OPER [27:24], OPER [23:20]
  localparam logic [3:0] S_PVAL = 4'h0;
  localparam logic [3:0] S_PAOD = 4'h1;
  localparam logic [3:0] S_PVAR = 4'h0;
  localparam logic [3:0] S_PVRI = 4'h1;
  localparam logic [3:0] S_PAOV = 4'h2;
  // family 3 (stores)
  localparam logic [3:0] M_ASLD = 4'h8;  // immediate value for ASLV/ASLI
  localparam logic [3:0] M_ASOD = 4'h9;  // structured store, literal offset
  localparam logic [3:0] M_ASOV = 4'hA;  // structured store, variable offset
  // family 4 (relations)
  localparam logic [3:0] M_RLOP = 4'h8;  // REL [27:24], VAL or VAR [23:0]

  // ---------------- memory unit opcodes ----------------------------------
  typedef enum logic [7:0] {
    M_NOP    = 8'h00,
    M_SNVR   = 8'h01,  // send variable to MXQ
    M_SNVI   = 8'h02,  // send indirect variable to MXQ
    M_STQV   = 8'h03,  // store XMQ head into variable
    M_STQI   = 8'h04,  // store XMQ head, indirect
    M_STIV   = 8'h05,  // store immediate: address part
    M_STII   = 8'h06,  // store immediate indirect: address part
    M_STID   = 8'h07,  // store immediate: the literal value
    M_SNAR   = 8'h08,  // structured send, base parcel
    M_SNOD   = 8'h09,  // structured send, literal offset
    M_SNOV   = 8'h0A,  // structured send, variable offset
    M_STAR   = 8'h0B,  // structured store, base parcel
    M_STOD   = 8'h0C,  // structured store, literal offset
    M_STOV   = 8'h0D,  // structured store, variable offset
    M_ACMVR0 = 8'h10,
    M_ACMVI0 = 8'h11,
    M_ACMVR1 = 8'h12,
    M_ACMVI1 = 8'h13,
    M_ARLSL  = 8'h18,  // relation leading: first variable, second is literal
    M_ARLSV  = 8'h19,  // relation leading: first variable, second is variable
    M_RLGT   = 8'h20,  // relation parcels: 8'h20 | rel code
    M_RLGE   = 8'h21,
    M_RLEQ   = 8'h22,
    M_RLNE   = 8'h23,
    M_RLLT   = 8'h24,
    M_RLLE   = 8'h25,
    M_CALL   = 8'h30,  // create data stack frame
    M_RETN   = 8'h31   // delete data stack frame
  } mem_op_e;

  // relation codes carried in a RLOP parcel
  typedef enum logic [3:0] {
    REL_GT = 4'h0, REL_GE = 4'h1, REL_EQ = 4'h2,
    REL_NE = 4'h3, REL_LT = 4'h4, REL_LE = 4'h5
  } rel_e;

  // ---------------- execution unit opcodes -------------------------------
  typedef enum logic [7:0] {
    X_NOP  = 8'h00,
    X_IVAL = 8'h01,  // push literal
    X_QVAL = 8'h02,  // push head of MXQ
    X_OPER = 8'h03,  // apply operator arg[3:0] to the top two items
    X_SEND = 8'h04   // pop top into RESREG and send it to XMQ
  } ex_op_e;

  typedef enum logic [3:0] {
    OP_ADD = 4'h0, OP_SUB = 4'h1, OP_MUL = 4'h2, OP_AND = 4'h3,
    OP_OR  = 4'h4, OP_XOR = 4'h5, OP_SHL = 4'h6, OP_SRA = 4'h7
  } oper_e;

  // one unit instruction: opcode and 24-bit argument
  typedef struct packed {
    logic [7:0]       op;
    logic [ARG_W-1:0] arg;
  } uinstr_t;

  // where an instruction field takes its argument from in the parcel
  typedef enum logic [2:0] {
    SRC_NONE = 3'd0,
    SRC_LO24 = 3'd1,  // parcel [23:0]
    SRC_HI24 = 3'd2,  // parcel [27:4]
    SRC_NIBH = 3'd3,  // parcel [27:24]
    SRC_NIBL = 3'd4,  // parcel [3:0]
    SRC_NIB2 = 3'd5   // parcel [23:20]
  } src_e;

  // one PLA output field: valid, opcode, argument source
  typedef struct packed {
    logic       v;
    logic [7:0] op;
    src_e       src;
  } pla_field_t;

  typedef struct packed {
    pla_field_t ad;   // to ADREG (memory unit)
    pla_field_t ex1;  // to EXREG1 (execution unit)
    pla_field_t ex2;  // to EXREG2 (execution unit)
  } pla_out_t;

  function automatic logic [ARG_W-1:0] pick_arg(input logic [31:0] p, input src_e s);
    case (s)
      SRC_LO24: return p[23:0];
      SRC_HI24: return p[27:4];
      SRC_NIBH: return {20'h0, p[27:24]};
      SRC_NIBL: return {20'h0, p[3:0]};
      SRC_NIB2: return {20'h0, p[23:20]};
      default:  return '0;
    endcase
  endfunction

  function automatic logic [DATA_W-1:0] sext24(input logic [ARG_W-1:0] v);
    return {{(DATA_W-ARG_W){v[ARG_W-1]}}, v};
  endfunction

endpackage
