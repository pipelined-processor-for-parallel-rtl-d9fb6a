// memory_unit: the pipelined memory (address) processor of the MSA. It
// takes instructions from the controller-to-memory queue (CMQ), binds
// variables to addresses through the display registers, makes the data
// cache accesses, sends loaded values to the execution unit (MXQ), stores
// values coming back from it (XMQ), evaluates relations for the controller
// (MCQ) and creates and deletes procedure data-stack frames.
//
// Pipeline (five stages, as the document gives them):
//   IF  : the CMQ head is popped into the memory instruction register MIR;
//         an empty CMQ yields a NOP.
//   ID  : MIR is decoded into access flags; a relation's
//         leading parcel records whether its second operand is a literal
//         or a variable.
//   AG  : the address adder forms DR[display] + offset into MAR. Structured
//         and store-immediate leading parcels park their address in a
//         pending address register (PAR) for the dependent parcel. CALL
//         saves DR.m for the frame and moves DR.m and HIGHMEM; RETN moves
//         HIGHMEM back and blocks AG until the saved DR.m has been read.
//   MEM : one data cache access per cycle at MAR, with the store data in
//         SMDR (from the XMQ or from a literal). Indirect operands and
//         variable structure offsets need a second access and hold the
//         stage one more cycle (the document's "1 cycle" pipe delay).
//   END : the loaded word (LMDR, the cache's read register) goes to the MXQ,
//         to the comparator's first-operand register, back into DR.m
//         (RETN), or, compared, as one bit to the MCQ.
// LMDR is the data cache's registered read output, so the MXQ write data
// comes straight from the cache's read port without another register.
// Every data cache access happens in MEM, in program order, and display
// registers are written only by CALL in AG or by RETN (with AG blocked), so
// no data hazard arises inside the unit.
//
// Frame layout (from the document): the first word of a frame holds the old
// DR.m; parameters and locals follow at offsets 1, 2, .... CALL's argument
// is {m, frame size[7:0], -}, RETN's {m, caller level, -} (this design's
// encoding). Indirect variables hold an absolute data address.
module memory_unit
  import msa_pkg::*;
#(
  parameter int unsigned   AW           = 24,
  parameter logic [AW-1:0] HIGHMEM_INIT = AW'(1) << 20
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              busy,
  // CMQ read side
  output logic              cmq_rd_en,
  input  uinstr_t           cmq_rd_data,
  input  logic              cmq_empty,
  // XMQ read side (values from the execution unit)
  output logic              xmq_rd_en,
  input  logic [DATA_W-1:0] xmq_rd_data,
  input  logic              xmq_empty,
  // MXQ write side (values to the execution unit)
  output logic              mxq_wr_en,
  output logic [DATA_W-1:0] mxq_wr_data,
  input  logic              mxq_full,
  // MCQ write side (relation results to the controller)
  output logic              mcq_wr_en,
  output logic              mcq_wr_data,
  input  logic              mcq_full,
  // data cache port A
  output logic              dc_en,
  output logic              dc_we,
  output logic [AW-1:0]     dc_addr,
  output logic [DATA_W-1:0] dc_wdata,
  input  logic [DATA_W-1:0] dc_rdata,
  // events
  output logic              ev_second_access,  // extra MEM cycle (indirection)
  output logic              ev_xmq_wait,       // store waiting for the XMQ
  output logic              ev_out_stall,      // MXQ or MCQ full
  output logic              ev_frame           // CALL or RETN processed in AG
);
  // what an instruction does in MEM and END
  typedef struct packed {
    logic rd;      // single read
    logic wr;      // single write
    logic two;     // first access reads a pointer/offset
    logic ptr;     // second address = pointer (1) or PAR + offset (0)
    logic two_wr;  // second access is a write
    logic xmq;     // write data comes from the XMQ
    logic to_mxq;
    logic to_mcq;
    logic set_a;   // END loads comparator register A
    logic restore; // END restores DR.m (RETN)
  } mflags_t;

  typedef struct packed {
    logic [7:0]        op;
    logic [ARG_W-1:0]  arg;
    mflags_t           f;
    logic              b_var;   // relation: second operand is a variable
  } dstage_t;

  typedef struct packed {
    logic [7:0]        op;
    logic [ARG_W-1:0]  arg;
    mflags_t           f;
    logic              b_var;
    logic [AW-1:0]     mar;
    logic [DATA_W-1:0] smdr;
    logic [AW-1:0]     base;    // PAR, for variable structure offsets
  } mstage_t;

  // ---------------- IF ---------------------------------------------------
  logic    mir_v, ag_v, mm_v, en_v;
  uinstr_t mir;
  dstage_t ag;
  mstage_t mm, en;
  logic    ph;            // MEM phase of a two-access instruction

  // ---------------- stall network ----------------------------------------
  logic end_stall, mem_busy, mem_free, ag_block, ag_free, id_free;
  logic mem_adv, ag_adv, id_adv, do_acc, xmq_need;

  assign end_stall = en_v && ((en.f.to_mxq && mxq_full) || (en.f.to_mcq && mcq_full));
  assign xmq_need  = mm_v && mm.f.xmq && (mm.f.two ? ph : 1'b1);
  assign do_acc    = mm_v && !end_stall && !(xmq_need && xmq_empty) &&
                     (mm.f.rd || mm.f.wr || mm.f.two);
  assign mem_busy  = mm_v && (end_stall || (xmq_need && xmq_empty) || (mm.f.two && !ph));
  assign mem_adv   = mm_v && !mem_busy;
  assign mem_free  = !mm_v || mem_adv;
  // RETN restores a display register in END: hold AG behind it
  assign ag_block  = (mm_v && mm.op == M_RETN) || (en_v && en.op == M_RETN);
  assign ag_adv    = ag_v && mem_free && !ag_block;
  assign ag_free   = !ag_v || ag_adv;
  assign id_adv    = mir_v && ag_free;
  assign id_free   = !mir_v || ag_free;
  assign cmq_rd_en = id_free && !cmq_empty;

  // ---------------- ID: decode -------------------------------------------
  logic    rel_b_var;   // set by the leading relation parcel
  mflags_t idf;

  always_comb begin
    idf = '0;
    case (mir.op)
      M_SNVR, M_SNOD:       begin idf.rd = 1'b1; idf.to_mxq = 1'b1; end
      M_SNVI:               begin idf.two = 1'b1; idf.ptr = 1'b1; idf.to_mxq = 1'b1; end
      M_SNOV:               begin idf.two = 1'b1; idf.to_mxq = 1'b1; end
      M_STQV, M_STOD:       begin idf.wr = 1'b1; idf.xmq = 1'b1; end
      M_STQI:               begin idf.two = 1'b1; idf.ptr = 1'b1; idf.two_wr = 1'b1; idf.xmq = 1'b1; end
      M_STOV:               begin idf.two = 1'b1; idf.two_wr = 1'b1; idf.xmq = 1'b1; end
      M_STID:               idf.wr = 1'b1;   // becomes two-access after STII (AG)
      M_ACMVR0, M_ACMVR1:   begin idf.rd = 1'b1; idf.to_mcq = 1'b1; end
      M_ACMVI0, M_ACMVI1:   begin idf.two = 1'b1; idf.ptr = 1'b1; idf.to_mcq = 1'b1; end
      M_ARLSL, M_ARLSV:     begin idf.rd = 1'b1; idf.set_a = 1'b1; end
      M_RLGT, M_RLGE, M_RLEQ, M_RLNE, M_RLLT, M_RLLE:
                            begin idf.rd = rel_b_var; idf.to_mcq = 1'b1; end
      M_CALL:               idf.wr = 1'b1;
      M_RETN:               begin idf.rd = 1'b1; idf.restore = 1'b1; end
      default: ;
    endcase
  end

  // ---------------- AG: address generation -------------------------------
  logic [AW-1:0] dr_base, highmem, par, ag_addr;
  logic          par_ind;
  logic [3:0]    curdisp;
  logic          dr_we, hm_we, cd_we;
  logic [3:0]    dr_idx, cd_wdata;
  logic [AW-1:0] dr_wdata, hm_wdata;
  mstage_t       ag_out;

  assign ag_addr = dr_base + AW'(ag.arg[OFF_W-1:0]);

  always_comb begin
    ag_out       = '0;
    ag_out.op    = ag.op;
    ag_out.arg   = ag.arg;
    ag_out.f     = ag.f;
    ag_out.b_var = ag.b_var;
    ag_out.mar   = ag_addr;
    ag_out.smdr  = sext24(ag.arg);
    ag_out.base  = par;
    hm_we = 1'b0; hm_wdata = highmem;
    cd_we = 1'b0; cd_wdata = ag.arg[19:16];
    case (ag.op)
      M_SNOD, M_STOD: ag_out.mar = par + AW'(ag.arg);
      M_STID: begin
        ag_out.mar = par;
        if (par_ind) begin  // stored address is that of a pointer
          ag_out.f.wr = 1'b0; ag_out.f.two = 1'b1; ag_out.f.ptr = 1'b1; ag_out.f.two_wr = 1'b1;
        end
      end
      M_CALL: begin
        ag_out.mar  = highmem;
        ag_out.smdr = DATA_W'(dr_base);
        hm_we = 1'b1; hm_wdata = highmem + AW'(ag.arg[19:12]) + AW'(1);
        cd_we = 1'b1; cd_wdata = ag.arg[23:20];
      end
      M_RETN: begin
        ag_out.mar = dr_base;
        hm_we = 1'b1; hm_wdata = dr_base;
        cd_we = 1'b1; cd_wdata = ag.arg[19:16];
      end
      default: ;
    endcase
  end

  logic [DATA_W-1:0] lmdr;
  assign lmdr = dc_rdata;

  assign dr_we    = (ag_adv && ag.op == M_CALL) || (en_v && !end_stall && en.f.restore);
  assign dr_idx   = (en_v && en.f.restore) ? en.arg[23:20] : ag.arg[23:20];
  assign dr_wdata = (en_v && en.f.restore) ? AW'(lmdr) : highmem;

  display_regs #(.AW(AW), .HIGHMEM_INIT(HIGHMEM_INIT)) u_dr (
    .clk, .rst_n,
    .rd_idx(ag.arg[23:20]), .rd_base(dr_base),
    .dr_we, .dr_idx, .dr_wdata,
    .hm_we(hm_we && ag_adv), .hm_wdata, .highmem,
    .cd_we(cd_we && ag_adv), .cd_wdata, .curdisp
  );

  // ---------------- MEM: data cache access -------------------------------
  logic [AW-1:0] second_addr;
  assign second_addr = mm.f.ptr ? AW'(dc_rdata) : mm.base + AW'(dc_rdata);

  always_comb begin
    dc_en    = do_acc;
    dc_we    = 1'b0;
    dc_addr  = mm.mar;
    dc_wdata = mm.f.xmq ? xmq_rd_data : mm.smdr;
    if (mm.f.two && ph) begin
      dc_addr = second_addr;
      dc_we   = mm.f.two_wr;
    end else if (!mm.f.two) begin
      dc_we = mm.f.wr;
    end
  end
  assign xmq_rd_en = do_acc && mm.f.xmq && dc_we;

  // ---------------- END: results -----------------------------------------
  logic [DATA_W-1:0] areg;   // comparator first operand
  logic              cmp_res;
  rel_e              rel;
  logic [DATA_W-1:0] cmp_b;

  always_comb begin
    rel   = rel_e'(en.op[3:0]);
    cmp_b = en.b_var ? lmdr : sext24(en.arg);
    unique case (en.op)
      M_ACMVR0, M_ACMVI0: begin rel = REL_EQ; cmp_b = '0; end
      M_ACMVR1, M_ACMVI1: begin rel = REL_EQ; cmp_b = DATA_W'(1); end
      default: ;
    endcase
  end
  mem_comparator #(.DW(DATA_W)) u_cmp (
    .a((en.op inside {M_ACMVR0, M_ACMVI0, M_ACMVR1, M_ACMVI1}) ? lmdr : areg),
    .b(cmp_b), .rel(rel), .result(cmp_res)
  );

  assign mxq_wr_en   = en_v && en.f.to_mxq && !mxq_full;
  assign mxq_wr_data = lmdr;
  assign mcq_wr_en   = en_v && en.f.to_mcq && !mcq_full;
  assign mcq_wr_data = cmp_res;

  // ---------------- pipeline registers -----------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mir_v <= 1'b0; ag_v <= 1'b0; mm_v <= 1'b0; en_v <= 1'b0;
      mir <= '0; ag <= '0; mm <= '0; en <= '0;
      ph <= 1'b0; rel_b_var <= 1'b0; par <= '0; par_ind <= 1'b0; areg <= '0;
    end else begin
      // IF: the CMQ head into MIR (a NOP when the CMQ is empty)
      if (id_free) begin
        mir_v <= !cmq_empty;
        mir   <= cmq_empty ? '0 : cmq_rd_data;
      end
      // ID: decode MIR
      if (id_adv) begin
        ag_v <= 1'b1;
        ag   <= '{op: mir.op, arg: mir.arg, f: idf, b_var: rel_b_var};
        if (mir.op == M_ARLSL) rel_b_var <= 1'b0;
        if (mir.op == M_ARLSV) rel_b_var <= 1'b1;
      end else if (ag_adv) begin
        ag_v <= 1'b0;
      end
      // AG
      if (ag_adv) begin
        mm_v <= 1'b1;
        mm   <= ag_out;
        ph   <= 1'b0;
        if (ag.op inside {M_SNAR, M_STAR}) begin par <= ag_addr; par_ind <= 1'b0; end
        if (ag.op == M_STIV) begin par <= ag_addr; par_ind <= 1'b0; end
        if (ag.op == M_STII) begin par <= ag_addr; par_ind <= 1'b1; end
      end else if (mem_adv) begin
        mm_v <= 1'b0;
      end
      // MEM phase
      if (mm_v && mm.f.two && !ph && do_acc) ph <= 1'b1;
      // MEM -> END
      if (!end_stall) begin
        en_v <= mem_adv;
        if (mem_adv) en <= mm;
        if (en_v && en.f.set_a) areg <= lmdr;
      end
    end
  end

  assign busy = mir_v || ag_v || mm_v || en_v || !cmq_empty;

  assign ev_second_access = mm_v && mm.f.two && ph && do_acc;
  assign ev_xmq_wait      = xmq_need && xmq_empty && !end_stall;
  assign ev_out_stall     = end_stall;
  assign ev_frame         = ag_adv && (ag.op inside {M_CALL, M_RETN});
endmodule
