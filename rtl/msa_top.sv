// msa_top: the pipelined Minimally Synchronized Architecture (MSA). An
// interpreted program is split, as the document proposes, over three
// pipelined processors that run concurrently and talk only through queues:
//
//   controller --CMQ--> memory unit --MXQ--> execution unit
//   controller --CEQ----------------------> execution unit
//   memory unit <--XMQ-- execution unit
//   controller <--MCQ-- memory unit (relation results for LOOP)
//
// Each processor reads only its own inputs and writes only its own outputs,
// so the pipelines have no data hazards between them; only LOOP has to wait
// for the memory unit. All queues share one length, Q_DEPTH (3, the length
// at which the document found no further gain; its base machine uses 1).
//
// Host side (this design's addition, the document does not describe
// program loading): the instruction cache is written through ic_wr_*, and
// the data cache is read and written through dc_b_* while the machine is
// idle. start begins execution at parcel 0; done rises when the controller
// has executed HALT and every unit and queue has drained. The ev_* outputs
// pulse once per occurrence of a pipeline event, for performance counting.
module msa_top
  import msa_pkg::*;
#(
  parameter int unsigned IC_AW       = 12,
  parameter int unsigned DC_AW       = 24,
  parameter int unsigned Q_DEPTH     = 3,
  parameter int unsigned CS_DEPTH    = 16,
  parameter int unsigned STACK_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              done,
  // host access
  input  logic              ic_wr_en,
  input  logic [IC_AW-1:0]  ic_wr_addr,
  input  logic [31:0]       ic_wr_data,
  input  logic              dc_b_en,
  input  logic              dc_b_we,
  input  logic [DC_AW-1:0]  dc_b_addr,
  input  logic [DATA_W-1:0] dc_b_wdata,
  output logic [DATA_W-1:0] dc_b_rdata,
  // errors (stack overflow/underflow)
  output logic              cs_err,
  output logic              stack_err,
  // events
  output logic              ev_redirect,
  output logic              ev_loop_wait,
  output logic              ev_loop_taken,
  output logic              ev_q_stall,
  output logic              ev_call,
  output logic              ev_retn,
  output logic              ev_second_access,
  output logic              ev_xmq_wait,
  output logic              ev_mem_out_stall,
  output logic              ev_frame,
  output logic              ev_mxq_wait,
  output logic              ev_xmq_stall
);
  localparam int unsigned QCW = $clog2(Q_DEPTH+1);

  // CMQ
  logic    cmq_wr_en, cmq_rd_en, cmq_empty, cmq_full;
  uinstr_t cmq_wr_data, cmq_rd_data;
  logic [QCW-1:0] cmq_count;
  // CEQ
  logic [1:0]    ceq_wr_en;
  uinstr_t [1:0] ceq_wr_data;
  logic    ceq_rd_en, ceq_empty, ceq_full;
  uinstr_t ceq_rd_data;
  logic [QCW-1:0] ceq_count;
  // MCQ
  logic mcq_wr_en, mcq_wr_data, mcq_rd_en, mcq_rd_data, mcq_empty, mcq_full;
  logic [QCW-1:0] mcq_count;
  // MXQ, XMQ
  logic mxq_wr_en, mxq_rd_en, mxq_empty, mxq_full;
  logic [DATA_W-1:0] mxq_wr_data, mxq_rd_data;
  logic [QCW-1:0] mxq_count;
  logic xmq_wr_en, xmq_rd_en, xmq_empty, xmq_full;
  logic [DATA_W-1:0] xmq_wr_data, xmq_rd_data;
  logic [QCW-1:0] xmq_count;
  // data cache port A
  logic dc_en, dc_we;
  logic [DC_AW-1:0]  dc_addr;
  logic [DATA_W-1:0] dc_wdata, dc_rdata;

  logic ctl_busy, mem_busy, ex_busy;

  controller_unit #(.AW(IC_AW), .CS_DEPTH(CS_DEPTH), .QCW(QCW)) u_ctl (
    .clk, .rst_n, .start, .busy(ctl_busy),
    .ic_wr_en, .ic_wr_addr, .ic_wr_data,
    .cmq_wr_en, .cmq_wr_data, .cmq_full,
    .ceq_wr_en, .ceq_wr_data, .ceq_count, .ceq_depth(QCW'(Q_DEPTH)),
    .mcq_rd_en, .mcq_rd_data, .mcq_empty,
    .ev_redirect, .ev_loop_wait, .ev_loop_taken, .ev_q_stall, .ev_call, .ev_retn,
    .cs_err
  );

  msa_queue #(.W(32), .DEPTH(Q_DEPTH), .N_WR(1)) u_cmq (
    .clk, .rst_n, .wr_en(cmq_wr_en), .wr_data(cmq_wr_data), .rd_en(cmq_rd_en),
    .rd_data(cmq_rd_data), .empty(cmq_empty), .full(cmq_full), .count(cmq_count)
  );

  msa_queue #(.W(32), .DEPTH(Q_DEPTH), .N_WR(2)) u_ceq (
    .clk, .rst_n, .wr_en(ceq_wr_en), .wr_data(ceq_wr_data), .rd_en(ceq_rd_en),
    .rd_data(ceq_rd_data), .empty(ceq_empty), .full(ceq_full), .count(ceq_count)
  );

  msa_queue #(.W(1), .DEPTH(Q_DEPTH), .N_WR(1)) u_mcq (
    .clk, .rst_n, .wr_en(mcq_wr_en), .wr_data(mcq_wr_data), .rd_en(mcq_rd_en),
    .rd_data(mcq_rd_data), .empty(mcq_empty), .full(mcq_full), .count(mcq_count)
  );

  msa_queue #(.W(DATA_W), .DEPTH(Q_DEPTH), .N_WR(1)) u_mxq (
    .clk, .rst_n, .wr_en(mxq_wr_en), .wr_data(mxq_wr_data), .rd_en(mxq_rd_en),
    .rd_data(mxq_rd_data), .empty(mxq_empty), .full(mxq_full), .count(mxq_count)
  );

  msa_queue #(.W(DATA_W), .DEPTH(Q_DEPTH), .N_WR(1)) u_xmq (
    .clk, .rst_n, .wr_en(xmq_wr_en), .wr_data(xmq_wr_data), .rd_en(xmq_rd_en),
    .rd_data(xmq_rd_data), .empty(xmq_empty), .full(xmq_full), .count(xmq_count)
  );

  memory_unit #(.AW(DC_AW)) u_mem (
    .clk, .rst_n, .busy(mem_busy),
    .cmq_rd_en, .cmq_rd_data, .cmq_empty,
    .xmq_rd_en, .xmq_rd_data, .xmq_empty,
    .mxq_wr_en, .mxq_wr_data, .mxq_full,
    .mcq_wr_en, .mcq_wr_data, .mcq_full,
    .dc_en, .dc_we, .dc_addr, .dc_wdata, .dc_rdata,
    .ev_second_access, .ev_xmq_wait, .ev_out_stall(ev_mem_out_stall), .ev_frame
  );

  data_cache #(.AW(DC_AW), .DW(DATA_W)) u_dc (
    .clk,
    .a_en(dc_en), .a_we(dc_we), .a_addr(dc_addr), .a_wdata(dc_wdata), .a_rdata(dc_rdata),
    .b_en(dc_b_en), .b_we(dc_b_we), .b_addr(dc_b_addr), .b_wdata(dc_b_wdata), .b_rdata(dc_b_rdata)
  );

  exec_unit #(.STACK_DEPTH(STACK_DEPTH)) u_ex (
    .clk, .rst_n, .busy(ex_busy),
    .ceq_rd_en, .ceq_rd_data, .ceq_empty,
    .mxq_rd_en, .mxq_rd_data, .mxq_empty,
    .xmq_wr_en, .xmq_wr_data, .xmq_full,
    .stack_err, .ev_mxq_wait, .ev_xmq_stall
  );

  // done: started, then every unit and queue idle
  logic ran;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     ran <= 1'b0;
    else if (start) ran <= 1'b1;
  end
  assign done = ran && !start && !ctl_busy && !mem_busy && !ex_busy &&
                cmq_empty && ceq_empty && mxq_empty && xmq_empty && mcq_empty;
endmodule
