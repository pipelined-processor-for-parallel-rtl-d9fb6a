// msa_queue: the FIFO queue that connects two MSA processors (CMQ, CEQ,
// MCQ, MXQ, XMQ). It has N_WR write ports and one read port. The document
// gives the port counts (the controller-to-memory queue has one write port,
// the controller-to-execution queue two) and the range of lengths studied
// (1 to 10, with no gain beyond 3); the circular-buffer build is this
// design's own.
//
// Interface: wr_en[i]/wr_data[i] write in port order in one cycle; a write
// is only legal if free space allows it (count + writes <= DEPTH). rd_en
// pops the head shown on rd_data when not empty. count is the occupancy.
// Timing: a written word can be read the next cycle; no fall-through.
// Reset empties the queue.
module msa_queue #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 3,
  parameter int unsigned N_WR  = 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N_WR-1:0]            wr_en,
  input  logic [N_WR-1:0][W-1:0]     wr_data,
  input  logic                       rd_en,
  output logic [W-1:0]               rd_data,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [CW-1:0] cnt;

  function automatic logic [PW-1:0] wrap(input logic [PW:0] p);
    return (p >= (PW+1)'(DEPTH)) ? PW'(p - (PW+1)'(DEPTH)) : PW'(p);
  endfunction

  logic do_rd;
  assign do_rd = rd_en && (cnt != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else begin
      logic [PW-1:0] p;
      logic [CW-1:0] n;
      p = wr_ptr;
      n = cnt;
      for (int i = 0; i < int'(N_WR); i++) begin
        if (wr_en[i]) begin
          p = wrap({1'b0, p} + 1'b1);
          n = n + 1'b1;
        end
      end
      if (do_rd) begin
        rd_ptr <= wrap({1'b0, rd_ptr} + 1'b1);
        n = n - 1'b1;
      end
      wr_ptr <= p;
      cnt    <= n;
    end
  end

  // storage: no reset, written at the slots the pointer logic assigns
  always_ff @(posedge clk) begin
    logic [PW-1:0] q;
    q = wr_ptr;
    for (int i = 0; i < int'(N_WR); i++) begin
      if (wr_en[i]) begin
        mem[q] <= wr_data[i];
        q = wrap({1'b0, q} + 1'b1);
      end
    end
  end

  assign rd_data = mem[rd_ptr];
  assign empty   = (cnt == '0);
  assign full    = (cnt == CW'(DEPTH));
  assign count   = cnt;

  // a write must never overflow the queue
  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n)
      (32'(cnt) - (do_rd ? 1 : 0) + $countones(wr_en)) <= 32'(DEPTH);
  endproperty
  a_no_overflow: assert property (p_no_overflow);
endmodule
