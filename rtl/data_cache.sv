// data_cache: the memory unit's data store. Port A is the memory unit's
// single read/write access per cycle (the document states the memory unit
// has one access to the data cache per cycle, so there are no structural
// hazards); port B lets a host load and inspect data while the machine is
// idle. The document names the cache and mentions read misses but gives no
// organisation or backing store, so it is modelled as an always-hitting RAM
// of 2**AW words (24-bit addresses, as the document's address field).
//
// Timing: a read returns a_rdata one cycle after a_en with a_we low. A
// write (a_we high) updates the word at the clock edge. Port B likewise.
module data_cache #(
  parameter int unsigned AW = 24,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      else      a_rdata <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      else      b_rdata <= mem[b_addr];
    end
  end
endmodule
