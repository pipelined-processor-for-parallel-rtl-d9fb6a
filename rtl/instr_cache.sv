// instr_cache: the controller's instruction store. One 32-bit instruction
// parcel is read each cycle into the instruction register. The document
// names the instruction cache but gives neither its size nor its miss
// handling; here it is an always-hitting RAM of 2**AW parcels with a
// registered read port (the read register is the controller's IR) and a
// separate write port through which a host loads the program.
//
// Timing: rd_data holds mem[rd_addr] one cycle after rd_en. Writes take
// effect at the clock edge.
module instr_cache #(
  parameter int unsigned AW = 12
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [31:0]   rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [31:0]   wr_data
);
  logic [31:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
