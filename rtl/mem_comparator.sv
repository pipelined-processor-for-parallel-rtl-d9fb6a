// mem_comparator: the memory unit's comparator. It evaluates the relation
// named by a relational instruction (GT, GE from the document's table; EQ,
// NE, LT, LE added by this design) on two signed words, and the equality
// tests with 0 and 1 of the ACMV instructions. The result is the single bit
// written to the memory-to-controller queue. Purely combinational.
module mem_comparator
  import msa_pkg::*;
#(
  parameter int unsigned DW = 32
) (
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  input  rel_e          rel,
  output logic          result
);
  always_comb begin
    unique case (rel)
      REL_GT:  result = $signed(a) >  $signed(b);
      REL_GE:  result = $signed(a) >= $signed(b);
      REL_EQ:  result = a == b;
      REL_NE:  result = a != b;
      REL_LT:  result = $signed(a) <  $signed(b);
      REL_LE:  result = $signed(a) <= $signed(b);
      default: result = 1'b0;
    endcase
  end
endmodule
