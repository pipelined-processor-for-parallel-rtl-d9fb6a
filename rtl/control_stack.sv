// control_stack: the controller's stack of return addresses. The document
// splits the activation stack in two: return addresses live here, in the
// controller, local data in the memory unit's data stack. CALL pushes the
// address of the parcel after the CALL; RETN pops it. Depth is not given
// in the document (DEPTH is assumed); overflow and underflow are flagged
// sticky on err and the offending operation is ignored.
//
// Timing: push/pop act at the clock edge; top shows the current top of
// stack combinationally. Push and pop in the same cycle is not used.
module control_stack #(
  parameter int unsigned AW    = 12,
  parameter int unsigned DEPTH = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [AW-1:0] push_data,
  input  logic          pop,
  output logic [AW-1:0] top,
  output logic          empty,
  output logic          err
);
  localparam int unsigned SW = $clog2(DEPTH+1);
  logic [AW-1:0] stk [DEPTH];
  logic [SW-1:0] sp;  // number of entries

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp  <= '0;
      err <= 1'b0;
    end else if (push) begin
      if (sp == SW'(DEPTH)) err <= 1'b1;
      else sp <= sp + 1'b1;
    end else if (pop) begin
      if (sp == '0) err <= 1'b1;
      else sp <= sp - 1'b1;
    end
  end

  always_ff @(posedge clk)
    if (push && sp != SW'(DEPTH)) stk[sp[$clog2(DEPTH)-1:0]] <= push_data;

  logic [SW-1:0] tidx;
  assign tidx  = sp - 1'b1;
  assign top   = stk[tidx[$clog2(DEPTH)-1:0]];
  assign empty = (sp == '0);
endmodule
