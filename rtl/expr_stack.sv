// expr_stack: the execution unit's expression stack, on which Polish
// expressions are evaluated. The top two items are always visible (t0 is
// the top, t1 the one below). One operation per cycle:
//   push        : push din
//   pop2_push   : replace the top two items by din (a binary operator)
//   pop         : remove the top item
// The depth is not given by the document (DEPTH is assumed). Overflow and
// underflow set the sticky err flag and leave the stack unchanged.
// Timing: the operation takes effect at the clock edge.
module expr_stack #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic          pop2_push,
  input  logic          pop,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] t0,
  output logic [DW-1:0] t1,
  output logic [$clog2(DEPTH+1)-1:0] depth,
  output logic          err
);
  localparam int unsigned SW = $clog2(DEPTH+1);
  localparam int unsigned IW = $clog2(DEPTH);
  logic [DW-1:0] stk [DEPTH];
  logic [SW-1:0] sp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp  <= '0;
      err <= 1'b0;
    end else if (push) begin
      if (sp == SW'(DEPTH)) err <= 1'b1;
      else sp <= sp + 1'b1;
    end else if (pop2_push) begin
      if (sp < SW'(2)) err <= 1'b1;
      else sp <= sp - 1'b1;
    end else if (pop) begin
      if (sp == '0) err <= 1'b1;
      else sp <= sp - 1'b1;
    end
  end

  // storage: no reset
  always_ff @(posedge clk) begin
    if (push && sp != SW'(DEPTH))          stk[IW'(sp)] <= din;
    else if (!push && pop2_push && sp >= SW'(2)) stk[IW'(sp - SW'(2))] <= din;
  end

  logic [SW-1:0] i0, i1;
  assign i0    = sp - SW'(1);
  assign i1    = sp - SW'(2);
  assign t0    = stk[IW'(i0)];
  assign t1    = stk[IW'(i1)];
  assign depth = sp;
endmodule
