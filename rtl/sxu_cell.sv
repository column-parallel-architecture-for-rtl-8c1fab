// sxu_cell: one bit of the per-column accumulator SX (sum over y of x * p_xy).
//
// Same structure as su_cell (full adder, register, bus driver), with one more
// gate: the adder's second operand is x_bit AND p, one bit of the column's
// X coordinate gated by the pixel flag. Because p is 0 or 1, the AND gates of
// the n cells together form the product x * p. Chained by carry, n cells add
// x * p to the stored value on every row step.
//
// Timing: register loads on the rising clk edge when load=1; first=1 makes the
// register operand 0 so the first row starts a new frame. bus_o is the register
// bit gated by xsel (the on-chip tri-state driver is modelled as an AND feeding
// an OR-bus).
module sxu_cell (
  input  logic clk,
  input  logic load,
  input  logic first,
  input  logic x_bit,  // this bit of the column's X coordinate
  input  logic p,      // pixel flag from the column comparator
  input  logic ci,
  output logic co,
  input  logic xsel,
  output logic q,
  output logic bus_o
);
  logic a, b, sum;

  assign a = q & ~first;
  assign b = x_bit & p;

  fa_1bit u_fa (.a(a), .b(b), .ci(ci), .s(sum), .co(co));

  always_ff @(posedge clk) begin
    if (load) q <= sum;
  end

  assign bus_o = xsel & q;
endmodule
