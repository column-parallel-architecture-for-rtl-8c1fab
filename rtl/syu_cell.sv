// syu_cell: one bit of the per-column accumulator SY (sum over y of y * p_xy).
//
// Same structure as sxu_cell, but the adder's second operand is y_bit AND p:
// one bit of the current row's Y coordinate, which is broadcast to all columns
// during the row readout, gated by the pixel flag. n chained cells add y * p
// to the stored value on every row step.
//
// Timing: register loads on the rising clk edge when load=1; first=1 makes the
// register operand 0 so the first row starts a new frame. bus_o is the register
// bit gated by xsel (tri-state driver modelled as AND into an OR-bus).
module syu_cell (
  input  logic clk,
  input  logic load,
  input  logic first,
  input  logic y_bit,  // this bit of the current row's Y coordinate
  input  logic p,
  input  logic ci,
  output logic co,
  input  logic xsel,
  output logic q,
  output logic bus_o
);
  logic a, b, sum;

  assign a = q & ~first;
  assign b = y_bit & p;

  fa_1bit u_fa (.a(a), .b(b), .ci(ci), .s(sum), .co(co));

  always_ff @(posedge clk) begin
    if (load) q <= sum;
  end

  assign bus_o = xsel & q;
endmodule
