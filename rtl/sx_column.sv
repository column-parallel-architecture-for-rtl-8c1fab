// sx_column: the SX circuit of one column, the sum over y of x * p_xy, where x
// is the column's own X coordinate.
//
// W sxu_cell instances chained by carry form a W-bit ripple-carry adder around
// a W-bit register. Each cell ANDs one bit of x with the pixel flag p, so the
// addend is x * p; carry-in of bit 0 is 0. On each row step with load=1 the
// register takes register + x*p (or just x*p when first=1). W is sized for
// (NX-1) * NY, so the top carry is never needed. bus_o carries the register
// while xsel is high and is 0 otherwise.
module sx_column #(
  parameter int unsigned W = 19  // bits for (NX-1) NY = 639 * 480
) (
  input  logic         clk,
  input  logic         load,
  input  logic         first,
  input  logic [W-1:0] x,        // column X coordinate, zero-extended
  input  logic         p,
  input  logic         xsel,
  output logic [W-1:0] value,
  output logic [W-1:0] bus_o
);
  logic [W:0] c;

  assign c[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_bit
    sxu_cell u_cell (
      .clk  (clk),
      .load (load),
      .first(first),
      .x_bit(x[i]),
      .p    (p),
      .ci   (c[i]),
      .co   (c[i+1]),
      .xsel (xsel),
      .q    (value[i]),
      .bus_o(bus_o[i])
    );
  end
endmodule
