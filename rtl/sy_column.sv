// sy_column: the SY circuit of one column, the sum over y of y * p_xy, where y
// is the coordinate of the row being read, broadcast to every column.
//
// W syu_cell instances chained by carry form a W-bit ripple-carry adder around
// a W-bit register; each cell ANDs one bit of y with the pixel flag p, so the
// addend is y * p; carry-in of bit 0 is 0. On each row step with load=1 the
// register takes register + y*p (just y*p when first=1). W is sized for
// NY (NY-1) / 2, the largest column sum. bus_o carries the register while
// xsel is high and is 0 otherwise.
module sy_column #(
  parameter int unsigned W = 17  // bits for NY (NY-1)/2 = 480 * 479 / 2
) (
  input  logic         clk,
  input  logic         load,
  input  logic         first,
  input  logic [W-1:0] y,        // current row Y coordinate, zero-extended
  input  logic         p,
  input  logic         xsel,
  output logic [W-1:0] value,
  output logic [W-1:0] bus_o
);
  logic [W:0] c;

  assign c[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_bit
    syu_cell u_cell (
      .clk  (clk),
      .load (load),
      .first(first),
      .y_bit(y[i]),
      .p    (p),
      .ci   (c[i]),
      .co   (c[i+1]),
      .xsel (xsel),
      .q    (value[i]),
      .bus_o(bus_o[i])
    );
  end
endmodule
