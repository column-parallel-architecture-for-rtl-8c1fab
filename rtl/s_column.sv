// s_column: the S circuit of one column, the n-bit count of pupil pixels in
// that column (sum over y of p_xy).
//
// W su_cell instances are chained carry-out to carry-in, forming a W-bit
// ripple-carry adder around a W-bit register. The pixel flag p enters on the
// carry-in of bit 0, so each row step with load=1 adds p to the count; the
// carry out of the top bit is dropped (W is sized so the count never wraps:
// W = bits to hold NY). first=1 on the first row restarts the count.
// While xsel is high the count appears on bus_o, otherwise bus_o is 0.
// value exposes the register for observation.
module s_column #(
  parameter int unsigned W = 9   // bits for 0..NY, NY = 480
) (
  input  logic         clk,
  input  logic         load,
  input  logic         first,
  input  logic         p,
  input  logic         xsel,
  output logic [W-1:0] value,
  output logic [W-1:0] bus_o
);
  logic [W:0] c;

  assign c[0] = p;

  for (genvar i = 0; i < W; i++) begin : g_bit
    su_cell u_cell (
      .clk  (clk),
      .load (load),
      .first(first),
      .ci   (c[i]),
      .co   (c[i+1]),
      .xsel (xsel),
      .q    (value[i]),
      .bus_o(bus_o[i])
    );
  end
endmodule
