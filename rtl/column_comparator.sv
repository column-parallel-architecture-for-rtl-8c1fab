// column_comparator: the per-column comparator that decides whether the pixel
// just read out belongs to the pupil.
//
// Under infrared light the pupil is the dark area of the eye image. The pixel
// value arrives here already digitised (PW bits, larger = brighter, as a
// camera delivers it); the flag p is 1 when the value is strictly below the
// threshold. Purely combinational: p is valid in the same cycle as pix and is
// sampled by the column's accumulators at the row step's clock edge.
// On a sensor chip this is a voltage comparator on the pixel's analogue
// output; the digital comparison here is this design's stand-in for it.
module column_comparator #(
  parameter int unsigned PW = 8
) (
  input  logic [PW-1:0] pix,
  input  logic [PW-1:0] threshold,
  output logic          p
);
  assign p = (pix < threshold);
endmodule
