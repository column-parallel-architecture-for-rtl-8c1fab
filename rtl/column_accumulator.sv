// column_accumulator: the adder and register outside the column array that
// sums the column results read out one column at a time (the X-direction sum).
//
// During the column phase the controller selects one column per cycle; the
// selected column's IW-bit result is on bus_in. At each rising clk edge with
// en=1 the OW-bit register takes acc + bus_in, or just bus_in when first=1
// (first column of the frame), so after the last column acc holds the frame
// total. acc keeps its value while en=0. rst_n clears it asynchronously.
// Three instances serve the S, SX and SY buses.
module column_accumulator #(
  parameter int unsigned IW = 9,
  parameter int unsigned OW = 19
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          first,
  input  logic [IW-1:0] bus_in,
  output logic [OW-1:0] acc
);
  logic [OW-1:0] addend;

  assign addend = OW'(bus_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc <= '0;
    else if (en)    acc <= (first ? '0 : acc) + addend;
  end
endmodule
