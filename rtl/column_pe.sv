// column_pe: the processing element of one pixel column.
//
// It holds the column comparator and the three column accumulators:
//   S  counts the pupil pixels of the column         (sum_y p)
//   SX accumulates the column's X coordinate per hit  (sum_y x p)
//   SY accumulates the current row's Y per hit        (sum_y y p)
// Row phase: for every row read out, pix is this column's pixel of that row
// and y its row number; with load=1 all three registers add their term at the
// clock edge (first=1 on the first row restarts them). Column phase: when
// xsel is high the three results are driven onto the S, SX and SY readout
// buses, otherwise the bus outputs are 0 so the buses of all columns can be
// ORed together. x is the column's fixed coordinate (0 = leftmost column).
// Widths follow the worst case of an all-pupil column; see los_pkg.
module column_pe import los_pkg::*; #(
  parameter int unsigned NX  = 640,
  parameter int unsigned NY  = 480,
  parameter int unsigned PW  = 8,
  parameter int unsigned XW  = bits_for((longint'(NX) - 1)),
  parameter int unsigned YW  = bits_for((longint'(NY) - 1)),
  parameter int unsigned SW  = s_width(NY),
  parameter int unsigned SXW = sx_width(NX, NY),
  parameter int unsigned SYW = sy_width(NY)
) (
  input  logic           clk,
  input  logic           load,
  input  logic           first,
  input  logic [PW-1:0]  pix,
  input  logic [PW-1:0]  threshold,
  input  logic [XW-1:0]  x,
  input  logic [YW-1:0]  y,
  input  logic           xsel,
  output logic           p,
  output logic [SW-1:0]  s_bus,
  output logic [SXW-1:0] sx_bus,
  output logic [SYW-1:0] sy_bus
);
  logic [SW-1:0]  s_val;
  logic [SXW-1:0] sx_val;
  logic [SYW-1:0] sy_val;

  column_comparator #(.PW(PW)) u_cmp (
    .pix      (pix),
    .threshold(threshold),
    .p        (p)
  );

  s_column #(.W(SW)) u_s (
    .clk(clk), .load(load), .first(first), .p(p), .xsel(xsel),
    .value(s_val), .bus_o(s_bus)
  );

  sx_column #(.W(SXW)) u_sx (
    .clk(clk), .load(load), .first(first), .x(SXW'(x)), .p(p), .xsel(xsel),
    .value(sx_val), .bus_o(sx_bus)
  );

  sy_column #(.W(SYW)) u_sy (
    .clk(clk), .load(load), .first(first), .y(SYW'(y)), .p(p), .xsel(xsel),
    .value(sy_val), .bus_o(sy_bus)
  );
endmodule
