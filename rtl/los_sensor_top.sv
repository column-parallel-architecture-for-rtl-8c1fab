// los_sensor_top: column-parallel pupil-centroid engine of a line-of-sight
// detection image sensor.
//
// The pupil is the dark disc in an infrared eye image; its centroid
//   cx = sum(x p) / sum(p),  cy = sum(y p) / sum(p)
// (p = 1 for a pupil pixel) gives the gaze direction. The double sums are
// split: a row phase sums every column down its rows in parallel (one row per
// cycle, NX column_pe instances working at once), then a column phase reads
// the NX column results one per cycle over three shared buses into three
// external column_accumulator instances. A frame therefore costs NY + NX
// cycles (560 kHz for 640 x 480 at 500 frames/s). Two centroid_divider
// instances then divide, overlapping with the next frame's row phase.
//
// Interface: the pixel array itself is outside this module. The sensor
// presents row row_sel, digitised, on row_pix in the cycle row_read is high
// (row_pix[i] is column i's pixel, larger value = brighter). threshold sets
// the comparator level. With run high frames follow back to back; num_rows
// (0 = NY) selects a window of the first num_rows rows.
// Timing: frame_done pulses for one cycle when area, sum_x and sum_y hold the
// new frame (one cycle after the last column step). The dividers start in
// that cycle and NW + FRAC cycles later centroid_valid pulses with cx, cy
// (FRAC fraction bits) and pupil_found (0 when no pixel was below threshold).
// The frame period (rows + NX) must be at least that division latency, which
// holds by a wide margin at the default size.
//
// The row/column split, the one-bit adder-register cells, the XSEL readout
// and the external accumulators follow the published column-parallel
// architecture. The digitised pixel input, the row window, the registered
// results and the divider design are this implementation's own choices.
module los_sensor_top import los_pkg::*; #(
  parameter int unsigned NX   = 640,
  parameter int unsigned NY   = 480,
  parameter int unsigned PW   = 8,
  parameter int unsigned FRAC = 4,
  parameter int unsigned XW   = bits_for((longint'(NX) - 1)),
  parameter int unsigned YW   = bits_for((longint'(NY) - 1)),
  parameter int unsigned RW   = bits_for(longint'(NY)),
  parameter int unsigned AW   = area_width(NX, NY),
  parameter int unsigned AXW  = sumx_width(NX, NY),
  parameter int unsigned AYW  = sumy_width(NX, NY)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   run,
  input  logic [RW-1:0]          num_rows,
  input  logic [PW-1:0]          threshold,
  input  logic [NX-1:0][PW-1:0]  row_pix,
  output logic [YW-1:0]          row_sel,
  output logic                   row_read,
  output logic                   frame_done,
  output logic [AW-1:0]          area,
  output logic [AXW-1:0]         sum_x,
  output logic [AYW-1:0]         sum_y,
  output logic                   centroid_valid,
  output logic                   pupil_found,
  output logic [XW+FRAC-1:0]     cx,
  output logic [YW+FRAC-1:0]     cy
);
  localparam int unsigned SW  = s_width(NY);
  localparam int unsigned SXW = sx_width(NX, NY);
  localparam int unsigned SYW = sy_width(NY);
  localparam int unsigned NW  = (AXW > AYW) ? AXW : AYW;  // both dividers same latency

  // ---- sequencer ----
  phase_e          phase;
  logic            row_load, row_first, col_en, col_first, ctrl_done;
  logic [YW-1:0]   y;
  logic [XW-1:0]   col_idx;
  logic [NX-1:0]   xsel;

  timing_controller #(.NX(NX), .NY(NY), .XW(XW), .YW(YW), .RW(RW)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .run       (run),
    .num_rows  (num_rows),
    .phase     (phase),
    .row_load  (row_load),
    .row_first (row_first),
    .y         (y),
    .col_en    (col_en),
    .col_first (col_first),
    .col_idx   (col_idx),
    .xsel      (xsel),
    .frame_done(ctrl_done)
  );

  assign row_sel  = y;
  assign row_read = row_load;

  // ---- column array ----
  logic [NX-1:0][SW-1:0]  s_bus_col;
  logic [NX-1:0][SXW-1:0] sx_bus_col;
  logic [NX-1:0][SYW-1:0] sy_bus_col;
  logic [NX-1:0]          p_col;

  for (genvar i = 0; i < NX; i++) begin : g_col
    column_pe #(
      .NX(NX), .NY(NY), .PW(PW), .XW(XW), .YW(YW),
      .SW(SW), .SXW(SXW), .SYW(SYW)
    ) u_pe (
      .clk      (clk),
      .load     (row_load),
      .first    (row_first),
      .pix      (row_pix[i]),
      .threshold(threshold),
      .x        (XW'(i)),
      .y        (y),
      .xsel     (xsel[i]),
      .p        (p_col[i]),
      .s_bus    (s_bus_col[i]),
      .sx_bus   (sx_bus_col[i]),
      .sy_bus   (sy_bus_col[i])
    );
  end

  // Readout buses: only the selected column drives a non-zero value.
  logic [SW-1:0]  s_bus;
  logic [SXW-1:0] sx_bus;
  logic [SYW-1:0] sy_bus;

  always_comb begin
    s_bus  = '0;
    sx_bus = '0;
    sy_bus = '0;
    for (int i = 0; i < NX; i++) begin
      s_bus  = s_bus  | s_bus_col[i];
      sx_bus = sx_bus | sx_bus_col[i];
      sy_bus = sy_bus | sy_bus_col[i];
    end
  end

  // ---- X-direction accumulators ----
  logic [AW-1:0]  acc_s;
  logic [AXW-1:0] acc_sx;
  logic [AYW-1:0] acc_sy;

  column_accumulator #(.IW(SW), .OW(AW)) u_acc_s (
    .clk(clk), .rst_n(rst_n), .en(col_en), .first(col_first), .bus_in(s_bus), .acc(acc_s)
  );
  column_accumulator #(.IW(SXW), .OW(AXW)) u_acc_sx (
    .clk(clk), .rst_n(rst_n), .en(col_en), .first(col_first), .bus_in(sx_bus), .acc(acc_sx)
  );
  column_accumulator #(.IW(SYW), .OW(AYW)) u_acc_sy (
    .clk(clk), .rst_n(rst_n), .en(col_en), .first(col_first), .bus_in(sy_bus), .acc(acc_sy)
  );

  // Frame results, held until the next frame completes.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      area       <= '0;
      sum_x      <= '0;
      sum_y      <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= ctrl_done;
      if (ctrl_done) begin
        area  <= acc_s;
        sum_x <= acc_sx;
        sum_y <= acc_sy;
      end
    end
  end

  // ---- the two divisions: cx = sum_x / area, cy = sum_y / area ----
  logic busy_x, busy_y, done_x, done_y, zero_x, zero_y;

  centroid_divider #(.NW(NW), .DW(AW), .FRAC(FRAC), .QW(XW + FRAC)) u_div_x (
    .clk(clk), .rst_n(rst_n), .start(ctrl_done), .num(NW'(acc_sx)), .den(acc_s),
    .busy(busy_x), .done(done_x), .q(cx), .div_zero(zero_x)
  );
  centroid_divider #(.NW(NW), .DW(AW), .FRAC(FRAC), .QW(YW + FRAC)) u_div_y (
    .clk(clk), .rst_n(rst_n), .start(ctrl_done), .num(NW'(acc_sy)), .den(acc_s),
    .busy(busy_y), .done(done_y), .q(cy), .div_zero(zero_y)
  );

  assign centroid_valid = done_x & done_y;
  assign pupil_found    = ~zero_x;

  // A new frame must not arrive while the previous one is still being divided.
  a_div_free: assert property (@(posedge clk) disable iff (!rst_n) ctrl_done |-> !(busy_x || busy_y));
  // Both dividers run in lock step.
  a_div_lockstep: assert property (@(posedge clk) disable iff (!rst_n) done_x == done_y);
endmodule
