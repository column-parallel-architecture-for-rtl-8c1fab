// tb_los_saccade: eye-movement tracking workload on los_sensor_top.
//
// A reduced 40 x 30 array watches a sequence of frames in which the pupil (a
// dark disc of radius 6 on a noisy bright background) fixates, jumps sideways
// in a saccade lasting a few frames, fixates again and jumps back. Disc
// centres lie on a half-pixel grid and the disc is symmetric about its
// centre, so the exact centroid is known without summing the image: the test
// checks every frame's cx, cy (4 fraction bits) against the disc centre the
// scene was drawn with. It also checks that each centroid arrives before the
// next frame has been read out (latency below one frame), and that a simple
// velocity detector on the reported track finds exactly the planned saccade
// frames.
module tb_los_saccade;
  localparam int unsigned NX = 40, NY = 30, PW = 8, FRAC = 4;
  localparam int unsigned XW = los_pkg::bits_for(longint'(NX) - 1);
  localparam int unsigned YW = los_pkg::bits_for(longint'(NY) - 1);
  localparam int unsigned RW = los_pkg::bits_for(longint'(NY));
  localparam int unsigned AW  = los_pkg::area_width(NX, NY);
  localparam int unsigned AXW = los_pkg::sumx_width(NX, NY);
  localparam int unsigned AYW = los_pkg::sumy_width(NX, NY);
  localparam int NF = 24;          // frames in the scene
  localparam int R2 = 12;          // twice the pupil radius
  localparam logic [PW-1:0] THR = 8'd64;

  logic clk = 1'b0, rst_n = 1'b0;
  logic run;
  logic [RW-1:0] num_rows;
  logic [PW-1:0] threshold;
  logic [NX-1:0][PW-1:0] row_pix;
  logic [YW-1:0] row_sel;
  logic row_read, frame_done, centroid_valid, pupil_found;
  logic [AW-1:0] area;
  logic [AXW-1:0] sum_x;
  logic [AYW-1:0] sum_y;
  logic [XW+FRAC-1:0] cx;
  logic [YW+FRAC-1:0] cy;

  los_sensor_top #(.NX(NX), .NY(NY), .PW(PW), .FRAC(FRAC)) dut (
    .clk(clk), .rst_n(rst_n), .run(run), .num_rows(num_rows), .threshold(threshold),
    .row_pix(row_pix), .row_sel(row_sel), .row_read(row_read), .frame_done(frame_done),
    .area(area), .sum_x(sum_x), .sum_y(sum_y), .centroid_valid(centroid_valid),
    .pupil_found(pupil_found), .cx(cx), .cy(cy));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int c2x[NF], c2y[NF];            // disc centre times two, per frame
  int started = 0, centroids = 0;
  int prev_cx16 = -1, detected = 0, planned = 0;
  longint unsigned cycle = 0, frame_start[NF];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [PW-1:0] pixel(int f, int x, int y);
    int dx, dy, h;
    dx = 2 * x + 1 - c2x[f];       // pixel centre at (x + 1/2, y + 1/2)
    dy = 2 * y + 1 - c2y[f];
    h  = (x * 131 + y * 71 + f * 29) % 101;
    if (dx * dx + dy * dy <= R2 * R2) return PW'(10 + h % 30);
    else                             return PW'(100 + h);
  endfunction

  int cur_f;
  always_comb begin
    cur_f = (row_sel == '0) ? started : started - 1;
    if (cur_f < 0) cur_f = 0;
    if (cur_f >= NF) cur_f = NF - 1;
    for (int x = 0; x < NX; x++) row_pix[x] = pixel(cur_f, x, row_sel);
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && row_read && row_sel == '0 && started < NF) begin
      frame_start[started] = cycle;
      started++;
    end
    if (rst_n && centroid_valid && centroids < NF) begin
      int f, ex, ey, cx16;
      f  = centroids;
      // centroid of a disc centred at c2/2, with pixel centres at x + 1/2:
      // sum x / area = c2/2 - 1/2, times 16
      ex = 8 * c2x[f] - 8;
      ey = 8 * c2y[f] - 8;
      check(pupil_found, $sformatf("pupil found in frame %0d", f));
      check(int'(cx) == ex, $sformatf("frame %0d cx %0d expected %0d", f, cx, ex));
      check(int'(cy) == ey, $sformatf("frame %0d cy %0d expected %0d", f, cy, ey));
      // the result must come before the next frame's readout is over
      check(cycle - frame_start[f] < longint'(2 * (NY + NX)), "latency below one frame");
      cx16 = int'(cx);
      // velocity detector: more than 1.5 pixels per frame horizontally
      if (prev_cx16 >= 0 && (cx16 - prev_cx16 > 24 || prev_cx16 - cx16 > 24)) detected++;
      prev_cx16 = cx16;
      centroids++;
    end
  end

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // scene: fixation, 4-frame saccade to the right, fixation, 3-frame saccade back
    for (int f = 0; f < NF; f++) begin
      if (f < 6)       c2x[f] = 2 * 10;
      else if (f < 10) c2x[f] = 2 * 10 + (f - 5) * 9;     // 4.5 pixels per frame
      else if (f < 17) c2x[f] = 2 * 10 + 4 * 9 + 1;       // settles half a pixel further
      else if (f < 20) c2x[f] = 2 * 10 + 4 * 9 + 1 - (f - 16) * 12;
      else             c2x[f] = 2 * 10 + 4 * 9 + 1 - 3 * 12;
      c2y[f] = 2 * 14 + (f % 2);                           // small vertical jitter
    end
    for (int f = 1; f < NF; f++)
      if (c2x[f] - c2x[f-1] > 3 || c2x[f-1] - c2x[f] > 3) planned++;
    run = 1'b0; num_rows = '0; threshold = THR;
    #12 rst_n = 1'b1;
    @(negedge clk); run = 1'b1;
    while (started < NF) @(posedge clk);
    @(negedge clk); run = 1'b0;
    while (centroids < NF) @(posedge clk);
    check(detected == planned, $sformatf("saccade frames detected %0d planned %0d", detected, planned));
    $display("frames=%0d saccade_frames=%0d", centroids, detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
