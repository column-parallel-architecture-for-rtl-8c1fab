// tb_los_sensor_top: end-to-end test of los_sensor_top at 16 x 16 pixels, the size of the preliminary integrated sensor.
//
// A synthetic infrared eye image is generated for every frame: a dark disc
// (the pupil, pixel values 5..44) of random centre and radius on a bright,
// noisy background (values 90..255), optionally with no pupil at all. The
// testbench plays the pixel array: it puts the row named by row_sel on
// row_pix. For each frame it computes area, sum of x and sum of y of the
// pixels below the threshold directly from the image and compares them with
// the frame result, then compares cx and cy with floor(16 * sum / area).
// It counts the mechanisms of the design and fails if one never occurred:
// back-to-back frames, a restart from idle, a reduced row window, a frame
// with no pupil, a centroid delivered, and the frame period rows + NX.
module tb_los_sensor_top;
  localparam int unsigned NX = 16, NY = 16, PW = 8, FRAC = 4;
  localparam int unsigned XW = los_pkg::bits_for(longint'(NX) - 1);
  localparam int unsigned YW = los_pkg::bits_for(longint'(NY) - 1);
  localparam int unsigned RW = los_pkg::bits_for(longint'(NY));
  localparam int unsigned AW  = los_pkg::area_width(NX, NY);
  localparam int unsigned AXW = los_pkg::sumx_width(NX, NY);
  localparam int unsigned AYW = los_pkg::sumy_width(NX, NY);
  localparam int unsigned MAXF = 64;
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
  // per-frame scene: pupil centre, radius (-1: no pupil), rows read
  int pcx[MAXF], pcy[MAXF], prad[MAXF], rows_of[MAXF];
  int started = 0;        // frames whose row 0 has been read
  int finished = 0;       // frame results seen
  int centroids = 0;      // centroid results seen
  longint unsigned ref_area[MAXF], ref_sx[MAXF], ref_sy[MAXF];
  // mechanism counters
  int n_back_to_back = 0, n_restart = 0, n_window = 0, n_empty = 0, n_found = 0, n_period_ok = 0;
  longint unsigned last_start_cycle = 0, cycle = 0;
  bit was_idle = 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int unsigned hash(int unsigned f, int unsigned x, int unsigned y);
    int unsigned h;
    h = (x * 32'd2654435761) ^ (y * 32'd40503) ^ (f * 32'd97);
    h = h ^ (h >> 13);
    h = h * 32'd1274126177;
    return h ^ (h >> 16);
  endfunction

  function automatic logic [PW-1:0] pixel(int unsigned f, int unsigned x, int unsigned y);
    int dx, dy;
    dx = int'(x) - pcx[f];
    dy = int'(y) - pcy[f];
    if (prad[f] >= 0 && dx * dx + dy * dy <= prad[f] * prad[f])
      return PW'(5 + hash(f, x, y) % 40);
    else
      return PW'(90 + hash(f, x, y) % 166);
  endfunction

  // The pixel array: row row_sel of the frame being read.
  int unsigned cur_f;
  always_comb begin
    cur_f = (row_sel == '0) ? started : started - 1;
    for (int x = 0; x < NX; x++) row_pix[x] = pixel(cur_f % MAXF, x, row_sel);
  end

  task automatic compute_ref(input int f);
    longint unsigned a, sx, sy;
    a = 0; sx = 0; sy = 0;
    for (int y = 0; y < rows_of[f]; y++)
      for (int x = 0; x < NX; x++)
        if (pixel(f, x, y) < THR) begin
          a++; sx += x; sy += y;
        end
    ref_area[f] = a; ref_sx[f] = sx; ref_sy[f] = sy;
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && row_read && row_sel == '0) begin
      rows_of[started] = (num_rows == '0 || num_rows > RW'(NY)) ? NY : int'(num_rows);
      if (rows_of[started] < NY) n_window++;
      if (started > 0 && !was_idle) begin
        n_back_to_back++;
        if (cycle - last_start_cycle == longint'(rows_of[started - 1] + NX)) n_period_ok++;
        check(cycle - last_start_cycle == longint'(rows_of[started - 1] + NX), "frame period rows + NX");
      end
      if (started > 0 && was_idle) n_restart++;
      last_start_cycle = cycle;
      was_idle = 1'b0;
      compute_ref(started);
      started++;
    end
    if (rst_n && !row_read && !dut.u_ctrl.col_en) was_idle = 1'b1;
    if (rst_n && frame_done) begin
      check(area == AW'(ref_area[finished]), $sformatf("area frame %0d: %0d vs %0d", finished, area, ref_area[finished]));
      check(sum_x == AXW'(ref_sx[finished]), $sformatf("sum_x frame %0d: %0d vs %0d", finished, sum_x, ref_sx[finished]));
      check(sum_y == AYW'(ref_sy[finished]), $sformatf("sum_y frame %0d: %0d vs %0d", finished, sum_y, ref_sy[finished]));
      finished++;
    end
    if (rst_n && centroid_valid) begin
      int f;
      f = centroids;
      check(f < finished, "centroid follows its frame");
      if (ref_area[f] == 0) begin
        n_empty++;
        check(!pupil_found, "empty frame reports no pupil");
      end else begin
        n_found++;
        check(pupil_found, "pupil found");
        check(cx == (XW+FRAC)'((ref_sx[f] << FRAC) / ref_area[f]),
              $sformatf("cx frame %0d: %0d vs %0d", f, cx, (ref_sx[f] << FRAC) / ref_area[f]));
        check(cy == (YW+FRAC)'((ref_sy[f] << FRAC) / ref_area[f]),
              $sformatf("cy frame %0d: %0d vs %0d", f, cy, (ref_sy[f] << FRAC) / ref_area[f]));
      end
      centroids++;
    end
  end

  initial begin
    #(10ms);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_frames(input int n);
    int target;
    target = finished + n;
    while (finished < target) @(posedge clk);
  endtask

  initial begin
    for (int f = 0; f < MAXF; f++) begin
      pcx[f]  = $urandom_range(0, NX - 1);
      pcy[f]  = $urandom_range(0, NY - 1);
      prad[f] = $urandom_range(1, (NY < NX ? NY : NX) / 3);
    end
    prad[0] = NX + NY;     // whole window is pupil: the largest sums
    prad[2] = -1;          // no pupil in frame 2
    run = 1'b0; num_rows = '0; threshold = THR;
    #12 rst_n = 1'b1;
    // frames 0-2: full height, back to back
    @(negedge clk); run = 1'b1;
    wait_frames(2);
    @(negedge clk); run = 1'b0;
    wait_frames(1);
    repeat (5) @(posedge clk);
    // frames 3-4: reduced row window, restarted from idle
    @(negedge clk); num_rows = RW'(5); run = 1'b1;
    wait_frames(1);
    @(negedge clk); run = 1'b0;
    wait_frames(1);
    repeat (3) @(posedge clk);
    // frames 5-6: second window then full height
    @(negedge clk); num_rows = RW'(1); run = 1'b1;
    wait_frames(1);
    @(negedge clk); num_rows = '0; run = 1'b0;
    wait_frames(1);
    // let the last division finish
    repeat (80) @(posedge clk);
    check(centroids == finished, "every frame got a centroid");
    check(n_back_to_back > 0, "back-to-back frames happened");
    check(n_period_ok > 0, "frame period rows + NX observed");
    check(n_restart > 0, "restart from idle happened");
    check(n_window > 0, "reduced row window happened");
    check(n_empty > 0, "frame without pupil happened");
    check(n_found > 0, "centroid of a pupil delivered");
    $display("frames=%0d back_to_back=%0d restarts=%0d windowed=%0d empty=%0d centroids=%0d",
             finished, n_back_to_back, n_restart, n_window, n_empty, n_found);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
