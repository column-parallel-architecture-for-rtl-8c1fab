// tb_timing_controller: walks the sequencer through single and back-to-back
// frames at 640 x 480 and with row windows of 64 and 175 rows, and checks on
// every cycle that the row phase presents rows 0..R-1 (first flag on row 0),
// the column phase selects columns 0..NX-1 with a one-hot xsel, frame_done
// pulses in the cycle after the last column, back-to-back frames take exactly
// R + NX cycles, and the controller idles when run drops.
module tb_timing_controller;
  import los_pkg::*;
  localparam int unsigned NX = 640, NY = 480;
  localparam int unsigned XW = 10, YW = 9, RW = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic run;
  logic [RW-1:0] num_rows;
  phase_e phase;
  logic row_load, row_first, col_en, col_first, frame_done;
  logic [YW-1:0] y;
  logic [XW-1:0] col_idx;
  logic [NX-1:0] xsel;
  int checks = 0, failures = 0;

  timing_controller #(.NX(NX), .NY(NY)) dut (
    .clk(clk), .rst_n(rst_n), .run(run), .num_rows(num_rows), .phase(phase),
    .row_load(row_load), .row_first(row_first), .y(y), .col_en(col_en),
    .col_first(col_first), .col_idx(col_idx), .xsel(xsel), .frame_done(frame_done));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs nframes frames of R rows back to back (R = 0 means NY), then stops.
  task automatic frames(input int unsigned R, input int unsigned nframes);
    int unsigned reff, wait_cyc, start_t, period;
    reff = (R == 0 || R > NY) ? NY : R;
    @(negedge clk);
    check(phase == PH_IDLE && !row_load && !col_en && xsel == '0, "idle before start");
    run = 1'b1; num_rows = RW'(R);
    @(negedge clk);
    // leaving idle takes exactly one cycle
    check(row_load, "row phase one cycle after run");
    for (int unsigned f = 0; f < nframes; f++) begin
      start_t = checks;
      period = 0;
      for (int unsigned r = 0; r < reff; r++) begin
        check(row_load && !col_en && y == YW'(r) && row_first == (r == 0) && xsel == '0,
              $sformatf("row step %0d", r));
        check(frame_done == (f > 0 && r == 0), "frame_done only after the column phase");
        // num_rows may change mid-frame without effect
        num_rows = RW'($urandom_range(1, NY));
        @(negedge clk);
        period++;
      end
      num_rows = RW'(R);
      for (int unsigned c = 0; c < NX; c++) begin
        logic [NX-1:0] exp_sel;
        exp_sel = '0;
        exp_sel[c] = 1'b1;
        check(col_en && !row_load && col_idx == XW'(c) && col_first == (c == 0) && xsel == exp_sel,
              $sformatf("column step %0d", c));
        check(!frame_done, "no frame_done in column phase");
        if (f == nframes - 1 && c == NX - 1) run = 1'b0;
        @(negedge clk);
        period++;
      end
      check(period == reff + NX, "frame period rows + NX");
    end
    check(frame_done, "frame_done after last column");
    check(phase == PH_IDLE, "idle after run dropped");
    @(negedge clk);
    check(!frame_done && phase == PH_IDLE && xsel == '0, "stays idle");
  endtask

  initial begin
    run = 1'b0; num_rows = '0;
    #12 rst_n = 1'b1;
    frames(0, 2);     // full 640 x 480, two frames back to back
    frames(64, 3);    // 640 x 64 window
    frames(175, 1);   // 640 x 175 window
    frames(480, 1);
    frames(1, 2);     // single row
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
