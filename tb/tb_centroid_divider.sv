// tb_centroid_divider: checks floor(num * 2^FRAC / den) for random centroid-like
// operands at the 640 x 480 sizes, the corner cases (one pixel, whole frame,
// zero area) and the latency of NW + FRAC + 1 cycles from start to done.
module tb_centroid_divider;
  localparam int unsigned NW = 27, DW = 19, FRAC = 4, QW = 14;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done, div_zero;
  logic [NW-1:0] num;
  logic [DW-1:0] den;
  logic [QW-1:0] q;
  int checks = 0, failures = 0;

  centroid_divider #(.NW(NW), .DW(DW), .FRAC(FRAC), .QW(QW)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .num(num), .den(den),
    .busy(busy), .done(done), .q(q), .div_zero(div_zero));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (num=%0d den=%0d q=%0d)", what, num, den, q);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic divide(input longint unsigned n, input longint unsigned d);
    int cyc;
    longint unsigned expq;
    @(negedge clk);
    num = NW'(n); den = DW'(d); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    // a start while busy must be ignored
    num = '1; den = 1;
    start = ($urandom_range(0, 1) == 1);
    while (!done && cyc < 200) begin
      @(negedge clk);
      start = 1'b0;
      cyc++;
    end
    num = NW'(n); den = DW'(d);
    check(cyc == NW + FRAC + 1, $sformatf("latency %0d", cyc));
    if (d == 0) begin
      check(div_zero, "div_zero flagged");
    end else begin
      expq = (n << FRAC) / d;
      check(!div_zero, "no div_zero");
      check(q == QW'(expq), $sformatf("quotient expected %0d", expq));
    end
  endtask

  initial begin
    start = 1'b0; num = '0; den = '0;
    #12 rst_n = 1'b1;
    divide(639, 1);                                  // single pixel at right edge
    divide(longint'(480) * 640 * 639 / 2, 640 * 480); // whole frame
    divide(12345, 0);                                // no pupil
    divide(0, 77);
    repeat (200) begin
      longint unsigned a, c;
      a = $urandom_range(1, 640 * 480 / 2);   // keeps a * 639 within sum_x range
      c = $urandom_range(0, 639);
      // num = a * (mean coordinate c + fraction), keeping num / den < 640
      divide(a * c + $urandom_range(0, a - 1), a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
