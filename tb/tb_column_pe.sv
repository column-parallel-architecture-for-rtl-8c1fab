// tb_column_pe: one column processing element at 640 x 480. For random
// columns, thresholds and pixel columns it runs the row phase (480 or fewer
// rows), checks the comparator flag on every row, then checks that the three
// readout buses show sum p, sum x p and sum y p when selected and 0 when not.
module tb_column_pe;
  localparam int unsigned NX = 640, NY = 480, PW = 8;
  localparam int unsigned XW = 10, YW = 9, SW = 9, SXW = 19, SYW = 17;
  logic clk = 1'b0;
  logic load, first, xsel, p;
  logic [PW-1:0] pix, threshold;
  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic [SW-1:0] s_bus;
  logic [SXW-1:0] sx_bus;
  logic [SYW-1:0] sy_bus;
  int checks = 0, failures = 0;

  column_pe #(.NX(NX), .NY(NY), .PW(PW)) dut (
    .clk(clk), .load(load), .first(first), .pix(pix), .threshold(threshold), .x(x), .y(y),
    .xsel(xsel), .p(p), .s_bus(s_bus), .sx_bus(sx_bus), .sy_bus(sy_bus));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic column(input int unsigned xc, input int unsigned rows, input int unsigned thr);
    longint unsigned es, esx, esy;
    es = 0; esx = 0; esy = 0;
    for (int unsigned r = 0; r < rows; r++) begin
      @(negedge clk);
      load = 1'b1; first = (r == 0); xsel = 1'b0;
      x = XW'(xc); y = YW'(r); threshold = PW'(thr);
      pix = PW'($urandom);
      #1;
      check(p == (pix < threshold), "comparator flag");
      if (pix < threshold) begin
        es++; esx += xc; esy += r;
      end
    end
    @(negedge clk);
    load = 1'b0; first = 1'b0; xsel = 1'b0; #1;
    check(s_bus == '0 && sx_bus == '0 && sy_bus == '0, "buses idle when not selected");
    xsel = 1'b1; #1;
    check(s_bus == SW'(es), $sformatf("S %0d vs %0d", s_bus, es));
    check(sx_bus == SXW'(esx), $sformatf("SX %0d vs %0d", sx_bus, esx));
    check(sy_bus == SYW'(esy), $sformatf("SY %0d vs %0d", sy_bus, esy));
  endtask

  initial begin
    load = 1'b0; first = 1'b0; xsel = 1'b0; pix = '0; threshold = '0; x = '0; y = '0;
    column(NX - 1, NY, 256 - 1);   // nearly all pixels flagged at the far column
    column(0, NY, 128);            // column 0 contributes nothing to SX
    for (int i = 0; i < 10; i++)
      column($urandom_range(0, NX - 1), $urandom_range(1, NY), $urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
