// tb_sy_column: self-checking test of the SY circuit (sum of the row Y coordinates of the column's pupil pixels).
// Runs frames of random length (up to 480 rows) with random pixel flags and
// idle cycles, checking the register and the gated readout bus against a
// software sum after every clock edge, plus the all-pupil worst case that
// sets the register width.
module tb_sy_column;
  localparam int unsigned W  = 17;
  localparam int unsigned NY = 480;
  localparam int unsigned NX = 640;
  logic clk = 1'b0;
  logic load, first, p, xsel;
  logic [W-1:0] coord, value, bus_o;
  longint unsigned ref_sum;
  int   checks = 0, failures = 0;

  sy_column #(.W(W)) dut (.clk(clk), .load(load), .first(first), .y(coord), .p(p), .xsel(xsel),
                         .value(value), .bus_o(bus_o));

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // xc: the column's X coordinate for this frame
  task automatic run_frame(input int unsigned rows, input int unsigned density, input int unsigned xc);
    for (int unsigned r = 0; r < rows; r++) begin
      if (r != 0 && $urandom_range(0, 9) == 0) begin
        @(negedge clk);
        load = 1'b0; first = 1'b0; p = 1'b1; coord = W'($urandom);
        @(posedge clk); #1;
        check(value, W'(ref_sum), "idle hold");
      end
      @(negedge clk);
      load  = 1'b1;
      first = (r == 0);
      p     = ($urandom_range(0, 99) < density);
      coord = W'(r);
      xsel  = 1'b0;
      if (r == 0) ref_sum = 0;
      if (p) ref_sum += r;
      @(posedge clk); #1;
      check(value, W'(ref_sum), "sum");
    end
    @(negedge clk);
    load = 1'b0; first = 1'b0;
    xsel = 1'b0; #1;
    check(bus_o, '0, "bus deselected");
    xsel = 1'b1; #1;
    check(bus_o, W'(ref_sum), "bus selected");
  endtask

  initial begin
    load = 1'b0; first = 1'b0; p = 1'b0; xsel = 1'b0; coord = '0;
    repeat (2) @(posedge clk);
    run_frame(NY, 100, NX - 1);   // worst case for this register
    check(value, W'(NY * (NY - 1) / 2), "full column");
    run_frame(NY, 0, 5);
    for (int f = 0; f < 6; f++) run_frame($urandom_range(1, NY), $urandom_range(0, 100), $urandom_range(0, NX - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
