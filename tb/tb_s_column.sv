// tb_s_column: self-checking test of the S circuit (pupil pixel count of one
// column). Runs several frames of random length (up to 480 rows) with random
// pixel flags and idle cycles, and checks the stored count and the gated
// readout bus against a software count after every clock edge. Also checks
// the all-ones frame that gives the largest count the width must hold.
module tb_s_column;
  localparam int unsigned W  = 9;
  localparam int unsigned NY = 480;
  logic clk = 1'b0;
  logic load, first, p, xsel;
  logic [W-1:0] value, bus_o;
  int unsigned ref_cnt;
  int   checks = 0, failures = 0;

  s_column #(.W(W)) dut (.clk(clk), .load(load), .first(first), .p(p), .xsel(xsel),
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

  task automatic run_frame(input int unsigned rows, input int unsigned density);
    for (int unsigned r = 0; r < rows; r++) begin
      // an idle cycle now and then (load low) must not change the count
      if (r != 0 && $urandom_range(0, 9) == 0) begin
        @(negedge clk);
        load = 1'b0; first = 1'b0; p = 1'b1;
        @(posedge clk); #1;
        check(value, W'(ref_cnt), "idle hold");
      end
      @(negedge clk);
      load  = 1'b1;
      first = (r == 0);
      p     = ($urandom_range(0, 99) < density);
      xsel  = 1'b0;
      if (r == 0) ref_cnt = 0;
      ref_cnt += p;
      @(posedge clk); #1;
      check(value, W'(ref_cnt), "count");
    end
    // readout: bus shows the count only when selected
    @(negedge clk);
    load = 1'b0; first = 1'b0;
    xsel = 1'b0; #1;
    check(bus_o, '0, "bus deselected");
    xsel = 1'b1; #1;
    check(bus_o, W'(ref_cnt), "bus selected");
  endtask

  initial begin
    load = 1'b0; first = 1'b0; p = 1'b0; xsel = 1'b0;
    repeat (2) @(posedge clk);
    run_frame(NY, 100);           // all pupil: count reaches NY
    check(value, W'(NY), "full column");
    run_frame(NY, 0);             // no pupil
    for (int f = 0; f < 6; f++) run_frame($urandom_range(1, NY), $urandom_range(0, 100));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
