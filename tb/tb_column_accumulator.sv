// tb_column_accumulator: checks the external X-direction accumulator. Random
// column sequences are added with first on the first column; the register is
// compared with a software sum after each edge, held while en is low, and
// the worst case (every column at its maximum) must not overflow.
module tb_column_accumulator;
  localparam int unsigned IW = 19;   // SX column width at 640 x 480
  localparam int unsigned OW = 27;   // sum_x width at 640 x 480
  localparam int unsigned NX = 640;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en, first;
  logic [IW-1:0] bus_in;
  logic [OW-1:0] acc;
  longint unsigned ref_acc;
  int checks = 0, failures = 0;

  column_accumulator #(.IW(IW), .OW(OW)) dut (.clk(clk), .rst_n(rst_n), .en(en), .first(first),
                                              .bus_in(bus_in), .acc(acc));
  always #5 clk = ~clk;

  task automatic check(input logic [OW-1:0] got, input longint unsigned exp, input string what);
    checks++;
    if (got !== OW'(exp)) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(input bit worst);
    for (int c = 0; c < NX; c++) begin
      @(negedge clk);
      en = 1'b1; first = (c == 0);
      // column c holds at most c * 480 in SX
      bus_in = worst ? IW'(c * 480) : IW'($urandom_range(0, c * 480));
      ref_acc = (c == 0 ? 0 : ref_acc) + bus_in;
      @(posedge clk); #1;
      check(acc, ref_acc, "acc");
      if ($urandom_range(0, 15) == 0) begin
        @(negedge clk);
        en = 1'b0; first = 1'b1; bus_in = '1;
        @(posedge clk); #1;
        check(acc, ref_acc, "hold");
      end
    end
  endtask

  initial begin
    en = 1'b0; first = 1'b0; bus_in = '0;
    #12 check(acc, 0, "reset");
    rst_n = 1'b1;
    frame(1'b1);
    check(acc, longint'(480) * 640 * 639 / 2, "worst case");
    repeat (3) frame(1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
