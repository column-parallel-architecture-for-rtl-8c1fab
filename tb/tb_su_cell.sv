// tb_su_cell: self-checking test of su_cell (one bit of a column accumulator).
// Drives random load / first / carry-in / operand / xsel patterns and compares
// the carry-out, the registered bit and the bus bit with a reference model of
// a full adder feeding a register. A watchdog ends the run if it hangs.
module tb_su_cell;
  logic clk = 1'b0;
  logic load, first, ci, xsel;
  
  logic co, q, bus_o;
  logic q_ref, a_ref, b_ref;
  int   checks = 0, failures = 0;

  su_cell dut (.clk(clk), .load(load), .first(first),  .ci(ci), .co(co), .xsel(xsel), .q(q), .bus_o(bus_o));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialise the register: first row with zero operands
    load = 1'b1; first = 1'b1; ci = 1'b0; xsel = 1'b0; 
    @(posedge clk); #1;
    q_ref = 1'b0;
    check(q, q_ref, "init");
    repeat (400) begin
      @(negedge clk);
      load  = $urandom_range(0, 3) != 0;
      first = $urandom_range(0, 5) == 0;
      ci    = $urandom_range(0, 1);
      xsel  = $urandom_range(0, 1);
      
      #1;
      a_ref = q_ref & ~first;
      b_ref = 1'b0;
      check(co, (a_ref & b_ref) | (a_ref & ci) | (b_ref & ci), "carry out");
      check(bus_o, xsel & q_ref, "bus");
      @(posedge clk); #1;
      if (load) q_ref = a_ref ^ b_ref ^ ci;
      check(q, q_ref, "register");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
