// su_cell: one bit of the per-column area counter S (sum over y of p_xy).
//
// A cell is a full adder, a one-bit register and a bus driver. Cells are
// chained carry-out to carry-in, so n cells form an n-bit ripple-carry adder
// whose addend comes in on the carry-in of the least significant cell (the
// pixel flag P) and whose other operand is the register itself: each row step
// adds P to the stored count.
//
// Timing: on a rising clk edge with load=1 the register takes the adder's sum.
// With first=1 the register operand is forced to 0, so the first row of a
// frame overwrites the previous frame's count instead of adding to it (this
// replaces a separate clear step; a choice of this design).
// The driver puts the register bit on the column-readout bus only while xsel
// is high. The shared on-chip bus uses tri-state buffers; here the driver is
// an AND gate and the bus is the OR of all columns, which gives the same value
// as long as one column at a time is selected.
// In S the full adder's second operand is unused (tied to 0): S only ever
// adds the one-bit flag P, which enters through the carry chain.
module su_cell (
  input  logic clk,
  input  logic load,   // row step: store the adder output
  input  logic first,  // first row of the frame: ignore the old register value
  input  logic ci,     // carry from the next lower bit (P for bit 0)
  output logic co,     // carry to the next higher bit
  input  logic xsel,   // column select for readout
  output logic q,      // register bit
  output logic bus_o   // bit driven onto the readout bus (0 when not selected)
);
  logic a, sum;

  assign a = q & ~first;

  fa_1bit u_fa (.a(a), .b(1'b0), .ci(ci), .s(sum), .co(co));

  always_ff @(posedge clk) begin
    if (load) q <= sum;
  end

  assign bus_o = xsel & q;
endmodule
