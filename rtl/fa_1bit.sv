// fa_1bit: one-bit full adder, the FA inside every Su, SXu and SYu cell.
// Purely combinational: s = a ^ b ^ ci, co = majority(a, b, ci).
module fa_1bit (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (ci & (a ^ b));
  end
endmodule
