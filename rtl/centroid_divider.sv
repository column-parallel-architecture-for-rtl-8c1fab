// centroid_divider: one of the two divisions per frame that turn the sums into
// a centroid coordinate, q = floor(num * 2^FRAC / den).
//
// Restoring radix-2 divider, one quotient bit per cycle. start (while idle)
// latches num and den; the dividend num * 2^FRAC is shifted through a
// partial remainder of DW+1 bits, one bit per cycle for NW+FRAC cycles; done
// pulses in the cycle after the last step (NW+FRAC+1 cycles after start)
// for one cycle and q then holds the QW least significant quotient bits, a fixed
// point value with FRAC fraction bits (sub-pixel resolution). For a centroid
// num/den never exceeds the largest coordinate, so QW = coordinate bits + FRAC
// loses nothing. den = 0 (no pupil pixel in the frame) sets div_zero with
// done and q is then meaningless. A start while busy is ignored.
module centroid_divider #(
  parameter int unsigned NW   = 27,
  parameter int unsigned DW   = 19,
  parameter int unsigned FRAC = 4,
  parameter int unsigned QW   = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          busy,
  output logic          done,
  output logic [QW-1:0] q,
  output logic          div_zero
);
  localparam int unsigned VW = NW + FRAC;          // dividend / quotient width
  localparam int unsigned CW = $clog2(VW + 1);

  logic [VW-1:0] dvd;    // dividend bits still to shift in, quotient bits shifted in
  logic [DW:0]   rem;
  logic [DW-1:0] dsr;
  logic [CW-1:0] cnt;
  logic [DW:0]   rem_sh;
  logic          qbit;

  always_comb begin
    rem_sh = {rem[DW-1:0], dvd[VW-1]};
    qbit   = (rem_sh >= {1'b0, dsr});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dvd      <= '0;
      rem      <= '0;
      dsr      <= '0;
      cnt      <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      div_zero <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          dvd      <= VW'(num) << FRAC;
          rem      <= '0;
          dsr      <= den;
          cnt      <= CW'(VW);
          busy     <= 1'b1;
          div_zero <= (den == '0);
        end
      end else begin
        rem <= qbit ? (rem_sh - {1'b0, dsr}) : rem_sh;
        dvd <= {dvd[VW-2:0], qbit};
        cnt <= cnt - CW'(1);
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign q = dvd[QW-1:0];
endmodule
