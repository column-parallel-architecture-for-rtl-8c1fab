// timing_controller: frame sequencer of the column-parallel centroid sensor.
//
// A frame has two phases, one step per clock cycle:
//   row phase    rows 0 .. num_rows-1 are read out one after another; every
//                column adds its pixel's terms (row_load=1, y = row number,
//                row_first on row 0).
//   column phase columns 0 .. NX-1 are selected one after another with a
//                one-hot xsel; the external accumulators add the selected
//                column's results (col_en=1, col_first on column 0).
// A frame therefore takes num_rows + NX cycles, so the clock needed for a
// frame rate F is F (NY + NX). frame_done pulses in the cycle after the last
// column step, when the accumulators hold the frame totals. While run is high
// frames follow back to back with no gap; when run is low after a frame the
// controller idles. num_rows (sampled at the start of each frame) lets a
// shorter window of rows be read; 0 or a value above NY means all NY rows.
// Leaving idle costs one cycle.
module timing_controller import los_pkg::*; #(
  parameter int unsigned NX = 640,
  parameter int unsigned NY = 480,
  parameter int unsigned XW = bits_for((longint'(NX) - 1)),
  parameter int unsigned YW = bits_for((longint'(NY) - 1)),
  parameter int unsigned RW = bits_for(longint'(NY))
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          run,
  input  logic [RW-1:0] num_rows,
  output phase_e        phase,
  output logic          row_load,
  output logic          row_first,
  output logic [YW-1:0] y,
  output logic          col_en,
  output logic          col_first,
  output logic [XW-1:0] col_idx,
  output logic [NX-1:0] xsel,
  output logic          frame_done
);
  logic [RW-1:0] rows_eff, rows_q;
  logic          last_row, last_col;

  assign rows_eff = (num_rows == '0 || num_rows > RW'(NY)) ? RW'(NY) : num_rows;
  assign last_row = (RW'(y) == rows_q - RW'(1));
  assign last_col = (col_idx == XW'(NX - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= PH_IDLE;
      y          <= '0;
      col_idx    <= '0;
      rows_q     <= RW'(NY);
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      unique case (phase)
        PH_IDLE: begin
          if (run) begin
            phase  <= PH_ROW;
            y      <= '0;
            rows_q <= rows_eff;
          end
        end
        PH_ROW: begin
          if (last_row) begin
            phase   <= PH_COL;
            col_idx <= '0;
          end else begin
            y <= y + YW'(1);
          end
        end
        PH_COL: begin
          if (last_col) begin
            frame_done <= 1'b1;
            if (run) begin
              phase  <= PH_ROW;
              y      <= '0;
              rows_q <= rows_eff;
            end else begin
              phase <= PH_IDLE;
            end
          end else begin
            col_idx <= col_idx + XW'(1);
          end
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  always_comb begin
    row_load  = (phase == PH_ROW);
    row_first = row_load && (y == '0);
    col_en    = (phase == PH_COL);
    col_first = col_en && (col_idx == '0);
    xsel      = '0;
    if (col_en) xsel[col_idx] = 1'b1;
  end

  // At most one column may drive the readout buses.
  a_xsel_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(xsel));
endmodule
