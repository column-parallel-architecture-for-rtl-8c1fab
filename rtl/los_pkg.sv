// los_pkg: widths and types shared by the line-of-sight (pupil centroid) sensor.
//
// The column registers and the external accumulators are sized from the
// largest value they can ever hold, i.e. a frame in which every pixel is
// flagged as pupil:
//   S  (per column)  sum_y p      <= NY
//   SX (per column)  sum_y x p    <= (NX-1) NY
//   SY (per column)  sum_y y p    <= NY (NY-1) / 2
//   area             sum_x sum_y p   <= NX NY
//   sum_x            sum_x sum_y x p <= NY NX (NX-1) / 2
//   sum_y            sum_x sum_y y p <= NX NY (NY-1) / 2
// Coordinates run from 0 (first column / first row) to NX-1 / NY-1.
package los_pkg;

  // Number of bits needed to hold every value 0..maxval.
  function automatic int unsigned bits_for(longint unsigned maxval);
    longint unsigned v;
    int unsigned n;
    v = maxval;
    n = 0;
    while (v != 0) begin
      v = v >> 1;
      n++;
    end
    return (n == 0) ? 1 : n;
  endfunction

  function automatic int unsigned s_width(int unsigned ny);
    return bits_for(longint'(ny));
  endfunction

  function automatic int unsigned sx_width(int unsigned nx, int unsigned ny);
    return bits_for((longint'(nx) - 1) * longint'(ny));
  endfunction

  function automatic int unsigned sy_width(int unsigned ny);
    return bits_for(longint'(ny) * (longint'(ny) - 1) / 2);
  endfunction

  function automatic int unsigned area_width(int unsigned nx, int unsigned ny);
    return bits_for(longint'(nx) * longint'(ny));
  endfunction

  function automatic int unsigned sumx_width(int unsigned nx, int unsigned ny);
    return bits_for(longint'(ny) * (longint'(nx) * (longint'(nx) - 1) / 2));
  endfunction

  function automatic int unsigned sumy_width(int unsigned nx, int unsigned ny);
    return bits_for(longint'(nx) * (longint'(ny) * (longint'(ny) - 1) / 2));
  endfunction

  // Phases of one frame (see timing_controller).
  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,  // waiting for run
    PH_ROW  = 2'd1,  // row readout: every column accumulates its pixel (Y-direction sum)
    PH_COL  = 2'd2   // column readout: XSEL walks the columns (X-direction sum)
  } phase_e;

endpackage
