// tb_column_comparator: checks the pupil flag for every pixel / threshold pair
// of the 8-bit range (exhaustive): p must be 1 exactly when pix < threshold.
module tb_column_comparator;
  localparam int unsigned PW = 8;
  logic [PW-1:0] pix, threshold;
  logic p;
  int checks = 0, failures = 0;

  column_comparator #(.PW(PW)) dut (.pix(pix), .threshold(threshold), .p(p));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 256; t++) begin
      for (int v = 0; v < 256; v++) begin
        pix = PW'(v); threshold = PW'(t);
        #1;
        checks++;
        if (p !== (v < t)) begin
          failures++;
          if (failures < 10) $display("FAIL pix=%0d thr=%0d p=%0b", v, t, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
