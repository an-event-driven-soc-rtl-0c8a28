// tb_thresh_detect - exhaustive check of the dual-polarity detector:
// hit must equal |y| > thresh for every 10-bit sample and threshold.
module tb_thresh_detect;
  logic signed [9:0] y;
  logic [6:0] thresh;
  logic hit;
  int checks = 0, failures = 0;

  thresh_detect dut (.*);

  initial begin
    for (int t = 0; t < 128; t++) begin
      for (int v = -512; v < 512; v++) begin
        int m;
        y = 10'(v); thresh = 7'(t);
        #1;
        m = (v < 0) ? -v : v;
        checks++;
        if (hit !== (m > t)) begin
          failures++;
          if (failures < 10) $display("FAIL: y=%0d thr=%0d hit=%0b", v, t, hit);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
