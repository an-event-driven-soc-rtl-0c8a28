// tb_iir_hpf - feeds interleaved random and DC samples for four channels
// with different shift settings and compares every output with a
// reference model of y[n] = x[n] - floor(w[n-1] / 2^k),
// w[n] = w[n-1] + y[n] (k = sel + 1, at most 9), saturated to 10 bits.
// Also checks that a constant input decays to zero (the filter removes
// the offset) and that out_valid follows in_valid by one cycle.
module tb_iir_hpf;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [1:0] in_ch = 0;
  logic [9:0] x_code = 0;
  logic [3:0] sel = 0;
  logic [3:0] clr_ch = 0;
  logic out_valid;
  logic [1:0] out_ch;
  logic signed [9:0] y;
  int checks = 0, failures = 0;
  longint w_ref [4];
  int sel_of [4] = '{0, 4, 8, 12};

  iir_hpf dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int model(int c, int xc);
    longint x, d, yy;
    int k;
    k  = (sel_of[c] > 8) ? 9 : sel_of[c] + 1;
    x  = longint'(xc) - 512;
    d  = w_ref[c] >>> k;
    yy = x - d;
    w_ref[c] = w_ref[c] + x - d;
    if (yy > 511) yy = 511;
    if (yy < -512) yy = -512;
    return int'(yy);
  endfunction

  task automatic feed(int c, int xc, int exp_gap);
    int e;
    @(negedge clk);
    in_valid = 1; in_ch = 2'(c); x_code = 10'(xc); sel = 4'(sel_of[c]);
    e = model(c, xc);
    @(negedge clk);
    in_valid = 0;
    chk(out_valid && out_ch == 2'(c), "out_valid one cycle after in_valid");
    chk(int'(y) == e, $sformatf("ch%0d x=%0d y=%0d exp %0d", c, xc, y, e));
    repeat (exp_gap) @(negedge clk);
  endtask

  initial begin
    for (int c = 0; c < 4; c++) w_ref[c] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // random samples, channels interleaved as in TDM
    for (int n = 0; n < 400; n++) feed(n % 4, int'($urandom_range(0, 1023)), n % 3);
    // offset removal: DC input on channel 0 (k = 1) and channel 1 (k = 5)
    for (int n = 0; n < 800; n++) feed(n % 2, 900, 0);
    chk(int'(y) < 3 && int'(y) > -3, $sformatf("DC not removed, y=%0d", y));
    // clearing a channel's state
    @(negedge clk); clr_ch = 4'b0010; @(negedge clk); clr_ch = 0; w_ref[1] = 0;
    feed(1, 700, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
