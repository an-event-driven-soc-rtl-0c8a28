// tb_sar_adc - converts random input voltages on random channels and
// checks the 10-bit result (ideal quantiser: code = vin / 64), the
// channel tag and the 11-cycle conversion time.  Inputs exactly on a
// DAC level check the comparator's decision at equality.
module tb_sar_adc;
  logic clk = 0, rst_n = 0;
  logic conv_start = 0;
  logic [1:0] ch_sel = 0;
  logic [15:0] vin [4];
  logic busy, done;
  logic [9:0] dout;
  logic [1:0] dout_ch;
  int checks = 0, failures = 0;

  sar_adc dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int lat;
      logic [15:0] v;
      logic [1:0] c;
      for (int i = 0; i < 4; i++) vin[i] = 16'($urandom);
      if (n < 64) vin[n % 4] = {10'($urandom), 6'd0};   // exactly on a DAC level
      if (n == 0) vin[0] = 16'hFFFF;
      if (n == 1) vin[1] = 16'h0000;
      c = 2'(n % 4);
      v = vin[c];
      @(negedge clk); ch_sel = c; conv_start = 1;
      @(negedge clk); conv_start = 0;
      for (int i = 0; i < 4; i++) vin[i] = 16'($urandom);  // held value must be used
      lat = 1;
      while (!done && lat < 40) begin @(negedge clk); lat++; end
      chk(lat == 11, $sformatf("conversion time %0d", lat));
      chk(dout == v[15:6], $sformatf("code %0d for vin %0d", dout, v));
      chk(dout_ch == c, "channel tag");
    end
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
