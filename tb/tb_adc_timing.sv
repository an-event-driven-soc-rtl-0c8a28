// tb_adc_timing - checks the conversion period (47 + csr cycles), the
// channel rotation 0..3, the frame tick on channel 0 and the ring row
// counter with its wrap-around.
module tb_adc_timing;
  logic clk = 0, rst_n = 0;
  logic [7:0] csr;
  logic conv_start, frame_tick;
  logic [1:0] ch_sel;
  logic [7:0] cur_row;
  int checks = 0, failures = 0;

  adc_timing #(.RING_ROWS(3)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_rate(input logic [7:0] code);
    int t_last, n;
    logic [1:0] exp_ch;
    logic [7:0] exp_row;
    csr = code;
    rst_n = 0; repeat (2) @(negedge clk); rst_n = 1; t_last = -1;
    n = 0; exp_ch = 0; exp_row = 0;
    for (int cyc = 0; n < 14; cyc++) begin
      if (cyc > 0) @(negedge clk);
      if (conv_start) begin
        if (t_last >= 0) chk(cyc - t_last == 47 + int'(code), $sformatf("period %0d at csr %0d", cyc - t_last, code));
        chk(ch_sel == exp_ch, $sformatf("channel order %0d exp %0d cyc %0d", ch_sel, exp_ch, cyc));
        chk(frame_tick == (exp_ch == 0), "frame tick");
        chk(cur_row == exp_row, $sformatf("row %0d exp %0d", cur_row, exp_row));
        t_last = cyc; n++;
        if (exp_ch == 3) exp_row = (exp_row == 2) ? 0 : exp_row + 1;
        exp_ch++;
      end else begin
        chk(!frame_tick, "no frame tick between periods");
      end
    end
  endtask

  initial begin
    run_rate(8'd0);
    run_rate(8'd255);
    run_rate(8'd100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
