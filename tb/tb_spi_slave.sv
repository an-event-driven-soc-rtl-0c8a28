// tb_spi_slave - an SPI master (mode 0, 16-bit words, SCLK half period of
// 8 system clocks) exchanges random words with the slave.  Checks the word
// received by the slave (rx_valid once per word), the word shifted out on
// MISO (the tx_word present when CS_n fell, loaded with one tx_load pulse
// per word) and that MISO is low while CS_n is high.
module tb_spi_slave;
  logic clk = 0, rst_n = 0;
  logic sclk = 0, cs_n = 1, mosi = 0, miso;
  logic [15:0] tx_word = 0, rx_word;
  logic tx_load, rx_valid;
  int checks = 0, failures = 0;
  int n_rx = 0, n_load = 0;
  logic [15:0] last_rx;

  spi_slave dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rx_valid) begin n_rx++; last_rx = rx_word; end
    if (tx_load) n_load++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic xfer(input logic [15:0] mo, output logic [15:0] mi);
    cs_n = 0;
    repeat (8) @(negedge clk);
    for (int i = 15; i >= 0; i--) begin
      mosi = mo[i];
      repeat (8) @(negedge clk);
      sclk = 1; mi[i] = miso;
      repeat (8) @(negedge clk);
      sclk = 0;
    end
    repeat (8) @(negedge clk);
    cs_n = 1;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      logic [15:0] mo, mi, txw;
      int r0, l0;
      mo = 16'($urandom); txw = 16'($urandom);
      tx_word = txw; r0 = n_rx; l0 = n_load;
      chk(!miso, "MISO low while deselected");
      xfer(mo, mi);
      chk(n_rx == r0 + 1 && last_rx == mo, $sformatf("rx %h exp %h", last_rx, mo));
      chk(n_load == l0 + 1, "one tx_load per word");
      chk(mi == txw, $sformatf("miso %h exp %h", mi, txw));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
