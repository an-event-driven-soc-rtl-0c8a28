// adc_timing - the global ADC trigger bus shared by all 16 recording blocks.
//
// Every block's ADC is driven by this one bus and runs in lock step.  A
// conversion period lasts PERIOD_MIN + csr clock cycles, csr being the
// 8-bit sample-rate code written with the CSR command.  With the 4 MHz
// timing clock assumed here that gives 4e6/47 = 85.1 kHz down to
// 4e6/302 = 13.245 kHz, the range the specification states; the 4 MHz
// clock and the "47 + code" divider are inferred from those two end
// points.  Each period converts one channel of every block, in the order
// 0,1,2,3 (time-division multiplexing), so each channel is sampled at a
// quarter of the ADC rate.  Four periods make a frame; frames fill the
// rows of the SRAM ring in turn.
//
// Timing: conv_start is high for one cycle at the first cycle of each
// period; ch_sel and cur_row are stable for the whole period.
// frame_tick is high together with conv_start when ch_sel is 0.
module adc_timing #(
  parameter int unsigned PERIOD_MIN = 47,   // cycles per conversion at csr = 0
  parameter int unsigned RING_ROWS  = 64    // rows of the SRAM ring
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] csr,        // sample-rate code
  output logic       conv_start, // start of a conversion period
  output logic [1:0] ch_sel,     // channel converted in this period
  output logic       frame_tick, // start of a frame (ch_sel == 0)
  output logic [7:0] cur_row     // SRAM ring row of the current frame
);
  logic [8:0] cnt;
  logic [8:0] last;

  assign last       = 9'(PERIOD_MIN - 1) + 9'(csr);
  assign conv_start = (cnt == '0);
  assign frame_tick = conv_start && (ch_sel == 2'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      ch_sel  <= '0;
      cur_row <= '0;
    end else if (cnt >= last) begin
      cnt    <= '0;
      ch_sel <= ch_sel + 2'd1;
      if (ch_sel == 2'd3)
        cur_row <= (cur_row == 8'(RING_ROWS - 1)) ? 8'd0 : cur_row + 8'd1;
    end else begin
      cnt <= cnt + 9'd1;
    end
  end
endmodule
