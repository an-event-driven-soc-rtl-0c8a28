// sar_adc - BEHAVIOURAL MODEL of one block's analogue input path: the 4:1
// multiplexer, the sample-and-hold capacitor and the 10-bit
// charge-redistribution SAR ADC.  It is not meant for synthesis: the real
// part is a split capacitor array and a rail-to-rail comparator.
//
// The analogue input voltages are represented as 16-bit codes, 0 = ground
// and 65535 = just below the ADC reference.  On conv_start the model
// samples vin[ch_sel] (S&H), then resolves one bit per clock, MSB first,
// comparing the held value with an ideal binary DAC, exactly as the
// successive-approximation algorithm does.  The result is offset binary.
//
// Timing: conv_start in cycle 0; bits decided in cycles 1..10; done is
// high for one cycle in cycle 11 with dout and dout_ch valid until the
// next conversion ends.  busy is high from cycle 1 to cycle 10.
module sar_adc #(
  parameter int unsigned BITS = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             conv_start,
  input  logic [1:0]       ch_sel,
  input  logic [15:0]      vin [4],   // AFE outputs, fraction of Vref
  output logic             busy,
  output logic             done,
  output logic [BITS-1:0]  dout,
  output logic [1:0]       dout_ch
);
  logic [15:0]     held;
  logic [BITS-1:0] sar;
  logic [3:0]      bitpos;   // bit being decided
  logic [1:0]      ch_hold;
  logic [15:0]     trial_v;

  // Voltage of the capacitor DAC for the trial code (ideal array).
  assign trial_v = 16'({sar | (BITS'(1) << bitpos)}) << (16 - BITS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held    <= '0;
      sar     <= '0;
      bitpos  <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      dout    <= '0;
      dout_ch <= '0;
      ch_hold <= '0;
    end else begin
      done <= 1'b0;
      if (conv_start) begin
        held    <= vin[ch_sel];
        ch_hold <= ch_sel;
        sar     <= '0;
        bitpos  <= 4'(BITS - 1);
        busy    <= 1'b1;
      end else if (busy) begin
        if (held >= trial_v)
          sar <= sar | (BITS'(1) << bitpos);
        if (bitpos == 4'd0) begin
          busy    <= 1'b0;
          done    <= 1'b1;
          dout    <= (held >= trial_v) ? (sar | BITS'(1)) : sar;
          dout_ch <= ch_hold;
        end else begin
          bitpos <= bitpos - 4'd1;
        end
      end
    end
  end
endmodule
