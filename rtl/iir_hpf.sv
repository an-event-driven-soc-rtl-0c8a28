// iir_hpf - first-order IIR high-pass filter shared by the four channels
// of a block.
//
// Direct form II with pole a = 1 - 2^-k:
//     w[n] = x[n] + w[n-1] - (w[n-1] >>> k)
//     y[n] = w[n] - w[n-1] = x[n] - (w[n-1] >>> k)
// The corner frequency is tuned by the shift k alone, about 6 dB per step
// (fc ~ fs / (2*pi*2^k)).  One adder datapath serves all four channels;
// each channel keeps its own delay element w.  The specification gives the
// direct form II structure, the sharing and the shift tuning; the word
// widths, k = min(sel,8)+1 (nine settings, 48 dB) and the saturation of y
// to 10 bits are this design's choices.
//
// Interface: in_valid with in_ch and the ADC code x_code (offset binary)
// is accepted in one cycle; out_valid follows one cycle later with y
// (two's complement) for out_ch.  clr_ch[c] clears channel c's state.
module iir_hpf #(
  parameter int unsigned W  = 10,   // sample width
  parameter int unsigned WW = W + 11 // delay-element width (x * 2^9 headroom)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [1:0]          in_ch,
  input  logic [W-1:0]        x_code,
  input  logic [3:0]          sel,       // shift select of in_ch
  input  logic [3:0]          clr_ch,
  output logic                out_valid,
  output logic [1:0]          out_ch,
  output logic signed [W-1:0] y
);
  logic signed [WW-1:0] w [4];
  logic signed [WW-1:0] w_old, w_new, dc, x_s;
  logic signed [WW-1:0] y_full;
  logic [3:0]           k;

  always_comb begin
    k      = (sel > 4'd8) ? 4'd9 : sel + 4'd1;
    x_s    = WW'($signed({~x_code[W-1], x_code[W-2:0]}));  // offset binary -> signed
    w_old  = w[in_ch];
    dc     = w_old >>> k;
    w_new  = x_s + w_old - dc;
    y_full = x_s - dc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 4; c++) w[c] <= '0;
      out_valid <= 1'b0;
      out_ch    <= '0;
      y         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        w[in_ch] <= w_new;
        out_ch   <= in_ch;
        if (y_full > WW'(2**(W-1) - 1))
          y <= W'(2**(W-1) - 1);
        else if (y_full < -WW'(2**(W-1)))
          y <= W'(-(2**(W-1)));
        else
          y <= W'(y_full);
      end
      for (int c = 0; c < 4; c++)
        if (clr_ch[c]) w[c] <= '0;
    end
  end
endmodule
