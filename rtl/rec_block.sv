// rec_block - one 4-channel recording block: the in-block FSM, the block's
// 64-bit configuration register, the IIR high-pass filter and threshold
// detector shared by the four channels, four spike engines and the
// block's part of an SRAM row.
//
// The block's ADC converts its channels one per conversion period (0..3).
// Each result goes through the shared HPF and threshold detector, then to
// the spike engine of its channel, and is offered for storage: the
// channel's MSB byte (sample bits [9:2]) and the block's packed LSB byte
// {ch3[1:0], ch2[1:0], ch1[1:0], ch0[1:0]}, as the SRAM holds 8-bit words.
//
// Configuration: four 16-bit words (nr_pkg::ch_cfg_t), one per channel,
// held in a 64-bit shift register.  Each cfg_shift pulse with cfg_en
// shifts a new word in at the bottom and the oldest word (channel 0's)
// out at cfg_dout; after four shifts the words written first..last are
// the settings of channels 0..3 and the old settings have all come back.
// The register resets to zero: all channels powered down.
// The analogue controls follow the mode: LFP streaming selects the
// sub-hertz high-pass pole and the 220 Hz low-pass corner; combined mode
// the sub-hertz pole and the 5 kHz corner; EAP modes the tunable pole and
// the 5 kHz corner.
//
// Timing: adc_done (cycle t) -> HPF result (t+1) -> smp_valid with
// msb_byte/lsb_byte/smp_ch (t+2), held until the next sample.
module rec_block
  import nr_pkg::*;
#(
  parameter int unsigned LAT_LIMIT = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  // ADC result
  input  logic        adc_done,
  input  logic [9:0]  adc_data,
  input  logic [1:0]  adc_ch,
  // global timing
  input  logic [7:0]  cur_row,
  input  logic        commit,
  input  logic        frame_tick,
  // configuration shift port
  input  logic        cfg_en,      // this block is selected
  input  logic        cfg_shift,
  input  logic [15:0] cfg_din,
  output logic [15:0] cfg_dout,
  // requests to the scheduler
  input  logic [3:0]  grant,
  output logic [3:0]  req,
  output req_info_t   info [4],
  // SRAM row data
  output logic        smp_valid,
  output logic [1:0]  smp_ch,
  output logic [7:0]  msb_byte,
  output logic [7:0]  lsb_byte,
  // analogue front-end controls, per channel
  output logic [3:0]  afe_pd,      // 1 = powered down
  output logic [3:0]  afe_hp_low,  // 1 = sub-hertz high-pass pole
  output logic [3:0]  afe_lp_low,  // 1 = 220 Hz low-pass corner
  output logic [1:0]  afe_gain [4]
);
  logic [63:0]         cfg_reg;
  ch_cfg_t             cfg [4];
  logic                f_valid;
  logic [1:0]          f_ch;
  logic signed [9:0]   f_y;
  logic                f_hit;
  logic [3:0]          en_vec;

  // ---------------- configuration register ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      cfg_reg <= '0;
    else if (cfg_en && cfg_shift)    cfg_reg <= {cfg_reg[47:0], cfg_din};
  end
  assign cfg_dout = cfg_reg[63:48];

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      cfg[c]        = ch_cfg_t'(cfg_reg[63-16*c -: 16]);
      en_vec[c]     = cfg[c].enable;
      afe_pd[c]     = !cfg[c].enable;
      afe_hp_low[c] = (cfg[c].mode == MODE_LFP_STREAM) || (cfg[c].mode == MODE_COMBINED);
      afe_lp_low[c] = (cfg[c].mode == MODE_LFP_STREAM);
      afe_gain[c]   = cfg[c].gain;
    end
  end

  // ---------------- shared filter and detector ----------------
  iir_hpf u_hpf (
    .clk, .rst_n,
    .in_valid (adc_done),
    .in_ch    (adc_ch),
    .x_code   (adc_data),
    .sel      (cfg[adc_ch].hpf_sel),
    .clr_ch   (~en_vec),
    .out_valid(f_valid),
    .out_ch   (f_ch),
    .y        (f_y)
  );

  thresh_detect u_thr (
    .y      (f_y),
    .thresh (cfg[f_ch].thresh),
    .hit    (f_hit)
  );

  // ---------------- per-channel spike engines ----------------
  for (genvar c = 0; c < 4; c++) begin : g_ch
    spike_engine #(.LAT_LIMIT(LAT_LIMIT)) u_se (
      .clk, .rst_n,
      .enable    (cfg[c].enable),
      .mode      (cfg[c].mode),
      .smp       (f_valid && f_ch == 2'(c)),
      .hit       (f_hit),
      .cur_row   (cur_row),
      .commit    (commit),
      .frame_tick(frame_tick),
      .grant     (grant[c]),
      .req       (req[c]),
      .info      (info[c])
    );
  end

  // ---------------- SRAM row bytes ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      smp_valid <= 1'b0;
      smp_ch    <= '0;
      msb_byte  <= '0;
      lsb_byte  <= '0;
    end else begin
      smp_valid <= f_valid;
      if (f_valid) begin
        smp_ch   <= f_ch;
        msb_byte <= f_y[9:2];
        lsb_byte[2*f_ch +: 2] <= f_y[1:0];
      end
    end
  end
endmodule
