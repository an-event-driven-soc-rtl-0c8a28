// neural_soc - 64-channel event-driven neural recording SoC, digital core.
//
// 64 channels form 16 blocks of 4.  Every block has a 10-bit SAR ADC that
// converts its four channels in turn; all ADCs share one trigger bus
// (adc_timing).  In each block the samples pass a shared first-order IIR
// high-pass filter and a dual-polarity threshold detector, then a
// per-channel spike engine decides what to send: every sample (EAP or
// combined streaming), every 8th sample (LFP streaming) or 16-sample
// windows around validated spikes.  All samples are stored in one shared
// 8-bit SRAM ring.  A round-robin scheduler picks pending channels in
// index order, the packetizer reads their samples back and frames them
// with a header carrying the channel, its mode and the latency in frames,
// and the chip-level FSM sends them over the SPI slave port in readout
// mode.  data_req tells the master that readout data is waiting.
//
// The analogue front ends are outside this module: their outputs enter as
// afe_vin (16-bit codes of the voltage at the ADC input, fraction of the
// reference) and their controls leave as the afe_* ports and hpf_dac.
// sar_adc is a behavioural model; everything else is synthesizable.  The
// PLL is also outside: clk is the 4 MHz timing clock assumed throughout.
module neural_soc
  import nr_pkg::*;
#(
  parameter int unsigned RING_ROWS  = 64,   // SRAM ring depth in frames
  parameter int unsigned LAT_LIMIT  = 32,   // frames a request may wait
  parameter int unsigned PERIOD_MIN = 47    // cycles per conversion at csr = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  // SPI slave
  input  logic        sclk,
  input  logic        cs_n,
  input  logic        mosi,
  output logic        miso,
  output logic        data_req,
  // analogue front ends
  input  logic [15:0] afe_vin    [NCH],
  output logic [NCH-1:0] afe_pd,
  output logic [NCH-1:0] afe_rst,
  output logic [NCH-1:0] afe_hp_low,
  output logic [NCH-1:0] afe_lp_low,
  output logic [1:0]  afe_gain   [NCH],
  output logic [4:0]  hpf_dac
);
  localparam int unsigned DEPTH = RING_ROWS * NBLK * ROW_BYTES;
  localparam int unsigned AW    = $clog2(DEPTH);

  // timing
  logic       conv_start, frame_tick;
  logic [1:0] ch_sel;
  logic [7:0] cur_row;
  logic [7:0] csr;

  // blocks
  logic        adc_done [NBLK];
  logic [9:0]  adc_data [NBLK];
  logic [1:0]  adc_ch   [NBLK];
  logic        adc_busy [NBLK];
  logic        smp_valid[NBLK];
  logic [1:0]  smp_ch   [NBLK];
  logic [7:0]  msb      [NBLK];
  logic [7:0]  lsb      [NBLK];
  logic [15:0] cfg_dout [NBLK];
  logic [NCH-1:0] req, grant;
  req_info_t   info [NCH];

  // SRAM
  logic          we, re, commit, wr_busy;
  logic [AW-1:0] waddr, raddr;
  logic [7:0]    wdata, rdata;

  // control
  logic        rx_valid, tx_load, ro, take, grant_valid, pkt_valid, pkt_pop, pkt_busy;
  logic [15:0] rx_word, tx_word, pkt_word, cfg_din;
  logic [3:0]  cfg_blk;
  logic        cfg_shift;
  logic [5:0]  grant_idx;
  chip_state_e state;

  adc_timing #(.PERIOD_MIN(PERIOD_MIN), .RING_ROWS(RING_ROWS)) u_timing (
    .clk, .rst_n, .csr, .conv_start, .ch_sel, .frame_tick, .cur_row
  );

  for (genvar b = 0; b < NBLK; b++) begin : g_blk
    logic [15:0] vin [4];
    for (genvar c = 0; c < 4; c++) begin : g_vin
      assign vin[c] = afe_vin[4*b + c];
    end

    sar_adc u_adc (
      .clk, .rst_n, .conv_start, .ch_sel, .vin,
      .busy(adc_busy[b]), .done(adc_done[b]), .dout(adc_data[b]), .dout_ch(adc_ch[b])
    );

    logic [3:0] b_req, b_pd, b_hp, b_lp;
    req_info_t  b_info [4];
    logic [1:0] b_gain [4];

    rec_block #(.LAT_LIMIT(LAT_LIMIT)) u_blk (
      .clk, .rst_n,
      .adc_done (adc_done[b]), .adc_data(adc_data[b]), .adc_ch(adc_ch[b]),
      .cur_row, .commit, .frame_tick,
      .cfg_en   (cfg_blk == 4'(b)), .cfg_shift, .cfg_din, .cfg_dout(cfg_dout[b]),
      .grant    (grant[4*b +: 4]), .req(b_req), .info(b_info),
      .smp_valid(smp_valid[b]), .smp_ch(smp_ch[b]), .msb_byte(msb[b]), .lsb_byte(lsb[b]),
      .afe_pd(b_pd), .afe_hp_low(b_hp), .afe_lp_low(b_lp), .afe_gain(b_gain)
    );

    assign req[4*b +: 4]        = b_req;
    assign afe_pd[4*b +: 4]     = b_pd;
    assign afe_hp_low[4*b +: 4] = b_hp;
    assign afe_lp_low[4*b +: 4] = b_lp;
    for (genvar c = 0; c < 4; c++) begin : g_out
      assign info[4*b + c]     = b_info[c];
      assign afe_gain[4*b + c] = b_gain[c];
    end
  end

  sram_wr_seq #(.AW(AW)) u_wr (
    .clk, .rst_n,
    .start(smp_valid[0]), .ch(smp_ch[0]), .row(cur_row), .msb, .lsb,
    .we, .waddr, .wdata, .commit, .busy(wr_busy)
  );

  sram_8b #(.DEPTH(DEPTH), .AW(AW)) u_sram (
    .clk, .we, .waddr, .wdata, .re, .raddr, .rdata
  );

  rr_scheduler #(.N(NCH)) u_sched (
    .clk, .rst_n, .req, .take, .grant_valid, .grant_idx, .grant
  );

  packetizer #(.RING_ROWS(RING_ROWS), .AW(AW)) u_pkt (
    .clk, .rst_n, .enable(ro),
    .take, .grant_valid, .grant_idx, .info,
    .re, .raddr, .rdata,
    .out_valid(pkt_valid), .out_word(pkt_word), .out_pop(pkt_pop), .busy(pkt_busy)
  );

  spi_slave u_spi (
    .clk, .rst_n, .sclk, .cs_n, .mosi, .miso, .tx_word, .tx_load, .rx_valid, .rx_word
  );

  chip_fsm u_fsm (
    .clk, .rst_n, .rx_valid, .rx_word, .tx_load, .tx_word,
    .state, .afe_rst, .hpf_dac, .csr,
    .cfg_blk, .cfg_shift, .cfg_din, .cfg_dout(cfg_dout[cfg_blk]),
    .ro, .pkt_valid, .pkt_word, .pkt_pop
  );

  assign data_req = ro && ((|req) || pkt_busy || pkt_valid);

  // All blocks run on one trigger bus, so they finish their samples together.
  // A conversion period must be long enough for the ADCs and the SRAM
  // writes of the previous period to have finished.
  for (genvar b = 0; b < NBLK; b++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) smp_valid[b] == smp_valid[0]);
    assert property (@(posedge clk) disable iff (!rst_n) conv_start |-> !adc_busy[b]);
  end
  assert property (@(posedge clk) disable iff (!rst_n) conv_start |-> !wr_busy);
endmodule
