// tb_rec_block - one recording block fed with ADC results frame by frame
// (channel 0..3 per frame, an SRAM commit after every channel, a frame
// tick before channel 0).  Configures the four channels through the
// 64-bit shift register (EAP stream, spike, LFP stream, powered down),
// reads the words back by shifting them through again, and checks the
// analogue controls each mode implies, the stored MSB/LSB bytes against
// a reference model of the high-pass filter, the streaming requests of
// channel 0, the spike request of channel 1 eleven frames after its
// validation point, every 8th-sample request of channel 2 and silence
// from the powered-down channel 3.
module tb_rec_block;
  import nr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic adc_done = 0;
  logic [9:0] adc_data = 0;
  logic [1:0] adc_ch = 0;
  logic [7:0] cur_row = 0;
  logic commit = 0, frame_tick = 0;
  logic cfg_en = 0, cfg_shift = 0;
  logic [15:0] cfg_din = 0, cfg_dout;
  logic [3:0] grant = 0, req;
  req_info_t info [4];
  logic smp_valid;
  logic [1:0] smp_ch;
  logic [7:0] msb_byte, lsb_byte;
  logic [3:0] afe_pd, afe_hp_low, afe_lp_low;
  logic [1:0] afe_gain [4];
  int checks = 0, failures = 0;
  ch_cfg_t cfgw [4];
  longint w_ref [4];
  int run1 = 0, coll1 = 0, post1 = 0, exp_spike_frame = -1;
  int n_stream = 0, n_lfp = 0, n_spike = 0, n_model = 0;

  rec_block dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int model(int c, int xc);
    longint x, d, yy;
    int k;
    k  = (cfgw[c].hpf_sel > 8) ? 9 : int'(cfgw[c].hpf_sel) + 1;
    x  = longint'(xc) - 512;
    d  = w_ref[c] >>> k;
    yy = x - d;
    w_ref[c] = w_ref[c] + x - d;
    if (yy > 511) yy = 511;
    if (yy < -512) yy = -512;
    return int'(yy);
  endfunction

  task automatic shift_word(input logic [15:0] w, output logic [15:0] old);
    @(negedge clk); cfg_en = 1; cfg_shift = 1; cfg_din = w; old = cfg_dout;
    @(negedge clk); cfg_shift = 0; cfg_en = 0;
  endtask

  initial begin
    logic [15:0] old;
    logic [7:0] lsb_exp;
    repeat (2) @(negedge clk); rst_n = 1;
    cfgw[0] = '{mode: MODE_EAP_STREAM, enable: 1, gain: 2'd1, hpf_sel: 4'd0,  thresh: 7'd50};
    cfgw[1] = '{mode: MODE_EAP_SPIKE,  enable: 1, gain: 2'd2, hpf_sel: 4'd3,  thresh: 7'd40};
    cfgw[2] = '{mode: MODE_LFP_STREAM, enable: 1, gain: 2'd3, hpf_sel: 4'd8,  thresh: 7'd10};
    cfgw[3] = '{mode: MODE_COMBINED,   enable: 0, gain: 2'd0, hpf_sel: 4'd2,  thresh: 7'd5};
    for (int i = 0; i < 4; i++) begin shift_word(cfgw[i], old); chk(old == 0, "reset config is zero"); end
    for (int i = 0; i < 4; i++) begin shift_word(cfgw[i], old); chk(old == cfgw[i], $sformatf("read back word %0d", i)); end
    chk(afe_pd == 4'b1000, "power-down follows enable");
    chk(afe_hp_low == 4'b1100 && afe_lp_low == 4'b0100, "analogue band follows mode");
    chk(afe_gain[0] == 1 && afe_gain[1] == 2 && afe_gain[2] == 3, "gain settings");
    for (int c = 0; c < 4; c++) w_ref[c] = 0;
    lsb_exp = 0;
    for (int f = 0; f < 120; f++) begin
      @(negedge clk); frame_tick = 1; cur_row = 8'(f % 64);
      @(negedge clk); frame_tick = 0;
      for (int c = 0; c < 4; c++) begin
        int xc, y;
        bit h;
        // ch1: spikes of 5 samples at frames 30 and 70; others: random
        if (c == 1) xc = ((f >= 30 && f < 35) || (f >= 70 && f < 72) || (f >= 90 && f < 95)) ? 850 : 512 + int'($urandom_range(0, 8)) - 4;
        else        xc = int'($urandom_range(300, 700));
        y = (cfgw[c].enable) ? model(c, xc) : 0;
        if (!cfgw[c].enable) w_ref[c] = 0;
        @(negedge clk); adc_done = 1; adc_data = 10'(xc); adc_ch = 2'(c);
        @(negedge clk); adc_done = 0;
        @(negedge clk);
        chk(smp_valid && smp_ch == 2'(c), "sample offered two cycles after ADC");
        if (cfgw[c].enable) begin
          chk(msb_byte == 8'(y >> 2), $sformatf("f%0d ch%0d msb %h exp y=%0d", f, c, msb_byte, y));
          lsb_exp[2*c +: 2] = 2'(y);
          chk(lsb_byte[2*c +: 2] == lsb_exp[2*c +: 2], "lsb bits");
        end
        // spike model for channel 1
        if (c == 1) begin
          h = ((y < 0) ? -y : y) > 40;
          if (coll1) begin
            post1++;
            if (post1 == 12) begin coll1 = 0; exp_spike_frame = f; n_model++; end
            run1 = 0;
          end else if (h && run1 == 2) begin
            coll1 = 1; post1 = 1; run1 = 0;
          end else run1 = h ? run1 + 1 : 0;
        end
        @(negedge clk); commit = 1;
        @(negedge clk); commit = 0;
        @(negedge clk);
        // requests after this channel's commit
        if (c == 0) begin chk(req[0], "stream request every sample"); grant[0] = 1; n_stream++; end
        if (c == 1) begin
          chk(req[1] == (exp_spike_frame == f), $sformatf("spike request at frame %0d", f));
          if (req[1]) begin
            chk(info[1].end_row == 8'(f % 64) && info[1].ptype == MODE_EAP_SPIKE, "spike info");
            grant[1] = 1; n_spike++;
          end
        end
        if (c == 2) begin
          chk(req[2] == ((f % 8) == 7), $sformatf("LFP request frame %0d", f));
          if (req[2]) begin grant[2] = 1; n_lfp++; end
        end
        if (c == 3) chk(!req[3], "powered-down channel silent");
        @(negedge clk); grant = 0;
      end
    end
    chk(n_spike == n_model && n_spike >= 3 && n_lfp == 15 && n_stream == 120, $sformatf("counts spike %0d lfp %0d stream %0d", n_spike, n_lfp, n_stream));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
