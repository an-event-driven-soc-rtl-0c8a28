// tb_neural_soc - end-to-end test of the whole chip at its default
// parameters (64 channels, 64-row SRAM ring).
//
// The testbench is the external SPI master and the analogue front ends.
// Every channel's AFE output is a mid-scale baseline with noise; four
// channels also carry 5-sample spikes, two of them at the same moments
// so that their requests compete.  The master sets the sample rate
// (CSR) and checks the conversion period, sets the analogue HPF code
// (CHPF), resets one channel (ARST), configures three blocks (CFG, and
// reads one block's words back by configuring it twice), then enters
// readout (RO) and parses the packet stream until STOP.
//
// Every packet is checked against a reference model: the testbench
// records what each ADC sampled and runs its own high-pass filter model.
// It notes the ring row of every grant (in grant order), maps it to a
// frame number, and compares the packet's samples with the model's for
// those frames; the header's latency must match the frames that passed.  Spike packets must hold 16 samples with
// the three crossings that validated them at positions 2..4; LFP packets
// must come 8 frames apart; powered-down channels must never send.
// Each mechanism is counted and a failure is counted for any that never
// happened: streaming, spike, LFP and combined packets, latency above
// zero, the lost flag, competing requests, data_req, every command.
module tb_neural_soc;
  import nr_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;     // a real falling edge applies the asynchronous reset
  logic sclk = 0, cs_n = 1, mosi = 0, miso, data_req;
  logic [15:0] afe_vin [NCH];
  logic [NCH-1:0] afe_pd, afe_rst, afe_hp_low, afe_lp_low;
  logic [1:0] afe_gain [NCH];
  logic [4:0] hpf_dac;
  int checks = 0, failures = 0;

  neural_soc dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // ---------------- configuration used ----------------
  ch_cfg_t cfgw [NCH];
  int spike_off [NCH];          // -1: no spikes on this channel
  localparam int SPK_PERIOD = 40;

  // ---------------- stimulus: AFE outputs ----------------
  int frame = -1;               // frame counter, follows frame_tick
  always @(posedge clk) if (rst_n && dut.frame_tick) frame <= frame + 1;
  always @(negedge clk) begin
    for (int c = 0; c < NCH; c++) begin
      int v;
      v = 32768 + int'($urandom_range(0, 400)) - 200;
      if (spike_off[c] >= 0 && frame >= 0 && ((frame + spike_off[c]) % SPK_PERIOD) < 5) v += 22000;
      afe_vin[c] = 16'(v);
    end
  end

  // ---------------- reference model of what is stored ----------------
  // The configuration registers are modelled word by word as the words
  // are shifted in, so the filter model sees the same (also transient)
  // settings as the chip.  All ADCs run in lock step: x is taken when
  // block 0's ADC samples and filtered when it finishes.
  logic [63:0] mreg [NBLK];
  int hist [NCH][8192];
  longint w_ref [NCH];
  int x_held [NBLK];
  int f_held;
  function automatic ch_cfg_t mcfg(int c);
    return ch_cfg_t'(mreg[c / 4][63 - 16 * (c % 4) -: 16]);
  endfunction
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int b = 0; b < NBLK; b++) mreg[b] <= '0;
    end else begin
      if (dut.cfg_shift) mreg[dut.cfg_blk] <= {mreg[dut.cfg_blk][47:0], dut.cfg_din};
      if (dut.conv_start) begin
        f_held = frame + ((dut.ch_sel == 0) ? 1 : 0);   // frame_tick updates frame in this edge
        for (int b = 0; b < NBLK; b++) x_held[b] = int'(afe_vin[4 * b + int'(dut.ch_sel)][15:6]);
      end
      if (dut.g_blk[0].u_adc.done) begin
        for (int b = 0; b < NBLK; b++) begin
          int c, k;
          longint x, d, yy;
          ch_cfg_t cf;
          c  = 4 * b + int'(dut.g_blk[0].u_adc.dout_ch);
          cf = mcfg(c);
          k  = (cf.hpf_sel > 8) ? 9 : int'(cf.hpf_sel) + 1;
          x  = longint'(x_held[b]) - 512;
          d  = w_ref[c] >>> k;
          yy = x - d;
          w_ref[c] = w_ref[c] + x - d;
          if (yy > 511) yy = 511;
          if (yy < -512) yy = -512;
          hist[c][f_held] = int'(yy);
        end
      end
      for (int c = 0; c < NCH; c++) if (!mcfg(c).enable) w_ref[c] = 0;
    end
  end

  // ---------------- SPI master ----------------
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
    repeat (4) @(negedge clk);
    cs_n = 1;
    repeat (8) @(negedge clk);
  endtask

  logic [15:0] last_sent;
  int n_ack_ok = 0;
  // send a word; the reply must be the echo of the previous one when
  // check_echo is set
  task automatic send(input logic [15:0] w, input bit check_echo, output logic [15:0] r);
    xfer(w, r);
    if (check_echo) begin
      chk(r == ~last_sent, $sformatf("echo %h of %h", r, last_sent));
      if (r == ~last_sent) n_ack_ok++;
    end
    last_sent = w;
  endtask

  // ---------------- mechanism counters ----------------
  int n_stream = 0, n_spike = 0, n_lfp = 0, n_comb = 0, n_lat = 0, n_lost = 0;
  int n_compete = 0, n_req_cycles = 0, n_arst = 0, n_chpf = 0, n_csr = 0, n_cfg_rb = 0, n_stop = 0;
  always @(posedge clk) begin
    if (dut.grant_valid && $countones(dut.req) > 1) n_compete++;
    if (data_req) n_req_cycles++;
  end

  int last_lfp_end [NCH];
  // frame of the newest sample of every granted packet, in grant order
  int gq_end [$];
  int gq_lat [$];
  always @(posedge clk) begin
    if (dut.grant_valid) begin
      int cf, ef;
      cf = frame + ((8'(frame % 64) != dut.cur_row) ? 1 : 0);
      ef = cf - ((int'(dut.cur_row) - int'(dut.info[dut.grant_idx].end_row) + 64) % 64);
      gq_end.push_back(ef);
      gq_lat.push_back(cf - ef);
    end
  end


  initial begin
    logic [15:0] r;
    for (int c = 0; c < NCH; c++) begin
      cfgw[c] = '0;
      spike_off[c] = -1;
      w_ref[c] = 0;
      last_lfp_end[c] = -1;
    end
    // block 0: one channel of each mode
    cfgw[0] = '{mode: MODE_EAP_STREAM, enable: 1, gain: 2'd1, hpf_sel: 4'd4, thresh: 7'd100};
    cfgw[1] = '{mode: MODE_EAP_SPIKE,  enable: 1, gain: 2'd3, hpf_sel: 4'd3, thresh: 7'd60};
    cfgw[2] = '{mode: MODE_LFP_STREAM, enable: 1, gain: 2'd2, hpf_sel: 4'd8, thresh: 7'd60};
    cfgw[3] = '{mode: MODE_COMBINED,   enable: 1, gain: 2'd0, hpf_sel: 4'd6, thresh: 7'd60};
    // block 7 and block 15: spike channels, two powered down
    cfgw[28] = '{mode: MODE_EAP_SPIKE, enable: 1, gain: 2'd3, hpf_sel: 4'd3, thresh: 7'd60};
    cfgw[60] = '{mode: MODE_EAP_SPIKE, enable: 1, gain: 2'd3, hpf_sel: 4'd2, thresh: 7'd60};
    cfgw[61] = '{mode: MODE_EAP_SPIKE, enable: 0, gain: 2'd3, hpf_sel: 4'd2, thresh: 7'd60};
    cfgw[62] = '{mode: MODE_EAP_SPIKE, enable: 1, gain: 2'd3, hpf_sel: 4'd2, thresh: 7'd60};
    spike_off[1] = 3; spike_off[28] = 17; spike_off[60] = 29; spike_off[62] = 29; spike_off[61] = 29;
    last_sent = 16'h0000;

    repeat (3) @(negedge clk); rst_n = 1;
    repeat (10) @(negedge clk);
    send(16'h0000, 0, r);                       // NOP

    // ---- CSR: slowest rate, 302 cycles per conversion ----
    send({OP_CSR, 12'd0}, 1, r);
    send(16'h00FF, 1, r);
    begin
      longint t0, t1;
      @(posedge clk iff dut.conv_start); t0 = $time;
      @(posedge clk iff dut.conv_start); t1 = $time;
      chk((t1 - t0) == 302 * 10, $sformatf("conversion period %0d cycles", (t1 - t0) / 10));
      if ((t1 - t0) == 3020) n_csr++;
    end
    // ---- CHPF ----
    send({OP_CHPF, 12'd0}, 1, r);
    send(16'h0011, 1, r);
    chk(hpf_dac == 5'h11, "CHPF code"); if (hpf_dac == 5'h11) n_chpf++;
    // ---- ARST of channel 5 ----
    send({OP_ARST, 2'd2, 4'd0, 6'd5}, 1, r);
    chk(afe_rst == (64'd1 << 5), "ARST channel 5"); if (afe_rst == (64'd1 << 5)) n_arst++;
    send({OP_STOP, 12'd0}, 1, r);
    chk(afe_rst == 0, "ARST released by STOP"); n_stop++;
    // ---- CFG blocks 0 (twice, read back), 7, 15 ----
    foreach (cfgw[i]) ;
    for (int pass = 0; pass < 2; pass++) begin
      send({OP_CFG, 8'd0, 4'd0}, pass == 0, r);
      for (int i = 0; i < 4; i++) begin
        send(cfgw[i], i == 0, r);
        if (i > 0 && pass == 1) begin
          chk(r == cfgw[i - 1], $sformatf("CFG read back word %0d: %h", i - 1, r));
          if (r == cfgw[i - 1]) n_cfg_rb++;
        end
      end
    end
    send({OP_CFG, 8'd0, 4'd7}, 0, r);
    chk(pass_rb(r, cfgw[3]), "last old word of block 0 returned");
    for (int i = 0; i < 4; i++) send(cfgw[28 + i], i == 0, r);
    send({OP_CFG, 8'd0, 4'd15}, 0, r);
    for (int i = 0; i < 4; i++) send(cfgw[60 + i], i == 0, r);
    chk(afe_pd[0] == 0 && afe_pd[61] == 1 && afe_pd[10] == 1, "power-down controls");
    chk(afe_lp_low[2] && afe_hp_low[2] && afe_hp_low[3] && !afe_lp_low[3] && !afe_hp_low[0], "band controls");
    chk(afe_gain[1] == 2'd3 && afe_gain[2] == 2'd2, "gain controls");

    // let requests wait longer than LAT_LIMIT before readout
    repeat (40 * 4 * 302) @(negedge clk);
    chk(!data_req, "no data_req outside readout");

    // ---- RO ----
    send({OP_RO, 12'd0}, 0, r);
    send(16'h0000, 1, r);                         // RO acknowledged
    begin
      automatic int nw = 0;
      while (nw < 900) begin
        logic [15:0] w;
        hdr_t h;
        xfer(16'h0000, w); nw++;
        if (w == 16'h0000) continue;
        h = hdr_t'(w);
        chk(h.marker, $sformatf("header expected, got %h", w));
        if (!h.marker) continue;
        begin
          int ch, len, d[16], fe;
          ch  = int'(h.chan);
          len = (h.ptype == MODE_EAP_SPIKE) ? 16 : 1;
          chk(cfgw[ch].enable, $sformatf("packet from powered-down channel %0d", ch));
          chk(h.ptype == cfgw[ch].mode, "packet type is channel mode");
          for (int k = 0; k < len; k++) begin
            xfer(16'h0000, w); nw++;
            chk(w[15:10] == 0, "data word format");
            d[k] = int'($signed(w[9:0]));
          end
          chk(gq_end.size() > 0, "header without grant");
          fe = gq_end.pop_front();
          begin
            int gl;
            gl = gq_lat.pop_front();
            chk(int'(h.latency) >= gl - 1 && int'(h.latency) <= gl, $sformatf("latency %0d vs %0d frames", h.latency, gl));
          end
          for (int k = 0; k < len; k++)
            chk(hist[ch][fe - len + 1 + k] == d[k], $sformatf("ch %0d sample %0d: %0d exp %0d", ch, k, d[k], hist[ch][fe - len + 1 + k]));
          if (h.latency > 0) n_lat++;
          if (h.lost) n_lost++;
          unique case (h.ptype)
            MODE_EAP_STREAM: n_stream++;
            MODE_COMBINED:   n_comb++;
            MODE_LFP_STREAM: begin
              n_lfp++;
              if (last_lfp_end[ch] >= 0)
                chk((fe - last_lfp_end[ch]) % 8 == 0, $sformatf("LFP spacing %0d", fe - last_lfp_end[ch]));
              last_lfp_end[ch] = fe;
            end
            MODE_EAP_SPIKE: begin
              n_spike++;
              for (int k = 2; k <= 4; k++)
                chk((d[k] < 0 ? -d[k] : d[k]) > int'(cfgw[ch].thresh), $sformatf("validation sample %0d of ch %0d", k, ch));
              chk((d[1] < 0 ? -d[1] : d[1]) <= int'(cfgw[ch].thresh) || (d[0] < 0 ? -d[0] : d[0]) <= int'(cfgw[ch].thresh),
                  "window starts 4 samples before validation");
            end
          endcase
        end
      end
    end
    send({OP_STOP, 12'd0}, 0, r);
    send(16'h0000, 1, r); n_stop++;
    repeat (10) @(negedge clk);
    chk(!data_req, "data_req low after STOP");

    $display("mechanisms: stream=%0d spike=%0d lfp=%0d combined=%0d latency>0=%0d lost=%0d compete=%0d data_req_cycles=%0d",
             n_stream, n_spike, n_lfp, n_comb, n_lat, n_lost, n_compete, n_req_cycles);
    $display("commands: csr=%0d chpf=%0d arst=%0d cfg_readback=%0d stop=%0d acks=%0d",
             n_csr, n_chpf, n_arst, n_cfg_rb, n_stop, n_ack_ok);
    chk(n_stream > 0, "streaming packets seen");
    chk(n_spike >= 4, "spike packets seen");
    chk(n_lfp > 0, "LFP packets seen");
    chk(n_comb > 0, "combined packets seen");
    chk(n_lat > 0, "latency reported");
    chk(n_lost > 0, "lost flag seen");
    chk(n_compete > 0, "competing requests seen");
    chk(n_req_cycles > 0, "data_req seen");
    chk(n_csr == 1 && n_chpf == 1 && n_arst == 1 && n_cfg_rb == 3 && n_stop == 2, "all commands took effect");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit pass_rb(logic [15:0] got, logic [15:0] exp_w);
    return got == exp_w;
  endfunction

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
