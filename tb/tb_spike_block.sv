// tb_spike_block - workload test: one block of four channels in spike
// output mode, with each channel's threshold set from training data.
//
// The four channels of block 0 carry noise of four different amplitudes.
// First they stream (EAP streaming mode) and the testbench collects 48
// training samples per channel from the packets, estimates each
// channel's noise level (mean absolute value) and sets the threshold to
// four times that.  The block is then switched to spike mode with those
// thresholds and biphasic spikes (two samples up, two down; inverted on
// channel 2) are injected every 45-60 frames.  Checked: the thresholds
// grow with the noise, every injected spike is reported in exactly one
// 16-sample packet, its validation point (third window sample from the
// start of the 12) is the spike's third sample, the two samples before
// that are the spike's first two, and no packet appears without a spike.
// The chip runs at its default parameters and the slowest sample rate
// (CSR code 255) for about 420 frames; the testbench acts as the SPI
// master (one bit per 8 clocks).  The packet cut short by the STOP that
// ends training, and one streaming packet per channel still pending from
// it, are read and set aside.  A watchdog ends a hung run as a failure.
module tb_spike_block;
  import nr_pkg::*;
  logic clk = 0, rst_n = 1;
  logic sclk = 0, cs_n = 1, mosi = 0, miso, data_req;
  logic [15:0] afe_vin [NCH];
  logic [NCH-1:0] afe_pd, afe_rst, afe_hp_low, afe_lp_low;
  logic [1:0] afe_gain [NCH];
  logic [4:0] hpf_dac;
  int checks = 0, failures = 0;

  neural_soc dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 60) $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // ---------------- stimulus ----------------
  int frame = -1;
  always @(posedge clk) if (rst_n && dut.frame_tick) frame <= frame + 1;
  int noise_amp [4] = '{300, 600, 900, 1200};
  bit inject = 0;
  int spike_start [4][$];          // first frame of every injected spike
  int next_spike [4];
  localparam int A = 100 * 64;     // spike amplitude: 100 LSB
  always @(posedge clk) if (rst_n && dut.frame_tick && inject) begin
    for (int c = 0; c < 4; c++) if (frame + 1 == next_spike[c]) begin
      spike_start[c].push_back(frame + 1);
      next_spike[c] = frame + 1 + 45 + int'($urandom_range(0, 15));
    end
  end
  always @(negedge clk) begin
    for (int c = 0; c < NCH; c++) begin
      int v, ph;
      v = 32768;
      if (c < 4) begin
        v += int'($urandom_range(0, 2 * noise_amp[c])) - noise_amp[c];
        if (spike_start[c].size() > 0) begin
          ph = frame - spike_start[c][$];
          if (ph == 0 || ph == 1) v += (c == 2) ? -A : A;
          if (ph == 2 || ph == 3) v += (c == 2) ? A : -A;
        end
      end
      afe_vin[c] = 16'(v);
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

  // frame of the newest sample of each granted packet, in grant order
  int gq_end [$];
  always @(posedge clk) if (dut.grant_valid) begin
    int cf;
    cf = frame + ((8'(frame % 64) != dut.cur_row) ? 1 : 0);
    gq_end.push_back(cf - ((int'(dut.cur_row) - int'(dut.info[dut.grant_idx].end_row) + 64) % 64));
  end

  // read one packet; returns channel, length, data and end frame
  task automatic get_packet(output int ch, output int len, output int d[16], output int fe, output bit got);
    logic [15:0] w;
    hdr_t h;
    got = 0;
    xfer(16'h0000, w);
    if (w == 16'h0000) return;
    h = hdr_t'(w);
    chk(h.marker, "header marker");
    ch  = int'(h.chan);
    len = (h.ptype == MODE_EAP_SPIKE) ? 16 : 1;
    for (int k = 0; k < len; k++) begin
      xfer(16'h0000, w);
      d[k] = int'($signed(w[9:0]));
    end
    chk(gq_end.size() > 0, "packet without grant");
    fe  = gq_end.pop_front();
    if (h.ptype == MODE_EAP_SPIKE) chk(!h.lost, "no spike packet lost");
    got = 1;
  endtask

  task automatic configure(input ch_cfg_t w [4]);
    logic [15:0] r;
    xfer({OP_CFG, 8'd0, 4'd0}, r);
    for (int i = 0; i < 4; i++) xfer(w[i], r);
  endtask

  initial begin
    logic [15:0] r;
    ch_cfg_t cw [4];
    int sum_abs [4], n_train [4], thr [4], n_pk [4], n_exp [4];
    int ch, len, d[16], fe;
    bit got;
    hdr_t part;
    int n_left = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (10) @(negedge clk);
    xfer({OP_CSR, 12'd0}, r); xfer(16'h00FF, r);           // 13.245 kHz
    // ---- training: stream ----
    for (int c = 0; c < 4; c++) begin
      cw[c] = '{mode: MODE_EAP_STREAM, enable: 1, gain: 2'd2, hpf_sel: 4'd4, thresh: 7'd127};
      sum_abs[c] = 0; n_train[c] = 0; n_pk[c] = 0; n_exp[c] = 0;
    end
    configure(cw);
    repeat (20 * 4 * 302) @(negedge clk);                    // filters settle
    xfer({OP_RO, 12'd0}, r);
    xfer(16'h0000, r);
    while (n_train[0] < 48 || n_train[1] < 48 || n_train[2] < 48 || n_train[3] < 48) begin
      get_packet(ch, len, d, fe, got);
      if (got && ch < 4) begin
        if (n_train[ch] < 48) begin sum_abs[ch] += (d[0] < 0) ? -d[0] : d[0]; n_train[ch]++; end
      end
    end
    // The reply to STOP may already be the header of a packet whose data
    // words will follow at the next readout.
    xfer({OP_STOP, 12'd0}, r);
    part = hdr_t'(r);
    for (int c = 0; c < 4; c++) begin
      thr[c] = (4 * sum_abs[c]) / n_train[c];
      if (thr[c] > 80) thr[c] = 80;
      if (thr[c] < 6) thr[c] = 6;
      $display("channel %0d: mean |y| %0d/%0d, threshold %0d", c, sum_abs[c], n_train[c], thr[c]);
    end
    chk(thr[0] < thr[1] && thr[1] < thr[2] && thr[2] < thr[3], "thresholds follow the noise");
    // ---- spike mode ----
    for (int c = 0; c < 4; c++) cw[c] = '{mode: MODE_EAP_SPIKE, enable: 1, gain: 2'd2, hpf_sel: 4'd4, thresh: 7'(thr[c])};
    configure(cw);
    repeat (8 * 4 * 302) @(negedge clk);
    for (int c = 0; c < 4; c++) next_spike[c] = frame + 5 + 13 * c;
    inject = 1;
    xfer({OP_RO, 12'd0}, r);
    xfer(16'h0000, r);
    if (part.marker) begin
      // finish the packet cut by STOP
      for (int k = 0; k < ((part.ptype == MODE_EAP_SPIKE) ? 16 : 1); k++) xfer(16'h0000, r);
      void'(gq_end.pop_front());
    end
    while (frame < 420) begin
      get_packet(ch, len, d, fe, got);
      if (got && len == 1) begin
        // a streaming request still pending from the training phase
        chk(ch < 4 && n_left < 4, "at most one left-over streaming packet per channel");
        n_left++;
      end else if (got) begin
        int s, m;
        chk(ch < 4, $sformatf("spike packet from block 0, ch %0d", ch));
        if (ch < 4) begin
          // validation point = window index 4 = third spike sample.
          // Channel 0 is converted in the same cycle the frame counter
          // steps, so its samples see the stimulus one frame later.
          m = -1;
          for (int i = 0; i < spike_start[ch].size(); i++)
            if (spike_start[ch][i] + 2 + 11 + ((ch == 0) ? 1 : 0) == fe) m = i;
          chk(m >= 0, $sformatf("ch %0d window ending frame %0d matches an injected spike (last start %0d)", ch, fe, spike_start[ch][$]));
          s = (ch == 2) ? -1 : 1;
          chk(s * d[2] > thr[ch] && s * d[3] > thr[ch] && s * d[4] < -thr[ch], $sformatf("ch %0d spike shape %0d %0d %0d", ch, d[2], d[3], d[4]));
          n_pk[ch]++;
        end
      end
      if (frame > 380) inject = 0;
    end
    // drain
    for (int n = 0; n < 40; n++) begin
      get_packet(ch, len, d, fe, got);
      if (got && ch < 4 && len == 16) n_pk[ch]++;
    end
    xfer({OP_STOP, 12'd0}, r);
    for (int c = 0; c < 4; c++) begin
      n_exp[c] = spike_start[c].size();
      $display("channel %0d: %0d spikes injected, %0d packets", c, n_exp[c], n_pk[c]);
      chk(n_pk[c] == n_exp[c] && n_exp[c] >= 4, $sformatf("ch %0d one packet per spike", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
