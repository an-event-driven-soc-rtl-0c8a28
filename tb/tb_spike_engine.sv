// tb_spike_engine - scenario test of one channel's spike engine.
// Each simulated frame gives one sample (smp + hit), then the SRAM
// commit, then the frame tick, with the ring row advancing per frame.
// Checked: 3-consecutive validation (two crossings are not enough), the
// request after the 12th window sample with the right end row, no
// re-trigger inside a window, streaming requests every sample, LFP
// requests every 8th sample, the lost flag when a request is still
// pending, latency counting, the drop after LAT_LIMIT frames and
// clearing on power-down.
module tb_spike_engine;
  import nr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic enable = 0;
  mode_e mode = MODE_EAP_SPIKE;
  logic smp = 0, hit = 0, commit = 0, frame_tick = 0, grant = 0;
  logic [7:0] cur_row = 0;
  logic req;
  req_info_t info;
  int checks = 0, failures = 0;
  int frame = 0;

  spike_engine #(.LAT_LIMIT(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (frame %0d)", what, frame); end
  endtask

  // one frame: sample, commit, frame tick; returns req after commit
  task automatic step(input bit h);
    @(negedge clk); cur_row = 8'(frame % 64); smp = 1; hit = h;
    @(negedge clk); smp = 0; hit = 0;
    @(negedge clk); commit = 1;
    @(negedge clk); commit = 0;
    @(negedge clk); frame_tick = 1; frame++;
    @(negedge clk); frame_tick = 0;
  endtask

  task automatic take();
    @(negedge clk); grant = 1;
    @(negedge clk); grant = 0;
    chk(!req, "request cleared by grant");
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; enable = 1;
    // ---- spike mode ----
    mode = MODE_EAP_SPIKE;
    step(0); step(1); step(1); step(0);                 // two crossings only
    chk(!req, "no spike from two crossings");
    step(1); step(1);                                     // frames 4,5
    step(1);                                              // frame 6: validation
    for (int i = 1; i < 12; i++) begin                    // frames 7..17
      chk(!req, "no request before window complete");
      step(1);                                            // crossings inside window ignored
    end
    chk(req, "spike request after 12th sample");
    chk(info.end_row == 8'd17, $sformatf("spike end row %0d", info.end_row));
    chk(info.ptype == MODE_EAP_SPIKE && !info.lost && info.latency == 1, "spike info");
    take();
    step(0); step(0); step(0);
    chk(!req, "no new spike without new crossings");

    // ---- EAP streaming ----
    mode = MODE_EAP_STREAM;
    step(0);
    chk(req && info.end_row == 8'(frame - 1) && info.ptype == MODE_EAP_STREAM, "stream request");
    take();
    step(0);
    chk(req && info.latency == 1, "stream latency 1 frame");
    step(1);                                               // not taken: dropped
    chk(req && info.lost && info.end_row == 8'(frame - 2), "second stream sample dropped, lost flag");
    chk(info.latency == 2, "latency counts frames");
    take();
    step(0);
    chk(req && !info.lost, "lost flag cleared after its header");
    take();

    // ---- LFP decimation ----
    mode = MODE_LFP_STREAM;
    enable = 0; @(negedge clk); enable = 1;               // restart decimation phase
    begin
      int nreq = 0;
      for (int i = 0; i < 32; i++) begin
        step(0);
        if (req) begin
          nreq++;
          chk((i % 8) == 7, $sformatf("LFP request at sample %0d", i));
          take();
        end
      end
      chk(nreq == 4, $sformatf("LFP requests %0d of 32 samples", nreq));
    end

    // ---- latency limit ----
    mode = MODE_EAP_STREAM;
    enable = 0; @(negedge clk); enable = 1;
    step(0);
    chk(req, "request before limit");
    mode = MODE_LFP_STREAM;                               // no new requests meanwhile
    for (int i = 0; i < 7; i++) step(0);
    chk(!req && info.lost, "request dropped after LAT_LIMIT frames");

    // ---- power-down ----
    mode = MODE_EAP_STREAM;
    step(0);
    chk(req, "request before power-down");
    enable = 0; @(negedge clk); @(negedge clk);
    chk(!req, "power-down clears request");
    step(1);
    chk(!req, "no request while powered down");

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
