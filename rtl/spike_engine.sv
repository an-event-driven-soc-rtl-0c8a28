// spike_engine - per-channel spike processing and readout request.
//
// Spike mode: a spike is validated when three consecutive samples cross
// the threshold; the third is the validation point.  The window sent off
// chip is the 4 samples before that point and 12 samples starting at it
// (16 in all).  Once the 12th has been taken and stored in the SRAM, a
// request is raised for the scheduler.  A new spike can only be validated
// after the window is complete, and the run counter restarts at
// validation.
// EAP streaming and combined modes request every sample; LFP streaming
// requests every 8th sample (simple decimation, the other samples are
// stored but not sent).
//
// A request waits for the SRAM write of its newest sample (commit pulse,
// which ends every conversion period).  While it is pending a latency
// counter counts frames; its value goes into the packet header so the
// receiver can restore the sample time.  If a request is still pending
// when the next one is due, the new one is dropped; if it waits LAT_LIMIT
// frames its samples are about to be overwritten in the SRAM ring and it
// is dropped too.  Either case sets a 'lost' flag that the next header
// carries.  The validation rule, window and decimation follow the
// specification; the drop policy, lost flag and latency unit are this
// design's own.
//
// Timing: smp is a one-cycle pulse with hit valid, once per frame for
// this channel.  grant is a one-cycle pulse from the scheduler that
// takes the request (info is sampled in the same cycle).
module spike_engine
  import nr_pkg::*;
#(
  parameter int unsigned LAT_LIMIT = 32   // frames a request may wait
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      enable,      // channel powered
  input  mode_e     mode,
  input  logic      smp,         // a new filtered sample of this channel
  input  logic      hit,         // threshold crossed by that sample
  input  logic [7:0] cur_row,    // ring row the sample is stored in
  input  logic      commit,      // SRAM writes of this period are done
  input  logic      frame_tick,  // frame boundary (latency unit)
  input  logic      grant,       // request taken by the scheduler
  output logic      req,
  output req_info_t info
);
  logic [1:0] run;          // consecutive crossings, saturating at 3
  logic       collecting;   // inside a spike window
  logic [3:0] post_cnt;     // window samples taken since validation
  logic [2:0] decim;        // LFP decimation phase
  logic       armed;        // a sample waits for its SRAM commit
  logic [7:0] arm_row;
  logic       lost;
  logic       req_q;
  mode_e      req_mode;
  logic [LAT_BITS-1:0] lat;
  logic [7:0] end_row;
  logic       due;          // this sample completes a packet

  always_comb begin
    due = 1'b0;
    unique case (mode)
      MODE_EAP_STREAM, MODE_COMBINED: due = 1'b1;
      MODE_LFP_STREAM:                due = (decim == 3'(LFP_DECIM - 1));
      MODE_EAP_SPIKE:                 due = collecting && (post_cnt == 4'(POST_SAMP - 1));
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run        <= '0;
      collecting <= 1'b0;
      post_cnt   <= '0;
      decim      <= '0;
      armed      <= 1'b0;
      arm_row    <= '0;
      lost       <= 1'b0;
      req_q      <= 1'b0;
      req_mode   <= MODE_EAP_STREAM;
      lat        <= '0;
      end_row    <= '0;
    end else if (!enable) begin
      run        <= '0;
      collecting <= 1'b0;
      post_cnt   <= '0;
      decim      <= '0;
      armed      <= 1'b0;
      req_q      <= 1'b0;
      lost       <= 1'b0;
    end else begin
      // ---- sample processing ----
      if (smp) begin
        decim <= decim + 3'd1;
        if (mode == MODE_EAP_SPIKE) begin
          if (collecting) begin
            post_cnt <= post_cnt + 4'd1;
            if (due) collecting <= 1'b0;
            run <= '0;
          end else if (hit && run == 2'(VALID_RUN - 1)) begin
            collecting <= 1'b1;      // validation point = 1st of 12
            post_cnt   <= 4'd1;
            run        <= '0;
          end else begin
            run <= hit ? ((run == 2'd3) ? run : run + 2'd1) : 2'd0;
          end
        end else begin
          collecting <= 1'b0;
          run        <= '0;
        end
        if (due) begin
          armed   <= 1'b1;
          arm_row <= cur_row;
        end
      end

      // ---- request bookkeeping ----
      if (grant) begin
        req_q <= 1'b0;
        lost  <= 1'b0;
      end
      if (req_q && !grant && frame_tick) begin
        if (32'(lat) + 1 >= LAT_LIMIT) begin
          req_q <= 1'b0;             // data about to be overwritten
          lost  <= 1'b1;
        end else if (lat != '1) begin
          lat <= lat + 1'b1;
        end
      end
      if (commit && armed) begin
        armed <= 1'b0;
        if (req_q && !grant) begin
          lost <= 1'b1;              // previous packet not sent yet
        end else begin
          req_q    <= 1'b1;
          req_mode <= mode;
          end_row  <= arm_row;
          lat      <= '0;
        end
      end
    end
  end

  assign req          = req_q;
  assign info.ptype   = req_mode;
  assign info.lost    = lost;
  assign info.latency = lat;
  assign info.end_row = end_row;

  // A grant is only given to a pending request.
  assert property (@(posedge clk) disable iff (!rst_n) grant |-> req_q);
endmodule
