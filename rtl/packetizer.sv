// packetizer - turns granted requests into the word stream sent over SPI.
//
// When idle, in readout mode and with its output register empty, it asks
// the scheduler for the next channel (take).  For a granted channel it
// emits a header word (nr_pkg::hdr_t: marker, channel mode, channel
// number, lost flag, latency in frames) and then the packet's samples,
// oldest first: 16 for a spike window, 1 for a streaming sample.  Each
// sample is rebuilt from two SRAM bytes, the channel's MSB byte and the
// two bits of the block's packed LSB byte, and sent as {6'b0, y[9:0]}
// (10-bit two's complement).  The packet structure (a header, then data)
// follows the specification; the exact bit layout is this design's own.
//
// Interface: out_valid/out_word hold the next word until out_pop.  The
// SRAM read port has one cycle of latency; one sample takes four cycles
// once the output register is free.
module packetizer
  import nr_pkg::*;
#(
  parameter int unsigned RING_ROWS = 64,
  parameter int unsigned AW        = 13
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,          // readout mode
  // scheduler
  output logic          take,
  input  logic          grant_valid,
  input  logic [5:0]    grant_idx,
  input  req_info_t     info [NCH],
  // SRAM read port
  output logic          re,
  output logic [AW-1:0] raddr,
  input  logic [7:0]    rdata,
  // output words
  output logic          out_valid,
  output logic [15:0]   out_word,
  input  logic          out_pop,
  output logic          busy
);
  typedef enum logic [1:0] {P_IDLE, P_RD_MSB, P_RD_LSB, P_ASM} pst_e;
  pst_e       st;
  logic [5:0] chan;
  logic [7:0] cur_end;   // ring row of the newest sample
  logic [4:0] k;         // sample index in the packet
  logic [4:0] len;
  logic [7:0] row;
  logic [7:0] msb_q;
  logic       out_free;
  hdr_t       hdr;

  assign out_free = !out_valid || out_pop;
  assign take     = (st == P_IDLE) && enable && out_free;
  assign busy     = (st != P_IDLE);

  always_comb begin
    // row of sample k: end_row - (len-1-k), modulo the ring
    logic [8:0] back, r;
    back = 9'(len) - 9'(k) - 9'd1;
    r    = 9'(cur_end) + 9'(RING_ROWS) - back;
    if (r >= 9'(RING_ROWS)) r = r - 9'(RING_ROWS);
    row  = r[7:0];

    hdr.marker  = 1'b1;
    hdr.ptype   = info[grant_idx].ptype;
    hdr.chan    = grant_idx;
    hdr.lost    = info[grant_idx].lost;
    hdr.latency = info[grant_idx].latency;

    re    = (st == P_RD_MSB && out_free) || (st == P_RD_LSB);
    raddr = AW'(row_addr(row, chan[5:2], (st == P_RD_LSB) ? 3'd4 : {1'b0, chan[1:0]}));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= P_IDLE;
      chan      <= '0;
      cur_end   <= '0;
      k         <= '0;
      len       <= '0;
      msb_q     <= '0;
      out_valid <= 1'b0;
      out_word  <= '0;
    end else begin
      if (out_pop) out_valid <= 1'b0;
      unique case (st)
        P_IDLE: if (grant_valid) begin
          chan      <= grant_idx;
          cur_end   <= info[grant_idx].end_row;
          len       <= pkt_len(info[grant_idx].ptype);
          k         <= '0;
          out_word  <= hdr;
          out_valid <= 1'b1;
          st        <= P_RD_MSB;
        end
        P_RD_MSB: if (out_free) st <= P_RD_LSB;
        P_RD_LSB: begin
          msb_q <= rdata;
          st    <= P_ASM;
        end
        P_ASM: begin
          out_word  <= {6'b0, msb_q, rdata[2*chan[1:0] +: 2]};
          out_valid <= 1'b1;
          k         <= k + 5'd1;
          st        <= (k == len - 5'd1) ? P_IDLE : P_RD_MSB;
        end
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) grant_valid |-> take);
endmodule
