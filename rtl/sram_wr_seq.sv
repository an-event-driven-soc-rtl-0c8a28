// sram_wr_seq - stores the samples of all blocks in the shared SRAM.
//
// All ADCs run in lock step, so after every conversion all 16 blocks
// offer a sample of the same channel at once.  On start the sequencer
// latches the channel and the ring row and writes, block after block, the
// channel's MSB byte and the block's packed LSB byte: 2 x NBLK writes, one
// per cycle.  The LSB byte is rewritten in every period with the bits
// known so far, so each channel's bits are correct as soon as its own
// period is over.  commit pulses for one cycle after the last write; the
// spike engines only raise a request after it, so a packet is never read
// before its samples are in the SRAM.  The block bytes must stay stable
// until commit (the blocks hold them for a whole conversion period).
//
// Timing: start in cycle 0, writes in cycles 1..2*NBLK, commit in cycle
// 2*NBLK+1.  The conversion period (at least 47 cycles) leaves room.
module sram_wr_seq
  import nr_pkg::*;
#(
  parameter int unsigned AW = 13
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [1:0]    ch,
  input  logic [7:0]    row,
  input  logic [7:0]    msb [NBLK],
  input  logic [7:0]    lsb [NBLK],
  output logic          we,
  output logic [AW-1:0] waddr,
  output logic [7:0]    wdata,
  output logic          commit,
  output logic          busy
);
  logic [5:0] step;       // {block, lsb_phase}
  logic [1:0] ch_q;
  logic [7:0] row_q;
  logic [3:0] b;
  logic       ph;

  assign b  = step[4:1];
  assign ph = step[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      step   <= '0;
      ch_q   <= '0;
      row_q  <= '0;
      commit <= 1'b0;
    end else begin
      commit <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        step  <= '0;
        ch_q  <= ch;
        row_q <= row;
      end else if (busy) begin
        if (step == 6'(2*NBLK - 1)) begin
          busy   <= 1'b0;
          commit <= 1'b1;
        end
        step <= step + 6'd1;
      end
    end
  end

  always_comb begin
    we    = busy;
    waddr = AW'(row_addr(row_q, b, ph ? 3'd4 : {1'b0, ch_q}));
    wdata = ph ? lsb[b] : msb[b];
  end

  // A new sample set must not arrive before the previous one is stored.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
