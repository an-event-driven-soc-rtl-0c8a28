// chip_fsm - chip-level controller: command decoder and six-state FSM.
//
// States: IDLE, ARST (analogue reset), CHPF (global analogue HPF corner),
// CSR (sample rate), CFG (configure a block), RO (readout).  Leaving IDLE
// always takes a command word from the SPI master (opcode in bits
// [15:12], nr_pkg::opcode_e).
//   ARST  [11:10] scope (chip / block / channel), [5:0] block or channel.
//         The selected AFEs are held in reset until STOP.
//   CHPF  the next word's bits [4:0] become the 5-bit code of the AFE's
//         high-pass bias current DAC; back to IDLE.
//   CSR   the next word's bits [7:0] become the sample-rate code; IDLE.
//   CFG   [3:0] block.  The next four words are shifted into that block's
//         configuration register while the old words come back; IDLE.
//   RO    readout: packet words go out, received words are ignored
//         except STOP.
//   STOP  returns to IDLE from ARST and RO; NOP does nothing anywhere.
// Every word received is acknowledged in the next transfer by its
// bit-wise inverse, so the master can check the link.  In CFG each data
// word is answered, one transfer later like every reply, by the old
// register word it pushed out instead of its echo: the replies are the
// CFG acknowledge, then old words 0..3, the last one in the transfer
// after the CFG sequence.  In RO only the RO command itself is echoed,
// after which packet words (or 16'h0000 when none is ready) follow.  The states, the commands and
// the inverted-echo acknowledge follow the specification; opcodes, field
// positions and the two-word form of CHPF and CSR are this design's own.
//
// Timing: rx_valid (one cycle) updates the state in the next cycle;
// tx_word must be stable at the next CS_n fall (tx_load).
module chip_fsm
  import nr_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // SPI slave
  input  logic        rx_valid,
  input  logic [15:0] rx_word,
  input  logic        tx_load,
  output logic [15:0] tx_word,
  // status and global settings
  output chip_state_e state,
  output logic [NCH-1:0] afe_rst,
  output logic [4:0]  hpf_dac,
  output logic [7:0]  csr,
  // block configuration port
  output logic [3:0]  cfg_blk,
  output logic        cfg_shift,
  output logic [15:0] cfg_din,
  input  logic [15:0] cfg_dout,
  // readout
  output logic        ro,
  input  logic        pkt_valid,
  input  logic [15:0] pkt_word,
  output logic        pkt_pop
);
  opcode_e    op;
  logic [15:0] echo;
  logic        send_echo;
  logic [1:0]  cfg_cnt;
  rst_scope_e  rst_scope;
  logic [5:0]  rst_idx;

  assign op        = opcode_e'(rx_word[15:12]);
  assign ro        = (state == S_RO);
  assign cfg_shift = rx_valid && (state == S_CFG);
  assign cfg_din   = rx_word;   // the received word itself is the shift-in data
  assign tx_word   = (ro && !send_echo) ? (pkt_valid ? pkt_word : 16'h0000) : echo;
  assign pkt_pop   = tx_load && ro && !send_echo && pkt_valid;

  always_comb begin
    afe_rst = '0;
    if (state == S_ARST) begin
      unique case (rst_scope)
        RST_CHIP:  afe_rst = '1;
        RST_BLOCK: afe_rst = NCH'(4'hF) << (4 * rst_idx[3:0]);
        RST_CHAN:  afe_rst = NCH'(1) << rst_idx;
        default:   afe_rst = '0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      echo      <= '0;
      send_echo <= 1'b1;
      cfg_cnt   <= '0;
      cfg_blk   <= '0;
      rst_scope <= RST_CHIP;
      rst_idx   <= '0;
      hpf_dac   <= '0;
      csr       <= '0;
    end else begin
      if (tx_load && ro) send_echo <= 1'b0;
      if (rx_valid) begin
        echo <= ~rx_word;
        unique case (state)
          S_IDLE: begin
            send_echo <= 1'b1;
            unique case (op)
              OP_ARST: begin
                state     <= S_ARST;
                rst_scope <= rst_scope_e'(rx_word[11:10]);
                rst_idx   <= rx_word[5:0];
              end
              OP_CHPF: state <= S_CHPF;
              OP_CSR:  state <= S_CSR;
              OP_CFG: begin
                state   <= S_CFG;
                cfg_blk <= rx_word[3:0];
                cfg_cnt <= '0;
              end
              OP_RO:   state <= S_RO;
              default: ;                    // NOP, STOP, unknown
            endcase
          end
          S_ARST: if (op == OP_STOP) state <= S_IDLE;
          S_CHPF: begin
            hpf_dac <= rx_word[4:0];
            state   <= S_IDLE;
          end
          S_CSR: begin
            csr   <= rx_word[7:0];
            state <= S_IDLE;
          end
          S_CFG: begin
            echo    <= cfg_dout;            // old register word goes back
            cfg_cnt <= cfg_cnt + 2'd1;
            if (cfg_cnt == 2'd3) state <= S_IDLE;
          end
          S_RO: if (op == OP_STOP) begin
            state     <= S_IDLE;
            send_echo <= 1'b1;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // Readout pops only words that exist.
  assert property (@(posedge clk) disable iff (!rst_n) pkt_pop |-> pkt_valid);
endmodule
