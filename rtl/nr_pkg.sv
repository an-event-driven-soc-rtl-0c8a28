// nr_pkg - constants and types shared by the neural-recording SoC.
//
// The chip has 64 channels in 16 blocks of 4; each block owns a 10-bit
// SAR ADC shared by its 4 channels.  A detected spike is sent as a window
// of 16 samples, 4 taken before the validation point and 12 from it on.
// These numbers, the six chip-level states and the command set follow the
// design's specification.  The binary encodings (opcodes, the layout of
// the 16-bit per-channel configuration word and of the packet header) are
// this implementation's own choices.
package nr_pkg;

  localparam int unsigned NBLK       = 16;   // recording blocks
  localparam int unsigned CH_PER_BLK = 4;    // channels per block (TDM on one ADC)
  localparam int unsigned NCH        = NBLK * CH_PER_BLK;
  localparam int unsigned ADC_BITS   = 10;
  localparam int unsigned PRE_SAMP   = 4;    // window samples before validation
  localparam int unsigned POST_SAMP  = 12;   // window samples from validation on
  localparam int unsigned WIN        = PRE_SAMP + POST_SAMP;
  localparam int unsigned VALID_RUN  = 3;    // consecutive crossings that make a spike
  localparam int unsigned LFP_DECIM  = 8;    // LFP streaming keeps every 8th sample
  localparam int unsigned ROW_BYTES  = 5;    // 4 MSB bytes + 1 packed LSB byte per block row
  localparam int unsigned LAT_BITS   = 6;    // latency field of the packet header

  // Command opcodes, bits [15:12] of an SPI command word.
  typedef enum logic [3:0] {
    OP_NOP  = 4'h0,
    OP_ARST = 4'h1,
    OP_CHPF = 4'h2,
    OP_CSR  = 4'h3,
    OP_CFG  = 4'h4,
    OP_RO   = 4'h5,
    OP_STOP = 4'hF
  } opcode_e;

  // Scope of an analogue reset, bits [11:10] of the ARST command word.
  typedef enum logic [1:0] {
    RST_CHIP  = 2'd0,
    RST_BLOCK = 2'd1,
    RST_CHAN  = 2'd2
  } rst_scope_e;

  // Chip-level FSM states.
  typedef enum logic [2:0] {
    S_IDLE = 3'd0,
    S_ARST = 3'd1,
    S_CHPF = 3'd2,
    S_CSR  = 3'd3,
    S_CFG  = 3'd4,
    S_RO   = 3'd5
  } chip_state_e;

  // Recording mode of one channel.
  typedef enum logic [1:0] {
    MODE_EAP_STREAM = 2'd0,   // every sample, EAP band
    MODE_EAP_SPIKE  = 2'd1,   // spike windows only
    MODE_LFP_STREAM = 2'd2,   // every 8th sample, LFP band
    MODE_COMBINED   = 2'd3    // every sample, wide band (LFP + EAP)
  } mode_e;

  // 16-bit configuration word of one channel.
  typedef struct packed {
    mode_e      mode;      // [15:14]
    logic       enable;    // [13]    0 = channel powered down
    logic [1:0] gain;      // [12:11] 4th-stage AFE gain setting
    logic [3:0] hpf_sel;   // [10:7]  digital HPF shift k = min(hpf_sel,8) + 1
    logic [6:0] thresh;    // [6:0]   absolute detection threshold, ADC LSBs
  } ch_cfg_t;

  // Packet header word.  Data words follow it: 16 for a spike packet,
  // one for every streaming packet.  A data word is {6'b0, sample[9:0]}.
  typedef struct packed {
    logic                 marker;    // [15] always 1 in a header
    mode_e                ptype;     // [14:13] mode of the channel
    logic [5:0]           chan;      // [12:7]
    logic                 lost;      // [6] an earlier request of this channel was dropped
    logic [LAT_BITS-1:0]  latency;   // [5:0] frames between ready and grant, saturating
  } hdr_t;

  // A request as handed from a channel to the readout path.
  typedef struct packed {
    mode_e               ptype;
    logic                lost;
    logic [LAT_BITS-1:0] latency;
    logic [7:0]          end_row;    // ring row of the newest sample of the packet
  } req_info_t;

  // Byte address of one byte of a block row in the shared SRAM.
  // Bytes 0..3 hold bits [9:2] of channels 0..3, byte 4 packs the two
  // LSBs of every channel as {ch3, ch2, ch1, ch0}.
  function automatic logic [15:0] row_addr(logic [7:0] row, logic [3:0] blk, logic [2:0] byte_sel);
    return 16'((32'(row) * NBLK + 32'(blk)) * ROW_BYTES + 32'(byte_sel));
  endfunction

  function automatic logic [4:0] pkt_len(mode_e m);
    return (m == MODE_EAP_SPIKE) ? 5'(WIN) : 5'd1;
  endfunction

endpackage
