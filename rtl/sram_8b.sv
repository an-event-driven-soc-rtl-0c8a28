// sram_8b - shared data memory with 8-bit words.
//
// Holds the sample ring for all 16 blocks: RING_ROWS rows, each made of
// 16 block rows of 5 bytes (see nr_pkg::row_addr).  Written as an array
// so that synthesis maps it to a memory; in silicon it is a standard
// SRAM macro with 8-bit words.  One write port (sample storage) and one
// read port (readout) work in the same cycle; the read data appears one
// cycle after the address (synchronous read).  Contents are not reset.
module sram_8b #(
  parameter int unsigned DEPTH = 5120,           // 64 rows x 16 blocks x 5 bytes
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata
);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

  assert property (@(posedge clk) we |-> 32'(waddr) < DEPTH);
  assert property (@(posedge clk) re |-> 32'(raddr) < DEPTH);
endmodule
