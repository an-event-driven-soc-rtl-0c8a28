// tb_packetizer - the testbench plays scheduler and SRAM (random
// contents, one-cycle read latency) and pops words at random moments.
// For random channels in all four modes, with end rows that wrap around
// the ring, it checks the header (marker, mode, channel, lost flag,
// latency), the number of data words (16 for a spike, 1 otherwise) and
// every sample rebuilt from its MSB byte and packed LSB bits, oldest
// first.  It also checks that no request is taken outside readout mode.
module tb_packetizer;
  import nr_pkg::*;
  localparam int RING = 64;
  localparam int DEPTH = RING * NBLK * ROW_BYTES;
  logic clk = 0, rst_n = 0;
  logic enable = 0;
  logic take, grant_valid = 0;
  logic [5:0] grant_idx = 0;
  req_info_t info [NCH];
  logic re;
  logic [12:0] raddr;
  logic [7:0] rdata = 0;
  logic out_valid, out_pop = 0, busy;
  logic [15:0] out_word;
  logic [7:0] mem [DEPTH];
  int checks = 0, failures = 0;

  packetizer dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (re) rdata <= mem[raddr];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic pop(output logic [15:0] w);
    int guard = 0;
    while (!out_valid && guard < 100) begin @(negedge clk); guard++; end
    chk(out_valid, "word available");
    w = out_word;
    out_pop = 1; @(negedge clk); out_pop = 0;
    repeat ($urandom_range(0, 6)) @(negedge clk);
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) mem[a] = 8'($urandom);
    for (int c = 0; c < NCH; c++) info[c] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (3) @(negedge clk);
    chk(!take, "no take outside readout");
    enable = 1;
    for (int n = 0; n < 120; n++) begin
      int ch, len, er;
      logic [15:0] w;
      hdr_t h;
      ch = int'($urandom_range(0, NCH - 1));
      info[ch].ptype   = mode_e'(n % 4);
      info[ch].lost    = 1'($urandom);
      info[ch].latency = 6'($urandom);
      info[ch].end_row = 8'(n < 4 ? n : $urandom_range(0, RING - 1));
      len = (info[ch].ptype == MODE_EAP_SPIKE) ? 16 : 1;
      er  = int'(info[ch].end_row);
      while (!take) @(negedge clk);
      grant_valid = 1; grant_idx = 6'(ch);
      @(negedge clk); grant_valid = 0;
      pop(w);
      h = hdr_t'(w);
      chk(h.marker && h.ptype == info[ch].ptype && int'(h.chan) == ch &&
          h.lost == info[ch].lost && h.latency == info[ch].latency, $sformatf("header %h", w));
      for (int k = 0; k < len; k++) begin
        int row, b, m, l;
        logic [9:0] s;
        row = (er - (len - 1 - k) + RING) % RING;
        b   = ch / 4;
        m   = (row * NBLK + b) * 5 + (ch % 4);
        l   = (row * NBLK + b) * 5 + 4;
        s   = {mem[m], 2'(mem[l] >> (2 * (ch % 4)))};
        pop(w);
        chk(w == {6'b0, s}, $sformatf("ch %0d sample %0d: %h exp %h", ch, k, w, s));
      end
      @(negedge clk);
      chk(!out_valid && !busy, "packet ends after its last word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
