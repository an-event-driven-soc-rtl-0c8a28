// tb_sram_wr_seq - starts the write sequence for random channels, rows
// and block bytes and checks every write (address and data, 32 per
// start, one per cycle), the commit pulse right after the last write,
// and that the sequencer is idle again afterwards.
module tb_sram_wr_seq;
  import nr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [1:0] ch = 0;
  logic [7:0] row = 0;
  logic [7:0] msb [NBLK];
  logic [7:0] lsb [NBLK];
  logic we, commit, busy;
  logic [12:0] waddr;
  logic [7:0] wdata;
  int checks = 0, failures = 0;

  sram_wr_seq dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      int c, r, nw;
      c = n % 4; r = int'($urandom_range(0, 63));
      for (int b = 0; b < NBLK; b++) begin msb[b] = 8'($urandom); lsb[b] = 8'($urandom); end
      @(negedge clk); start = 1; ch = 2'(c); row = 8'(r);
      @(negedge clk); start = 0; ch = 2'($urandom); row = 8'($urandom);  // must be latched
      nw = 0;
      for (int i = 0; i < 2 * NBLK; i++) begin
        int b, a;
        b = i / 2;
        a = (r * NBLK + b) * 5 + ((i % 2) ? 4 : c);
        chk(we, "write every cycle");
        chk(int'(waddr) == a, $sformatf("addr %0d exp %0d", waddr, a));
        chk(wdata == ((i % 2) ? lsb[b] : msb[b]), "data");
        chk(!commit, "no early commit");
        @(negedge clk);
      end
      chk(commit && !we, "commit after last write");
      @(negedge clk);
      chk(!busy && !commit, "idle after commit");
      repeat (3) @(negedge clk);
    end
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
