// tb_sram_8b - writes random bytes to random addresses while reading
// others, and checks every read against a shadow copy, with the data one
// cycle after the address.
module tb_sram_8b;
  localparam int DEPTH = 5120;
  logic clk = 0;
  logic we = 0, re = 0;
  logic [12:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] shadow [DEPTH];
  bit         valid  [DEPTH];
  int checks = 0, failures = 0;

  sram_8b dut (.*);
  always #5 clk = ~clk;

  initial begin
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = 13'(a); wdata = 8'($urandom); shadow[a] = wdata; valid[a] = 1;
    end
    @(negedge clk); we = 0;
    // mixed traffic
    for (int n = 0; n < 20000; n++) begin
      int ra;
      ra = int'($urandom_range(0, DEPTH - 1));
      @(negedge clk);
      re = 1; raddr = 13'(ra);
      we = ($urandom_range(0, 1) == 1);
      waddr = 13'($urandom_range(0, DEPTH - 1));
      wdata = 8'($urandom);
      if (waddr == raddr) we = 0;           // no same-address collision
      begin
        logic [7:0] e;
        e = shadow[ra];
        if (we) shadow[waddr] = wdata;
        @(negedge clk);
        we = 0; re = 0;
        checks++;
        if (rdata !== e) begin failures++; if (failures < 10) $display("FAIL @%0d: %h exp %h", ra, rdata, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
