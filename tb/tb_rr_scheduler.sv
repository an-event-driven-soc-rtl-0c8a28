// tb_rr_scheduler - random request patterns; every grant is compared with
// a model that searches upward (wrapping) from the channel served last,
// and checks that only requesting channels are served and nothing is
// granted without take.
module tb_rr_scheduler;
  localparam int N = 64;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req = 0;
  logic take = 0;
  logic grant_valid;
  logic [5:0] grant_idx;
  logic [N-1:0] grant;
  int checks = 0, failures = 0;
  int last = N - 1;
  int served [N];

  rr_scheduler dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int exp_i;
      @(negedge clk);
      for (int i = 0; i < N; i++) if ($urandom_range(0, 9) == 0) req[i] = 1;
      take = ($urandom_range(0, 3) != 0);
      #1;
      exp_i = -1;
      for (int k = 1; k <= N; k++) if (exp_i < 0 && req[(last + k) % N]) exp_i = (last + k) % N;
      if (!take || exp_i < 0) begin
        chk(!grant_valid && grant == 0, "no grant");
      end else begin
        chk(grant_valid && int'(grant_idx) == exp_i, $sformatf("grant %0d exp %0d", grant_idx, exp_i));
        chk(grant == (64'(1) << exp_i), "one-hot grant");
        last = exp_i;
        served[exp_i]++;
        @(posedge clk); #1;
        req[exp_i] = 0;
      end
    end
    // all channels are served in index order when all request
    @(negedge clk); take = 1; req = '1;
    for (int i = 1; i <= N; i++) begin
      #1;
      chk(int'(grant_idx) == (last + 1) % N, "sweep in index order");
      last = int'(grant_idx);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
