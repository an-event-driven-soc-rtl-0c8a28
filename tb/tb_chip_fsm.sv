// tb_chip_fsm - drives received words straight into the chip-level FSM
// (as the SPI slave would) and checks: every transition of Table-II style
// commands (ARST/CHPF/CSR/CFG/RO/STOP/NOP), the inverted echo of each
// word, the ARST masks for chip, block and channel scope, the CHPF and
// CSR registers, the four CFG shifts with the old register words coming
// back, and in RO the echo of the RO command followed by packet words,
// with STOP the only word that has an effect.
module tb_chip_fsm;
  import nr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, tx_load = 0;
  logic [15:0] rx_word = 0, tx_word;
  chip_state_e state;
  logic [NCH-1:0] afe_rst;
  logic [4:0] hpf_dac;
  logic [7:0] csr;
  logic [3:0] cfg_blk;
  logic cfg_shift;
  logic [15:0] cfg_din, cfg_dout;
  logic ro, pkt_valid = 0, pkt_pop;
  logic [15:0] pkt_word = 0;
  logic [15:0] model_reg [4];
  int checks = 0, failures = 0;
  int n_shift = 0, n_pop = 0;

  chip_fsm dut (.*);
  always #5 clk = ~clk;
  // a one-block configuration register model for cfg_dout
  assign cfg_dout = model_reg[0];
  always @(posedge clk) if (cfg_shift) begin
    model_reg[0] <= model_reg[1]; model_reg[1] <= model_reg[2];
    model_reg[2] <= model_reg[3]; model_reg[3] <= cfg_din; n_shift++;
  end
  always @(posedge clk) if (pkt_pop) n_pop++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // one SPI transfer: load (CS fall) then receive
  task automatic word(input logic [15:0] w, output logic [15:0] reply);
    @(negedge clk); tx_load = 1; reply = tx_word;
    @(negedge clk); tx_load = 0;
    repeat (3) @(negedge clk);
    rx_valid = 1; rx_word = w;
    @(negedge clk); rx_valid = 0;
    @(negedge clk);
  endtask

  task automatic cmd(input logic [15:0] w, input chip_state_e exp_state);
    logic [15:0] r;
    word(w, r);
    chk(state == exp_state, $sformatf("state %s after %h", state.name(), w));
    word(16'h0000, r);   // NOP carries the acknowledge back
    chk(r == ~w, $sformatf("echo %h of %h", r, w));
  endtask

  initial begin
    logic [15:0] r;
    for (int i = 0; i < 4; i++) model_reg[i] = 16'h1111 * 16'(i + 1);
    repeat (2) @(negedge clk); rst_n = 1;
    chk(state == S_IDLE && afe_rst == 0, "reset state");
    // ARST, chip scope
    word({OP_ARST, 2'd0, 10'd0}, r);
    chk(state == S_ARST && afe_rst == '1, "ARST chip");
    word(16'h0123, r); chk(state == S_ARST, "ARST holds until STOP");
    chk(r == ~{OP_ARST, 2'd0, 10'd0}, "ARST echo");
    word({OP_STOP, 12'd0}, r); chk(state == S_IDLE && afe_rst == 0, "STOP ends ARST");
    // ARST block 5 and channel 37
    word({OP_ARST, 2'd1, 4'd0, 6'd5}, r);
    chk(afe_rst == (64'hF << 20), "ARST block 5");
    word({OP_STOP, 12'd0}, r);
    word({OP_ARST, 2'd2, 4'd0, 6'd37}, r);
    chk(afe_rst == (64'h1 << 37), "ARST channel 37");
    word({OP_STOP, 12'd0}, r);
    // CHPF / CSR
    cmd({OP_CHPF, 12'd0}, S_CHPF);
    chk(state == S_IDLE && hpf_dac == 5'd0, "CHPF value word");
    word({OP_CHPF, 12'd0}, r); word(16'h0015, r);
    chk(state == S_IDLE && hpf_dac == 5'h15, "CHPF sets 5-bit code");
    word({OP_CSR, 12'd0}, r); word(16'h00A7, r);
    chk(state == S_IDLE && csr == 8'hA7, "CSR sets 8-bit code");
    chk(r == ~{OP_CSR, 12'd0}, "CSR echo");
    // CFG block 9
    word({OP_CFG, 8'd0, 4'd9}, r);
    chk(state == S_CFG && cfg_blk == 4'd9, "CFG selects block");
    for (int i = 0; i < 4; i++) begin
      logic [15:0] old;
      old = model_reg[i];          // registers shift, so word i's old value
      word(16'hA000 + 16'(i), r);
      if (i > 0) chk(r == 16'h1111 * 16'(i), $sformatf("old word %0d back: %h", i - 1, r));
    end
    word(16'h0000, r);
    chk(r == 16'h4444, "fourth old word back");
    chk(state == S_IDLE && n_shift == 4, "CFG ends after four words");
    chk(model_reg[0] == 16'hA000 && model_reg[3] == 16'hA003, "new words in place");
    // NOP in IDLE
    cmd(16'h0000, S_IDLE);
    // RO
    word({OP_RO, 12'd0}, r);
    chk(state == S_RO && ro, "enter RO");
    pkt_valid = 1; pkt_word = 16'hBEEF;
    word(16'h0000, r); chk(r == ~{OP_RO, 12'd0}, "RO acknowledged first");
    word({OP_CFG, 12'd0}, r); chk(r == 16'hBEEF && state == S_RO, "packet word, other commands ignored");
    chk(n_pop == 1, "one pop per word sent");
    pkt_valid = 0;
    word(16'h0000, r); chk(r == 16'h0000, "idle word when no packet");
    word({OP_STOP, 12'd0}, r); chk(state == S_IDLE && !ro, "STOP ends RO");
    word(16'h0000, r); chk(r == ~{OP_STOP, 12'd0}, "STOP acknowledged");
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
