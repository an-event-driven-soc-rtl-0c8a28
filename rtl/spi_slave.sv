// spi_slave - SPI slave port to the external controller (mode 0, 16-bit
// words, MSB first).
//
// SCLK, CS_n and MOSI are synchronised into the system clock domain with
// two flip-flops each and their edges detected there, so SCLK must be
// slow against clk: at least 8 clk cycles per SCLK half period.  When
// CS_n falls the word on tx_word is loaded into the transmit shift
// register (tx_load pulses) and its MSB appears on MISO; MISO advances on
// every falling SCLK edge, MOSI is sampled on every rising edge.  After
// the 16th rising edge rx_valid pulses with the received word.  The
// controller must leave CS_n high for at least 4 clk cycles between
// words.  MISO is driven low while CS_n is high.  The specification only
// says the chip is an SPI slave; mode, word length and the oversampling
// scheme are this design's choices.
module spi_slave (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sclk,
  input  logic        cs_n,
  input  logic        mosi,
  output logic        miso,
  input  logic [15:0] tx_word,
  output logic        tx_load,
  output logic        rx_valid,
  output logic [15:0] rx_word
);
  logic [2:0]  sclk_s, cs_s;    // [0],[1] synchroniser, [2] previous
  logic [1:0]  mosi_s;
  logic        sclk_rise, sclk_fall, cs_fall, active;
  logic [15:0] tx_sh, rx_sh;
  logic [4:0]  nbits;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_s <= '0;
      cs_s   <= '1;
      mosi_s <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      cs_s   <= {cs_s[1:0], cs_n};
      mosi_s <= {mosi_s[0], mosi};
    end
  end

  assign active    = !cs_s[1];
  assign sclk_rise = active && sclk_s[1] && !sclk_s[2];
  assign sclk_fall = active && !sclk_s[1] && sclk_s[2];
  assign cs_fall   = !cs_s[1] && cs_s[2];
  assign tx_load   = cs_fall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_sh    <= '0;
      rx_sh    <= '0;
      nbits    <= '0;
      rx_valid <= 1'b0;
      rx_word  <= '0;
    end else begin
      rx_valid <= 1'b0;
      if (cs_fall) begin
        tx_sh <= tx_word;
        nbits <= '0;
      end else begin
        if (sclk_rise) begin
          rx_sh <= {rx_sh[14:0], mosi_s[1]};
          nbits <= nbits + 5'd1;
          if (nbits == 5'd15) begin
            rx_valid <= 1'b1;
            rx_word  <= {rx_sh[14:0], mosi_s[1]};
          end
        end
        if (sclk_fall) tx_sh <= {tx_sh[14:0], 1'b0};
      end
    end
  end

  assign miso = active && tx_sh[15];
endmodule
