// spi_slave: SPI port of the PTMAC, used to load the program memory and to
// read back a status word.
//
// The design description shows an SPI interface attached to the control unit and
// nothing more; protocol and framing here are this design's own. SPI mode 0
// (data sampled on the rising SCLK edge, shifted on the falling edge), most
// significant bit first. SCLK, MOSI and CS_N are synchronised into the system
// clock domain with two flip-flops each, so SCLK must be slower than a
// quarter of the system clock.
//
// Frame (CS_N low for 48 SCLK cycles):
//   MOSI: [47:32] word address, [31:0] instruction word
//   MISO: the 48-bit `tx_word` captured when CS_N falls
// After the 48th bit `wr_en` pulses for one system clock with the address and
// data, which write the program memory. Frames with another bit count are
// discarded when CS_N rises.
module spi_slave #(
  parameter int unsigned ADDR_W  = 16,
  parameter int unsigned DATA_W  = 32,
  localparam int unsigned FRAME  = ADDR_W + DATA_W,
  localparam int unsigned CNT_W  = $clog2(FRAME + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sclk,
  input  logic              cs_n,
  input  logic              mosi,
  output logic              miso,
  input  logic [FRAME-1:0]  tx_word,
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [DATA_W-1:0] wr_data
);

  logic [2:0]       sclk_s, cs_s;
  logic [1:0]       mosi_s;
  logic [FRAME-1:0] rx_sr, tx_sr;
  logic [CNT_W-1:0] cnt;

  wire sclk_rise = sclk_s[1] & ~sclk_s[2];
  wire sclk_fall = ~sclk_s[1] & sclk_s[2];
  wire cs_fall   = ~cs_s[1] & cs_s[2];
  wire active    = ~cs_s[1];

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

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sr   <= '0;
      tx_sr   <= '0;
      cnt     <= '0;
      wr_en   <= 1'b0;
      wr_addr <= '0;
      wr_data <= '0;
    end else begin
      wr_en <= 1'b0;
      if (cs_fall) begin
        cnt   <= '0;
        tx_sr <= tx_word;
      end else if (active) begin
        if (sclk_rise) begin
          rx_sr <= {rx_sr[FRAME-2:0], mosi_s[1]};
          cnt   <= cnt + 1'b1;
          if (cnt == CNT_W'(FRAME - 1)) begin
            wr_en   <= 1'b1;
            wr_addr <= rx_sr[FRAME-2:DATA_W-1];
            wr_data <= {rx_sr[DATA_W-2:0], mosi_s[1]};
          end
        end
        if (sclk_fall) tx_sr <= {tx_sr[FRAME-2:0], 1'b0};
      end else begin
        cnt <= '0;
      end
    end
  end

  assign miso = tx_sr[FRAME-1];

endmodule
