// pi_spi_slave: SPI slave that streams the SPI RAM to the Raspberry Pi.
//
// The Pi is the SPI master (mode 0: clock idles low, data sampled on rising
// edges, MSB first) and there is no chip select: bytes are framed by counting
// eight clocks from `clear`, which the controller pulses on entering the send
// state. Each 16-bit word at spi_addr goes out as two bytes, first bits
// [15:8] (spi_cycle = 1) then bits [7:0] (spi_cycle = 0); after the second
// byte spi_addr advances, so the Pi receives words 0, 1, 2, ... in order.
// sclk and mosi are synchronised into the core clock with two flip-flops and
// their edges detected there; miso changes about three core clocks after a
// falling sclk edge, so sclk may run up to roughly a tenth of the core clock
// (500 kHz at 5 MHz). The word read from the RAM (rd_data, one clock after
// spi_addr) is latched on the first rising edge of each byte; before that edge
// miso shows its top bit directly. Bits from mosi are shifted into rx_byte,
// which the design does not otherwise use.
// The byte order, the spi_cycle / spi_addr counters and the lack of chip
// select follow the document; sampling sclk with the core clock instead of
// clocking the slave and the RAM from sclk is this design's choice.
module pi_spi_slave #(
  parameter int unsigned AW = ukucorn_pkg::LOGN_DEFAULT
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          clear,       // start of a transfer
  input  logic          sclk,
  input  logic          mosi,
  output logic          miso,
  output logic [AW-1:0] spi_addr,
  input  logic [15:0]   rd_data,
  output logic          spi_cycle,
  output logic [7:0]    rx_byte,
  output logic          byte_done    // one-clock pulse per byte
);
  logic [2:0] sclk_s;               // two sync stages + previous value
  logic [1:0] mosi_s;
  logic       rise, fall;
  logic [2:0] bit_cnt;
  logic [7:0] shreg;
  logic [7:0] tx_byte;

  assign rise    = sclk_s[1] & ~sclk_s[2];
  assign fall    = ~sclk_s[1] & sclk_s[2];
  assign tx_byte = spi_cycle ? rd_data[15:8] : rd_data[7:0];
  assign miso    = (bit_cnt == 3'd0) ? tx_byte[7] : shreg[7];

  always_ff @(posedge clk) begin
    byte_done <= 1'b0;
    if (reset) begin
      sclk_s    <= '0;
      mosi_s    <= '0;
      bit_cnt   <= '0;
      shreg     <= '0;
      rx_byte   <= '0;
      spi_cycle <= 1'b1;
      spi_addr  <= '0;
    end else begin
      sclk_s <= {sclk_s[1:0], sclk};
      mosi_s <= {mosi_s[0], mosi};
      if (clear) begin
        bit_cnt   <= '0;
        spi_cycle <= 1'b1;
        spi_addr  <= '0;
      end else begin
        if (rise) begin
          if (bit_cnt == 3'd0) shreg <= tx_byte;
          rx_byte <= {rx_byte[6:0], mosi_s[1]};
        end
        if (fall) begin
          shreg   <= {shreg[6:0], 1'b0};
          bit_cnt <= bit_cnt + 3'd1;
          if (bit_cnt == 3'd7) begin
            byte_done <= 1'b1;
            spi_cycle <= ~spi_cycle;
            if (!spi_cycle) spi_addr <= spi_addr + 1'b1;
          end
        end
      end
    end
  end
endmodule
