// adc_spi_master: SPI master that reads the MCP3002 10-bit ADC.
//
// The ADC clock adc_clk is the top bit of a divider counter running on the core
// clock, so one ADC clock lasts 2**SCLK_DIV_LOG2 core clocks (64 by default:
// 5 MHz / 64 = 78.1 kHz, the document's 16 x 4884 Hz). A conversion frame is
// 16 ADC clocks, counted by bit_cnt 0..15:
//   * bit_cnt 0..3   : adc_mosi carries the configuration start=1, SGL=1,
//                      ODD=CHANNEL, MSBF=1 (the ADC latches it on rising edges);
//   * bit_cnt 4      : the ADC drives its null bit;
//   * bit_cnt 5..14  : the ADC drives B9..B0, sampled here on rising edges;
//   * bit_cnt 15     : chip select adc_cs_n is high for one ADC clock, which
//                      ends the conversion and starts the next one.
// So one sample is taken every 16 ADC clocks (4883 samples/s by default), and
// sample_valid pulses for one core clock when the frame reaches bit_cnt 15,
// with the new sample on `sample` (held until the next one). While `en` is
// low, a frame in progress is finished and then chip select stays high.
// adc_mosi changes and bit_cnt advances on falling edges of adc_clk.
// The frame layout, the ADC clock rate and the one-clock chip-select pulse
// follow the document. Running every register on the core clock, with the ADC
// clock edges taken as enables rather than as a clock of their own, is this
// design's choice.
module adc_spi_master #(
  parameter int unsigned SCLK_DIV_LOG2 = 6,  // core clocks per adc_clk = 2**this
  parameter bit          CHANNEL       = 1'b0
) (
  input  logic                               clk,
  input  logic                               reset,     // synchronous, active high
  input  logic                               en,        // keep converting
  // ADC pins
  output logic                               adc_clk,
  output logic                               adc_cs_n,
  output logic                               adc_mosi,
  input  logic                               adc_miso,
  // sample out
  output logic [ukucorn_pkg::ADC_BITS-1:0]   sample,
  output logic                               sample_valid,
  output logic [3:0]                         bit_cnt
);
  import ukucorn_pkg::*;

  localparam int unsigned L = SCLK_DIV_LOG2;

  logic [L-1:0] div_cnt;
  logic         rise_evt, fall_evt;
  logic [ADC_BITS-1:0] shreg;
  logic [3:0]   next_cnt;

  // adc_clk rises on the clock edge after div_cnt == HALF-1 and falls on the
  // edge after div_cnt == all ones.
  assign rise_evt = (div_cnt == L'(2**(L-1) - 1));
  assign fall_evt = &div_cnt;
  assign adc_clk  = div_cnt[L-1];
  assign adc_cs_n = (bit_cnt == 4'd15);
  assign next_cnt = bit_cnt + 4'd1;

  function automatic logic cfg_bit(input logic [3:0] n);
    case (n)
      4'd0:    return 1'b1;     // start
      4'd1:    return 1'b1;     // single-ended
      4'd2:    return CHANNEL;  // ODD/SIGN: channel select
      4'd3:    return 1'b1;     // MSB first
      default: return 1'b0;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    sample_valid <= 1'b0;
    if (reset) begin
      div_cnt  <= '0;
      bit_cnt  <= 4'd15;
      adc_mosi <= 1'b0;
      shreg    <= '0;
      sample   <= '0;
    end else begin
      div_cnt <= div_cnt + 1'b1;
      if (rise_evt && bit_cnt >= 4'd5 && bit_cnt <= 4'd14)
        shreg <= {shreg[ADC_BITS-2:0], adc_miso};
      if (fall_evt && (en || bit_cnt != 4'd15)) begin
        bit_cnt  <= next_cnt;
        adc_mosi <= cfg_bit(next_cnt);
        if (bit_cnt == 4'd14) begin
          sample       <= shreg;
          sample_valid <= 1'b1;
        end
      end
    end
  end
endmodule
