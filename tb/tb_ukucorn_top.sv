// tb_ukucorn_top: end-to-end test of the FPGA at reduced size.
// N = 256 points, core clock 40/2 MHz, ADC clock core/4, so that two complete
// listen-capture-transform-send rounds run in seconds. The strum's tones are
// scaled with the sample rate so they fall on the same relative bins as at
// full size. All checking is in e2e_harness.
module tb_ukucorn_top;
  localparam int LOGN = 8;
  localparam real FS = 40.0e6 / 2.0 / 4.0 / 16.0;
  logic clk_40m = 0, reset = 0;
  logic pi_ready, spi_stop, sclk, pi_mosi, pi_miso, spi_read;
  logic adc_miso, adc_clk, adc_cs_n, adc_mosi;
  logic [2:0] state_led;
  int checks, failures;
  logic finished;

  ukucorn_top #(.LOGN(LOGN), .CLK_DIV_LOG2(1), .ADC_SCLK_DIV_LOG2(2)) dut (
    .clk_40m(clk_40m), .reset(reset), .pi_ready(pi_ready), .spi_stop(spi_stop),
    .sclk(sclk), .pi_mosi(pi_mosi), .pi_miso(pi_miso), .spi_read(spi_read),
    .adc_miso(adc_miso), .adc_clk(adc_clk), .adc_cs_n(adc_cs_n), .adc_mosi(adc_mosi),
    .state_led(state_led));

  e2e_harness #(.LOGN(LOGN), .FS_HZ(FS), .TONE_SCALE(FS / 4882.8125), .AMP(40),
                .STRUM_DELAY(12), .ROUNDS(2), .SCLK_HALF_NS(250), .CHORD_CHECK(1)) board (
    .clk_40m(clk_40m), .pi_ready(pi_ready), .spi_stop(spi_stop), .sclk(sclk),
    .pi_mosi(pi_mosi), .pi_miso(pi_miso), .spi_read(spi_read), .adc_miso(adc_miso),
    .adc_clk(adc_clk), .adc_cs_n(adc_cs_n), .adc_mosi(adc_mosi), .state_led(state_led),
    .checks(checks), .failures(failures), .finished(finished));

  always #12.5ns clk_40m = ~clk_40m;

  initial begin
    #(200ms);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #(10ns) reset = 1;         // a reset pulse, as from the board's reset pin
    #(1us) reset = 0;
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
