// tb_ukucorn_top_full: one complete operation of the FPGA at its default size.
// 40 MHz board clock, 5 MHz core clock, 4883 samples/s, N = 1024 points, the
// Pi reading at 400 kHz. One round: the Pi signals ready, a C6 strum (open
// strings C4, E4, G4, A4) is captured, transformed and read back; e2e_harness
// checks all 1024 magnitudes bit for bit against the reference FFT and that
// the four strongest bins between 230 and 480 Hz are the four strings. About
// 0.27 s of simulated time.
module tb_ukucorn_top_full;
  logic clk_40m = 0, reset = 0;
  logic pi_ready, spi_stop, sclk, pi_mosi, pi_miso, spi_read;
  logic adc_miso, adc_clk, adc_cs_n, adc_mosi;
  logic [2:0] state_led;
  int checks, failures;
  logic finished;

  ukucorn_top dut (
    .clk_40m(clk_40m), .reset(reset), .pi_ready(pi_ready), .spi_stop(spi_stop),
    .sclk(sclk), .pi_mosi(pi_mosi), .pi_miso(pi_miso), .spi_read(spi_read),
    .adc_miso(adc_miso), .adc_clk(adc_clk), .adc_cs_n(adc_cs_n), .adc_mosi(adc_mosi),
    .state_led(state_led));

  e2e_harness #(.LOGN(10), .FS_HZ(40.0e6 / 8.0 / 64.0 / 16.0), .TONE_SCALE(1.0), .AMP(40),
                .STRUM_DELAY(12), .ROUNDS(1), .SCLK_HALF_NS(1250), .CHORD_CHECK(1)) board (
    .clk_40m(clk_40m), .pi_ready(pi_ready), .spi_stop(spi_stop), .sclk(sclk),
    .pi_mosi(pi_mosi), .pi_miso(pi_miso), .spi_read(spi_read), .adc_miso(adc_miso),
    .adc_clk(adc_clk), .adc_cs_n(adc_cs_n), .adc_mosi(adc_mosi), .state_led(state_led),
    .checks(checks), .failures(failures), .finished(finished));

  always #12.5ns clk_40m = ~clk_40m;

  initial begin
    #(800ms);
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
