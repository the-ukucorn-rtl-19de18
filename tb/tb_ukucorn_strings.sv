// tb_ukucorn_strings: the instrument test of plucking each open string alone
// and then strumming the C6 chord, run on the FPGA at its default size.
// Five rounds at 40 MHz / 4883 samples/s / 1024 points, the Pi reading at
// 200 kHz (the full-size test uses 400 kHz). Rounds 0..3 pluck C4 (261.63 Hz),
// E4 (329.63 Hz), G4 (392 Hz) and A4 (440 Hz) one at a time; round 4 strums
// all four. e2e_harness checks
// every magnitude bit for bit, that the peak of each single string lies
// within 1.5 bins (about 7 Hz) of its frequency, and that the four strongest
// bins of the chord are the four strings. About 1.6 s of simulated time.
module tb_ukucorn_strings;
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
                .STRUM_DELAY(12), .ROUNDS(5), .SCLK_HALF_NS(2500), .CHORD_CHECK(1),
                .SINGLE_STRINGS(1)) board (
    .clk_40m(clk_40m), .pi_ready(pi_ready), .spi_stop(spi_stop), .sclk(sclk),
    .pi_mosi(pi_mosi), .pi_miso(pi_miso), .spi_read(spi_read), .adc_miso(adc_miso),
    .adc_clk(adc_clk), .adc_cs_n(adc_cs_n), .adc_mosi(adc_mosi), .state_led(state_led),
    .checks(checks), .failures(failures), .finished(finished));

  always #12.5ns clk_40m = ~clk_40m;

  initial begin
    #(3s);
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
