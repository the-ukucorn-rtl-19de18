// tb_adc_spi_master: checks the ADC SPI master against the MCP3002 model.
//
// Drives a new random code into the model for every conversion and checks
// that each sample_valid pulse carries the code converted in that frame, that
// the configuration bits seen by the ADC are start=1, SGL=1, ODD=0, MSBF=1,
// that chip select is high for exactly one ADC clock per frame, that adc_clk
// has a period of 64 core clocks, and that samples arrive every 16 x 64 core
// clocks. Disabling `en` must stop conversions after the frame in progress.
module tb_adc_spi_master;
  import ukucorn_pkg::*;
  localparam int DIV = 6;
  logic clk = 0, reset = 1, en = 0;
  logic adc_clk, cs_n, mosi, miso;
  logic [9:0] sample, code = '0;
  logic valid;
  logic [3:0] bit_cnt, cfg;
  int conversions;
  int checks = 0, failures = 0, cycles = 0;

  adc_spi_master #(.SCLK_DIV_LOG2(DIV)) dut (
    .clk(clk), .reset(reset), .en(en), .adc_clk(adc_clk), .adc_cs_n(cs_n),
    .adc_mosi(mosi), .adc_miso(miso), .sample(sample), .sample_valid(valid),
    .bit_cnt(bit_cnt)
  );
  mcp3002_model adc (.cs_n(cs_n), .clk(adc_clk), .din(mosi), .dout(miso),
                     .code(code), .cfg(cfg), .conversions(conversions));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected code queue: the code is latched by the model at conversion
  logic [9:0] expected[$];
  always @(negedge adc_clk) if (!cs_n && adc.rises == 4) expected.push_back(code);
  // new code after each latch
  always @(posedge adc_clk) if (!cs_n) code <= 10'($urandom);

  // chip-select high time and adc_clk period
  int cs_rise_t = 0, last_clk_rise = 0;
  int nsamples = 0, last_valid_t = 0;
  always @(posedge cs_n) cs_rise_t = cycles;
  always @(negedge cs_n) if (!reset && nsamples > 0) begin
    checks++;
    if (cycles - cs_rise_t != 64) begin failures++; $display("cs_n high for %0d clocks", cycles - cs_rise_t); end
  end
  always @(posedge adc_clk) begin
    if (last_clk_rise != 0) begin
      checks++;
      if (cycles - last_clk_rise != 64) begin failures++; $display("adc_clk period %0d", cycles - last_clk_rise); end
    end
    last_clk_rise = cycles;
  end

  always @(posedge clk) if (valid) begin
    logic [9:0] e;
    e = expected.pop_front();
    checks++;
    if (sample !== e) begin failures++; $display("sample %0d: got %h expected %h", nsamples, sample, e); end
    checks++;
    if (cfg != 4'b1101) begin failures++; $display("config bits %b", cfg); end
    if (last_valid_t != 0) begin
      checks++;
      if (cycles - last_valid_t != 16 * 64) begin failures++; $display("sample spacing %0d", cycles - last_valid_t); end
    end
    last_valid_t = cycles;
    nsamples++;
  end

  initial begin
    int conv_at_stop;
    repeat (4) @(posedge clk);
    reset = 0;
    en = 1;
    wait (nsamples == 20);
    @(negedge clk) en = 0;
    repeat (16 * 64 * 3) @(posedge clk);
    conv_at_stop = conversions;
    repeat (16 * 64 * 3) @(posedge clk);
    checks++;
    if (conversions != conv_at_stop || !cs_n) begin failures++; $display("conversions continue with en low"); end
    checks++;
    if (nsamples < 20 || nsamples > 21) begin failures++; $display("%0d samples", nsamples); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
