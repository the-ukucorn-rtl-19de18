// ukucorn_top: FPGA side of the Ukucorn ukulele teacher.
//
// A piezo contact microphone on the ukulele body feeds, through an analog
// filter, an MCP3002 ADC. This FPGA listens to it and, when a strum is heard,
// captures N = 2**LOGN samples at about 4883 samples/s, transforms them with a
// radix-2 FFT and offers the squared magnitude of every bin to a Raspberry Pi
// over SPI; the Pi picks out the notes and drives the fretboard LEDs.
//
// Dataflow (one burst per pass through the controller states):
//   adc_spi_master -> sample_loader -> fft_core (bank 0, bit-reversed)
//   fft_core -> mag_compute -> spi_ram (tp_ram, 2**LOGN x 16) -> pi_spi_slave
// ukucorn_ctrl sequences listen, idle, load, fft, compute and send.
//
// Clocking: clk_40m is the board clock. clk_div divides it by 2**CLK_DIV_LOG2
// (8: 5 MHz) and everything else runs on that core clock. The board reset is
// asynchronous and active high; it clears the divider at once and reaches the
// core logic through a two-stage synchroniser on the core clock.
// Pi handshake: the Pi raises pi_ready to let the FPGA listen, waits for
// spi_read, clocks out 2 * N bytes (high byte of each word first) and raises
// spi_stop. state_led shows the controller state (encoding in ukucorn_pkg).
// The block structure, clock rates, trigger level and handshake follow the
// document. Sampling the Pi's sclk in the core clock domain (rather than
// switching the SPI RAM's clock to sclk), reading the FFT result from the bank
// the last level wrote, and the reset synchroniser are this design's choices.
module ukucorn_top
  import ukucorn_pkg::*;
#(
  parameter int unsigned         LOGN              = LOGN_DEFAULT,   // N = 1024
  parameter int unsigned         CLK_DIV_LOG2      = 3,              // 40 -> 5 MHz
  parameter int unsigned         ADC_SCLK_DIV_LOG2 = 6,              // 5 MHz / 64
  parameter logic [ADC_BITS-1:0] TRIGGER           = TRIGGER_DEFAULT,
  parameter string               TW_FILE           = "rtl/twiddle_rom.hex"
) (
  input  logic       clk_40m,
  input  logic       reset,
  // Raspberry Pi
  input  logic       pi_ready,
  input  logic       spi_stop,
  input  logic       sclk,
  input  logic       pi_mosi,
  output logic       pi_miso,
  output logic       spi_read,
  // MCP3002 ADC
  input  logic       adc_miso,
  output logic       adc_clk,
  output logic       adc_cs_n,
  output logic       adc_mosi,
  // debug
  output logic [2:0] state_led
);
  logic clk;
  logic [1:0] rst_sync;
  logic rst;

  clk_div #(.DIV_LOG2(CLK_DIV_LOG2)) u_clk_div (
    .clk_in(clk_40m), .reset(reset), .clk_out(clk)
  );

  always_ff @(posedge clk or posedge reset)
    if (reset) rst_sync <= 2'b11;
    else       rst_sync <= {rst_sync[0], 1'b0};
  assign rst = rst_sync[1];

  // ---------------------------------------------------------------- control
  state_t state;
  logic   trigger, load_done, fft_done, mag_done;
  logic   start_fft, start_mag, clear_spi;

  ukucorn_ctrl u_ctrl (
    .clk(clk), .reset(rst), .pi_ready(pi_ready), .spi_stop(spi_stop),
    .trigger(trigger), .load_done(load_done), .fft_done(fft_done),
    .mag_done(mag_done), .state(state), .start_fft(start_fft),
    .start_mag(start_mag), .clear_spi(clear_spi), .spi_read(spi_read)
  );
  assign state_led = state;

  // ---------------------------------------------------------------- ADC
  logic [ADC_BITS-1:0] sample;
  logic                sample_valid;

  adc_spi_master #(.SCLK_DIV_LOG2(ADC_SCLK_DIV_LOG2)) u_adc (
    .clk(clk), .reset(rst), .en(state == ST_IDLE || state == ST_LOAD),
    .adc_clk(adc_clk), .adc_cs_n(adc_cs_n), .adc_mosi(adc_mosi),
    .adc_miso(adc_miso), .sample(sample), .sample_valid(sample_valid),
    .bit_cnt()
  );

  // ---------------------------------------------------------------- capture
  logic            load_we;
  logic [LOGN-1:0] load_addr;
  cplx_t           load_data;

  sample_loader #(.LOGN(LOGN), .TRIGGER(TRIGGER)) u_loader (
    .clk(clk), .reset(rst), .arm(state == ST_IDLE), .load(state == ST_LOAD),
    .sample(sample), .sample_valid(sample_valid), .trigger(trigger),
    .load_we(load_we), .load_addr(load_addr), .load_data(load_data),
    .load_done(load_done), .sample_count()
  );

  // ---------------------------------------------------------------- FFT
  logic [LOGN-1:0] res_addr_a, res_addr_b;
  cplx_t           res_a, res_b;

  fft_core #(.LOGN(LOGN), .TW_FILE(TW_FILE)) u_fft (
    .clk(clk), .reset(rst), .start(start_fft), .busy(), .done(fft_done),
    .load_we(load_we), .load_addr(load_addr), .load_data(load_data),
    .res_addr_a(res_addr_a), .res_addr_b(res_addr_b),
    .res_data_a(res_a), .res_data_b(res_b), .level()
  );

  // ---------------------------------------------------------------- magnitudes
  logic            mag_we;
  logic [LOGN-1:0] mag_addr_a, mag_addr_b;
  logic [DW-1:0]   mag_a, mag_b;

  mag_compute #(.LOGN(LOGN)) u_mag (
    .clk(clk), .reset(rst), .start(start_mag), .busy(), .done(mag_done),
    .rd_addr_a(res_addr_a), .rd_addr_b(res_addr_b),
    .rd_data_a(res_a), .rd_data_b(res_b),
    .wr_en(mag_we), .wr_addr_a(mag_addr_a), .wr_addr_b(mag_addr_b),
    .wr_data_a(mag_a), .wr_data_b(mag_b)
  );

  // ---------------------------------------------------------------- spiRam
  logic [LOGN-1:0] spi_addr, spi_ram_addr_a;
  logic [DW-1:0]   spi_ram_q_a;

  assign spi_ram_addr_a = mag_we ? mag_addr_a : spi_addr;

  tp_ram #(.WIDTH(DW), .AW(LOGN)) u_spi_ram (
    .clk(clk), .addr_a(spi_ram_addr_a), .addr_b(mag_addr_b),
    .din_a(mag_a), .din_b(mag_b), .we_a(mag_we), .we_b(mag_we),
    .dout_a(spi_ram_q_a), .dout_b()
  );

  // ---------------------------------------------------------------- Pi SPI
  pi_spi_slave #(.AW(LOGN)) u_pi_spi (
    .clk(clk), .reset(rst), .clear(clear_spi), .sclk(sclk), .mosi(pi_mosi),
    .miso(pi_miso), .spi_addr(spi_addr), .rd_data(spi_ram_q_a),
    .spi_cycle(), .rx_byte(), .byte_done()
  );
endmodule
