// tb_ukucorn_ctrl: walks the controller through every state and transition.
// Checks that each state waits for its own condition and ignores the others,
// that start_fft, start_mag and clear_spi pulse once in the first clock of
// their states, and that spi_read is high exactly in send.
module tb_ukucorn_ctrl;
  import ukucorn_pkg::*;
  logic clk = 0, reset = 1;
  logic pi_ready = 0, spi_stop = 0, trigger = 0, load_done = 0, fft_done = 0, mag_done = 0;
  state_t state;
  logic start_fft, start_mag, clear_spi, spi_read;
  int checks = 0, failures = 0;
  int n_fft = 0, n_mag = 0, n_clr = 0;

  ukucorn_ctrl dut (.clk(clk), .reset(reset), .pi_ready(pi_ready), .spi_stop(spi_stop),
    .trigger(trigger), .load_done(load_done), .fft_done(fft_done), .mag_done(mag_done),
    .state(state), .start_fft(start_fft), .start_mag(start_mag), .clear_spi(clear_spi),
    .spi_read(spi_read));

  always #5 clk = ~clk;
  always @(posedge clk) if (!reset) begin
    if (start_fft) n_fft++;
    if (start_mag) n_mag++;
    if (clear_spi) n_clr++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(state_t s, string what);
    checks++;
    if (state !== s) begin failures++; $display("%s: state %0d, expected %0d", what, state, s); end
    checks++;
    if (spi_read !== (s == ST_SEND)) begin failures++; $display("%s: spi_read %b", what, spi_read); end
  endtask

  // pulse one input for one clock
  task automatic pulse(ref logic sig);
    @(negedge clk) sig = 1;
    @(negedge clk) sig = 0;
  endtask

  task automatic others_wait(state_t s);
    // every condition except the state's own must be ignored
    @(negedge clk);
    if (s != ST_LISTEN)  pi_ready  = 1;
    if (s != ST_IDLE)    trigger   = 1;
    if (s != ST_LOAD)    load_done = 1;
    if (s != ST_FFT)     fft_done  = 1;
    if (s != ST_COMPUTE) mag_done  = 1;
    if (s != ST_SEND)    spi_stop  = 1;
    @(negedge clk);
    {pi_ready, trigger, load_done, fft_done, mag_done, spi_stop} = '0;
    repeat (2) @(negedge clk);
    expect_state(s, "holding");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int round = 0; round < 2; round++) begin
      expect_state(ST_LISTEN, "reset/return");
      others_wait(ST_LISTEN);
      pulse(pi_ready);   expect_state(ST_IDLE, "pi_ready");
      others_wait(ST_IDLE);
      pulse(trigger);    expect_state(ST_LOAD, "trigger");
      others_wait(ST_LOAD);
      pulse(load_done);  expect_state(ST_FFT, "load_done");
      others_wait(ST_FFT);
      pulse(fft_done);   expect_state(ST_COMPUTE, "fft_done");
      others_wait(ST_COMPUTE);
      pulse(mag_done);   expect_state(ST_SEND, "mag_done");
      others_wait(ST_SEND);
      pulse(spi_stop);
    end
    expect_state(ST_LISTEN, "spi_stop");
    checks++;
    if (n_fft != 2 || n_mag != 2 || n_clr != 2) begin
      failures++; $display("entry pulses %0d %0d %0d", n_fft, n_mag, n_clr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
