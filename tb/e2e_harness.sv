// e2e_harness: board around the Ukucorn FPGA for the end-to-end tests.
//
// Holds an MCP3002 model whose input is a synthetic strum: quiet at code 500
// (+/- 8, below the 520 trigger) until STRUM_DELAY conversions after the FPGA
// starts listening, then the four open strings of a C6 chord (C4, E4, G4, A4)
// of AMP codes each around the same offset, slowly decaying. A model of the
// Raspberry Pi raises pi_ready, waits for spi_read, reads 2*N bytes with a
// mode-0 SPI master at SCLK_HALF_NS half periods, raises spi_stop and drops
// pi_ready, ROUNDS times.
// For every round it rebuilds the captured samples from the ADC log (the N
// conversions after the first code above the trigger), runs the bit-exact
// reference FFT and compares all N magnitudes the Pi received. It also checks
// that the strongest bins in the band of the strings lie next to the four
// string frequencies, and counts each mechanism of the design: waiting in
// listen, rejecting quiet samples in idle, triggering, capture, FFT, magnitude
// pass, send, return to listen on spi_stop, re-arming for another capture.
// With SINGLE_STRINGS set, rounds 0..3 pluck one string each (C4, E4, G4, A4)
// and round 4 onward strums the chord; for a single string the strongest bin
// of the band must lie next to that string.
module e2e_harness #(
  parameter int  LOGN         = 10,
  parameter real FS_HZ        = 40.0e6 / 8.0 / 64.0 / 16.0,   // sample rate
  parameter real TONE_SCALE   = 1.0,       // multiplies the string frequencies
  parameter int  AMP          = 40,
  parameter int  STRUM_DELAY  = 12,
  parameter int  ROUNDS       = 1,
  parameter int  SCLK_HALF_NS = 1250,
  parameter bit  CHORD_CHECK  = 1,
  parameter bit  SINGLE_STRINGS = 0
) (
  input  logic       clk_40m,
  output logic       pi_ready,
  output logic       spi_stop,
  output logic       sclk,
  output logic       pi_mosi,
  input  logic       pi_miso,
  input  logic       spi_read,
  output logic       adc_miso,
  input  logic       adc_clk,
  input  logic       adc_cs_n,
  input  logic       adc_mosi,
  input  logic [2:0] state_led,
  output int         checks,
  output int         failures,
  output logic       finished
);
  import fft_ref_pkg::*;
  localparam int N = 1 << LOGN;
  localparam logic [2:0] S_LISTEN = 3'd0, S_IDLE = 3'd1, S_LOAD = 3'd2,
                         S_FFT = 3'd3, S_COMPUTE = 3'd4, S_SEND = 3'd5;
  localparam real STRING_HZ [4] = '{261.63, 329.63, 392.00, 440.00};

  logic [9:0] code;
  logic [3:0] cfg;
  int conversions;
  mcp3002_model adc (.cs_n(adc_cs_n), .clk(adc_clk), .din(adc_mosi), .dout(adc_miso),
                     .code(code), .cfg(cfg), .conversions(conversions));

  // ------------------------------------------------------------ signal source
  int strum_at = 1 << 30;
  int log_codes [$];
  int round_start_idx [$];         // log index where each idle period began

  function automatic logic [9:0] wave(int c);
    real v;
    v = 500.0;
    if (c < strum_at) return 10'(500 + int'($urandom_range(16)) - 8);
    for (int s = 0; s < 4; s++)
      if (!SINGLE_STRINGS || round_start_idx.size() > 4 || s == round_start_idx.size() - 1)
      v += AMP * $exp(-real'(c - strum_at) / (4.0 * FS_HZ)) *
           $sin(2.0 * PI * STRING_HZ[s] * TONE_SCALE * real'(c - strum_at) / FS_HZ + s);
    return 10'(rnd(v));
  endfunction

  // a new value at the start of every conversion; the model latches it on the
  // falling clock edge after its 4th rising edge
  initial code = 10'd500;
  always @(negedge adc_cs_n) code = wave(log_codes.size());
  always @(negedge adc_clk) if (!adc_cs_n && adc.rises == 4) log_codes.push_back(int'(code));

  // ------------------------------------------------------------ mechanism counters
  int n_listen_wait = 0, n_quiet = 0, n_trigger = 0, n_load = 0, n_fft = 0,
      n_compute = 0, n_send = 0, n_stop = 0, n_rearm = 0, n_bytes = 0;
  logic [2:0] prev_state = S_LISTEN;
  logic       counting = 0;          // off while the board is held in reset
  always @(posedge clk_40m) begin
    if (!counting) prev_state = state_led;
    else if (state_led == S_LISTEN && !pi_ready) n_listen_wait++;
    if (counting && state_led != prev_state) begin
      case (state_led)
        S_IDLE:    begin
                     round_start_idx.push_back(log_codes.size());
                     strum_at = log_codes.size() + STRUM_DELAY;
                     if (n_stop > 0) n_rearm++;
                   end
        S_LOAD:    n_trigger++;
        S_FFT:     n_load++;
        S_COMPUTE: n_fft++;
        S_SEND:    n_compute++;
        S_LISTEN:  if (prev_state == S_SEND) n_stop++;
        default: ;
      endcase
      if (prev_state == S_SEND) n_send++;
      prev_state = state_led;
    end
  end

  // ------------------------------------------------------------ Pi model
  task automatic spi_byte(output logic [7:0] rx);
    for (int b = 7; b >= 0; b--) begin
      pi_mosi = 1'b1;
      #(SCLK_HALF_NS * 1ns) sclk = 1;
      rx[b] = pi_miso;
      #(SCLK_HALF_NS * 1ns) sclk = 0;
    end
    #(SCLK_HALF_NS * 1ns);
    n_bytes++;
  endtask

  initial begin
    int got [];
    int x [], yr [], yi [];
    int first, bad;
    logic [7:0] hi, lo;
    checks = 0; failures = 0; finished = 0;
    pi_ready = 0; spi_stop = 0; sclk = 0; pi_mosi = 0;
    got = new[N]; x = new[N];
    #(20us);                                      // reset is over, FPGA waits in listen
    counting = 1;
    checks++;
    if (state_led != S_LISTEN) begin failures++; $display("state %0d after reset, expected listen", state_led); end
    #(2us);
    for (int r = 0; r < ROUNDS; r++) begin
      pi_ready = 1; spi_stop = 0;
      wait (spi_read);
      #(5us);
      for (int n = 0; n < N; n++) begin
        spi_byte(hi);
        spi_byte(lo);
        got[n] = int'({hi, lo});
      end
      spi_stop = 1; pi_ready = 0;
      wait (!spi_read);
      #(5us) spi_stop = 0;
      // ---- reference: samples after the first code above the trigger
      first = -1;
      for (int c = round_start_idx[r]; c < log_codes.size(); c++)
        if (log_codes[c] > 520) begin first = c; break; end
      checks++;
      if (first < 0 || first + N >= log_codes.size()) begin
        failures++; $display("round %0d: capture not found in the ADC log", r);
        continue;
      end
      n_quiet += first - round_start_idx[r];
      for (int n = 0; n < N; n++) x[n] = log_codes[first + 1 + n];
      ref_fft(LOGN, x, yr, yi);
      bad = 0;
      for (int n = 0; n < N; n++) begin
        checks++;
        if (got[n] != sqmag(yr[n], yi[n])) begin
          failures++; bad++;
          if (bad < 5) $display("round %0d bin %0d: Pi got %0d, reference %0d", r, n, got[n], sqmag(yr[n], yi[n]));
        end
      end
      // ---- the four strongest bins of the strings' band are the strings
      if (CHORD_CHECK && SINGLE_STRINGS && r < 4) begin
        automatic int lo_bin = int'(230.0 * TONE_SCALE * N / FS_HZ);
        automatic int hi_bin = int'(480.0 * TONE_SCALE * N / FS_HZ);
        automatic int best = lo_bin;
        automatic real e = STRING_HZ[r] * TONE_SCALE * N / FS_HZ;
        for (int n = lo_bin; n <= hi_bin; n++) if (got[n] > got[best]) best = n;
        checks++;
        if (real'(best) > e - 1.5 && real'(best) < e + 1.5)
          $display("round %0d: single string %0.2f Hz, peak at bin %0d (%0.1f Hz)",
                   r, STRING_HZ[r], best, best * FS_HZ / N / TONE_SCALE);
        else begin
          failures++;
          $display("round %0d: single string %0.2f Hz, peak at bin %0d, expected %0.1f", r, STRING_HZ[r], best, e);
        end
      end else if (CHORD_CHECK) begin
        automatic int lo_bin = int'(230.0 * TONE_SCALE * N / FS_HZ);
        automatic int hi_bin = int'(480.0 * TONE_SCALE * N / FS_HZ);
        int m [];
        m = new[N];
        for (int n = 0; n < N; n++) m[n] = got[n];
        for (int s = 0; s < 4; s++) begin
          automatic int best = lo_bin;
          automatic int ok = 0;
          for (int n = lo_bin; n <= hi_bin; n++) if (m[n] > m[best]) best = n;
          for (int t = 0; t < 4; t++) begin
            automatic real e = STRING_HZ[t] * TONE_SCALE * N / FS_HZ;
            if (real'(best) > e - 1.5 && real'(best) < e + 1.5) ok = 1;
          end
          checks++;
          if (!ok) begin failures++; $display("round %0d: peak %0d at bin %0d is not a string", r, s, best); end
          else $display("round %0d: peak %0d at bin %0d (%0.1f Hz)", r, s, best, best * FS_HZ / N / TONE_SCALE);
          // clear the peak and its neighbours
          for (int n = best - 2; n <= best + 2; n++) if (n >= 0 && n < N) m[n] = 0;
        end
      end
      #(20us);
    end
    // ---- every mechanism happened
    begin
      int cnt [10];
      string nm [10];
      cnt = '{n_listen_wait, n_quiet, n_trigger, n_load, n_fft, n_compute,
              n_send, n_stop, (ROUNDS > 1) ? n_rearm : 1, n_bytes};
      nm = '{"listen wait", "quiet samples ignored", "trigger", "capture",
                         "fft", "magnitudes", "send", "stop", "re-arm", "spi bytes"};
      for (int i = 0; i < 10; i++) begin
        checks++;
        if (cnt[i] == 0) begin failures++; $display("mechanism never happened: %s", nm[i]); end
        else $display("mechanism %-22s %0d", nm[i], cnt[i]);
      end
      checks++;
      if (n_trigger != ROUNDS || n_fft != ROUNDS || n_bytes != 2 * N * ROUNDS) begin
        failures++; $display("counts: %0d triggers %0d ffts %0d bytes", n_trigger, n_fft, n_bytes);
      end
      checks++;
      if (cfg != 4'b1101) begin failures++; $display("ADC configuration %b", cfg); end
    end
    finished = 1;
  end
endmodule
