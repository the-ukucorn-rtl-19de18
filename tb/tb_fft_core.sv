// tb_fft_core: self-checking test of the 1024-point FFT core.
//
// Loads several input vectors (a single tone, a two-tone mix, a step and
// random data) into bank 0 in bit-reversed order, runs the transform and reads
// the spectrum back. Each output bin is compared with
//   * a bit-exact reference: a textbook in-place radix-2 decimation-in-time
//     FFT written here, with twiddles computed from $cos/$sin, the same 16-bit
//     wrap and the same truncation of products by 2**15; and
//   * a floating-point DFT, on the strong non-DC bins, within 8 %.
// It also checks that `done` arrives LOGN*(N/2+3)+1 clocks after `start`.
module tb_fft_core;
  import ukucorn_pkg::*;
  localparam int LOGN = 10;
  localparam int N    = 1 << LOGN;
  localparam real PI  = 3.14159265358979323846;

  logic clk = 0, reset = 1, start = 0;
  logic busy, done;
  logic load_we = 0;
  logic [LOGN-1:0] load_addr = '0, ra = '0, rb = '0;
  cplx_t load_data = '0, da, db;
  logic [3:0] level;
  int checks = 0, failures = 0;
  int cycles = 0;

  fft_core #(.LOGN(LOGN)) dut (
    .clk(clk), .reset(reset), .start(start), .busy(busy), .done(done),
    .load_we(load_we), .load_addr(load_addr), .load_data(load_data),
    .res_addr_a(ra), .res_addr_b(rb), .res_data_a(da), .res_data_b(db),
    .level(level)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr[N], xi[N];
  int rr[N], ri[N];
  int wr_t[N/2], wi_t[N/2];

  function automatic int rnd(real x);
    return (x >= 0.0) ? int'($floor(x + 0.5)) : -int'($floor(-x + 0.5));
  endfunction

  function automatic int wrap16(longint v);
    logic [15:0] t;
    t = v[15:0];
    return int'($signed(t));
  endfunction

  function automatic int bitrev(int v);
    int r = 0;
    for (int b = 0; b < LOGN; b++) if (v & (1 << b)) r |= 1 << (LOGN - 1 - b);
    return r;
  endfunction

  // Bit-exact reference, textbook loop structure.
  task automatic ref_fft();
    int ar[N], ai[N];
    for (int n = 0; n < N; n++) begin ar[bitrev(n)] = xr[n]; ai[bitrev(n)] = xi[n]; end
    for (int s = 0; s < LOGN; s++) begin
      int half = 1 << s;
      for (int g = 0; g < N; g += 2 * half)
        for (int m = 0; m < half; m++) begin
          int p = g + m, q = g + m + half;
          int k = m * (N / (2 * half));
          longint pr, pi_;
          int tr, ti;
          pr  = longint'(ar[q]) * wr_t[k] - longint'(ai[q]) * wi_t[k];
          pi_ = longint'(ar[q]) * wi_t[k] + longint'(ai[q]) * wr_t[k];
          tr = wrap16(pr >>> 15);
          ti = wrap16(pi_ >>> 15);
          {ar[q], ai[q]} = {wrap16(ar[p] - tr), wrap16(ai[p] - ti)};
          {ar[p], ai[p]} = {wrap16(ar[p] + tr), wrap16(ai[p] + ti)};
        end
    end
    for (int n = 0; n < N; n++) begin rr[n] = ar[n]; ri[n] = ai[n]; end
  endtask

  task automatic run_one(string name, bit float_check);
    int t0, lat;
    real er, ei, a;
    int bad = 0;
    // load
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      load_we = 1; load_addr = LOGN'(bitrev(n));
      load_data.re = 16'(xr[n]); load_data.im = 16'(xi[n]);
    end
    @(negedge clk) load_we = 0;
    // run
    start = 1; @(posedge clk); t0 = cycles; @(negedge clk) start = 0;
    while (!done) @(posedge clk);
    lat = cycles - t0;
    checks++;
    if (lat != LOGN * (N/2 + 3) + 1) begin
      failures++; $display("%s: latency %0d, expected %0d", name, lat, LOGN*(N/2+3)+1);
    end
    ref_fft();
    // read back two bins per clock
    for (int n = 0; n < N; n += 2) begin
      @(negedge clk) ra = LOGN'(n); rb = LOGN'(n + 1);
      @(posedge clk); #1;
      for (int h = 0; h < 2; h++) begin
        int gr = h ? int'(db.re) : int'(da.re);
        int gi = h ? int'(db.im) : int'(da.im);
        checks++;
        if (gr != rr[n+h] || gi != ri[n+h]) begin
          failures++; bad++;
          if (bad < 5) $display("%s bin %0d: got (%0d,%0d) ref (%0d,%0d)", name, n+h, gr, gi, rr[n+h], ri[n+h]);
        end
        if (float_check) begin
          er = 0; ei = 0;
          for (int t = 0; t < N; t++) begin
            a = -2.0 * PI * real'((t * (n + h)) % N) / real'(N);
            er += xr[t] * $cos(a) - xi[t] * $sin(a);
            ei += xr[t] * $sin(a) + xi[t] * $cos(a);
          end
          // Truncating every product by 2**15 with W(0) = 32767/32768 biases
          // each level by about one LSB, which doubles from level to level, so
          // only the strong bins other than DC are held to the floating-point DFT (8 %).
          if (n + h != 0 && er*er + ei*ei > 1.0e6) begin
            real d2 = (er-gr)*(er-gr) + (ei-gi)*(ei-gi);
            checks++;
            if (d2 > 0.0064 * (er*er + ei*ei)) begin
              failures++; bad++;
              if (bad < 5) $display("%s bin %0d: got (%0d,%0d) dft (%f,%f)", name, n+h, gr, gi, er, ei);
            end
          end
        end
      end
    end
    $display("%s done, latency %0d", name, lat);
  endtask

  initial begin
    for (int k = 0; k < N/2; k++) begin
      wr_t[k] = rnd(32767.0 * $cos(2.0 * PI * k / N));
      wi_t[k] = rnd(-32767.0 * $sin(2.0 * PI * k / N));
    end
    repeat (3) @(posedge clk);
    reset = 0;
    // tone at bin 37, amplitude 24 (peak 24*N/2 = 12288 fits 16 bits)
    for (int n = 0; n < N; n++) begin xr[n] = rnd(24.0 * $cos(2.0*PI*37*n/N)); xi[n] = 0; end
    run_one("tone37", 1);
    // two tones and a small offset
    for (int n = 0; n < N; n++) begin
      xr[n] = rnd(10.0 * $sin(2.0*PI*100*n/N) + 8.0 * $cos(2.0*PI*301*n/N)) + 3; xi[n] = 0;
    end
    run_one("two_tones", 1);
    // step (the document's own bring-up pattern: +1 then -1)
    for (int n = 0; n < N; n++) begin xr[n] = (n < 256) ? 31 : -31; xi[n] = 0; end
    run_one("step", 0);
    // random complex data, large enough to wrap: bit-exact check only
    for (int n = 0; n < N; n++) begin xr[n] = int'($urandom_range(2047)) - 1024; xi[n] = int'($urandom_range(255)) - 128; end
    run_one("random", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
