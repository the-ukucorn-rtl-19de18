// tb_fft_core_32: the FFT core built for 32 points (LOGN = 5), the size used
// to bring the transform up in simulation before moving to 1024 points.
//
// Five levels is an odd count, so the last level writes bank 1 and the result
// is read from there: this exercises the other half of the result selection.
// Test vectors: a ramp, a tone at bin 3, two tones with an offset, a +/- step
// and random samples. Each is loaded in bit-reversed order, transformed, and
// all 32 complex bins are compared bit for bit with the reference in
// fft_ref_pkg; bins whose floating-point DFT magnitude exceeds 2000 must also
// agree with it within 3 %. `done` must come LOGN*(N/2+3)+1 = 96 clocks after
// `start`.
module tb_fft_core_32;
  import ukucorn_pkg::*;
  import fft_ref_pkg::*;
  localparam int LOGN = 5;
  localparam int N    = 1 << LOGN;

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
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int x [];

  task automatic run_one(string name);
    int yr [], yi [];
    int t0, lat, bad;
    real er, ei, a, d2;
    bad = 0;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      load_we = 1; load_addr = LOGN'(bitrev(n, LOGN));
      load_data.re = 16'(x[n]); load_data.im = '0;
    end
    @(negedge clk) load_we = 0;
    start = 1; @(posedge clk); t0 = cycles; @(negedge clk) start = 0;
    while (!done) @(posedge clk);
    lat = cycles - t0;
    checks++;
    if (lat != LOGN * (N/2 + 3) + 1) begin
      failures++; $display("%s: latency %0d, expected %0d", name, lat, LOGN*(N/2+3)+1);
    end
    ref_fft(LOGN, x, yr, yi);
    for (int n = 0; n < N; n += 2) begin
      @(negedge clk) ra = LOGN'(n); rb = LOGN'(n + 1);
      @(posedge clk); #1;
      for (int h = 0; h < 2; h++) begin
        automatic int gr = h ? int'(db.re) : int'(da.re);
        automatic int gi = h ? int'(db.im) : int'(da.im);
        checks++;
        if (gr != yr[n+h] || gi != yi[n+h]) begin
          failures++; bad++;
          if (bad < 5) $display("%s bin %0d: got (%0d,%0d) ref (%0d,%0d)", name, n+h, gr, gi, yr[n+h], yi[n+h]);
        end
        er = 0; ei = 0;
        for (int t = 0; t < N; t++) begin
          a = -2.0 * PI * real'((t * (n + h)) % N) / real'(N);
          er += x[t] * $cos(a);
          ei += x[t] * $sin(a);
        end
        if (er*er + ei*ei > 4.0e6) begin
          d2 = (er-gr)*(er-gr) + (ei-gi)*(ei-gi);
          checks++;
          if (d2 > 0.0009 * (er*er + ei*ei)) begin
            failures++; bad++;
            if (bad < 5) $display("%s bin %0d: got (%0d,%0d) dft (%f,%f)", name, n+h, gr, gi, er, ei);
          end
        end
      end
    end
    $display("%s done, latency %0d, %0d mismatches", name, lat, bad);
  endtask

  initial begin
    x = new[N];
    repeat (3) @(posedge clk);
    reset = 0;
    for (int n = 0; n < N; n++) x[n] = 64 * n - 1024;
    run_one("ramp");
    for (int n = 0; n < N; n++) x[n] = rnd(500.0 * $cos(2.0 * PI * 3 * n / N));
    run_one("tone3");
    for (int n = 0; n < N; n++) x[n] = rnd(300.0 * $sin(2.0 * PI * 5 * n / N) + 200.0 * $cos(2.0 * PI * 11 * n / N)) + 20;
    run_one("two_tones");
    for (int n = 0; n < N; n++) x[n] = (n < N / 2) ? 400 : -400;
    run_one("step");
    for (int n = 0; n < N; n++) x[n] = int'($urandom_range(2047)) - 1024;
    run_one("random");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
