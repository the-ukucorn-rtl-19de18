// tb_fft_agu: checks the FFT address sequence for N = 32 and N = 1024.
// For every clock of a transform the test works out, from its own count of
// clocks since start, which level, butterfly and flush clock it is in; it
// checks the read addresses (the pair of words of a textbook radix-2
// butterfly: p = group base + m, q = p + 2**level, for the butterfly given by
// the rotation rule), the read bank, the twiddle index m * N / 2**(level+1),
// that exactly N/2 writes per level happen, one clock after the matching read,
// to the other bank, and that done comes after LOGN*(N/2+3)+1 clocks.
module tb_fft_agu;
  int checks = 0, failures = 0;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic clk = 0;
  always #5 clk = ~clk;

  logic done5, done10;
  int   fin = 0;
  agu_run #(.LOGN(5))  r5  (.clk(clk), .checks_o(), .done_o(done5));
  agu_run #(.LOGN(10)) r10 (.clk(clk), .checks_o(), .done_o(done10));

  initial begin
    wait (done5 && done10);
    checks   = r5.checks + r10.checks;
    failures = r5.failures + r10.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
