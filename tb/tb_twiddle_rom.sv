// tb_twiddle_rom: checks every twiddle factor against $cos/$sin.
// For N = 1024 and N = 32 (the address is scaled by 1024/N inside the ROM),
// entry k must equal round(32767*cos(2*pi*k/N)) and round(-32767*sin(...))
// within one LSB, with the value appearing one clock after the address.
module tb_twiddle_rom;
  import ukucorn_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0;
  logic [8:0] a10 = '0;
  logic [3:0] a5 = '0;
  cplx_t t10, t5;
  int checks = 0, failures = 0;

  twiddle_rom #(.LOGN(10)) dut10 (.clk(clk), .addr(a10), .tw(t10));
  twiddle_rom #(.LOGN(5))  dut5  (.clk(clk), .addr(a5),  .tw(t5));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(string nm, int k, int n, cplx_t v);
    real er, ei;
    er = 32767.0 * $cos(2.0 * PI * k / n);
    ei = -32767.0 * $sin(2.0 * PI * k / n);
    checks++;
    if (real'(v.re) - er > 1.0 || er - real'(v.re) > 1.0 ||
        real'(v.im) - ei > 1.0 || ei - real'(v.im) > 1.0) begin
      failures++;
      if (failures < 5) $display("%s k=%0d got (%0d,%0d) exp (%f,%f)", nm, k, v.re, v.im, er, ei);
    end
  endtask

  initial begin
    for (int k = 0; k < 512; k++) begin
      @(negedge clk) a10 = 9'(k); a5 = 4'(k % 16);
      @(posedge clk); #1;
      cmp("N1024", k, 1024, t10);
      if (k < 16) cmp("N32", k, 32, t5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
