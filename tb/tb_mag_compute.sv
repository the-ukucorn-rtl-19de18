// tb_mag_compute: checks the magnitude pass (LOGN = 6) against a model of the
// FFT result RAM. The test answers the block's read requests one clock later
// from an array of random complex bins (plus corner values), captures the
// block's writes, and checks that every bin is written exactly once with
// (re*re + im*im) >> 15 (low 16 bits), and that done comes N/2 + 2 clocks
// after start.
module tb_mag_compute;
  import ukucorn_pkg::*;
  localparam int LOGN = 6, N = 1 << LOGN;
  logic clk = 0, reset = 1, start = 0;
  logic busy, done, we;
  logic [LOGN-1:0] ra, rb, wa, wb;
  cplx_t da, db;
  logic [15:0] qa, qb;
  int checks = 0, failures = 0, cycles = 0;
  cplx_t spec [N];
  int written [N];
  logic [15:0] got [N];

  mag_compute #(.LOGN(LOGN)) dut (.clk(clk), .reset(reset), .start(start), .busy(busy),
    .done(done), .rd_addr_a(ra), .rd_addr_b(rb), .rd_data_a(da), .rd_data_b(db),
    .wr_en(we), .wr_addr_a(wa), .wr_addr_b(wb), .wr_data_a(qa), .wr_data_b(qb));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  always @(posedge clk) begin da <= spec[ra]; db <= spec[rb]; end
  always @(posedge clk) if (!reset && we) begin
    written[wa]++; written[wb]++; got[wa] = qa; got[wb] = qb;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    longint e;
    for (int n = 0; n < N; n++) begin spec[n] = $urandom; written[n] = 0; end
    spec[0] = '{re: 16'sh7fff, im: 16'sh0};
    spec[1] = '{re: -16'sh7fff, im: -16'sh7fff};
    spec[2] = '{re: 16'sd181, im: 16'sd0};
    spec[3] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    @(negedge clk) start = 1;
    @(posedge clk) t0 = cycles;
    @(negedge clk) start = 0;
    while (!done) @(posedge clk);
    checks++;
    if (cycles - t0 != N/2 + 2) begin failures++; $display("latency %0d", cycles - t0); end
    for (int n = 0; n < N; n++) begin
      e = (longint'(spec[n].re) * spec[n].re + longint'(spec[n].im) * spec[n].im) >> 15;
      checks++;
      if (written[n] != 1 || got[n] !== e[15:0]) begin
        failures++; if (failures < 5) $display("bin %0d: written %0d got %h exp %h", n, written[n], got[n], e[15:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
