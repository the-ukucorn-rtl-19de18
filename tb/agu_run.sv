// agu_run: one instance of the fft_agu check used by tb_fft_agu, for one size.
module agu_run #(parameter int LOGN = 5) (
  input  logic clk,
  output int   checks_o,
  output logic done_o
);
  localparam int N = 1 << LOGN;
  logic reset = 1, start = 0;
  logic busy, done, rd_bank, wr_en, wr_bank;
  logic [LOGN-1:0] ra, rb, wa, wb;
  logic [LOGN-2:0] tw;
  logic [3:0] level;
  int checks = 0, failures = 0;

  fft_agu #(.LOGN(LOGN)) dut (.clk(clk), .reset(reset), .start(start), .busy(busy),
    .done(done), .rd_addr_a(ra), .rd_addr_b(rb), .rd_bank(rd_bank), .tw_addr(tw),
    .wr_en(wr_en), .wr_addr_a(wa), .wr_addr_b(wb), .wr_bank(wr_bank), .level(level));

  assign checks_o = checks;

  initial begin
    int cyc, lvl, pos, j, m, half, p, q, nwrites;
    logic [LOGN-1:0] pra, prb;
    logic pvalid, pbank;
    int seen [int];
    done_o = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 0; pvalid = 0; nwrites = 0;
    while (1) begin
      // now in clock `cyc` of the transform (outputs of this clock)
      if (cyc == LOGN * (N/2 + 3)) begin
        checks++;
        if (!done || busy) begin failures++; $display("N=%0d: done missing at %0d", N, cyc); end
        break;
      end
      checks++;
      if (done) begin failures++; $display("N=%0d: early done at %0d", N, cyc); end
      lvl = cyc / (N/2 + 3);
      pos = cyc % (N/2 + 3);
      j = (pos < N/2) ? pos : N/2 - 1;
      // write check for the previous clock's read
      checks++;
      if (wr_en !== pvalid) begin failures++; $display("N=%0d cyc %0d: wr_en %b", N, cyc, wr_en); end
      if (pvalid) begin
        checks++;
        if (wa !== pra || wb !== prb || wr_bank !== ~pbank) begin failures++; $display("N=%0d cyc %0d: write side", N, cyc); end
        nwrites++;
      end
      // butterfly j of level lvl, textbook form: group g, member m
      half = 1 << lvl;
      // rotation rule: the pair differs in bit lvl; the other bits are 2j rotated
      p = ((2*j) << lvl | (2*j) >> (LOGN - lvl)) & (N - 1);
      q = p | half;
      m = p & (half - 1);
      checks++;
      if (ra !== LOGN'(p) || rb !== LOGN'(q) || (p & half) != 0) begin
        failures++; if (failures < 5) $display("N=%0d cyc %0d: read %0d,%0d exp %0d,%0d", N, cyc, ra, rb, p, q);
      end
      checks++;
      if (tw !== (LOGN-1)'(m * (N / (2 * half))) || rd_bank !== lvl[0] || level != 4'(lvl)) begin
        failures++; if (failures < 5) $display("N=%0d cyc %0d: tw %0d exp %0d", N, cyc, tw, m * (N / (2*half)));
      end
      if (pos < N/2) begin
        // every word is touched once per level
        seen[lvl * N + p] = 1; seen[lvl * N + q] = 1;
      end
      pra = ra; prb = rb; pbank = rd_bank; pvalid = (pos < N/2);
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (seen.num() != LOGN * N) begin failures++; $display("N=%0d: %0d words touched", N, seen.num()); end
    checks++;
    if (nwrites != LOGN * N / 2) begin failures++; $display("N=%0d: %0d writes", N, nwrites); end
    done_o = 1;
  end
endmodule
