// tb_fft_data_block: checks the ping-pong data banks (LOGN = 5).
// Loads bank 0 through the load port, reads it back on both ports, writes
// bank 1 through the write-back port while reading bank 0 in the same clock,
// and checks that each bank holds what was written to it, that the read mux
// follows rd_bank of the clock the address was given, and that a bank that
// is not written keeps its contents.
module tb_fft_data_block;
  import ukucorn_pkg::*;
  localparam int LOGN = 5, N = 1 << LOGN;
  logic clk = 0;
  logic load_we = 0, rd_bank = 0, wr_en = 0, wr_bank = 0;
  logic [LOGN-1:0] load_addr = '0, ra = '0, rb = '0, wa = '0, wb = '0;
  cplx_t load_data = '0, da, db, wda = '0, wdb = '0;
  int checks = 0, failures = 0;
  cplx_t m0 [N], m1 [N];

  fft_data_block #(.LOGN(LOGN)) dut (.clk(clk), .load_we(load_we), .load_addr(load_addr),
    .load_data(load_data), .rd_addr_a(ra), .rd_addr_b(rb), .rd_bank(rd_bank),
    .rd_data_a(da), .rd_data_b(db), .wr_en(wr_en), .wr_bank(wr_bank),
    .wr_addr_a(wa), .wr_addr_b(wb), .wr_data_a(wda), .wr_data_b(wdb));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(logic bank, string what);
    for (int n = 0; n < N; n += 2) begin
      @(negedge clk) ra = LOGN'(n); rb = LOGN'(n + 1); rd_bank = bank;
      @(posedge clk); #1;
      // change rd_bank right after the edge: the output must not follow it
      rd_bank = ~bank; #1;
      checks += 2;
      if (da !== (bank ? m1[n] : m0[n]) || db !== (bank ? m1[n+1] : m0[n+1])) begin
        failures++; if (failures < 5) $display("%s: bank %0d word %0d: %h %h", what, bank, n, da, db);
      end
    end
  endtask

  initial begin
    // load bank 0
    for (int n = 0; n < N; n++) begin
      @(negedge clk) load_we = 1; load_addr = LOGN'(n); load_data = $urandom; m0[n] = load_data;
    end
    @(negedge clk) load_we = 0;
    read_check(0, "after load");
    // write bank 1 from the write port while reading bank 0
    for (int n = 0; n < N; n += 2) begin
      @(negedge clk);
      wr_en = 1; wr_bank = 1; wa = LOGN'(n); wb = LOGN'(n + 1); wda = $urandom; wdb = $urandom;
      m1[n] = wda; m1[n+1] = wdb;
      rd_bank = 0; ra = LOGN'(N - 1 - n); rb = LOGN'(N - 2 - n);
      @(posedge clk); #1;
      checks++;
      if (da !== m0[N-1-n] || db !== m0[N-2-n]) begin failures++; $display("read during write: %h", da); end
    end
    @(negedge clk) wr_en = 0;
    read_check(1, "bank 1 written");
    read_check(0, "bank 0 kept");
    // write bank 0 at a few places, bank 1 must stay
    for (int n = 0; n < N; n += 4) begin
      @(negedge clk) wr_en = 1; wr_bank = 0; wa = LOGN'(n); wb = LOGN'(n + 3); wda = $urandom; wdb = $urandom;
      m0[n] = wda; m0[n+3] = wdb;
    end
    @(negedge clk) wr_en = 0;
    read_check(0, "bank 0 rewritten");
    read_check(1, "bank 1 kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
