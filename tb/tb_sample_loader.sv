// tb_sample_loader: checks trigger detection and bit-reversed capture.
// Uses a short burst (LOGN = 5). Samples at or below the trigger level must
// not trigger; the first one above it must, in idle only. In the load state
// every sample must be written once, sample n at address bitrev(n) with the
// code as real part and zero imaginary part, and load_done must pulse together
// with the last write and never otherwise.
module tb_sample_loader;
  import ukucorn_pkg::*;
  localparam int LOGN = 5, N = 1 << LOGN;
  logic clk = 0, reset = 1, arm = 0, load = 0, sv = 0;
  logic [9:0] sample = '0;
  logic trig, we, ldone;
  logic [LOGN-1:0] addr, count;
  cplx_t data;
  int checks = 0, failures = 0;
  int triggers = 0, writes = 0, dones = 0;
  logic [9:0] mem [N];

  sample_loader #(.LOGN(LOGN), .TRIGGER(10'd520)) dut (
    .clk(clk), .reset(reset), .arm(arm), .load(load), .sample(sample),
    .sample_valid(sv), .trigger(trig), .load_we(we), .load_addr(addr),
    .load_data(data), .load_done(ldone), .sample_count(count));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!reset) begin
    if (trig) triggers++;
    if (we) begin
      writes++;
      mem[addr] = data.re[9:0];
      checks++;
      if (data.im != 0 || data.re[15:10] != 0) begin failures++; $display("bad data word %h", data); end
    end
    if (ldone) begin
      dones++;
      checks++;
      if (!we || writes != N) begin failures++; $display("load_done with %0d writes", writes); end
    end
  end

  task automatic give(logic [9:0] v);
    @(negedge clk) sample = v; sv = 1;
    @(negedge clk) sv = 0;
    repeat (3) @(negedge clk);
  endtask

  function automatic int bitrev(int v);
    int r = 0;
    for (int b = 0; b < LOGN; b++) if (v & (1 << b)) r |= 1 << (LOGN - 1 - b);
    return r;
  endfunction

  initial begin
    logic [9:0] vals [N];
    repeat (3) @(posedge clk);
    reset = 0;
    give(10'd900);                 // not armed: no trigger
    arm = 1;
    give(10'd100); give(10'd520);  // at or below the level
    checks++;
    if (triggers != 0) begin failures++; $display("triggered too early"); end
    give(10'd521);
    checks++;
    if (triggers != 1) begin failures++; $display("no trigger above the level"); end
    arm = 0; load = 1;
    for (int n = 0; n < N; n++) begin vals[n] = 10'($urandom); give(vals[n]); end
    load = 0;
    checks++;
    if (writes != N || dones != 1) begin failures++; $display("%0d writes %0d dones", writes, dones); end
    for (int n = 0; n < N; n++) begin
      checks++;
      if (mem[bitrev(n)] !== vals[n]) begin failures++; $display("sample %0d at %0d: %h vs %h", n, bitrev(n), mem[bitrev(n)], vals[n]); end
    end
    // a second burst starts again from address 0
    load = 1; writes = 0;
    give(10'd7);
    checks++;
    if (mem[0] !== 10'd7 || count != 1) begin failures++; $display("counter did not restart"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
