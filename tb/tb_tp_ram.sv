// tb_tp_ram: checks the two-port RAM against an associative-array model.
// Random reads and writes on both ports, including write-through (a write
// shows its own data on the port's output) and both ports writing the same
// address in one clock (port B wins). Read data is checked one clock after
// the address.
module tb_tp_ram;
  localparam int W = 32, AW = 6;
  logic clk = 0;
  logic [AW-1:0] aa, ab;
  logic [W-1:0] da, db, qa, qb;
  logic wa, wb;
  int checks = 0, failures = 0;
  logic [W-1:0] model [int];

  tp_ram #(.WIDTH(W), .AW(AW)) dut (.clk(clk), .addr_a(aa), .addr_b(ab), .din_a(da),
    .din_b(db), .we_a(wa), .we_b(wb), .dout_a(qa), .dout_b(qb));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] ea, eb;
    logic va, vb;
    // fill every word first so reads are defined
    for (int n = 0; n < 2**AW; n += 2) begin
      @(negedge clk);
      aa = AW'(n); ab = AW'(n + 1); da = $urandom; db = $urandom; wa = 1; wb = 1;
      model[n] = da; model[n + 1] = db;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      aa = AW'($urandom); ab = (t % 7 == 0) ? aa : AW'($urandom);
      da = $urandom; db = $urandom;
      wa = $urandom_range(2) == 0; wb = $urandom_range(2) == 0;
      // expected outputs: write-through or old contents
      ea = wa ? da : model[int'(aa)];
      eb = wb ? db : model[int'(ab)];
      if (wa) model[int'(aa)] = da;
      if (wb) model[int'(ab)] = db;
      @(posedge clk); #1;
      checks += 2;
      if (qa !== ea) begin failures++; if (failures < 5) $display("port A addr %0d got %h exp %h", aa, qa, ea); end
      if (qb !== eb) begin failures++; if (failures < 5) $display("port B addr %0d got %h exp %h", ab, qb, eb); end
    end
    va = 0; vb = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
