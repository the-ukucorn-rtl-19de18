// tb_clk_div: checks the core clock divider.
// After reset the output must be low for 4 input clocks and high for 4,
// repeatedly (divide by 8, 50 % duty), and must return low at once on reset.
module tb_clk_div;
  logic clk = 0, reset = 1, out;
  int checks = 0, failures = 0;

  clk_div #(.DIV_LOG2(3)) dut (.clk_in(clk), .reset(reset), .clk_out(out));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      checks++;
      // n-th input clock after release: high in clocks 4..7 of every 8
      if (out !== ((n % 8) >= 3 && (n % 8) <= 6)) begin
        failures++;
        if (failures < 5) $display("clock %0d: out=%b", n, out);
      end
    end
    reset = 1; #1;
    checks++;
    if (out !== 1'b0) begin failures++; $display("reset did not clear the output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
