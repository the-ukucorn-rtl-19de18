// tb_pi_spi_slave: the Pi side of the magnitude transfer (AW = 6).
// A mode-0 SPI master in the test clocks the slave at 400 kHz against a 5 MHz
// core clock (12.5 core clocks per bit) and reads 2 bytes per word. The words
// come from a RAM model with one clock of read latency addressed by spi_addr.
// Every word must arrive in order, high byte first; after `clear` the stream
// restarts at word 0 with the high byte. The bytes the master sends on MOSI
// must show up in rx_byte.
module tb_pi_spi_slave;
  localparam int AW = 6, NW = 1 << AW;
  logic clk = 0, reset = 1, clear = 0, sclk = 0, mosi = 0;
  logic miso, spi_cycle, byte_done;
  logic [AW-1:0] addr;
  logic [15:0] rd_data, ram [NW];
  logic [7:0] rx;
  int checks = 0, failures = 0;

  pi_spi_slave #(.AW(AW)) dut (.clk(clk), .reset(reset), .clear(clear), .sclk(sclk),
    .mosi(mosi), .miso(miso), .spi_addr(addr), .rd_data(rd_data), .spi_cycle(spi_cycle),
    .rx_byte(rx), .byte_done(byte_done));

  always #100 clk = ~clk;                   // 5 MHz (200 ns)
  always @(posedge clk) rd_data <= ram[addr];

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one mode-0 byte, 400 kHz: 1250 ns half periods
  task automatic xfer(input logic [7:0] tx, output logic [7:0] rxd);
    for (int b = 7; b >= 0; b--) begin
      mosi = tx[b];
      #1250 sclk = 1;
      rxd[b] = miso;
      #1250 sclk = 0;
    end
    #1250;
  endtask

  task automatic read_words(int count, string what);
    logic [7:0] hi, lo, sent;
    for (int n = 0; n < count; n++) begin
      sent = 8'($urandom);
      xfer(sent, hi);
      #400;
      checks++;
      if (rx !== sent) begin failures++; $display("rx_byte %h, sent %h", rx, sent); end
      xfer(8'h01, lo);
      checks++;
      if ({hi, lo} !== ram[n]) begin
        failures++; if (failures < 6) $display("%s word %0d: got %h%h exp %h", what, n, hi, lo, ram[n]);
      end
    end
  endtask

  initial begin
    for (int n = 0; n < NW; n++) ram[n] = 16'($urandom);
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    checks++;
    if (spi_cycle !== 1'b1 || addr !== '0) begin failures++; $display("clear: cycle %b addr %0d", spi_cycle, addr); end
    #3000;
    read_words(NW, "first pass");
    // restart part way
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    #3000;
    read_words(5, "after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
