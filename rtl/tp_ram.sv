// tp_ram: two-port synchronous RAM.
//
// Both ports address the same array. On every rising clock edge each port
// either writes its input word (and shows that word on its output, write
// through) or reads the addressed word onto its output, so read data appears
// one clock after the address. If both ports write the same address in one
// clock, port B's word is kept. The design uses this RAM three times: the two
// FFT data banks (32-bit complex words) and the spiRam that holds the 16-bit
// magnitudes for the Pi. Port behaviour follows the document's two-port RAM;
// the collision rule is this design's choice. Contents are not reset.
module tp_ram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = 10          // 2**AW words
) (
  input  logic             clk,
  input  logic [AW-1:0]    addr_a,
  input  logic [AW-1:0]    addr_b,
  input  logic [WIDTH-1:0] din_a,
  input  logic [WIDTH-1:0] din_b,
  input  logic             we_a,
  input  logic             we_b,
  output logic [WIDTH-1:0] dout_a,
  output logic [WIDTH-1:0] dout_b
);
  logic [WIDTH-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= din_a;
    if (we_b) mem[addr_b] <= din_b;
  end

  always_ff @(posedge clk) begin
    dout_a <= we_a ? din_a : mem[addr_a];
    dout_b <= we_b ? din_b : mem[addr_b];
  end
endmodule
