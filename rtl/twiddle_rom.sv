// twiddle_rom: FFT twiddle factor ROM.
//
// Holds W^k = exp(-j*2*pi*k/1024) for k = 0..511 as Q1.15 fixed point:
// re = round(32767 * cos(2*pi*k/1024)), im = round(-32767 * sin(2*pi*k/1024)),
// rounding half away from zero; one line of twiddle_rom.hex is {re, im} as
// eight hex digits. A transform of 2**LOGN points (LOGN <= 10) needs
// W_N^k = W_1024^(k * 1024/N), so the address is shifted left by 10 - LOGN and
// one table serves every size. The read is synchronous: `tw` is valid one
// clock after `addr`, which lines it up with the data RAM output.
// The table size (N/2 entries) and 16-bit entries follow the document; the
// Q1.15 scale of 32767 and the rounding are this design's choice.
module twiddle_rom
  import ukucorn_pkg::*;
#(
  parameter int unsigned LOGN = LOGN_DEFAULT,
  parameter string       INIT_FILE = "rtl/twiddle_rom.hex"
) (
  input  logic            clk,
  input  logic [LOGN-2:0] addr,
  output cplx_t           tw
);
  localparam int unsigned ROM_LOGN = 10;
  logic [2*DW-1:0] rom [2**(ROM_LOGN-1)];

  initial $readmemh(INIT_FILE, rom);

  logic [ROM_LOGN-2:0] rom_addr;
  assign rom_addr = (ROM_LOGN-1)'(addr) << (ROM_LOGN - LOGN);

  always_ff @(posedge clk) tw <= cplx_t'(rom[rom_addr]);
endmodule
