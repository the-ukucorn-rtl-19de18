// fft_core: pipelined, in-place 2**LOGN-point radix-2 FFT.
//
// The address generation unit walks LOGN levels of N/2 butterflies. Each clock
// it reads a pair of complex words from one data bank and the matching twiddle
// factor; one clock later the butterfly result is written to the same
// addresses of the other bank, so one butterfly completes per clock. Samples
// are loaded beforehand into bank 0 in bit-reversed order (load port), and the
// spectrum comes out in natural order in bank RESULT_BANK (bank 0 for an even
// LOGN, bank 1 for an odd one), where the result read port reads it whenever
// the core is not busy (read data one clock after the address).
// Timing: `done` pulses LOGN * (N/2 + 3) + 1 clocks after the `start` pulse
// (5151 clocks for N = 1024).
// Blocks and dataflow follow the document (AGU, data block, twiddle ROM,
// butterfly unit). The document's listing reads the spectrum from bank 1 after
// ten levels although its last level writes bank 0; this core reads the bank
// the last level writes.
module fft_core
  import ukucorn_pkg::*;
#(
  parameter int unsigned LOGN = LOGN_DEFAULT,
  parameter string       TW_FILE = "rtl/twiddle_rom.hex"
) (
  input  logic            clk,
  input  logic            reset,
  input  logic            start,
  output logic            busy,
  output logic            done,
  // sample loading
  input  logic            load_we,
  input  logic [LOGN-1:0] load_addr,
  input  cplx_t           load_data,
  // result read port
  input  logic [LOGN-1:0] res_addr_a,
  input  logic [LOGN-1:0] res_addr_b,
  output cplx_t           res_data_a,
  output cplx_t           res_data_b,
  output logic [3:0]      level
);
  localparam bit RESULT_BANK = (LOGN % 2 == 0) ? 1'b0 : 1'b1;

  logic            agu_busy;
  logic [LOGN-1:0] agu_rd_a, agu_rd_b, wr_a, wr_b;
  logic            agu_rd_bank, wr_en, wr_bank;
  logic [LOGN-2:0] tw_addr;
  cplx_t           a, b, w, ap, bp;
  logic [LOGN-1:0] rd_a, rd_b;
  logic            rd_bank;

  fft_agu #(.LOGN(LOGN)) u_agu (
    .clk(clk), .reset(reset), .start(start), .busy(agu_busy), .done(done),
    .rd_addr_a(agu_rd_a), .rd_addr_b(agu_rd_b), .rd_bank(agu_rd_bank),
    .tw_addr(tw_addr), .wr_en(wr_en), .wr_addr_a(wr_a), .wr_addr_b(wr_b),
    .wr_bank(wr_bank), .level(level)
  );

  assign busy    = agu_busy;
  assign rd_a    = agu_busy ? agu_rd_a : res_addr_a;
  assign rd_b    = agu_busy ? agu_rd_b : res_addr_b;
  assign rd_bank = agu_busy ? agu_rd_bank : RESULT_BANK;

  fft_data_block #(.LOGN(LOGN)) u_data (
    .clk(clk),
    .load_we(load_we), .load_addr(load_addr), .load_data(load_data),
    .rd_addr_a(rd_a), .rd_addr_b(rd_b), .rd_bank(rd_bank),
    .rd_data_a(a), .rd_data_b(b),
    .wr_en(wr_en), .wr_bank(wr_bank), .wr_addr_a(wr_a), .wr_addr_b(wr_b),
    .wr_data_a(ap), .wr_data_b(bp)
  );

  twiddle_rom #(.LOGN(LOGN), .INIT_FILE(TW_FILE)) u_tw (
    .clk(clk), .addr(tw_addr), .tw(w)
  );

  fft_bfu u_bfu (.a(a), .b(b), .w(w), .ap(ap), .bp(bp));

  assign res_data_a = a;
  assign res_data_b = b;
endmodule
