// fft_data_block: the two ping-pong banks of FFT data.
//
// Two two-port RAMs of 2**LOGN complex words. Bank 0 port A also takes the
// captured samples (load_we/load_addr/load_data). During the transform one
// bank is read at rd_addr_a/rd_addr_b while the other is written at
// wr_addr_a/wr_addr_b with the butterfly outputs; each port of a bank uses its
// write address when that bank is being written and its read address
// otherwise. Read data appears one clock after the address, taken from the
// bank rd_bank named in the clock the address was given.
// The bank arrangement and the address multiplexing follow the document;
// registering rd_bank for the output multiplexer is this design's choice.
module fft_data_block
  import ukucorn_pkg::*;
#(
  parameter int unsigned LOGN = LOGN_DEFAULT
) (
  input  logic            clk,
  // sample loading into bank 0
  input  logic            load_we,
  input  logic [LOGN-1:0] load_addr,
  input  cplx_t           load_data,
  // reads
  input  logic [LOGN-1:0] rd_addr_a,
  input  logic [LOGN-1:0] rd_addr_b,
  input  logic            rd_bank,
  output cplx_t           rd_data_a,
  output cplx_t           rd_data_b,
  // butterfly write-back
  input  logic            wr_en,
  input  logic            wr_bank,
  input  logic [LOGN-1:0] wr_addr_a,
  input  logic [LOGN-1:0] wr_addr_b,
  input  cplx_t           wr_data_a,
  input  cplx_t           wr_data_b
);
  logic [1:0]            we;
  logic [LOGN-1:0]       addr_a [2];
  logic [LOGN-1:0]       addr_b [2];
  logic [2*DW-1:0]       din_a  [2];
  logic [2*DW-1:0]       dout_a [2];
  logic [2*DW-1:0]       dout_b [2];
  logic [1:0]            we_a;
  logic                  rd_bank_q;

  assign we[0] = wr_en && (wr_bank == 1'b0);
  assign we[1] = wr_en && (wr_bank == 1'b1);

  always_comb begin
    for (int b = 0; b < 2; b++) begin
      addr_a[b] = we[b] ? wr_addr_a : rd_addr_a;
      addr_b[b] = we[b] ? wr_addr_b : rd_addr_b;
      din_a[b]  = wr_data_a;
      we_a[b]   = we[b];
    end
    if (load_we) begin
      addr_a[0] = load_addr;
      din_a[0]  = load_data;
      we_a[0]   = 1'b1;
    end
  end

  for (genvar b = 0; b < 2; b++) begin : g_bank
    tp_ram #(.WIDTH(2*DW), .AW(LOGN)) u_bank (
      .clk    (clk),
      .addr_a (addr_a[b]),
      .addr_b (addr_b[b]),
      .din_a  (din_a[b]),
      .din_b  (wr_data_b),
      .we_a   (we_a[b]),
      .we_b   (we[b]),
      .dout_a (dout_a[b]),
      .dout_b (dout_b[b])
    );
  end

  always_ff @(posedge clk) rd_bank_q <= rd_bank;

  assign rd_data_a = cplx_t'(rd_bank_q ? dout_a[1] : dout_a[0]);
  assign rd_data_b = cplx_t'(rd_bank_q ? dout_b[1] : dout_b[0]);
endmodule
