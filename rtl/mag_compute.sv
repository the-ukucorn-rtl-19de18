// mag_compute: squared magnitude of every FFT bin, written to the SPI RAM.
//
// After a one-clock `start` pulse it reads the spectrum two bins per clock
// (bins 2m and 2m+1 on the A and B read ports, m = 0..N/2-1). One clock later,
// when the data arrive, it writes (re*re + im*im) bits [30:15] of each bin to
// the same addresses of the SPI RAM through both of its write ports. The
// result is the squared magnitude scaled down by 2**15, 16 bits wide (it wraps
// only for re = im = -32768). The pass takes N/2 reads; `done` pulses in the
// clock after the last write, N/2 + 2 clocks after `start`.
// The two-bins-per-clock schedule and the [30:15] squared magnitude follow the
// document; the start/done handshake is this design's choice.
module mag_compute
  import ukucorn_pkg::*;
#(
  parameter int unsigned LOGN = LOGN_DEFAULT
) (
  input  logic            clk,
  input  logic            reset,
  input  logic            start,
  output logic            busy,
  output logic            done,
  // FFT result read port (one clock latency)
  output logic [LOGN-1:0] rd_addr_a,
  output logic [LOGN-1:0] rd_addr_b,
  input  cplx_t           rd_data_a,
  input  cplx_t           rd_data_b,
  // SPI RAM write ports
  output logic            wr_en,
  output logic [LOGN-1:0] wr_addr_a,
  output logic [LOGN-1:0] wr_addr_b,
  output logic [DW-1:0]   wr_data_a,
  output logic [DW-1:0]   wr_data_b
);
  logic [LOGN-2:0] m;
  logic            last_q;

  function automatic logic [DW-1:0] sqmag(input cplx_t v);
    logic [2*DW-1:0] s;
    s = (2*DW)'(v.re * v.re) + (2*DW)'(v.im * v.im);
    return s[2*DW-2:DW-1];
  endfunction

  assign rd_addr_a = {m, 1'b0};
  assign rd_addr_b = {m, 1'b1};
  assign wr_data_a = sqmag(rd_data_a);
  assign wr_data_b = sqmag(rd_data_b);

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (reset) begin
      busy      <= 1'b0;
      m         <= '0;
      wr_en     <= 1'b0;
      last_q    <= 1'b0;
      wr_addr_a <= '0;
      wr_addr_b <= '0;
    end else begin
      wr_en     <= busy;
      wr_addr_a <= rd_addr_a;
      wr_addr_b <= rd_addr_b;
      last_q    <= busy && (&m);
      if (last_q) done <= 1'b1;
      if (start) begin
        busy <= 1'b1;
        m    <= '0;
      end else if (busy) begin
        m <= m + 1'b1;
        if (&m) busy <= 1'b0;
      end
    end
  end
endmodule
