// fft_bfu: radix-2 decimation-in-time butterfly.
//
// Computes T = B * W and then A' = A + T, B' = A - T on 16-bit two's
// complement values. W is Q1.15; the 32-bit products are combined and bits
// [30:15] kept, i.e. the product is scaled back by 2**15 with truncation.
// The additions wrap at 16 bits: there is no scaling between FFT levels, so
// inputs must be small enough not to overflow over LOGN levels.
// Purely combinational; the FFT core registers around it through its RAMs.
// Structure, widths and the [30:15] pruning follow the document.
module fft_bfu
  import ukucorn_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  input  cplx_t w,
  output cplx_t ap,
  output cplx_t bp
);
  logic signed [2*DW-1:0] t_re, t_im;
  logic signed [DW-1:0]   tr, ti;

  assign t_re = (b.re * w.re) - (b.im * w.im);
  assign t_im = (b.re * w.im) + (b.im * w.re);
  assign tr   = t_re[2*DW-2:DW-1];
  assign ti   = t_im[2*DW-2:DW-1];

  assign ap.re = a.re + tr;
  assign ap.im = a.im + ti;
  assign bp.re = a.re - tr;
  assign bp.im = a.im - ti;
endmodule
