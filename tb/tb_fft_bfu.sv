// tb_fft_bfu: checks the butterfly on random operands and corner values.
// Reference: T = (B*W) computed in 64-bit integers, shifted right by 15
// (arithmetic, i.e. truncation), then A +/- T wrapped to 16 bits.
module tb_fft_bfu;
  import ukucorn_pkg::*;
  cplx_t a, b, w, ap, bp;
  int checks = 0, failures = 0;

  fft_bfu dut (.a(a), .b(b), .w(w), .ap(ap), .bp(bp));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] w16(longint v);
    return v[15:0];
  endfunction

  initial begin
    longint tr, ti;
    for (int t = 0; t < 20000; t++) begin
      a = $urandom; b = $urandom; w = $urandom;
      if (t < 4) begin
        a = '0; b.re = 16'sh7fff; b.im = -16'sh8000; w.re = 16'sh7fff; w.im = 16'sh0000;
        if (t == 1) w = '{re: 16'sh0000, im: -16'sh7fff};
        if (t == 2) begin a = '{re: 16'sh7fff, im: 16'sh7fff}; w = '{re: 16'sh5a82, im: -16'sh5a82}; end
        if (t == 3) begin b = '{re: -16'sd1, im: -16'sd1}; w = '{re: 16'sh7fff, im: 16'sh0000}; end
      end
      #1;
      tr = (longint'(b.re) * w.re - longint'(b.im) * w.im) >>> 15;
      ti = (longint'(b.re) * w.im + longint'(b.im) * w.re) >>> 15;
      checks++;
      if (ap.re !== w16(a.re + tr) || ap.im !== w16(a.im + ti) ||
          bp.re !== w16(a.re - tr) || bp.im !== w16(a.im - ti)) begin
        failures++;
        if (failures < 5) $display("a=%h b=%h w=%h: ap=%h bp=%h", a, b, w, ap, bp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
