// sample_loader: trigger detection and bit-reversed capture of one sample burst.
//
// While `arm` is high (controller state idle) every new ADC sample is compared
// with TRIGGER; a sample strictly above it raises `trigger` for one clock and
// the controller moves to the load state. While `load` is high, each following
// sample (the triggering one is not stored) is written to FFT data bank 0 at
// the bit-reversed value of a sample counter: sample n goes to address
// bitrev(n). The real part is the unsigned 10-bit code, the imaginary part is
// zero. When sample 2**LOGN - 1 has been written, `load_done` pulses for one
// clock. The counter clears whenever `load` is low.
// Timing: load_we follows sample_valid by one clock; load_done is raised in the
// same clock as the last write.
// The trigger rule, the bit-reversed order and the zero imaginary part follow
// the document; the exact trigger value (520 codes) is the document's; which
// sample is the first stored is this design's choice.
module sample_loader
  import ukucorn_pkg::*;
#(
  parameter int unsigned          LOGN    = LOGN_DEFAULT,
  parameter logic [ADC_BITS-1:0]  TRIGGER = TRIGGER_DEFAULT
) (
  input  logic                 clk,
  input  logic                 reset,          // synchronous, active high
  input  logic                 arm,            // state idle
  input  logic                 load,           // state load
  input  logic [ADC_BITS-1:0]  sample,
  input  logic                 sample_valid,
  output logic                 trigger,        // one-clock pulse
  output logic                 load_we,
  output logic [LOGN-1:0]      load_addr,
  output cplx_t                load_data,
  output logic                 load_done,      // one-clock pulse
  output logic [LOGN-1:0]      sample_count    // samples stored so far
);
  logic [LOGN-1:0] cnt;

  function automatic logic [LOGN-1:0] bitrev(input logic [LOGN-1:0] v);
    for (int b = 0; b < LOGN; b++) bitrev[b] = v[LOGN-1-b];
  endfunction

  always_ff @(posedge clk) begin
    trigger   <= 1'b0;
    load_we   <= 1'b0;
    load_done <= 1'b0;
    if (reset) begin
      cnt       <= '0;
      load_addr <= '0;
      load_data <= '0;
    end else begin
      if (arm && sample_valid && sample > TRIGGER) trigger <= 1'b1;
      if (!load) begin
        cnt <= '0;
      end else if (sample_valid) begin
        load_we      <= 1'b1;
        load_addr    <= bitrev(cnt);
        load_data.re <= signed'(DW'(sample));
        load_data.im <= '0;
        cnt          <= cnt + 1'b1;
        if (&cnt) load_done <= 1'b1;
      end
    end
  end

  assign sample_count = cnt;
endmodule
