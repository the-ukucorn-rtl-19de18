// ukucorn_pkg: types and constants shared by the Ukucorn FPGA blocks.
//
// The FPGA captures a burst of audio samples from a 10-bit SPI ADC, runs a
// 1024-point radix-2 FFT on it and hands the squared magnitude of every bin to
// a Raspberry Pi over SPI. This package holds the controller state encoding,
// the complex sample type used between the FFT blocks, and the default sizes.
// The sizes (N = 1024, 10-bit samples, 16-bit real and imaginary parts, a
// trigger level of 520 codes, roughly 1.6 V of a 3.3 V range) follow the
// document; the packing of the complex word is this design's choice.
package ukucorn_pkg;

  // Default transform size: N = 2**LOGN points.
  localparam int unsigned LOGN_DEFAULT = 10;
  // Width of one ADC sample.
  localparam int unsigned ADC_BITS = 10;
  // Width of the real and the imaginary part of an FFT value.
  localparam int unsigned DW = 16;
  // Trigger level: a sample above this starts a capture (about 1.6 V).
  localparam logic [ADC_BITS-1:0] TRIGGER_DEFAULT = 10'd520;

  // Controller states, in the order the document lists them.
  typedef enum logic [2:0] {
    ST_LISTEN  = 3'd0,   // wait for the Pi to be ready
    ST_IDLE    = 3'd1,   // sample the ADC, compare against the trigger
    ST_LOAD    = 3'd2,   // store N samples in bit-reversed order
    ST_FFT     = 3'd3,   // run the transform
    ST_COMPUTE = 3'd4,   // squared magnitudes into the SPI RAM
    ST_SEND    = 3'd5    // the Pi reads the magnitudes
  } state_t;

  // One complex value, real part in the upper half of the packed word.
  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

endpackage
