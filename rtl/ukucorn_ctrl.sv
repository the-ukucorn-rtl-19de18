// ukucorn_ctrl: the FPGA's six-state controller.
//
//   listen  -> idle     when the Pi raises pi_ready (reset state)
//   idle    -> load     when a sample exceeds the trigger level
//   load    -> fft      when the last of the N samples is stored
//   fft     -> compute  when the FFT is done
//   compute -> send     when the magnitudes are in the SPI RAM
//   send    -> listen   when the Pi raises spi_stop
// The state register is updated on every core clock and reset synchronously
// by the top's synchronised reset, like every other core register. Besides the
// state, the controller gives one-clock pulses in the first clock of the fft,
// compute and send states (start_fft, start_mag, clear_spi), and spi_read,
// high throughout send, which tells the Pi that the results may be read.
// States and transitions follow the document. The entry pulses and the
// synchronous reset (the original resets the state asynchronously) are this
// design's choices.
module ukucorn_ctrl
  import ukucorn_pkg::*;
(
  input  logic   clk,
  input  logic   reset,         // synchronous, active high
  input  logic   pi_ready,
  input  logic   spi_stop,
  input  logic   trigger,
  input  logic   load_done,
  input  logic   fft_done,
  input  logic   mag_done,
  output state_t state,
  output logic   start_fft,
  output logic   start_mag,
  output logic   clear_spi,
  output logic   spi_read
);
  state_t next, prev;

  always_comb begin
    next = state;
    unique case (state)
      ST_LISTEN:  if (pi_ready)  next = ST_IDLE;
      ST_IDLE:    if (trigger)   next = ST_LOAD;
      ST_LOAD:    if (load_done) next = ST_FFT;
      ST_FFT:     if (fft_done)  next = ST_COMPUTE;
      ST_COMPUTE: if (mag_done)  next = ST_SEND;
      ST_SEND:    if (spi_stop)  next = ST_LISTEN;
      default:                   next = ST_LISTEN;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= ST_LISTEN;
      prev  <= ST_LISTEN;
    end else begin
      state <= next;
      prev  <= state;
    end
  end

  assign start_fft = (state == ST_FFT)     && (prev != ST_FFT);
  assign start_mag = (state == ST_COMPUTE) && (prev != ST_COMPUTE);
  assign clear_spi = (state == ST_SEND)    && (prev != ST_SEND);
  assign spi_read  = (state == ST_SEND);
endmodule
