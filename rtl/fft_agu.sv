// fft_agu: address generation unit of the in-place radix-2 FFT.
//
// Three counters sequence the transform: the level i (0..LOGN-1), the
// butterfly index j (0..N/2-1) and a 2-bit flush counter k. Within a level j
// advances every clock; when j reaches N/2-1, k counts 1, 2, 3 while the last
// butterfly's result drains out of the one-clock read pipeline, then j and k
// clear and i advances. A level therefore takes N/2 + 3 clocks, and the whole
// transform LOGN * (N/2 + 3) clocks; `done` pulses one clock after the last
// flush clock.
//
// Butterfly j of level i reads the pair of words at rot_i(2j) and rot_i(2j+1),
// where rot_i rotates a LOGN-bit address left by i bits. With the input stored
// in bit-reversed order this gives a decimation-in-time FFT whose output is in
// natural order. The twiddle index is j with all but its top i bits masked,
// i.e. W_N^(m * N/2^(i+1)) for the butterfly's position m inside its group.
// Level i reads bank i[0] and writes the other bank; the writes use the read
// addresses delayed by one clock (`wr_*`), in step with the RAM and twiddle
// ROM read latency. Only reads made with k == 0 are written back, so the
// repeated reads of the flush clocks write nothing.
// The counters, the rotation addressing, the twiddle mask, the flush counter
// and the ping-pong banks follow the document. Starting on a one-clock pulse,
// and a write enable derived from a valid bit rather than from j and k, are
// this design's choices.
module fft_agu
  import ukucorn_pkg::*;
#(
  parameter int unsigned LOGN = LOGN_DEFAULT
) (
  input  logic            clk,
  input  logic            reset,          // synchronous, active high
  input  logic            start,          // one-clock pulse
  output logic            busy,
  output logic            done,           // one-clock pulse
  // read side (this clock)
  output logic [LOGN-1:0] rd_addr_a,
  output logic [LOGN-1:0] rd_addr_b,
  output logic            rd_bank,
  output logic [LOGN-2:0] tw_addr,
  // write side (reads of the previous clock)
  output logic            wr_en,
  output logic [LOGN-1:0] wr_addr_a,
  output logic [LOGN-1:0] wr_addr_b,
  output logic            wr_bank,
  output logic [3:0]      level           // i, for observation
);
  logic [3:0]      i;
  logic [LOGN-2:0] j;
  logic [1:0]      k;
  logic [LOGN-1:0] ja, jb;
  logic [LOGN-2:0] mask;
  logic            rd_valid;

  function automatic logic [LOGN-1:0] rotl(input logic [LOGN-1:0] v, input logic [3:0] n);
    logic [2*LOGN-1:0] d;
    d = {v, v} << n;
    return d[2*LOGN-1 -: LOGN];
  endfunction

  assign ja = {j, 1'b0};
  assign jb = {j, 1'b1};
  assign rd_addr_a = rotl(ja, i);
  assign rd_addr_b = rotl(jb, i);
  assign rd_bank   = i[0];
  // top i bits set
  assign mask      = ~((LOGN-1)'({(LOGN-1){1'b1}}) >> i);
  assign tw_addr   = j & mask;
  assign rd_valid  = busy && (k == 2'd0);
  assign level     = i;

  always_ff @(posedge clk) begin
    done <= 1'b0;
    if (reset) begin
      busy <= 1'b0;
      i <= '0; j <= '0; k <= '0;
    end else if (start) begin
      busy <= 1'b1;
      i <= '0; j <= '0; k <= '0;
    end else if (busy) begin
      if (!(&j)) begin
        j <= j + 1'b1;
      end else if (k != 2'd3) begin
        k <= k + 1'b1;
      end else begin
        j <= '0;
        k <= '0;
        if (i == 4'(LOGN - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          i    <= '0;
        end else begin
          i <= i + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      wr_en     <= 1'b0;
      wr_addr_a <= '0;
      wr_addr_b <= '0;
      wr_bank   <= 1'b1;
    end else begin
      wr_en     <= rd_valid;
      wr_addr_a <= rd_addr_a;
      wr_addr_b <= rd_addr_b;
      wr_bank   <= ~rd_bank;
    end
  end

  // A level must never read the bank it is writing.
  always_ff @(posedge clk)
    if (!reset && wr_en && rd_valid)
      assert (wr_bank != rd_bank) else $error("fft_agu: read and write hit the same bank");
endmodule
