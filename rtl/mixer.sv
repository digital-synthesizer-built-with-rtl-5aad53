// mixer: sums the per-key tone samples into one audio sample.
//
// In play and record modes the mixer adds wave_value to a running sum in
// every cycle where read_value is high. Samples are two's-complement
// values held in plain vectors. If the sum or the new value is negative
// the addition is done modulo 2^16, which is ordinary two's-complement
// addition. If both are positive and the result would pass 0x7fff, the sum
// is clamped to 0x7fff instead of wrapping to a negative number. Negative
// overflow is not clamped; this follows the source design. On ready the
// sum is copied to sample_out (to the AC97 link and the recorder) and
// cleared. In playback mode the mixer instead copies mem_value (the
// recorder's output) to sample_out on ready.
//
// Timing: sample_out changes only in the cycle after ready and holds for a
// whole sample period. A read_value in the same cycle as ready is ignored.
module mixer
  import synth_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    ready,
  input  logic    read_value,
  input  mode_e   mode,
  input  sample_t wave_value,
  input  sample_t mem_value,
  output sample_t sample_out
);

  sample_t           sum;
  logic [SAMPLE_W:0] wide;

  assign wide = {1'b0, sum} + {1'b0, wave_value};

  always_ff @(posedge clk) begin
    if (rst) begin
      sum        <= '0;
      sample_out <= '0;
    end else if (ready) begin
      sample_out <= (mode == MODE_PLAYBACK) ? mem_value : sum;
      sum        <= '0;
    end else if (read_value) begin
      if (sum[SAMPLE_W-1] || wave_value[SAMPLE_W-1]) begin
        sum <= wide[SAMPLE_W-1:0];
      end else if (wide > {1'b0, SAMPLE_MAX_POS}) begin
        sum <= SAMPLE_MAX_POS;
      end else begin
        sum <= wide[SAMPLE_W-1:0];
      end
    end
  end

endmodule
