// phase_accumulator: the "phase wheel" of one key.
//
// A PHASE_W-bit wrap-around counter. On each cycle where step is high
// (the 48 kHz AC97 ready pulse) it adds the tuning word M, so the output
// frequency is f_step * M / 2^PHASE_W. Widths (16-bit phase, 11-bit tuning
// word) follow the source design. The new angle is visible one clock after
// the step pulse. Synchronous active-high reset to angle 0 is this design's
// choice.
module phase_accumulator #(
  parameter int unsigned PHASE_W = 16,
  parameter int unsigned TW_W    = 11
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               step,   // one-cycle pulse per audio sample
  input  logic [TW_W-1:0]    tword,  // tuning word M
  output logic [PHASE_W-1:0] angle
);

  always_ff @(posedge clk) begin
    if (rst)       angle <= '0;
    else if (step) angle <= angle + PHASE_W'(tword);
  end

endmodule
