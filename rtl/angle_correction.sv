// angle_correction: maps a full-circle angle to a quarter-wave ROM index.
//
// With A the quarter-circle angle (2^(PHASE_W-2)) the rules are:
//   quadrant 0:  index = theta            value = +table
//   quadrant 1:  index = 2A - theta       value = +table
//   quadrant 2:  index = theta - 2A       value = -table
//   quadrant 3:  index = 4A - theta       value = -table
// These follow the source design. In quadrants 1 and 3 the index equals A
// when theta sits exactly on a quadrant boundary; A does not fit the
// A-entry table, so it is clamped to A-1, whose stored value rounds to the
// same full-scale peak. The output is the index plus a negate flag instead
// of a 16-bit word (this design's choice). Purely combinational.
module angle_correction #(
  parameter int unsigned PHASE_W = 16
) (
  input  logic [PHASE_W-1:0] angle,
  output logic [PHASE_W-3:0] index,
  output logic               negate
);

  localparam int unsigned IW = PHASE_W - 2;

  logic [1:0]    quadrant;
  logic [IW-1:0] offset;
  logic [IW:0]   mirrored;  // A - offset, range 1..A

  always_comb begin
    quadrant = angle[PHASE_W-1 -: 2];
    offset   = angle[IW-1:0];
    mirrored = {1'b1, {IW{1'b0}}} - {1'b0, offset};
    negate   = quadrant[1];
    if (quadrant[0]) begin
      index = mirrored[IW] ? {IW{1'b1}} : mirrored[IW-1:0];
    end else begin
      index = offset;
    end
  end

endmodule
