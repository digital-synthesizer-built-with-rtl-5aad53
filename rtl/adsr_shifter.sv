// adsr_shifter: scales a tone sample by an ADSR magnitude.
//
// magnitude runs from 0 to 16; the sample is shifted arithmetically right
// by 16 - magnitude, so 16 leaves it unchanged and each step down halves
// it. Magnitude 0 gives silence (0) rather than the -1 that a 16-bit
// arithmetic shift of a negative sample would leave (this design's choice).
// Magnitudes above 16 are treated as 16. Purely combinational.
module adsr_shifter
  import synth_pkg::*;
(
  input  sample_t          sample_in,
  input  logic [MAG_W-1:0] magnitude,
  output sample_t          sample_out
);

  logic [MAG_W-1:0] shift;

  always_comb begin
    shift = (magnitude >= MAG_W'(16)) ? '0 : MAG_W'(16) - magnitude;
    if (magnitude == '0) sample_out = '0;
    else                 sample_out = sample_t'($signed(sample_in) >>> shift);
  end

endmodule
