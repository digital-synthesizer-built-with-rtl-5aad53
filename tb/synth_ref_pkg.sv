// synth_ref_pkg: reference arithmetic for the synthesizer testbenches,
// written from the design's definition rather than from the RTL: note
// frequencies, tuning words, ideal sine samples and the mixer's
// positive-saturating sum.
package synth_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  // C D E F G A B in octave 4, Hz
  localparam real F4 [7] = '{261.6256, 293.6648, 329.6276, 349.2282, 391.9954, 440.0, 493.8833};

  // tuning word for key k (k / 7 extra octaves) at octave_select o (octave o + 2)
  function automatic int tuning_word(int k, int o);
    real f;
    f = F4[k % 7] * (2.0 ** (o - 2 + k / 7));
    return int'(f / 48000.0 * 65536.0);
  endfunction

  function automatic logic [15:0] sine(logic [15:0] phase);
    return 16'(int'(32767.0 * $sin(2.0 * PI * real'(phase) / 65536.0)));
  endfunction

  // returns 1 when the positive clamp was applied
  function automatic logic sat_add(inout logic [15:0] sum, input logic [15:0] v);
    logic [16:0] w;
    w = 17'(sum) + 17'(v);
    if (!sum[15] && !v[15] && w > 17'h7fff) begin
      sum = 16'h7fff;
      return 1'b1;
    end
    sum = w[15:0];
    return 1'b0;
  endfunction

endpackage
