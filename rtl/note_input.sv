// note_input: turns the pushbutton keys into tuning words.
//
// Each of the N_NOTES keys is debounced. For every pressed key the module
// outputs that key's tuning word M for the octave picked by octave_select;
// a released key gives M = 0, which stops its phase accumulator. The
// words are elaboration-time constants
//   M = round(f / FS_HZ * 2^16),  f = 440 Hz * 2^(semitones from A4 / 12)
// so with the default 48 kHz sample rate every note is within
// 48000 / 2^17 = 0.37 Hz of its ideal pitch. The source design keeps the
// words as parameters and concatenates them into an N_NOTES x 11-bit bus;
// the note names (C major scale: C D E F G A B, repeating upward for more
// than seven keys) and the octave mapping (octave_select 0..3 = octaves
// 2..5, all of which fit 11 bits) are this design's choice.
//
// reset_envelope pulses for one clock when a debounced key goes down, for
// the ADSR envelope. key_down is the debounced key state.
module note_input
  import synth_pkg::*;
#(
  parameter int unsigned N_NOTES         = 7,
  parameter int unsigned DEBOUNCE_CYCLES = 270_000,
  parameter real         FS_HZ           = 48_000.0,
  parameter int          LOWEST_OCTAVE   = 2
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N_NOTES-1:0]   keys,
  input  logic [1:0]           octave_select,
  output tword_t [N_NOTES-1:0] tuning_words,
  output logic   [N_NOTES-1:0] key_down,
  output logic   [N_NOTES-1:0] reset_envelope
);

  // Semitones of C D E F G A B relative to A.
  function automatic int semitone(int unsigned note);
    case (note % 7)
      0: return -9;
      1: return -7;
      2: return -5;
      3: return -4;
      4: return -2;
      5: return 0;
      default: return 2;
    endcase
  endfunction

  function automatic tword_t tuning_word(int unsigned note, int unsigned octave_sel);
    real semis, freq;
    semis = real'(semitone(note) + 12 * int'(note / 7)
                  + 12 * (int'(octave_sel) + LOWEST_OCTAVE - 4));
    freq  = 440.0 * $pow(2.0, semis / 12.0);
    return tword_t'($rtoi(freq / FS_HZ * real'(1 << PHASE_W) + 0.5));
  endfunction

  tword_t [3:0][N_NOTES-1:0] tw_table;

  for (genvar o = 0; o < 4; o++) begin : g_oct
    for (genvar k = 0; k < N_NOTES; k++) begin : g_note
      localparam tword_t TW = tuning_word(k, o);
      assign tw_table[o][k] = TW;
    end
  end

  logic [N_NOTES-1:0] key_down_q;

  for (genvar k = 0; k < N_NOTES; k++) begin : g_key
    debouncer #(.DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_deb (
      .clk   (clk),
      .rst   (rst),
      .noisy (keys[k]),
      .clean (key_down[k])
    );
    assign tuning_words[k] = key_down[k] ? tw_table[octave_select][k] : '0;
  end

  always_ff @(posedge clk) begin
    if (rst) key_down_q <= '0;
    else     key_down_q <= key_down;
  end

  assign reset_envelope = key_down & ~key_down_q;

endmodule
