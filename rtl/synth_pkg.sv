// synth_pkg: types and constants shared by the synthesizer blocks.
//
// The synthesizer uses direct digital synthesis: each key owns a 16-bit
// phase accumulator stepped once per audio sample (48 kHz) by an 11-bit
// tuning word, and one shared quarter-wave sine ROM converts the angles to
// 16-bit two's-complement samples, one key after another. Samples are kept
// as plain (unsigned) 16-bit vectors that hold two's-complement values.
//
// The 2-bit mode and its encoding are this design's choice: the source
// design names a 2-bit mode with play, record and playback behaviour but
// gives no encoding.
package synth_pkg;

  localparam int unsigned PHASE_W   = 16;  // phase accumulator width (N)
  localparam int unsigned TW_W      = 11;  // tuning word width (M)
  localparam int unsigned SAMPLE_W  = 16;  // audio sample width
  localparam int unsigned TABLE_AW  = PHASE_W - 2;  // quarter-wave ROM index
  localparam int unsigned MAG_W     = 5;   // ADSR magnitude 0..16

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [PHASE_W-1:0]  phase_t;
  typedef logic [TW_W-1:0]     tword_t;

  typedef enum logic [1:0] {
    MODE_PLAY     = 2'd0,  // keys to speaker only
    MODE_RECORD   = 2'd1,  // keys to speaker, samples stored in the ZBT RAMs
    MODE_PLAYBACK = 2'd2,  // stored samples to speaker
    MODE_IDLE     = 2'd3   // behaves as MODE_PLAY
  } mode_e;

  localparam sample_t SAMPLE_MAX_POS = 16'h7fff;

endpackage
