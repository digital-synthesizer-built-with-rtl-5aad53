// adsr_controller: attack-decay-sustain-release envelopes for every key.
//
// Each key has a cycle counter and a magnitude (0..16). A one-clock
// reset_envelope pulse (a key going down) restarts that key's envelope:
//   attack : magnitude rises by one every (tA >> 4) cycles up to m_A = 16
//   decay  : falls by one every (tD >> log2(16 - m_S)) cycles down to m_S
//   sustain: holds m_S for tS cycles
//   release: falls by one every (tR / m_S) cycles down to 0
// where each time is the user setting in quarter seconds times
// CYCLES_PER_QUARTER. m_S is one of 16, 14, 12, 8 (sustain_sel 0..3), so
// 16 - m_S is a power of two and the decay step is a shift; only the
// release step needs a divide, done once on the shared settings. These
// rules are the source design's, which describes this extension but did
// not build it. This design's choices: the counter restarts at every
// magnitude step instead of counting from the key press, so no divider is
// needed per key; a zero step length means one step per cycle; with
// m_S = 16 the decay phase is skipped; 4-bit time settings; keys that were
// never pressed, or whose release has ended, have magnitude 0.
//
// magnitude is the value of the key selected by sel_angle, registered
// twice so that it lines up with the tone generator's two-cycle latency.
module adsr_controller
  import synth_pkg::*;
#(
  parameter int unsigned N_NOTES            = 7,
  parameter int unsigned SEL_W              = $clog2(N_NOTES + 1),
  parameter int unsigned CYCLES_PER_QUARTER = 6_750_000  // 0.25 s at 27 MHz
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [N_NOTES-1:0] reset_envelope,
  input  logic [3:0]         t_attack,     // quarter seconds
  input  logic [3:0]         t_decay,
  input  logic [3:0]         t_sustain,
  input  logic [3:0]         t_release,
  input  logic [1:0]         sustain_sel,  // m_S = 16, 14, 12, 8
  input  logic [SEL_W-1:0]   sel_angle,
  output logic [MAG_W-1:0]   magnitude
);

  typedef enum logic [2:0] {
    ENV_IDLE, ENV_ATTACK, ENV_DECAY, ENV_SUSTAIN, ENV_RELEASE
  } env_e;

  typedef logic [31:0] cyc_t;

  localparam logic [MAG_W-1:0] M_ATTACK = MAG_W'(16);

  // Step lengths shared by all keys.
  logic [MAG_W-1:0] m_sustain;
  logic [2:0]       decay_shift;
  cyc_t             step_attack, step_decay, len_sustain, step_release;
  cyc_t             t_a_cyc, t_d_cyc, t_r_cyc;

  always_comb begin
    case (sustain_sel)
      2'd0:    begin m_sustain = MAG_W'(16); decay_shift = 3'd0; end
      2'd1:    begin m_sustain = MAG_W'(14); decay_shift = 3'd1; end
      2'd2:    begin m_sustain = MAG_W'(12); decay_shift = 3'd2; end
      default: begin m_sustain = MAG_W'(8);  decay_shift = 3'd3; end
    endcase
    t_a_cyc      = cyc_t'(t_attack)  * cyc_t'(CYCLES_PER_QUARTER);
    t_d_cyc      = cyc_t'(t_decay)   * cyc_t'(CYCLES_PER_QUARTER);
    t_r_cyc      = cyc_t'(t_release) * cyc_t'(CYCLES_PER_QUARTER);
    step_attack  = t_a_cyc >> 4;
    step_decay   = t_d_cyc >> decay_shift;
    len_sustain  = cyc_t'(t_sustain) * cyc_t'(CYCLES_PER_QUARTER);
    step_release = t_r_cyc / cyc_t'(m_sustain);
  end

  env_e             state [N_NOTES];
  logic [MAG_W-1:0] mag   [N_NOTES];
  cyc_t             count [N_NOTES];

  // The current phase's step has ended for a key when its counter reaches
  // the step length (a zero length ends every cycle).
  function automatic logic step_done(cyc_t cnt, cyc_t len);
    return (len == '0) || (cnt >= len - 1);
  endfunction

  for (genvar k = 0; k < N_NOTES; k++) begin : g_key
    always_ff @(posedge clk) begin
      if (rst) begin
        state[k] <= ENV_IDLE;
        mag[k]   <= '0;
        count[k] <= '0;
      end else if (reset_envelope[k]) begin
        state[k] <= ENV_ATTACK;
        mag[k]   <= '0;
        count[k] <= '0;
      end else begin
        unique case (state[k])
          ENV_IDLE: begin
            mag[k]   <= '0;
            count[k] <= '0;
          end
          ENV_ATTACK: begin
            if (step_done(count[k], step_attack)) begin
              count[k] <= '0;
              mag[k]   <= mag[k] + 1'b1;
              if (mag[k] + 1'b1 == M_ATTACK)
                state[k] <= (m_sustain == M_ATTACK) ? ENV_SUSTAIN : ENV_DECAY;
            end else begin
              count[k] <= count[k] + 1'b1;
            end
          end
          ENV_DECAY: begin
            if (step_done(count[k], step_decay)) begin
              count[k] <= '0;
              mag[k]   <= mag[k] - 1'b1;
              if (mag[k] - 1'b1 <= m_sustain) state[k] <= ENV_SUSTAIN;
            end else begin
              count[k] <= count[k] + 1'b1;
            end
          end
          ENV_SUSTAIN: begin
            if (step_done(count[k], len_sustain)) begin
              count[k] <= '0;
              state[k] <= ENV_RELEASE;
            end else begin
              count[k] <= count[k] + 1'b1;
            end
          end
          ENV_RELEASE: begin
            if (step_done(count[k], step_release)) begin
              count[k] <= '0;
              mag[k]   <= mag[k] - 1'b1;
              if (mag[k] == MAG_W'(1)) state[k] <= ENV_IDLE;
            end else begin
              count[k] <= count[k] + 1'b1;
            end
          end
          default: state[k] <= ENV_IDLE;
        endcase
      end
    end
  end

  logic [MAG_W-1:0] mag_sel, mag_q;

  always_comb begin
    mag_sel = '0;
    for (int k = 0; k < N_NOTES; k++) begin
      if (sel_angle == SEL_W'(k)) mag_sel = mag[k];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mag_q     <= '0;
      magnitude <= '0;
    end else begin
      mag_q     <= mag_sel;
      magnitude <= mag_q;
    end
  end

endmodule
