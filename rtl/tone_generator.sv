// tone_generator: direct digital synthesis of N_NOTES sine tones with one
// shared quarter-wave ROM.
//
// Each key has a phase accumulator that adds its tuning word on every
// ready pulse. A note mux, driven by sel_angle from the control module,
// feeds one accumulator at a time into the angle correction and the wave
// table; mux input N_NOTES (and anything above it) is tied to angle 0,
// which reads amplitude 0, so once the control module parks sel_angle at
// N_NOTES the mixer only sees zeros. This serial lookup is the source
// design's: one ROM copy serves every key, since the 27 MHz clock leaves
// hundreds of cycles between 48 kHz samples.
//
// Timing (this design's pipeline): sel_angle in cycle c -> angle
// correction registered at the end of c -> ROM read at the end of c+1 ->
// wave_value valid in cycle c+2 (two-cycle latency). The negation of the lower
// half-wave is a two's-complement invert-and-add-one on the ROM output.
module tone_generator
  import synth_pkg::*;
#(
  parameter int unsigned N_NOTES = 7,
  parameter int unsigned SEL_W   = $clog2(N_NOTES + 1)
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  ready,                // 48 kHz sample pulse
  input  tword_t [N_NOTES-1:0]  tuning_words,         // M per key
  input  logic   [SEL_W-1:0]    sel_angle,            // key being looked up
  output sample_t               wave_value            // two's-complement sample
);

  phase_t [N_NOTES-1:0] angles;

  for (genvar k = 0; k < N_NOTES; k++) begin : g_acc
    phase_accumulator #(.PHASE_W(PHASE_W), .TW_W(TW_W)) u_acc (
      .clk   (clk),
      .rst   (rst),
      .step  (ready),
      .tword (tuning_words[k]),
      .angle (angles[k])
    );
  end

  // Note mux: inputs at or above N_NOTES read angle 0.
  phase_t angle_sel;
  always_comb begin
    angle_sel = '0;
    for (int k = 0; k < N_NOTES; k++) begin
      if (sel_angle == SEL_W'(k)) angle_sel = angles[k];
    end
  end

  logic [TABLE_AW-1:0] index_c, index_q;
  logic                negate_c, negate_q, negate_qq;

  angle_correction #(.PHASE_W(PHASE_W)) u_corr (
    .angle  (angle_sel),
    .index  (index_c),
    .negate (negate_c)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      index_q   <= '0;
      negate_q  <= 1'b0;
      negate_qq <= 1'b0;
    end else begin
      index_q   <= index_c;
      negate_q  <= negate_c;
      negate_qq <= negate_q;
    end
  end

  sample_t magnitude;

  wave_table #(.ADDR_W(TABLE_AW), .DATA_W(SAMPLE_W)) u_rom (
    .clk  (clk),
    .addr (index_q),
    .data (magnitude)
  );

  assign wave_value = negate_qq ? (~magnitude + 1'b1) : magnitude;

endmodule
