// synth_top: a polyphonic sine-wave synthesizer for an FPGA board with an
// AC97 codec and two ZBT SRAMs.
//
// Data flow, once per 48 kHz audio sample (the AC97 frame rate):
//   keys -> note_input (debounce, tuning word per pressed key)
//        -> tone_generator (one phase accumulator per key, one shared
//           quarter-wave sine ROM read serially, key by key)
//        -> adsr_shifter (envelope scaling, bypassed unless adsr_enable)
//        -> mixer (saturating sum of the keys, or recorded samples)
//        -> ac97_interface (serial frames to the codec)
// The ac97_interface turns each frame into the one-cycle ready pulse that
// steps the accumulators, latches the mixer sum and starts the control
// module, which then walks sel_angle over the keys (two clocks each) and
// strobes the mixer with read_value. The zbt_interface records mixer
// samples to the two RAMs (through two zbt_drivers) and plays them back
// into the mixer. The adsr_controller tracks an envelope per key.
//
// This structure follows the source design. This design's choices: the
// ADSR envelope, which the source describes as an extension, is built and
// switched in with adsr_enable (0 reproduces the plain on/off tones); the
// RAM clock is the system clock (a deskewed copy at board level); the RAM
// data buses are split into out / output-enable / in.
//
// Interface: clk is the 27 MHz system clock, rst a synchronous active-high
// reset. Key inputs are raw pushbutton levels (high = pressed). mode uses
// synth_pkg::mode_e (0 play, 1 record, 2 playback). The ADSR times are in
// quarter seconds.
module synth_top
  import synth_pkg::*;
#(
  parameter int unsigned N_NOTES            = 7,
  parameter int unsigned DEBOUNCE_CYCLES    = 270_000,
  parameter int unsigned CYCLES_PER_QUARTER = 6_750_000,
  parameter int unsigned RAM_ADDR_W         = 19,
  parameter int unsigned RAM_DATA_W         = 36,
  parameter logic [RAM_ADDR_W-1:0] MAX_RAM_ADDRESS = '1,
  parameter int unsigned SEL_W              = $clog2(N_NOTES + 1)
) (
  input  logic                  clk,
  input  logic                  rst,
  // control switches and keys
  input  logic [N_NOTES-1:0]    keys,
  input  logic [1:0]            octave_select,
  input  logic [1:0]            mode,
  input  logic                  clear_recording,
  input  logic                  adsr_enable,
  input  logic [3:0]            t_attack,
  input  logic [3:0]            t_decay,
  input  logic [3:0]            t_sustain,
  input  logic [3:0]            t_release,
  input  logic [1:0]            sustain_sel,
  // AC97 codec
  input  logic                  ac97_bit_clk,
  output logic                  ac97_sync,
  output logic                  ac97_sdata_out,
  output logic                  ac97_reset_b,
  // two ZBT SRAMs
  output logic [RAM_ADDR_W-1:0] ram_addr   [2],
  output logic [1:0]            ram_we_b,
  output logic [1:0]            ram_cen_b,
  output logic [1:0]            ram_adv_ld,
  output logic [3:0]            ram_bwe_b  [2],
  output logic [RAM_DATA_W-1:0] ram_dq_o   [2],
  output logic [1:0]            ram_dq_oe,
  input  logic [RAM_DATA_W-1:0] ram_dq_i   [2],
  // status
  output sample_t               sample_out,   // sample sent to the codec
  output logic [N_NOTES-1:0]    key_down,     // debounced keys
  output logic [RAM_ADDR_W-1:0] w_index,      // recorder write position
  output logic [RAM_ADDR_W-1:0] r_index,      // recorder read position
  output logic                  mem1_full,
  output logic                  mem2_full
);

  mode_e mode_e_v;
  assign mode_e_v = mode_e'(mode);

  logic                 ready;
  logic [SEL_W-1:0]     sel_angle;
  logic                 read_value;
  tword_t [N_NOTES-1:0] tuning_words;
  logic [N_NOTES-1:0]   reset_envelope;
  sample_t              wave_value, shaped_value, mem_value;
  logic [MAG_W-1:0]     adsr_mag, shift_mag;

  note_input #(.N_NOTES(N_NOTES), .DEBOUNCE_CYCLES(DEBOUNCE_CYCLES)) u_note_input (
    .clk            (clk),
    .rst            (rst),
    .keys           (keys),
    .octave_select  (octave_select),
    .tuning_words   (tuning_words),
    .key_down       (key_down),
    .reset_envelope (reset_envelope)
  );

  control_module #(.N_NOTES(N_NOTES)) u_control (
    .clk        (clk),
    .rst        (rst),
    .ready      (ready),
    .sel_angle  (sel_angle),
    .read_value (read_value)
  );

  tone_generator #(.N_NOTES(N_NOTES)) u_tone (
    .clk          (clk),
    .rst          (rst),
    .ready        (ready),
    .tuning_words (tuning_words),
    .sel_angle    (sel_angle),
    .wave_value   (wave_value)
  );

  adsr_controller #(.N_NOTES(N_NOTES), .CYCLES_PER_QUARTER(CYCLES_PER_QUARTER)) u_adsr (
    .clk            (clk),
    .rst            (rst),
    .reset_envelope (reset_envelope),
    .t_attack       (t_attack),
    .t_decay        (t_decay),
    .t_sustain      (t_sustain),
    .t_release      (t_release),
    .sustain_sel    (sustain_sel),
    .sel_angle      (sel_angle),
    .magnitude      (adsr_mag)
  );

  assign shift_mag = adsr_enable ? adsr_mag : MAG_W'(16);

  adsr_shifter u_shifter (
    .sample_in  (wave_value),
    .magnitude  (shift_mag),
    .sample_out (shaped_value)
  );

  mixer u_mixer (
    .clk        (clk),
    .rst        (rst),
    .ready      (ready),
    .read_value (read_value),
    .mode       (mode_e_v),
    .wave_value (shaped_value),
    .mem_value  (mem_value),
    .sample_out (sample_out)
  );

  ac97_interface u_ac97 (
    .clk            (clk),
    .rst            (rst),
    .sample_in      (sample_out),
    .ready          (ready),
    .ac97_bit_clk   (ac97_bit_clk),
    .ac97_sync      (ac97_sync),
    .ac97_sdata_out (ac97_sdata_out),
    .ac97_reset_b   (ac97_reset_b)
  );

  // Recorder and RAM drivers
  logic [1:0]            zreq;
  logic                  zwe;
  logic [RAM_ADDR_W-1:0] zaddr;
  logic [RAM_DATA_W-1:0] zwdata;
  logic [RAM_DATA_W-1:0] zrdata [2];
  logic [1:0]            zvalid;

  zbt_interface #(
    .ADDR_W          (RAM_ADDR_W),
    .DATA_W          (RAM_DATA_W),
    .MAX_RAM_ADDRESS (MAX_RAM_ADDRESS)
  ) u_recorder (
    .clk             (clk),
    .rst             (rst),
    .ready           (ready),
    .mode            (mode_e_v),
    .clear_recording (clear_recording),
    .sample_in       (sample_out),
    .mem_value       (mem_value),
    .req             (zreq),
    .we              (zwe),
    .addr            (zaddr),
    .wdata           (zwdata),
    .rdata           (zrdata),
    .read_valid      (zvalid),
    .w_index         (w_index),
    .r_index         (r_index),
    .mem1_full       (mem1_full),
    .mem2_full       (mem2_full)
  );

  for (genvar m = 0; m < 2; m++) begin : g_ram
    zbt_driver #(.ADDR_W(RAM_ADDR_W), .DATA_W(RAM_DATA_W)) u_drv (
      .clk        (clk),
      .rst        (rst),
      .req        (zreq[m]),
      .we         (zwe),
      .addr       (zaddr),
      .wdata      (zwdata),
      .rdata      (zrdata[m]),
      .read_valid (zvalid[m]),
      .ram_addr   (ram_addr[m]),
      .ram_we_b   (ram_we_b[m]),
      .ram_cen_b  (ram_cen_b[m]),
      .ram_adv_ld (ram_adv_ld[m]),
      .ram_bwe_b  (ram_bwe_b[m]),
      .ram_dq_o   (ram_dq_o[m]),
      .ram_dq_oe  (ram_dq_oe[m]),
      .ram_dq_i   (ram_dq_i[m])
    );
  end

endmodule
