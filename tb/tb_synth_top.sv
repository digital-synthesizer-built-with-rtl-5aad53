// tb_synth_top: end-to-end test of the synthesizer at reduced sizes
// (16-clock debounce, 16-word RAMs, short ADSR quarter seconds) with a
// behavioural AC97 codec and two behavioural ZBT SRAMs.
//
// A reference model keeps one phase per key, steps it on every ready pulse
// with the tuning word of the debounced key, and predicts each output
// sample as the positive-saturating sum of ideal sines (released keys keep
// their last angle). Every sample in play and record mode is checked. The
// test then records until both RAMs are full, plays the track back and
// compares it, clears it, and runs the ADSR envelope. It counts each
// mechanism (debounce rejection, chords, octave switch, saturation, RAM
// switch, memory full, playback, clear, envelope steps, codec frames) and
// fails any that never happened.
`timescale 1ns / 1ps
module tb_synth_top;
  import synth_pkg::*;
  import synth_ref_pkg::*;

  localparam int N = 7;
  localparam int DEB = 16;
  localparam int CPQ = 5620;  // about ten samples per "quarter second"
  localparam logic [18:0] MAXA = 19'd15;

  logic clk = 1'b0, rst = 1'b1;
  logic [N-1:0] keys = '0, key_down;
  logic [1:0] oct = 2'd2, mode = 2'd0, ssel = 2'd1;
  logic clr = 1'b0, adsr_en = 1'b0;
  logic [3:0] ta = 4'd2, td = 4'd1, ts = 4'd2, tr = 4'd2;
  logic bit_clk, sync, sdata, reset_b;
  logic [18:0] ram_addr [2];
  logic [1:0] ram_we_b, ram_cen_b, ram_adv_ld, ram_dq_oe;
  logic [3:0] ram_bwe_b [2];
  logic [35:0] ram_dq_o [2], ram_dq_i [2];
  sample_t sample_out;
  logic [18:0] w_index, r_index;
  logic m1, m2;
  int writes [2];
  int frames, sync_len;
  logic [15:0] tag;
  logic [19:0] cmd_addr, cmd_data, left, right;

  synth_top #(.N_NOTES(N), .DEBOUNCE_CYCLES(DEB), .CYCLES_PER_QUARTER(CPQ),
              .MAX_RAM_ADDRESS(MAXA)) dut (
    .clk(clk), .rst(rst), .keys(keys), .octave_select(oct), .mode(mode),
    .clear_recording(clr), .adsr_enable(adsr_en), .t_attack(ta), .t_decay(td),
    .t_sustain(ts), .t_release(tr), .sustain_sel(ssel),
    .ac97_bit_clk(bit_clk), .ac97_sync(sync), .ac97_sdata_out(sdata), .ac97_reset_b(reset_b),
    .ram_addr(ram_addr), .ram_we_b(ram_we_b), .ram_cen_b(ram_cen_b), .ram_adv_ld(ram_adv_ld),
    .ram_bwe_b(ram_bwe_b), .ram_dq_o(ram_dq_o), .ram_dq_oe(ram_dq_oe), .ram_dq_i(ram_dq_i),
    .sample_out(sample_out), .key_down(key_down), .w_index(w_index), .r_index(r_index),
    .mem1_full(m1), .mem2_full(m2));

  for (genvar m = 0; m < 2; m++) begin : g_ram
    zbt_sram_model #(.ADDR_W(19), .DATA_W(36)) ram (
      .clk(clk), .addr(ram_addr[m]), .we_b(ram_we_b[m]), .cen_b(ram_cen_b[m]),
      .dq_i(ram_dq_o[m]), .dq_oe(ram_dq_oe[m]), .dq_o(ram_dq_i[m]), .writes(writes[m]));
  end

  ac97_codec_model codec (.reset_b(reset_b), .bit_clk(bit_clk), .sync(sync), .sdata(sdata),
                          .frames(frames), .tag(tag), .cmd_addr(cmd_addr), .cmd_data(cmd_data),
                          .left(left), .right(right), .sync_len(sync_len));

  always #18.518 clk = ~clk;   // 27 MHz

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #40ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model, stepped on ready ----------------
  logic [15:0] phase [N];
  logic [15:0] pending = '0;
  int  samples = 0, skip = 2, sample_checks = 0;
  int  n_sat = 0, n_chord = 0, n_octave = 0, n_env = 0, n_frames_ok = 0;
  logic [1:0] last_oct = 2'd2;
  sample_t recent [3] = '{default: '0};
  sample_t outs [$];            // sample_out after each ready, for record/playback

  initial for (int k = 0; k < N; k++) phase[k] = '0;

  always @(posedge clk) begin
    if (!rst && dut.ready) begin
      #1;   // after the edge: sample_out holds the new sample
      samples++;
      outs.push_back(sample_out);
      recent[2] = recent[1]; recent[1] = recent[0]; recent[0] = sample_out;
      if (skip > 0) skip--;
      else if (mode != 2'(MODE_PLAYBACK)) begin
        sample_checks++;
        check(sample_out == pending, $sformatf("sample %0d: got %h expected %h", samples, sample_out, pending));
      end
      if (adsr_en) skip = 2;
      if ($countones(key_down) > 1) n_chord++;
      if (oct != last_oct && key_down != '0) n_octave++;
      last_oct = oct;
      for (int k = 0; k < N; k++)
        if (key_down[k]) phase[k] = phase[k] + 16'(tuning_word(k, int'(oct)));
      pending = '0;
      for (int k = 0; k < N; k++) if (sat_add(pending, sine(phase[k]))) n_sat++;
    end
  end

  // envelope magnitudes seen at the shifter
  always @(posedge clk) if (adsr_en && dut.read_value && dut.shift_mag > 0 && dut.shift_mag < 16) n_env++;

  // every codec frame carries one of the latest samples, padded to 20 bits
  always @(frames) if (frames > 4 && !rst) begin
    check(left == {recent[0], 4'h0} || left == {recent[1], 4'h0} || left == {recent[2], 4'h0},
          $sformatf("codec left %h", left));
    check(tag == 16'hf800, "codec tag");
    n_frames_ok++;
  end

  task automatic wait_samples(input int n);
    repeat (n) @(posedge clk iff dut.ready);
    @(negedge clk);
  endtask

  initial begin
    int n_glitch = 0, n_rec = 0, n_play = 0, n_clear = 0, n_switch = 0, n_full = 0;
    int rec_start, play_start;
    repeat (20) @(negedge clk);
    rst = 1'b0;
    wait_samples(3);

    // a glitch shorter than the debounce time is ignored
    keys[0] = 1'b1; repeat (DEB / 2) @(negedge clk); keys[0] = 1'b0;
    repeat (3 * DEB) @(negedge clk);
    check(key_down == '0, "glitch passed the debouncer");
    if (key_down == '0) n_glitch++;

    // one note, then a chord, then an octave switch
    keys[5] = 1'b1;
    wait_samples(20);
    keys = 7'b0010101;
    wait_samples(20);
    oct = 2'd3;
    wait_samples(10);
    // all keys: drives the mixer into saturation
    keys = '1;
    wait_samples(10);

    // record until both RAMs are full
    keys = '1;                   // every key moving: no constant offsets
    oct = 2'd3;
    wait_samples(2);
    mode = 2'(MODE_RECORD);
    rec_start = outs.size() - 1;   // the sample latched at the last ready is the first one written
    wait_samples(40);
    check(m1 && m2, "RAMs not full after 40 samples");
    if (m1) n_switch++;
    if (m2) n_full++;
    for (int a = 0; a < 16; a++) begin
      check(g_ram[0].ram.peek(19'(a)) == 36'(outs[rec_start + a]), $sformatf("RAM1[%0d] %h expected %h", a, g_ram[0].ram.peek(19'(a)), outs[rec_start + a]));
      check(g_ram[1].ram.peek(19'(a)) == 36'(outs[rec_start + 16 + a]), $sformatf("RAM2[%0d]", a));
      n_rec += 2;
    end

    begin
      int distinct;
      distinct = 0;
      for (int a = 1; a < 32; a++) if (outs[rec_start + a] != outs[rec_start + a - 1]) distinct++;
      check(distinct > 16, $sformatf("recorded track nearly constant (%0d changes, %h %h %h)", distinct, outs[rec_start], outs[rec_start+1], outs[rec_start+2]));
    end
    // playback: sample_out repeats the recording one sample late
    mode = 2'(MODE_PLAYBACK);
    keys = '0;
    play_start = outs.size();
    wait_samples(36);
    for (int i = 0; i < 32; i++) begin
      check(outs[play_start + 1 + i] == outs[rec_start + i],
            $sformatf("playback %0d: %h expected %h", i, outs[play_start + 1 + i], outs[rec_start + i]));
      n_play++;
    end
    check(outs[play_start + 34] == '0, "silence after the track");

    // clear the recording
    mode = 2'(MODE_PLAY);
    @(negedge clk); clr = 1'b1; @(negedge clk); clr = 1'b0;
    check(w_index == '0 && !m1 && !m2, "clear_recording");
    if (w_index == '0 && !m1 && !m2) n_clear++;
    skip = 2;
    wait_samples(4);

    // ADSR envelope on a fresh press
    skip = 3;
    adsr_en = 1'b1;
    keys[3] = 1'b1;
    wait_samples(100);
    adsr_en = 1'b0;
    skip = 3;
    wait_samples(5);

    $display("samples=%0d checked=%0d glitch=%0d chord=%0d octave=%0d sat=%0d rec=%0d switch=%0d full=%0d play=%0d clear=%0d env=%0d frames=%0d",
             samples, sample_checks, n_glitch, n_chord, n_octave, n_sat, n_rec, n_switch, n_full, n_play, n_clear, n_env, n_frames_ok);
    check(n_glitch > 0, "no debounce rejection");
    check(n_chord > 0, "no chord");
    check(n_octave > 0, "no octave switch");
    check(n_sat > 0, "no saturation");
    check(n_rec > 0, "no recording");
    check(n_switch > 0, "no RAM switch");
    check(n_full > 0, "no memory full");
    check(n_play > 0, "no playback");
    check(n_clear > 0, "no clear");
    check(n_env > 0, "no envelope steps");
    check(n_frames_ok > 0, "no codec frames");
    check(sample_checks > 50, "too few samples checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
