// tb_note_input: presses keys in every octave and checks each tuning word
// against equal-tempered note frequencies written out here (C D E F G A B,
// octaves 2..5): the word must be the nearest integer to f/48000*65536,
// the synthesized frequency must be within 0.37 Hz of the note, released
// keys must give 0, and each press must give one reset_envelope pulse.
`timescale 1ns / 1ps
module tb_note_input;
  import synth_pkg::*;
  localparam int N = 7;
  localparam int D = 4;
  logic clk = 1'b0, rst = 1'b1;
  logic [N-1:0] keys = '0, down, renv;
  logic [1:0] oct = '0;
  tword_t [N-1:0] tw;
  int checks = 0, failures = 0, pulses = 0;
  real f4 [7] = '{261.6256, 293.6648, 329.6276, 349.2282, 391.9954, 440.0, 493.8833};
  real err_sum = 0.0, err_max = 0.0;
  int  err_n = 0;

  note_input #(.N_NOTES(N), .DEBOUNCE_CYCLES(D)) dut (
    .clk(clk), .rst(rst), .keys(keys), .octave_select(oct),
    .tuning_words(tw), .key_down(down), .reset_envelope(renv));

  always #5 clk = ~clk;

  always @(posedge clk) pulses += $countones(renv);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int o = 0; o < 4; o++) begin
      oct = 2'(o);
      for (int k = 0; k < N; k++) begin
        real f, fo, e;
        int  m;
        int  p0;
        p0 = pulses;
        @(negedge clk); keys = '0; keys[k] = 1'b1;
        repeat (D + 5) @(negedge clk);
        f  = f4[k] * (2.0 ** (o - 2));
        m  = int'(f / 48000.0 * 65536.0);
        fo = real'(tw[k]) * 48000.0 / 65536.0;
        e  = (fo > f) ? fo - f : f - fo;
        err_sum += e; err_n++;
        if (e > err_max) err_max = e;
        checks++;
        if (int'(tw[k]) != m) begin failures++; $display("FAIL note %0d oct %0d: M=%0d expected %0d", k, o, tw[k], m); end
        checks++;
        if (e > 0.37) begin failures++; $display("FAIL note %0d oct %0d: error %f Hz", k, o, e); end
        for (int j = 0; j < N; j++) if (j != k) begin
          checks++;
          if (tw[j] != '0) begin failures++; $display("FAIL released key %0d has M=%0d", j, tw[j]); end
        end
        checks++;
        if (pulses != p0 + 1) begin failures++; $display("FAIL reset_envelope pulses %0d", pulses - p0); end
        @(negedge clk); keys = '0;
        repeat (D + 5) @(negedge clk);
        checks++;
        if (tw != '0) begin failures++; $display("FAIL key release"); end
      end
    end
    $display("mean error %f Hz, max error %f Hz", err_sum / err_n, err_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
