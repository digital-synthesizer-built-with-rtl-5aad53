// tb_adsr_controller: restarts envelopes and compares the selected key's
// magnitude, every clock, with a piecewise model of the envelope written
// from its definition (attack 16 steps of tA/16, decay to m_S in steps of
// tD/(16-m_S), sustain tS, release m_S steps of tR/m_S), for each sustain
// level. Quarter seconds are scaled to 64 clocks. Also checks that a key
// pressed again mid-envelope starts over and that other keys stay silent.
`timescale 1ns / 1ps
module tb_adsr_controller;
  import synth_pkg::*;
  localparam int N = 7;
  localparam int Q = 64;
  logic clk = 1'b0, rst = 1'b1;
  logic [N-1:0] renv = '0;
  logic [3:0] ta = 4'd2, td = 4'd1, ts = 4'd1, tr = 4'd3;
  logic [1:0] ssel = '0;
  logic [2:0] sel = '0;
  logic [4:0] mag;
  int checks = 0, failures = 0;
  int seen_attack = 0, seen_decay = 0, seen_release = 0;

  adsr_controller #(.N_NOTES(N), .CYCLES_PER_QUARTER(Q)) dut (
    .clk(clk), .rst(rst), .reset_envelope(renv), .t_attack(ta), .t_decay(td),
    .t_sustain(ts), .t_release(tr), .sustain_sel(ssel), .sel_angle(sel), .magnitude(mag));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // magnitude j clocks after the restart
  function automatic int model(int j, int ms);
    int pa, pd, pr, j1, j2;
    pa = (int'(ta) * Q) / 16;
    pd = (ms == 16) ? 1 : (int'(td) * Q) / (16 - ms);
    pr = (int'(tr) * Q) / ms;
    if (j < 0) return 0;
    if (j <= 16 * pa) return j / pa;
    j1 = 16 * pa + ((ms == 16) ? 0 : (16 - ms) * pd);
    if (j <= j1) return 16 - (j - 16 * pa) / pd;
    j2 = j1 + int'(ts) * Q;
    if (j <= j2) return ms;
    if (j <= j2 + ms * pr) return ms - (j - j2) / pr;
    return 0;
  endfunction

  initial begin
    int msv [4] = '{16, 14, 12, 8};
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int s = 0; s < 4; s++) begin
      int k, ms, total;
      k = s + 1; ms = msv[s]; ssel = 2'(s);
      sel = 3'(k);
      @(negedge clk);
      checks++;
      if (mag != '0) begin failures++; $display("FAIL untouched key %0d magnitude %0d", k, mag); end
      renv[k] = 1'b1;
      @(negedge clk);
      renv[k] = 1'b0;
      total = 16 * 8 + 200 + 64 + 3 * 64 + 20;
      for (int j = 0; j < total; j++) begin
        int exp;
        // output is the state two clocks back
        exp = model(j - 2, ms);
        checks++;
        if (int'(mag) != exp) begin
          failures++;
          if (failures < 10) $display("FAIL m_S=%0d t=%0d magnitude %0d expected %0d", ms, j, mag, exp);
        end
        if (j > 2 && exp > 0 && exp < 16 && model(j - 3, ms) < exp) seen_attack++;
        if (j > 2 && model(j - 3, ms) > exp && exp >= ms && ms < 16) seen_decay++;
        if (j > 2 && model(j - 3, ms) > exp && exp < ms) seen_release++;
        // restart test on the last run: press again in sustain
        @(negedge clk);
      end
    end
    // re-press mid-envelope
    ssel = 2'd2;
    sel = 3'd6;
    @(negedge clk); renv[6] = 1'b1; @(negedge clk); renv[6] = 1'b0;
    repeat (100) @(negedge clk);
    renv[6] = 1'b1; @(negedge clk); renv[6] = 1'b0;
    for (int j = 0; j < 60; j++) begin
      // the first two outputs still show the pre-restart magnitude
      if (j < 2) begin @(negedge clk); continue; end
      checks++;
      if (int'(mag) != model(j - 2, 12)) begin
        failures++;
        if (failures < 20) $display("FAIL restart t=%0d magnitude %0d expected %0d", j, mag, model(j - 2, 12));
      end
      @(negedge clk);
    end
    $display("steps seen: attack %0d decay %0d release %0d", seen_attack, seen_decay, seen_release);
    checks++;
    if (seen_attack == 0 || seen_decay == 0 || seen_release == 0) begin failures++; $display("FAIL a phase never ran"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
