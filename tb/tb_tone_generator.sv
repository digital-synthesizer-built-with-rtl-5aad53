// tb_tone_generator: drives random tuning words, ready pulses and a
// sel_angle sweep, keeps its own phase per key, and checks that each
// key's sample appears two clocks after it is selected and equals
// round(32767 * sin(2*pi*phase/65536)); selections at or above N_NOTES
// must give 0.
`timescale 1ns / 1ps
module tb_tone_generator;
  import synth_pkg::*;
  localparam int N = 7;
  logic clk = 1'b0, rst = 1'b1, ready = 1'b0;
  tword_t [N-1:0] tw;
  logic [2:0] sel = 3'd7;
  sample_t wave;
  int checks = 0, failures = 0;
  real pi = 3.14159265358979323846;
  logic [15:0] phase [N];

  tone_generator #(.N_NOTES(N)) dut (
    .clk(clk), .rst(rst), .ready(ready), .tuning_words(tw), .sel_angle(sel), .wave_value(wave));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    // back-to-back selections, one key per clock: each sample must come
    // out exactly two clocks after its selection
    begin
      int hist [$];
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        sel = 3'($urandom % (N + 1));
        hist.push_back(int'(sel));
        if (hist.size() > 2) begin
          int k;
          k = hist.pop_front();
          checks++;
          if (int'($signed(wave)) != ((k < N) ? expect_of(phase[k]) : 0)) begin
            failures++;
            if (failures < 10) $display("FAIL back-to-back key %0d: got %0d", k, $signed(wave));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_of(logic [15:0] ph);
    return int'(32767.0 * $sin(2.0 * pi * real'(ph) / 65536.0));
  endfunction

  initial begin
    for (int k = 0; k < N; k++) begin phase[k] = '0; tw[k] = '0; end
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int s = 0; s < 400; s++) begin
      @(negedge clk);
      for (int k = 0; k < N; k++) begin
        tw[k] = (s < 8) ? 11'(k * 293) : 11'($urandom);
        if ($urandom % 5 == 0) tw[k] = '0;
      end
      ready = 1'b1;
      @(negedge clk);
      ready = 1'b0;
      for (int k = 0; k < N; k++) phase[k] = phase[k] + 16'(tw[k]);
      for (int k = 0; k <= N; k++) begin
        sel = 3'(k);
        @(negedge clk);
        @(negedge clk);
        // two clocks after selecting key k its sample is on the output
        checks++;
        if (k < N && int'($signed(wave)) != expect_of(phase[k])) begin
          failures++;
          if (failures < 10)
            $display("FAIL key %0d phase %h: got %0d expected %0d", k, phase[k], $signed(wave), expect_of(phase[k]));
        end
        if (k == N && wave != '0) begin
          failures++;
          $display("FAIL input N gave %0d", wave);
        end
      end
      @(negedge clk); @(negedge clk);
      checks++;
      if (wave != '0) begin failures++; $display("FAIL parked selection gave %0d", wave); end
    end
    // back-to-back selections, one key per clock: each sample must come
    // out exactly two clocks after its selection
    begin
      int hist [$];
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        sel = 3'($urandom % (N + 1));
        hist.push_back(int'(sel));
        if (hist.size() > 2) begin
          int k;
          k = hist.pop_front();
          checks++;
          if (int'($signed(wave)) != ((k < N) ? expect_of(phase[k]) : 0)) begin
            failures++;
            if (failures < 10) $display("FAIL back-to-back key %0d: got %0d", k, $signed(wave));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
