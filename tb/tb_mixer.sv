// tb_mixer: feeds random two's-complement values with read_value strobes
// and checks each sample period's output against a model of the
// positive-saturating sum; also checks playback pass-through and that the
// sum clears on ready. Counts how often the clamp was exercised.
`timescale 1ns / 1ps
module tb_mixer;
  import synth_pkg::*;
  logic clk = 1'b0, rst = 1'b1, ready = 1'b0, rv = 1'b0;
  mode_e mode = MODE_PLAY;
  sample_t wave = '0, mem = '0, out;
  int checks = 0, failures = 0, clamps = 0;

  mixer dut (.clk(clk), .rst(rst), .ready(ready), .read_value(rv), .mode(mode),
             .wave_value(wave), .mem_value(mem), .sample_out(out));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] model;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int s = 0; s < 500; s++) begin
      logic [15:0] exp_out;
      model = '0;
      mode  = (s % 7 == 3) ? MODE_PLAYBACK : ((s % 2) ? MODE_RECORD : MODE_PLAY);
      mem   = 16'($urandom);
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        rv   = i[0];
        case (s % 3)
          0: wave = 16'($urandom);
          1: wave = 16'($urandom % 16'h3000);           // positive, saturates often
          default: wave = 16'($urandom % 16'h1000) | ((i % 4 == 3) ? 16'h8000 : 16'h0);
        endcase
        if (rv) begin
          if (!model[15] && !wave[15]) begin
            if (17'(model) + 17'(wave) > 17'h7fff) begin model = 16'h7fff; clamps++; end
            else model = model + wave;
          end else model = model + wave;
        end
      end
      @(negedge clk);
      rv = 1'b0;
      @(negedge clk);
      ready = 1'b1;
      exp_out = (mode == MODE_PLAYBACK) ? mem : model;
      @(negedge clk);
      ready = 1'b0;
      checks++;
      if (out != exp_out) begin
        failures++;
        if (failures < 10) $display("FAIL sample %0d mode %0d: got %h expected %h", s, mode, out, exp_out);
      end
    end
    checks++;
    if (clamps == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("clamps=%0d", clamps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
