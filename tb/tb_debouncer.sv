// tb_debouncer: drives a bouncing input and checks that the output follows
// only after the input has been stable for DEBOUNCE_CYCLES clocks (plus the
// two-flop synchroniser), and never follows shorter glitches.
`timescale 1ns / 1ps
module tb_debouncer;
  localparam int D = 20;
  logic clk = 1'b0, rst = 1'b1, noisy = 1'b0, clean;
  int checks = 0, failures = 0, rejected = 0;

  debouncer #(.DEBOUNCE_CYCLES(D)) dut (.clk(clk), .rst(rst), .noisy(noisy), .clean(clean));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic level;
    level = 1'b0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 40; t++) begin
      // bounce: short pulses of the new level, each shorter than D
      for (int b = 0; b < 4; b++) begin
        int len;
        len = 1 + int'($urandom % (D - 3));
        @(negedge clk); noisy = ~level;
        repeat (len) begin
          @(negedge clk);
          checks++;
          if (clean != level) begin failures++; $display("FAIL followed a glitch"); end
        end
        noisy = level;
        repeat (3) @(negedge clk);
        rejected++;
      end
      // settle on the new level and time the output
      noisy = ~level;
      for (int c = 1; c <= D + 4; c++) begin
        @(negedge clk);
        checks++;
        if (clean != ((c >= D + 2) ? ~level : level)) begin
          failures++;
          if (failures < 10) $display("FAIL toggle %0d cycle %0d clean %b", t, c, clean);
        end
      end
      level = ~level;
    end
    $display("glitches rejected=%0d", rejected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
