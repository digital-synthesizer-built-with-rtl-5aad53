// tb_phase_accumulator: checks that the phase wheel adds the tuning word
// once per step pulse, wraps modulo 2^16, holds without a step, and shows
// the new angle one clock after the step.
`timescale 1ns / 1ps
module tb_phase_accumulator;
  logic        clk = 1'b0, rst = 1'b1, step = 1'b0;
  logic [10:0] tword = '0;
  logic [15:0] angle;
  int checks = 0, failures = 0;
  logic [15:0] model = '0;

  phase_accumulator dut (.clk(clk), .rst(rst), .step(step), .tword(tword), .angle(angle));

  always #5 clk = ~clk;

  task automatic check(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk); #1;
    check(angle, 16'h0, "reset");
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      tword = 11'($urandom);
      step  = ($urandom % 3) != 0;
      if (i > 1500) tword = 11'h7ff;   // wrap fast
      @(posedge clk); #1;
      if (step) model = model + 16'(tword);
      check(angle, model, "angle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
