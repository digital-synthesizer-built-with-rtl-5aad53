// tb_control_module: after each ready pulse, checks sel_angle cycle by
// cycle (0 one clock after ready, each key held two clocks, then parked at
// N_NOTES) and that read_value is high in every second clock starting
// two clocks after ready.
`timescale 1ns / 1ps
module tb_control_module;
  localparam int N = 7;
  logic clk = 1'b0, rst = 1'b1, ready = 1'b0;
  logic [2:0] sel;
  logic rv;
  int checks = 0, failures = 0;

  control_module #(.N_NOTES(N)) dut (.clk(clk), .rst(rst), .ready(ready), .sel_angle(sel), .read_value(rv));

  always #5 clk = ~clk;

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
    @(posedge clk); #1;
    checks++;
    if (sel != 3'(N)) begin failures++; $display("FAIL parked after reset: %0d", sel); end
    for (int s = 0; s < 50; s++) begin
      int gap;
      gap = 2 * N + 4 + int'($urandom % 30);
      @(negedge clk); ready = 1'b1;
      @(negedge clk); ready = 1'b0;
      // now in cycle r+1
      for (int c = 1; c < gap; c++) begin
        int exp_sel;
        exp_sel = (c - 1) / 2;
        if (exp_sel > N) exp_sel = N;
        checks++;
        if (int'(sel) != exp_sel) begin
          failures++;
          if (failures < 10) $display("FAIL cycle r+%0d sel %0d expected %0d", c, sel, exp_sel);
        end
        checks++;
        if (rv != (c % 2 == 0)) begin
          failures++;
          if (failures < 10) $display("FAIL cycle r+%0d read_value %b", c, rv);
        end
        if (c < gap - 1) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
