// tb_wave_table: reads every word of the quarter-wave ROM and compares it
// with 32767 * sin(2*pi*i/65536) rounded; checks the one-cycle read
// latency, the endpoints and that the table rises monotonically.
`timescale 1ns / 1ps
module tb_wave_table;
  logic        clk = 1'b0;
  logic [13:0] addr = '0;
  logic [15:0] data;
  int checks = 0, failures = 0;
  real pi = 3.14159265358979323846;
  logic [15:0] prev = '0;

  wave_table dut (.clk(clk), .addr(addr), .data(data));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16384; i++) begin
      int exp;
      @(negedge clk);
      addr = 14'(i);
      @(posedge clk); #1;
      exp = int'(32767.0 * $sin(2.0 * pi * real'(i) / 65536.0));  // int'() rounds
      checks++;
      if (int'(data) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d: got %0d expected %0d", i, data, exp);
      end
      checks++;
      if (data < prev) begin
        failures++;
        $display("FAIL not monotonic at %0d", i);
      end
      prev = data;
    end
    checks++;
    if (prev != 16'd32767) begin failures++; $display("FAIL peak %0d", prev); end
    // latency: the output must not change in the same cycle as the address
    @(negedge clk); addr = 14'd0; #1;
    checks++;
    if (data != 16'd32767) begin failures++; $display("FAIL read was not registered"); end
    @(posedge clk); #1;
    checks++;
    if (data != 16'd0) begin failures++; $display("FAIL addr 0 got %0d", data); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
