// tb_angle_correction: for every 16-bit angle, checks that the sine of the
// corrected index, negated when flagged, equals the sine of the angle
// (to well below one 16-bit step), and that the index stays in the
// quarter table.
`timescale 1ns / 1ps
module tb_angle_correction;
  logic [15:0] angle;
  logic [13:0] index;
  logic        negate;
  int checks = 0, failures = 0;
  real pi = 3.14159265358979323846;

  angle_correction dut (.angle(angle), .index(index), .negate(negate));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 65536; a++) begin
      real want, got;
      angle = 16'(a);
      #1;
      want = $sin(2.0 * pi * real'(a) / 65536.0);
      got  = $sin(2.0 * pi * real'(index) / 65536.0);
      if (negate) got = -got;
      checks++;
      if ((want - got) > 1.0e-6 || (got - want) > 1.0e-6) begin
        failures++;
        if (failures < 10) $display("FAIL angle %h: index %h negate %b", a, index, negate);
      end
      checks++;
      if (negate != (a >= 32768) && want != 0.0) begin
        failures++;
        if (failures < 10) $display("FAIL angle %h: sign", a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
