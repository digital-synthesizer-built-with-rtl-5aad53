// tb_adsr_shifter: checks the arithmetic right shift by 16 - magnitude for
// random samples and every magnitude, including magnitude 0 (silence).
`timescale 1ns / 1ps
module tb_adsr_shifter;
  logic [15:0] sin_v, sout;
  logic [4:0]  mag;
  int checks = 0, failures = 0;

  adsr_shifter dut (.sample_in(sin_v), .magnitude(mag), .sample_out(sout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int s, exp;
      sin_v = (i < 4) ? (i[0] ? 16'h8000 : 16'h7fff) : 16'($urandom);
      mag   = 5'(i % 17);
      #1;
      s = int'($signed(sin_v));
      if (mag == 0) exp = 0;
      else begin
        exp = s;
        for (int k = 0; k < 16 - int'(mag); k++) exp = (exp < 0) ? -((-exp + 1) / 2) : exp / 2;
      end
      checks++;
      if (int'($signed(sout)) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL in %0d mag %0d: got %0d expected %0d", s, mag, $signed(sout), exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
