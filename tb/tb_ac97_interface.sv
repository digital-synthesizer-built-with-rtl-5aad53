// tb_ac97_interface: runs the frame builder against a behavioural AC97
// codec and checks, frame by frame: the tag (valid frame, slots 1-4),
// sync high for 16 bit clocks, the command slots cycling through the
// register writes, both PCM slots equal to the sample with four zero LSBs,
// and one ready pulse per frame, 27e6/48e3 = 562.5 system clocks apart.
`timescale 1ns / 1ps
module tb_ac97_interface;
  import synth_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  sample_t sample = '0;
  logic ready, sync, sdata, reset_b, bit_clk;
  int frames, sync_len;
  logic [15:0] tag;
  logic [19:0] cmd_addr, cmd_data, left, right;
  int checks = 0, failures = 0;

  ac97_interface dut (.clk(clk), .rst(rst), .sample_in(sample), .ready(ready),
                      .ac97_bit_clk(bit_clk), .ac97_sync(sync), .ac97_sdata_out(sdata),
                      .ac97_reset_b(reset_b));

  ac97_codec_model codec (.reset_b(reset_b), .bit_clk(bit_clk), .sync(sync), .sdata(sdata),
                          .frames(frames), .tag(tag), .cmd_addr(cmd_addr), .cmd_data(cmd_data),
                          .left(left), .right(right), .sync_len(sync_len));

  always #18.518 clk = ~clk;   // 27 MHz

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count clocks between ready pulses
  int gap = 0, last_gap = 0, readies = 0;
  always @(posedge clk) begin
    gap++;
    if (ready) begin
      last_gap = gap; gap = 0; readies++;
      if (readies > 2) check(last_gap >= 561 && last_gap <= 564, $sformatf("ready spacing %0d", last_gap));
    end
  end

  // new sample just after each ready, as the mixer does
  sample_t sent [$];
  always @(posedge clk) if (ready) begin
    sample <= 16'($urandom);
  end

  logic [6:0] regs_seen [$];
  always @(frames) regs_seen.push_back(cmd_addr[18:12]);

  initial begin
    int f0;
    repeat (10) @(posedge clk);
    rst <= 1'b0;
    wait (frames == 2);
    for (int n = 0; n < 40; n++) begin
      sample_t s_at_boundary;
      f0 = frames;
      // the frame latches the sample at its boundary, which precedes the
      // ready pulse that frame produces; sample it a little after ready
      @(posedge clk iff ready);
      repeat (3) @(posedge clk);
      s_at_boundary = sample;
      wait (frames == f0 + 1);
      wait (frames == f0 + 2);
      check(tag == 16'hf800, $sformatf("tag %h", tag));
      check(sync_len == 16, $sformatf("sync length %0d", sync_len));
      check(left == {s_at_boundary, 4'h0}, $sformatf("left %h sample %h", left, s_at_boundary));
      check(right == left, "right channel");
      check(cmd_addr[19] == 1'b0 && cmd_addr[11:0] == '0, $sformatf("command slot %h", cmd_addr));
    end
    begin
      int n02, n18;
      n02 = 0; n18 = 0;
      foreach (regs_seen[i]) begin
        if (regs_seen[i] == 7'h02) n02++;
        if (regs_seen[i] == 7'h18) n18++;
      end
      check(n02 > 0 && n18 > 0, $sformatf("volume registers written %0d %0d", n02, n18));
    end
    check(readies >= 40, "ready pulses");
    $display("frames=%0d readies=%0d", frames, readies);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
