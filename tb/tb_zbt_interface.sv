// tb_zbt_interface: the recorder with two drivers and two behavioural
// SRAMs of 10 words each (MAX_RAM_ADDRESS = 9). Records a stream of
// samples across the first RAM into the second until both are full,
// checks the RAM contents, that recording stops at mem2_full and resumes
// where it stopped, then plays the track back and checks the samples come
// out in order followed by silence, that re-entering playback restarts
// it, and that clear_recording starts a new recording at address 0.
`timescale 1ns / 1ps
module tb_zbt_interface;
  import synth_pkg::*;
  localparam int AW = 4, DW = 36;
  localparam logic [AW-1:0] MAXA = 4'd9;
  logic clk = 1'b0, rst = 1'b1, ready = 1'b0, clr = 1'b0;
  mode_e mode = MODE_PLAY;
  sample_t sample = '0, mem_value;
  logic [1:0] req, rv;
  logic zwe;
  logic [AW-1:0] zaddr, w_index, r_index;
  logic [DW-1:0] zwdata, rdata [2];
  logic m1, m2;
  logic [AW-1:0] ram_addr [2];
  logic [1:0] ram_we_b, ram_cen_b, ram_adv_ld, ram_dq_oe;
  logic [3:0] ram_bwe_b [2];
  logic [DW-1:0] ram_dq_o [2], ram_dq_i [2];
  int writes [2];
  int checks = 0, failures = 0;

  zbt_interface #(.ADDR_W(AW), .DATA_W(DW), .MAX_RAM_ADDRESS(MAXA)) dut (
    .clk(clk), .rst(rst), .ready(ready), .mode(mode), .clear_recording(clr),
    .sample_in(sample), .mem_value(mem_value), .req(req), .we(zwe), .addr(zaddr),
    .wdata(zwdata), .rdata(rdata), .read_valid(rv), .w_index(w_index), .r_index(r_index),
    .mem1_full(m1), .mem2_full(m2));

  for (genvar m = 0; m < 2; m++) begin : g_ram
    zbt_driver #(.ADDR_W(AW), .DATA_W(DW)) drv (
      .clk(clk), .rst(rst), .req(req[m]), .we(zwe), .addr(zaddr), .wdata(zwdata),
      .rdata(rdata[m]), .read_valid(rv[m]), .ram_addr(ram_addr[m]), .ram_we_b(ram_we_b[m]),
      .ram_cen_b(ram_cen_b[m]), .ram_adv_ld(ram_adv_ld[m]), .ram_bwe_b(ram_bwe_b[m]),
      .ram_dq_o(ram_dq_o[m]), .ram_dq_oe(ram_dq_oe[m]), .ram_dq_i(ram_dq_i[m]));
    zbt_sram_model #(.ADDR_W(AW), .DATA_W(DW)) ram (
      .clk(clk), .addr(ram_addr[m]), .we_b(ram_we_b[m]), .cen_b(ram_cen_b[m]),
      .dq_i(ram_dq_o[m]), .dq_oe(ram_dq_oe[m]), .dq_o(ram_dq_i[m]), .writes(writes[m]));
  end

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    // clearing part-way through a recording also rewinds it
    check(w_index == 4'd3, $sformatf("write position %0d", w_index));
    @(negedge clk); clr = 1'b1; @(negedge clk); clr = 1'b0;
    check(w_index == '0, "clear_recording mid-track");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one sample period: ready, then the mixer's new sample one clock later
  task automatic period(input sample_t next);
    @(negedge clk); ready = 1'b1;
    @(negedge clk); ready = 1'b0; sample = next;
    repeat (14) @(negedge clk);
  endtask

  sample_t track [$];

  initial begin
    int w0 [2];
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    w0[0] = writes[0]; w0[1] = writes[1];
    // record 12 samples, leave record mode, record the rest
    mode = MODE_RECORD;
    for (int i = 0; i < 12; i++) begin
      sample_t s;
      s = 16'($urandom);
      period(s);
      track.push_back(s);
    end
    mode = MODE_PLAY;
    for (int i = 0; i < 3; i++) period(16'hdead);
    check(w_index == 4'd2 && m1 && !m2, $sformatf("position after pause: %0d m1 %b m2 %b", w_index, m1, m2));
    mode = MODE_RECORD;
    for (int i = 0; i < 12; i++) begin
      sample_t s;
      s = 16'($urandom);
      period(s);
      if (track.size() < 20) track.push_back(s);
    end
    check(m1 && m2, "both RAMs full");
    check(writes[0] - w0[0] == 10 && writes[1] - w0[1] == 10,
          $sformatf("writes %0d %0d", writes[0] - w0[0], writes[1] - w0[1]));
    for (int a = 0; a < 10; a++) begin
      check(g_ram[0].ram.peek(AW'(a)) == DW'(track[a]), $sformatf("RAM1[%0d]", a));
      check(g_ram[1].ram.peek(AW'(a)) == DW'(track[10 + a]), $sformatf("RAM2[%0d]", a));
    end
    // playback: the value read at ready n is on mem_value before ready n+1
    mode = MODE_PLAYBACK;
    for (int rep = 0; rep < 2; rep++) begin
      for (int i = 0; i < 22; i++) begin
        period(16'h0);
        check(mem_value == ((i < 20) ? track[i] : 16'h0),
              $sformatf("playback %0d/%0d: %h expected %h", rep, i, mem_value, (i < 20) ? track[i] : 16'h0));
      end
      mode = MODE_PLAY;
      period(16'h0);
      mode = MODE_PLAYBACK;
    end
    // clear and record three new samples over the old track
    mode = MODE_PLAY;
    @(negedge clk); clr = 1'b1; @(negedge clk); clr = 1'b0;
    check(w_index == '0 && !m1 && !m2, "clear_recording");
    mode = MODE_RECORD;
    track.delete();
    for (int i = 0; i < 3; i++) begin
      sample_t s;
      s = 16'($urandom);
      period(s);
      track.push_back(s);
    end
    mode = MODE_PLAY;
    period(16'h0);
    mode = MODE_PLAYBACK;
    for (int i = 0; i < 5; i++) begin
      period(16'h0);
      check(mem_value == ((i < 3) ? track[i] : 16'h0), $sformatf("new track %0d: %h", i, mem_value));
    end
    // clearing part-way through a recording also rewinds it
    check(w_index == 4'd3, $sformatf("write position %0d", w_index));
    @(negedge clk); clr = 1'b1; @(negedge clk); clr = 1'b0;
    check(w_index == '0, "clear_recording mid-track");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
