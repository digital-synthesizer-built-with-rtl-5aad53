// ac97_codec_model: behavioural model of the AC-link side of an AC97
// codec, for simulation only (not part of the design).
//
// While reset_b is high it runs a 12.288 MHz bit clock. It samples sync
// and sdata on the falling edge; a rising sync marks a frame, whose 256
// bits follow starting with the next falling edge. For each frame it
// reports the tag, the command address and data slots, the left and right
// 20-bit samples, the number of bit clocks sync stayed high, and a frame
// count.
`timescale 1ns / 1ps
module ac97_codec_model (
  input  logic        reset_b,
  output logic        bit_clk,
  input  logic        sync,
  input  logic        sdata,
  output int          frames,
  output logic [15:0] tag,
  output logic [19:0] cmd_addr,
  output logic [19:0] cmd_data,
  output logic [19:0] left,
  output logic [19:0] right,
  output int          sync_len
);

  logic [255:0] bits;
  int           pos;
  int           sync_cnt;
  logic         sync_q;

  initial begin
    bit_clk  = 1'b0;
    frames   = 0;
    pos      = -1;
    sync_q   = 1'b0;
    sync_cnt = 0;
    sync_len = 0;
    tag = '0; cmd_addr = '0; cmd_data = '0; left = '0; right = '0;
    bits = '0;
    forever begin
      #40.690;
      bit_clk = reset_b ? ~bit_clk : 1'b0;
    end
  end

  always @(negedge bit_clk) begin
    if (sync) sync_cnt = sync_cnt + 1;
    if (sync && !sync_q) begin
      if (pos >= 0) sync_len = 0;
      pos      = 0;
      sync_cnt = 1;
    end else if (pos >= 0 && pos < 256) begin
      bits[255 - pos] = sdata;
      pos = pos + 1;
      if (pos == 17) sync_len = sync_cnt;
      if (pos == 96) begin
        tag      = bits[255 -: 16];
        cmd_addr = bits[239 -: 20];
        cmd_data = bits[219 -: 20];
        left     = bits[199 -: 20];
        right    = bits[179 -: 20];
        frames   = frames + 1;
      end
    end
    sync_q = sync;
  end

endmodule
