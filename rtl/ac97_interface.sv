// ac97_interface: AC-link frame builder for an LM4550-class AC97 codec.
//
// The codec supplies the 12.288 MHz bit clock. Every 256 bit clocks
// (48 kHz) this module sends one frame on sdata_out, most significant bit
// first, with sync high for the 16 bits of slot 0:
//   slot 0 (16 bits): tag - frame valid, slots 1..4 valid
//   slot 1 (20 bits): command address - write, register index
//   slot 2 (20 bits): command data, 16 bits left-aligned
//   slot 3 / slot 4 (20 bits each): left / right PCM sample
//   slots 5..12: zero
// The 16-bit mixer sample goes to both channels, padded with four zero
// least-significant bits to the codec's 20 bits (as in the source design).
// Slots 1 and 2 cycle through a fixed list of codec register writes, one
// per frame, that set the output volumes to 0 dB and unmute them; the
// source design says the module sets the codec's registers but not which,
// so the list is this design's choice.
//
// sync and sdata_out change on the rising edge of bit_clk (the codec
// samples them on the falling edge); sync rises one bit clock before the
// first tag bit. The sample is latched at the frame boundary. A toggle at
// each frame boundary crosses into the system clock domain through a
// three-flop synchroniser; each change gives a one-cycle ready pulse on
// clk, the 48 kHz sample strobe for the rest of the synthesizer.
// ac97_reset_b is the registered inverse of rst, so the codec is held in
// reset (and its bit clock stopped) while the design is.
module ac97_interface
  import synth_pkg::*;
(
  input  logic    clk,          // system clock
  input  logic    rst,          // synchronous to clk, active high
  input  sample_t sample_in,    // mixer output, stable between ready pulses
  output logic    ready,        // one clk cycle per AC97 frame
  input  logic    ac97_bit_clk,
  output logic    ac97_sync,
  output logic    ac97_sdata_out,
  output logic    ac97_reset_b
);

  localparam int unsigned N_CMDS    = 4;
  localparam int unsigned FRAME_USE = 96;  // slots 0..4

  // {register index, data}
  localparam logic [6:0]  CMD_REG  [N_CMDS] = '{7'h02, 7'h04, 7'h18, 7'h1a};
  localparam logic [15:0] CMD_DATA [N_CMDS] = '{16'h0000, 16'h0000, 16'h0808, 16'h0000};

  // ---------------- bit-clock domain ----------------
  logic [7:0]           bit_count;
  logic [FRAME_USE-1:0] shreg;
  logic [1:0]           cmd_idx;
  logic                 frame_toggle;
  logic                 rst_bc_0, rst_bc;    // reset synchronised to bit_clk

  logic [FRAME_USE-1:0] next_frame;
  logic [19:0]          pcm20;

  always_comb begin
    pcm20      = {sample_in, 4'h0};
    next_frame = {
      16'b1111_1000_0000_0000,                 // tag: valid, slots 1-4
      1'b0, CMD_REG[cmd_idx], 12'h000,         // slot 1: write, index
      CMD_DATA[cmd_idx], 4'h0,                 // slot 2: data
      pcm20,                                   // slot 3: left
      pcm20                                    // slot 4: right
    };
  end

  always_ff @(posedge ac97_bit_clk) begin
    rst_bc_0 <= rst;
    rst_bc   <= rst_bc_0;
  end

  always_ff @(posedge ac97_bit_clk) begin
    if (rst_bc) begin
      bit_count      <= '0;
      shreg          <= '0;
      cmd_idx        <= '0;
      frame_toggle   <= 1'b0;
      ac97_sync      <= 1'b0;
      ac97_sdata_out <= 1'b0;
    end else begin
      bit_count <= bit_count + 1'b1;
      if (bit_count == 8'd255) ac97_sync <= 1'b1;
      else if (bit_count == 8'd15) ac97_sync <= 1'b0;

      if (bit_count == 8'd255) begin
        shreg        <= next_frame;
        cmd_idx      <= (cmd_idx == 2'(N_CMDS - 1)) ? '0 : cmd_idx + 1'b1;
        frame_toggle <= ~frame_toggle;
        ac97_sdata_out <= 1'b0;
      end else if (bit_count < 8'(FRAME_USE)) begin
        ac97_sdata_out <= shreg[FRAME_USE-1];
        shreg          <= {shreg[FRAME_USE-2:0], 1'b0};
      end else begin
        ac97_sdata_out <= 1'b0;
      end
    end
  end

  // ---------------- system-clock domain ----------------
  logic [2:0] toggle_sync;

  always_ff @(posedge clk) begin
    if (rst) begin
      toggle_sync  <= '0;
      ready        <= 1'b0;
      ac97_reset_b <= 1'b0;
    end else begin
      toggle_sync  <= {toggle_sync[1:0], frame_toggle};
      ready        <= toggle_sync[2] ^ toggle_sync[1];
      ac97_reset_b <= 1'b1;
    end
  end

endmodule
