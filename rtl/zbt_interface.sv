// zbt_interface: the recorder. Stores the synthesizer's output in two ZBT
// SRAMs used one after the other, and plays it back.
//
// Record mode: one sample per ready, taken one clock after ready so that
// sample_in holds the sample just sent to the codec. It is written to RAM
// w_sel at w_index, and w_index advances. When w_index reaches
// MAX_RAM_ADDRESS the write moves to the start of the second RAM (mem1_full)
// or, if that was the second RAM, recording stops (mem2_full). The write
// position is kept when record mode is left, so a new recording continues
// the old one; clear_recording sets it back to the start of the first RAM.
//
// Playback mode: on each ready, the sample at (r_sel, r_index) is read and,
// when it returns, shown on mem_value for the mixer; the read position
// then advances, crossing to the second RAM the same way. Entering playback
// mode restarts the read position at the beginning.
//
// All of the above follows the source design. This design's choices:
// separate RAM selects for reading and writing (the source names a single
// ram_select); playback stops at the end of the recording, where mem_value
// becomes 0; the sample is stored in the low 16 bits of the RAM word.
module zbt_interface
  import synth_pkg::*;
#(
  parameter int unsigned ADDR_W          = 19,
  parameter int unsigned DATA_W          = 36,
  parameter logic [ADDR_W-1:0] MAX_RAM_ADDRESS = '1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ready,
  input  mode_e             mode,
  input  logic              clear_recording,
  input  sample_t           sample_in,      // mixer output
  output sample_t           mem_value,      // sample to the mixer
  // one request port per RAM driver
  output logic [1:0]        req,
  output logic              we,
  output logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] wdata,
  input  logic [DATA_W-1:0] rdata     [2],
  input  logic [1:0]        read_valid,
  // state
  output logic [ADDR_W-1:0] w_index,
  output logic [ADDR_W-1:0] r_index,
  output logic              mem1_full,
  output logic              mem2_full
);

  logic  w_sel, r_sel;
  logic  ready_d;
  mode_e mode_q;
  logic  r_done;       // the last word of the second RAM has been read
  logic  track_left;   // recorded samples remain ahead of the read position

  assign track_left = !r_done && (({r_sel, r_index} < {w_sel, w_index}) || mem2_full);

  always_ff @(posedge clk) begin
    if (rst) begin
      ready_d   <= 1'b0;
      mode_q    <= MODE_PLAY;
      w_sel     <= 1'b0;
      w_index   <= '0;
      r_sel     <= 1'b0;
      r_index   <= '0;
      r_done    <= 1'b0;
      mem1_full <= 1'b0;
      mem2_full <= 1'b0;
      mem_value <= '0;
      req       <= '0;
      we        <= 1'b0;
      addr      <= '0;
      wdata     <= '0;
    end else begin
      ready_d <= ready;
      mode_q  <= mode;
      req     <= '0;
      we      <= 1'b0;

      if (mode == MODE_PLAYBACK && mode_q != MODE_PLAYBACK) begin
        r_sel   <= 1'b0;
        r_index <= '0;
        r_done  <= 1'b0;
      end

      if (clear_recording) begin
        w_sel     <= 1'b0;
        w_index   <= '0;
        mem1_full <= 1'b0;
        mem2_full <= 1'b0;
      end else if (ready_d && mode == MODE_RECORD && !mem2_full) begin
        req[w_sel] <= 1'b1;
        we         <= 1'b1;
        addr       <= w_index;
        wdata      <= DATA_W'(sample_in);
        if (w_index == MAX_RAM_ADDRESS) begin
          w_index <= '0;
          if (w_sel) begin
            mem2_full <= 1'b1;
          end else begin
            w_sel     <= 1'b1;
            mem1_full <= 1'b1;
          end
        end else begin
          w_index <= w_index + 1'b1;
        end
      end

      if (ready && mode == MODE_PLAYBACK && mode_q == MODE_PLAYBACK) begin
        if (track_left) begin
          req[r_sel] <= 1'b1;
          addr       <= r_index;
          if (r_index == MAX_RAM_ADDRESS) begin
            r_index <= '0;
            if (r_sel) r_done <= 1'b1;
            else       r_sel  <= 1'b1;
          end else begin
            r_index <= r_index + 1'b1;
          end
        end else begin
          mem_value <= '0;
        end
      end

      if (read_valid[0])      mem_value <= rdata[0][SAMPLE_W-1:0];
      else if (read_valid[1]) mem_value <= rdata[1][SAMPLE_W-1:0];
    end
  end

endmodule
