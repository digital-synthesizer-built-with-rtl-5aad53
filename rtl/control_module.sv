// control_module: sequences the serial wave-table lookups after each
// audio sample pulse.
//
// On ready the phase accumulators step; their new angles are visible one
// clock later. The module therefore sets sel_angle to 0 one clock after ready
// and advances it by one every two clocks until it reaches
// N_NOTES, where it stays until the next ready (the note mux reads zero
// there). read_value is cleared by ready and then toggles every clock, so
// it is high in every second cycle: with the tone generator's two-cycle
// latency it is high exactly once, in the second cycle, of each
// two-cycle window in which a key's sample is stable. The one-cycle delay,
// two cycles per key and the toggling read_value follow the source design;
// the exact phase of read_value is this design's choice, matched to the
// tone generator latency.
//
// Timing, with ready high in cycle r: sel_angle = k in cycles
// r+1+2k and r+2+2k; read_value high in cycles r+2, r+4, ...
module control_module #(
  parameter int unsigned N_NOTES = 7,
  parameter int unsigned SEL_W   = $clog2(N_NOTES + 1)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ready,
  output logic [SEL_W-1:0] sel_angle,
  output logic             read_value
);

  logic hold;  // second of the two cycles spent on the current key

  always_ff @(posedge clk) begin
    if (rst) begin
      sel_angle  <= SEL_W'(N_NOTES);
      hold       <= 1'b0;
      read_value <= 1'b0;
    end else begin
      read_value <= ready ? 1'b0 : ~read_value;
      if (ready) begin
        sel_angle <= '0;      // visible one clock after ready
        hold      <= 1'b0;
      end else if (sel_angle != SEL_W'(N_NOTES)) begin
        hold <= ~hold;
        if (hold) sel_angle <= sel_angle + 1'b1;
      end
    end
  end

endmodule
