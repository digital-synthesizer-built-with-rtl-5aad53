// debouncer: cleans up one mechanical pushbutton.
//
// The raw input is first passed through two flip-flops (it is asynchronous
// to the clock). The output changes only after the synchronised input has
// held a new value for DEBOUNCE_CYCLES consecutive clocks; any bounce
// restarts the count. The source design debounces its keys but does not
// say how; this counter and its default of 10 ms at 27 MHz are this
// design's choice. Output latency: DEBOUNCE_CYCLES + 2 clocks.
module debouncer #(
  parameter int unsigned DEBOUNCE_CYCLES = 270_000
) (
  input  logic clk,
  input  logic rst,
  input  logic noisy,
  output logic clean
);

  localparam int unsigned CNT_W = $clog2(DEBOUNCE_CYCLES + 1);

  logic             sync_0, sync_1;
  logic [CNT_W-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync_0 <= 1'b0;
      sync_1 <= 1'b0;
      count  <= '0;
      clean  <= 1'b0;
    end else begin
      sync_0 <= noisy;
      sync_1 <= sync_0;
      if (sync_1 == clean) begin
        count <= '0;
      end else if (count == CNT_W'(DEBOUNCE_CYCLES - 1)) begin
        count <= '0;
        clean <= sync_1;
      end else begin
        count <= count + 1'b1;
      end
    end
  end

endmodule
