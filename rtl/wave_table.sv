// wave_table: quarter-wave sine ROM.
//
// 2^ADDR_W words of DATA_W bits. Entry i holds
//   round((2^(DATA_W-1) - 1) * sin(2*pi*i / 2^(ADDR_W+2)))
// i.e. the first quarter of a sine sampled at 2^(ADDR_W+2) points per
// period; with the source design's 16-bit phase this is 16384 x 16 bits.
// The contents are computed at elaboration instead of being read from a
// file. Read is synchronous: data appears one clock after addr.
module wave_table #(
  parameter int unsigned ADDR_W = 14,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);

  localparam int unsigned DEPTH = 1 << ADDR_W;
  localparam real PI = 3.14159265358979323846;
  localparam real FULL_SCALE = real'((1 << (DATA_W - 1)) - 1);

  logic [DATA_W-1:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      rom[i] = DATA_W'($rtoi(FULL_SCALE * $sin(2.0 * PI * real'(i) / real'(4 * DEPTH)) + 0.5));
    end
  end

  always_ff @(posedge clk) data <= rom[addr];

endmodule
