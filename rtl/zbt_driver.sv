// zbt_driver: request-level port for one pipelined ZBT SRAM.
//
// A zero-bus-turnaround SRAM takes the address and write enable on one
// clock edge and the write data two edges later; read data comes back two
// edges after the address. This driver registers each request onto the
// RAM pins and delays the write data to match, so the user only presents
// address, write enable and data in one cycle. The source design says its
// drivers set up this address-to-data delay; the request interface, the
// all-registered pins and the read_valid flag are this design's choice.
// The bidirectional data bus is split into dq_o / dq_oe / dq_i; the board
// level joins them with a tristate buffer. The chip enable, byte-write and
// address-advance pins are held active (single accesses, all bytes).
//
// Timing, request in cycle c: address and we_b on the pins from cycle
// c+1, write data driven in cycle c+3 (sampled by the RAM at the end of
// it), read data captured at the end of cycle c+3 and presented with
// read_valid in cycle c+4. One request may be issued every cycle.
module zbt_driver #(
  parameter int unsigned ADDR_W = 19,
  parameter int unsigned DATA_W = 36
) (
  input  logic              clk,
  input  logic              rst,
  // request side
  input  logic              req,        // start an access this cycle
  input  logic              we,         // 1 = write, 0 = read
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  output logic              read_valid,
  // RAM pins
  output logic [ADDR_W-1:0] ram_addr,
  output logic              ram_we_b,
  output logic              ram_cen_b,
  output logic              ram_adv_ld,
  output logic [3:0]        ram_bwe_b,
  output logic [DATA_W-1:0] ram_dq_o,
  output logic              ram_dq_oe,
  input  logic [DATA_W-1:0] ram_dq_i
);

  logic [DATA_W-1:0] wdata_1, wdata_2;
  logic              wr_1, wr_2, rd_1, rd_2, rd_3;

  assign ram_cen_b  = 1'b0;
  assign ram_adv_ld = 1'b0;
  assign ram_bwe_b  = 4'b0000;

  always_ff @(posedge clk) begin
    if (rst) begin
      ram_addr   <= '0;
      ram_we_b   <= 1'b1;
      wdata_1    <= '0;
      wdata_2    <= '0;
      wr_1       <= 1'b0;
      wr_2       <= 1'b0;
      rd_1       <= 1'b0;
      rd_2       <= 1'b0;
      rd_3       <= 1'b0;
      ram_dq_o   <= '0;
      ram_dq_oe  <= 1'b0;
      rdata      <= '0;
      read_valid <= 1'b0;
    end else begin
      ram_addr  <= addr;
      ram_we_b  <= ~(req && we);
      wdata_1   <= wdata;
      wr_1      <= req && we;
      rd_1      <= req && !we;
      wdata_2   <= wdata_1;
      wr_2      <= wr_1;
      rd_2      <= rd_1;
      ram_dq_o  <= wdata_2;
      ram_dq_oe <= wr_2;
      rd_3      <= rd_2;
      read_valid <= rd_3;
      if (rd_3) rdata <= ram_dq_i;
    end
  end

endmodule
