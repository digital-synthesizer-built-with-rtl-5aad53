// zbt_sram_model: behavioural model of a pipelined ZBT SRAM, for
// simulation only (not synthesizable in general, not part of the design).
//
// Address and write enable are taken at a rising clock edge K (when
// cen_b is low). For a write the data on dq_i is stored at edge K+2; for a
// read the word is driven on dq_o after edge K+1, so the controller can
// capture it at edge K+2. Unwritten words read as 0. writes counts the
// stored words.
module zbt_sram_model #(
  parameter int unsigned ADDR_W = 19,
  parameter int unsigned DATA_W = 36
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we_b,
  input  logic              cen_b,
  input  logic [DATA_W-1:0] dq_i,   // controller's write data
  input  logic              dq_oe,  // controller drives the bus
  output logic [DATA_W-1:0] dq_o,   // read data to the controller
  output int                writes
);

  logic [DATA_W-1:0] mem [logic [ADDR_W-1:0]];

  logic [ADDR_W-1:0] a1 = '0, a2 = '0;
  logic              w1 = 1'b0, w2 = 1'b0, v1 = 1'b0;

  initial begin
    writes = 0;
    dq_o   = '0;
  end

  always @(posedge clk) begin
    a1 <= addr;
    w1 <= !we_b && !cen_b;
    v1 <= !cen_b;
    a2 <= a1;
    w2 <= w1;
    // a write completes before a read in the same cycle (read-after-write
    // forwarding, as the real part does)
    if (w2 && dq_oe) begin  // write data must be on the bus two edges after the address
      mem[a2] = dq_i;
      writes  <= writes + 1;
    end
    if (v1 && !w1) dq_o <= mem.exists(a1) ? mem[a1] : '0;
  end

  function automatic logic [DATA_W-1:0] peek(logic [ADDR_W-1:0] a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

endmodule
