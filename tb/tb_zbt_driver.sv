// tb_zbt_driver: connects the driver to a behavioural pipelined ZBT SRAM,
// issues back-to-back random writes and reads, and checks that every read
// returns the last data written to its address, exactly four clocks after
// the request (read_valid), and that write data reaches the RAM.
`timescale 1ns / 1ps
module tb_zbt_driver;
  localparam int AW = 6, DW = 36;
  logic clk = 1'b0, rst = 1'b1;
  logic req = 1'b0, we = 1'b0;
  logic [AW-1:0] addr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic read_valid;
  logic [AW-1:0] ram_addr;
  logic ram_we_b, ram_cen_b, ram_adv_ld, ram_dq_oe;
  logic [3:0] ram_bwe_b;
  logic [DW-1:0] ram_dq_o, ram_dq_i;
  int writes;
  int checks = 0, failures = 0;

  zbt_driver #(.ADDR_W(AW), .DATA_W(DW)) dut (
    .clk(clk), .rst(rst), .req(req), .we(we), .addr(addr), .wdata(wdata),
    .rdata(rdata), .read_valid(read_valid), .ram_addr(ram_addr), .ram_we_b(ram_we_b),
    .ram_cen_b(ram_cen_b), .ram_adv_ld(ram_adv_ld), .ram_bwe_b(ram_bwe_b),
    .ram_dq_o(ram_dq_o), .ram_dq_oe(ram_dq_oe), .ram_dq_i(ram_dq_i));

  zbt_sram_model #(.ADDR_W(AW), .DATA_W(DW)) ram (
    .clk(clk), .addr(ram_addr), .we_b(ram_we_b), .cen_b(ram_cen_b),
    .dq_i(ram_dq_o), .dq_oe(ram_dq_oe), .dq_o(ram_dq_i), .writes(writes));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] shadow [1 << AW];
  logic [DW-1:0] expq [$];
  int            cyc = 0;
  int            dueq [$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (read_valid && !rst) begin
      logic [DW-1:0] e;
      int d;
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected read_valid"); end
      else begin
        e = expq.pop_front();
        d = dueq.pop_front();
        if (rdata != e || cyc != d) begin
          failures++;
          if (failures < 10) $display("FAIL read got %h at %0d expected %h at %0d", rdata, cyc, e, d);
        end
      end
    end
  end

  initial begin
    int nw;
    for (int i = 0; i < (1 << AW); i++) shadow[i] = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    nw = writes;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      req   = ($urandom % 4) != 0;
      we    = (i < 64) ? 1'b1 : ($urandom % 2 == 0);
      addr  = (i < 64) ? AW'(i) : AW'($urandom);
      wdata = {4'($urandom), 32'($urandom)};
      if (req && we) begin shadow[addr] = wdata; nw++; end
      if (req && !we) begin expq.push_back(shadow[addr]); dueq.push_back(cyc + 4); end
    end
    @(negedge clk); req = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d reads never returned", expq.size()); end
    checks++;
    if (writes != nw) begin failures++; $display("FAIL RAM saw %0d writes, expected %0d", writes, nw); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
