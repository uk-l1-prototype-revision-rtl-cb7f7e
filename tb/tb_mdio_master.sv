// tb_mdio_master: checks the PHY management master against a behavioural PHY.
// With CLK_DIV = 2 (MDC = clk/4) it checks: the MDC period; that the first
// frame writes 0x2100 into PHY register 0; that registers 0, 16 and 1 are
// then read in turn, appear on reg0/reg16/reg1 and set 'ready' after the
// first round; that a later change of a PHY register shows after the next
// round; that the master never drives the line while the PHY does; and that
// a round of three reads takes 3 x 64 MDC periods.
module tb_mdio_master;
  localparam int DIV = 2;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic mdc, mdio_o, mdio_oe, phy_oe, phy_o, line, ready;
  logic [15:0] reg0, reg16, reg1;
  assign line = mdio_oe ? mdio_o : (phy_oe ? phy_o : 1'b1);

  mdio_master #(.CLK_DIV(DIV), .PHY_ADDR(5'd0), .BMCR_VALUE(16'h2100)) dut (
    .clk, .rst, .mdc, .mdio_o, .mdio_oe, .mdio_i(line), .reg0, .reg16, .reg1, .ready);
  mdio_phy_model #(.PHY_ADDR(5'd0)) phy (.mdc, .line, .drv_oe(phy_oe), .drv_o(phy_o));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int conflicts = 0;
  always @(posedge clk) if (mdio_oe && phy_oe) conflicts++;

  int t0, t1, r0;
  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // MDC period
    @(posedge mdc); t0 = $time; @(posedge mdc); t1 = $time;
    chk(t1 - t0 == 10 * 2 * DIV, "MDC period is 2*CLK_DIV clocks");
    wait (ready);
    #1;
    chk(phy.writes == 1 && phy.regs[0] == 16'h2100, "control register written once with 0x2100");
    chk(phy.reads == 3, "three reads in the first round");
    chk(reg0 == 16'h2100 && reg16 == 16'h0010 && reg1 == 16'h7809, "read values");
    // one more round, timed
    r0 = phy.reads;
    t0 = $time;
    phy.regs[1] = 16'h780D;
    phy.regs[16] = 16'h4321;
    wait (phy.reads == r0 + 3);
    @(posedge ready or negedge ready or reg1);
    #1;
    chk(reg1 == 16'h780D && reg16 == 16'h4321 && reg0 == 16'h2100, "updated values after the next round");
    t1 = $time;
    chk((t1 - t0) / (10 * 2 * DIV) >= 3 * 64 - 2 && (t1 - t0) / (10 * 2 * DIV) <= 3 * 64 + 2,
        $sformatf("a round takes 3 x 64 MDC periods (%0d)", (t1 - t0) / (10 * 2 * DIV)));
    chk(phy.writes == 1, "no further writes");
    chk(conflicts == 0, "no bus conflict");
    chk(ready, "ready stays set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
