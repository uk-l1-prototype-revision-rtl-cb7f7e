// mdio_phy_model: behavioural model of the management side of a Fast
// Ethernet PHY, for simulation only. It watches the shared MDIO line on the
// rising edges of MDC, recognises clause-22 frames (at least 32 preamble
// ones, start 01, opcode, PHY address, register address), stores written
// data in its 32-register file and answers reads for its own address by
// driving the turnaround zero and 16 data bits, each changed at the falling
// edge of MDC. 'line' is the wired value of the pad (master or PHY driver,
// pulled up when nobody drives). Register reset values: 0 = 0x3100
// (auto-negotiation on), 1 = 0x7809, 16 = 0x0010, others 0.
module mdio_phy_model #(
  parameter logic [4:0] PHY_ADDR = 5'd0
) (
  input  logic mdc,
  input  logic line,
  output logic drv_oe,
  output logic drv_o
);
  logic [15:0] regs [32];
  int st = 0, ones = 0, n = 0;
  int writes = 0, reads = 0;
  logic [11:0] hdr;
  logic [15:0] wd, rd;
  logic [4:0]  ra, ad;

  initial begin
    for (int i = 0; i < 32; i++) regs[i] = 16'h0000;
    regs[0] = 16'h3100; regs[1] = 16'h7809; regs[16] = 16'h0010;
    drv_oe = 0; drv_o = 1;
  end

  always @(posedge mdc) begin
    case (st)
      0: if (line) ones++;
         else begin st = (ones >= 32) ? 1 : 0; ones = 0; end
      1: begin st = line ? 2 : 0; n = 0; hdr = 0; end
      2: begin
        hdr = {hdr[10:0], line};
        n++;
        if (n == 12) begin
          ad = hdr[9:5]; ra = hdr[4:0]; n = 0;
          if (hdr[11:10] == 2'b10 && ad == PHY_ADDR) begin st = 3; rd = regs[ra]; reads++; end
          else st = 4;
        end
      end
      3: begin n++; if (n == 18) begin st = 0; n = 0; end end
      4: begin
        n++;
        if (n > 2) wd = {wd[14:0], line};
        if (n == 18) begin
          if (hdr[11:10] == 2'b01 && ad == PHY_ADDR) begin regs[ra] = wd; writes++; end
          st = 0; n = 0;
        end
      end
      default: st = 0;
    endcase
  end

  always @(negedge mdc) begin
    if (st == 3 && n == 0)      begin drv_oe = 0; end
    else if (st == 3 && n == 1) begin drv_oe = 1; drv_o = 0; end
    else if (st == 3 && n >= 2) begin drv_oe = 1; drv_o = rd[17 - n]; end
    else                        begin drv_oe = 0; drv_o = 1; end
  end
endmodule
