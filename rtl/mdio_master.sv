// mdio_master: management-interface master for the 100baseTX PHY.
//
// After reset it writes the PHY control register (register 0) once with
// BMCR_VALUE, which fixes the link at 100 Mbit/s, full duplex, with
// auto-negotiation off, and then reads PHY registers 0, 16 and 1 in an
// endless loop. The latest values are held on reg0, reg16 and reg1 for the
// status block, and 'ready' rises once the first complete round of reads has
// finished.
//
// Each transaction is a standard clause-22 management frame of 64 MDC
// periods: 32 preamble ones, start 01, opcode (01 write, 10 read), PHY
// address, register address, turnaround, 16 data bits, MSB first. MDC is
// clk divided by 2*CLK_DIV. The master changes its output after the falling
// edge of MDC and samples the PHY's read data at the rising edge; during the
// turnaround and data bits of a read mdio_oe is low so the PHY can drive the
// line. mdio_o/mdio_oe/mdio_i are the three sides of the open pad.
//
// Follows the document: the forced 100 Mbit/s full-duplex setting and which
// PHY registers appear in the status block (registers 0, 16, 1). Own choices
// (not given there): the frame timing, MDC rate (1 MHz at 80 MHz clk), PHY
// address 0, the polling order and the write-once-after-reset policy.
module mdio_master #(
  parameter int unsigned CLK_DIV    = 40,
  parameter logic [4:0]  PHY_ADDR   = 5'd0,
  parameter logic [15:0] BMCR_VALUE = 16'h2100
) (
  input  logic        clk,
  input  logic        rst,
  output logic        mdc,
  output logic        mdio_o,
  output logic        mdio_oe,
  input  logic        mdio_i,
  output logic [15:0] reg0,
  output logic [15:0] reg16,
  output logic [15:0] reg1,
  output logic        ready
);
  localparam int unsigned DW = (CLK_DIV < 2) ? 1 : $clog2(CLK_DIV);

  logic [DW-1:0] div;
  logic [5:0]    bit_cnt;
  logic [1:0]    op;        // 0: write reg 0, 1: read 0, 2: read 16, 3: read 1
  logic [63:0]   frame;
  logic [15:0]   shreg;
  logic [4:0]    regad;
  logic          is_read;
  logic          primed;    // a bit has been presented since reset

  always_comb begin
    case (op)
      2'd0:    regad = 5'd0;
      2'd1:    regad = 5'd0;
      2'd2:    regad = 5'd16;
      default: regad = 5'd1;
    endcase
    is_read = (op != 2'd0);
    frame = is_read ? {32'hFFFF_FFFF, 2'b01, 2'b10, PHY_ADDR, regad, 2'b11, 16'hFFFF}
                    : {32'hFFFF_FFFF, 2'b01, 2'b01, PHY_ADDR, regad, 2'b10, BMCR_VALUE};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      div     <= '0;
      mdc     <= 1'b0;
      mdio_o  <= 1'b1;
      mdio_oe <= 1'b0;
      bit_cnt <= '0;
      op      <= 2'd0;
      shreg   <= '0;
      reg0    <= '0;
      reg16   <= '0;
      reg1    <= '0;
      ready   <= 1'b0;
      primed  <= 1'b0;
    end else if (div != DW'(CLK_DIV - 1)) begin
      div <= div + 1'b1;
    end else begin
      div <= '0;
      mdc <= !mdc;
      if (mdc) begin
        // falling edge: present bit bit_cnt
        mdio_o  <= frame[6'd63 - bit_cnt];
        mdio_oe <= !(is_read && bit_cnt >= 6'd46);
        primed  <= 1'b1;
      end else if (primed) begin
        // rising edge: the bit presented is sampled (by the PHY or by us)
        if (is_read && bit_cnt >= 6'd48) shreg <= {shreg[14:0], mdio_i};
        bit_cnt <= bit_cnt + 1'b1;
        if (bit_cnt == 6'd63) begin
          case (op)
            2'd1: reg0  <= {shreg[14:0], mdio_i};
            2'd2: reg16 <= {shreg[14:0], mdio_i};
            2'd3: begin
              reg1  <= {shreg[14:0], mdio_i};
              ready <= 1'b1;
            end
            default: ;
          endcase
          op <= (op == 2'd3) ? 2'd1 : op + 2'd1;
        end
      end
    end
  end
endmodule
