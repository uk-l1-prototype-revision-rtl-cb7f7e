// ctrl_regs: the board's 32 16-bit control registers.
//
// Registers are written through the control interface (register id and
// value). Reset values: register 2 = 0x0001 (L0 emulator inhibited, so real
// input data flows after reset), register 31 = IP_LOW_DEFAULT, all others 0.
// The module also turns two control bits into actions in the system clock
// domain:
//  * read_start: one-cycle pulse on a low-to-high transition of register 0
//    bit 3 (transmission trigger).
//  * ip_low: the low 15 bits of the IP source address, loaded from register
//    31 bits 14:0 on a low-to-high transition of its bit 15. The document's
//    register table says high-to-low while its text says low-to-high; the text
//    is followed, matching the other trigger bits.
// The TTC trigger bits are passed on as levels and edge-detected in the
// clk40 domain by the TTC modules. The register map and the triggers follow
// the document; the reset values are this design's choice.
module ctrl_regs #(
  parameter logic [14:0] IP_LOW_DEFAULT = 15'h0210   // 192.168.2.16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        wr,
  input  logic [4:0]  wr_id,
  input  logic [15:0] wr_data,
  output logic [15:0] regs [32],
  output logic        read_start,
  output logic [14:0] ip_low
);
  logic rd_trig_q, ip_trig_q;

  assign read_start = regs[0][3] && !rd_trig_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
      regs[2]   <= 16'h0001;
      regs[31]  <= {1'b0, IP_LOW_DEFAULT};
      rd_trig_q <= 1'b0;
      ip_trig_q <= 1'b0;
      ip_low    <= IP_LOW_DEFAULT;
    end else begin
      if (wr) regs[wr_id] <= wr_data;
      rd_trig_q <= regs[0][3];
      ip_trig_q <= regs[31][15];
      if (regs[31][15] && !ip_trig_q) ip_low <= regs[31][14:0];
    end
  end
endmodule
