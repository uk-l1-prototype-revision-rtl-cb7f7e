// l0_emulator: on-board event generator that stands in for the front-end (L0)
// electronics.
//
// For every L0 trigger (the TTCrx L1Accept pulse) it generates a burst of
// events when it is not inhibited (control register 2 bit 0). The burst
// length comes from control register 2 bits 12:8 (0 is taken as 1). Events
// use LHCb format (two L0 header words, 32 pixel rows, parity word) or, with
// register 2 bit 1 set, ALICE format (256 pixel rows), and are delivered in
// the same 16-bit framed stream as an input channel's receive buffer, low
// half of each 32-bit word first. Consecutive events of a burst are separated
// by GAP_CYCLES idle cycles. Triggers that arrive during a burst add to the
// number of events still to send (saturating counter).
//
// Event contents are this design's choice: L0[0] = {16'hE000, event number},
// L0[1] = 0, pixel row r of event e has one hit, at column (5*e) mod 32, if
// r = e mod 32 (ALICE: if r = e mod 256), and the trailer is the XOR of all
// preceding 32-bit words, the parity rule the input channels check. The
// document fixes only the trigger/burst behaviour and the two formats; the
// minimum LHCb inter-event gap it asks for is not given as a number, so
// GAP_CYCLES is assumed (72 cycles = 900 ns at 80 MHz).
module l0_emulator #(
  parameter int unsigned GAP_CYCLES = 72
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        inhibit,
  input  logic        alice,
  input  logic [4:0]  burst,
  input  logic        l0_trig,      // one-cycle pulse per L0 trigger
  output logic        valid,
  output logic [15:0] data,
  output logic        sof,
  output logic        eof,
  output logic        busy
);
  logic [9:0]  pending;
  logic [15:0] ev;
  logic        active, in_gap, mode;
  logic [9:0]  w;            // 16-bit word index in the event
  logic [15:0] gap;
  logic [31:0] xacc, cur;
  logic [9:0]  n16, r;
  logic [31:0] pix;

  assign n16  = mode ? 10'(2 * (2 + 256 + 1)) : 10'(2 * (2 + 32 + 1));
  assign r    = (w >> 1) - 10'd2;   // pixel row of the current word
  assign pix  = (mode ? (r == 10'(ev[7:0])) : (r == 10'(ev[4:0]))) ? (32'h1 << (5 * ev) % 32) : 32'h0;
  always_comb begin
    if (w < 10'd2)              cur = {16'hE000, ev};
    else if (w < 10'd4)         cur = 32'h0;
    else if (w < n16 - 10'd2)   cur = pix;
    else                        cur = xacc;
  end

  assign valid = active && !in_gap;
  assign data  = w[0] ? cur[31:16] : cur[15:0];
  assign sof   = (w == 0);
  assign eof   = (w == n16 - 10'd1);
  assign busy  = active || (pending != 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      pending <= '0;
      ev      <= '0;
      active  <= 1'b0;
      in_gap  <= 1'b0;
      mode    <= 1'b0;
      w       <= '0;
      gap     <= '0;
      xacc    <= '0;
    end else begin
      logic [9:0] add;
      add = (l0_trig && !inhibit) ? ((burst == 0) ? 10'd1 : 10'(burst)) : 10'd0;
      if (!active) begin
        if (pending != 0 || add != 0) begin
          active  <= 1'b1;
          in_gap  <= 1'b0;
          w       <= '0;
          xacc    <= '0;
          mode    <= alice;
          pending <= pending + add - 10'd1;
        end
      end else begin
        if ((pending + add) < pending) pending <= '1;
        else                           pending <= pending + add;
        if (in_gap) begin
          if (gap == 0) active <= 1'b0;
          else          gap <= gap - 1'b1;
        end else begin
          w <= w + 1'b1;
          if (w[0]) xacc <= xacc ^ cur;
          if (eof) begin
            ev     <= ev + 1'b1;
            in_gap <= 1'b1;
            gap    <= 16'(GAP_CYCLES);
          end
        end
      end
    end
  end
endmodule
