// rx_channel: front end of one optical input channel.
//
// It receives the 16-bit word stream that the transceiver's receive buffer
// delivers (one HPD event framed by start and end markers, 32-bit event words
// sent as two 16-bit words, low half first) and writes whole events into the
// channel's 18 x 1024 ingress FIFO. For every event it also pushes a small
// descriptor (ALICE/LHCb mode, parity error, length) that tells the zero-suppression
// unit what it will find.
//
// How it works:
//  * Auto-sensing: SENSE_CYCLES after reset the link's sync flag is sampled;
//    a channel without sync is inhibited until the next reset. The
//    configuration inhibit bit inhibits it as well. An inhibited channel
//    drops all data.
//  * An event is accepted only if, at its start word, the ingress FIFO has
//    room for the largest event (an ALICE event, 518 words) and the
//    descriptor queue has a free place; otherwise the whole event is dropped.
//  * Mode: with the force bit set the configured mode is used; otherwise the
//    mode follows the event length (more than 35 32-bit words = ALICE).
//  * Parity: the trailer word is compared with the XOR of all preceding
//    32-bit words of the event; a mismatch increments an 8-bit error counter.
//  * Status word (register 16+n): bit 0 inhibit, bit 1 loss of sync,
//    7:4 receive-buffer overflow count, 11:8 clock-correction count, 15:12
//    events written into the zero-suppressed FIFO (all 4-bit, wrapping).
//
// The status layout, the auto-inhibit on reset, the forced/auto mode bits and
// the per-channel parity counter follow the document. The event framing, the
// length-based mode detection, the parity rule and the drop-whole-event policy
// are this design's own choices, since the input link format is defined
// elsewhere. Timing: one input word per cycle, FIFO write in the same cycle,
// descriptor pushed in the cycle of the end word.
module rx_channel
  import l1_pkg::*;
#(
  parameter int unsigned SENSE_CYCLES = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  chan_cfg_t   cfg,
  // receive buffer side
  input  logic        rx_valid,
  input  logic [15:0] rx_data,
  input  logic        rx_sof,
  input  logic        rx_eof,
  input  logic        rx_sync,
  input  logic        rx_ovf_pulse,     // receive buffer overflow event
  input  logic        rx_clkcor_pulse,  // clock correction event
  input  logic        zs_event_pulse,   // an event was written past zero suppression
  // ingress FIFO
  output logic        fifo_wr,
  output fifo_word_t  fifo_din,
  input  logic [10:0] fifo_free,
  // descriptor queue {alice, parity_error, number of 16-bit words}
  output logic        desc_wr,
  output logic [11:0] desc_din,
  input  logic        desc_full,
  // status
  output logic [15:0] status,
  output logic [7:0]  parity_errors,
  output logic        inhibited,
  output logic        los_masked        // loss of sync, masked by the configured inhibit
);
  localparam int unsigned MAX_W16 = 2 * ALICE_IN_W32;

  logic [$clog2(SENSE_CYCLES+1)-1:0] sense_cnt;
  logic        sense_done, auto_inh;
  logic        in_event, accepting;
  logic [9:0]  cnt16;
  logic [15:0] lo_half;
  logic [31:0] xacc;
  logic [3:0]  ovf_cnt, cc_cnt, zs_cnt;

  logic        accept_word, start_ok, hi_half;
  logic [31:0] w32;
  logic [9:0]  n32;

  assign inhibited  = cfg.inhibit | auto_inh;
  assign los_masked = !rx_sync && !cfg.inhibit;
  assign status     = {zs_cnt, cc_cnt, ovf_cnt, 2'b00, !rx_sync, inhibited};

  assign start_ok    = !inhibited && sense_done && (fifo_free >= 11'(MAX_W16)) && !desc_full;
  // a word is stored if it opens an accepted event or continues one
  assign accept_word = rx_valid && (rx_sof ? start_ok : (in_event && accepting));
  assign hi_half     = rx_sof ? 1'b0 : cnt16[0];
  assign w32         = {rx_data, lo_half};
  assign n32         = (cnt16 + 10'd1) >> 1;

  always_comb begin
    fifo_wr       = accept_word;
    fifo_din.sof  = rx_sof;
    fifo_din.eof  = rx_eof;
    fifo_din.data = rx_data;
    desc_wr       = accept_word && rx_eof;
    desc_din[11]  = cfg.force_mode ? cfg.alice : (n32 > 10'(LHCB_IN_W32));
    desc_din[10]  = !hi_half || (xacc != w32);
    desc_din[9:0] = rx_sof ? 10'd1 : cnt16 + 10'd1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sense_cnt     <= '0;
      sense_done    <= 1'b0;
      auto_inh      <= 1'b0;
      in_event      <= 1'b0;
      accepting     <= 1'b0;
      cnt16         <= '0;
      lo_half       <= '0;
      xacc          <= '0;
      parity_errors <= '0;
      ovf_cnt       <= '0;
      cc_cnt        <= '0;
      zs_cnt        <= '0;
    end else begin
      if (!sense_done) begin
        sense_cnt <= sense_cnt + 1'b1;
        if (sense_cnt == SENSE_CYCLES[$bits(sense_cnt)-1:0]) begin
          sense_done <= 1'b1;
          auto_inh   <= !rx_sync;
        end
      end
      if (rx_ovf_pulse)    ovf_cnt <= ovf_cnt + 1'b1;
      if (rx_clkcor_pulse) cc_cnt  <= cc_cnt + 1'b1;
      if (zs_event_pulse)  zs_cnt  <= zs_cnt + 1'b1;

      if (rx_valid) begin
        if (rx_sof) begin
          in_event  <= !rx_eof;
          accepting <= start_ok;
          cnt16     <= 10'd1;
          lo_half   <= rx_data;
          xacc      <= '0;
        end else if (in_event) begin
          cnt16 <= cnt16 + 1'b1;
          if (hi_half) xacc    <= xacc ^ w32;
          else         lo_half <= rx_data;
          if (rx_eof) in_event <= 1'b0;
        end
        if (desc_wr && desc_din[10]) parity_errors <= parity_errors + 1'b1;
      end
    end
  end
endmodule
