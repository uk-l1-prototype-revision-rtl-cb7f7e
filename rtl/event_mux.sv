// event_mux: merges the zero-suppressed FIFOs of two input channels into the
// single stream that is written into one L1 buffer memory.
//
// Whole events are taken alternately from the two channels (round robin at
// event boundaries); a channel with nothing to send is skipped. The mux reads
// its two FIFOs itself and places the words in a 4-word output queue, which
// the buffer controller reads like a FIFO (empty / rd / dout, one-cycle read
// latency). The end-of-event flag of a returned word stops further reads from
// that channel in the same cycle, so no word of the next event is fetched
// before the arbitration decision.
//
// The document shows a mux per channel pair feeding each memory; the
// event-granular round robin and the queue are this design's choices.
// Throughput: one word per cycle while the selected channel has data.
module event_mux
  import l1_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // the two zero-suppressed FIFOs
  input  logic [1:0]  in_empty,
  output logic [1:0]  in_rd,
  input  fifo_word_t  in_dout [2],
  // merged stream, FIFO style
  output logic        out_empty,
  input  logic        out_rd,
  output fifo_word_t  out_dout
);
  logic       cur, busy, vld, vch;
  logic       pick, can_issue, issue;
  logic [2:0] q_count, q_free;
  fifo_word_t rword;
  logic       q_full;

  assign rword = in_dout[vch];
  // channel to read this cycle
  always_comb begin
    pick = cur;
    if (!busy) pick = !in_empty[!cur] ? !cur : cur;
  end
  assign can_issue = (q_count + 3'(vld)) <= 3'd2;
  assign issue     = can_issue && !in_empty[pick] && !(vld && rword.eof && vch == pick);
  always_comb begin
    in_rd       = 2'b00;
    in_rd[pick] = issue;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cur  <= 1'b1;
      busy <= 1'b0;
      vld  <= 1'b0;
      vch  <= 1'b0;
    end else begin
      vld <= issue;
      vch <= pick;
      if (issue) begin
        cur  <= pick;
        busy <= 1'b1;
      end
      if (vld && rword.eof && !(issue && pick != vch)) busy <= 1'b0;
    end
  end

  sync_fifo #(.WIDTH(18), .DEPTH(4)) u_q (
    .clk, .rst,
    .wr_en(vld), .din(rword),
    .rd_en(out_rd), .dout(out_dout),
    .empty(out_empty), .full(q_full), .count(q_count), .free(q_free)
  );
endmodule
