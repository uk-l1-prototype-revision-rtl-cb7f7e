// zs_encoder: the zero-suppression ("ZS") unit of one input channel.
//
// It takes complete events from the channel's ingress FIFO, puts a 32-bit L1
// header in front of each and writes the result into the channel's second
// 18 x 1024 FIFO. L0 headers, pixel data and the parity trailer pass through
// unmodified.
//
// Zero suppression applies to LHCb-mode events (32 pixel rows of 32 bits,
// 128 bytes) when the channel's ZS enable bit is set. Every non-zero byte
// becomes a 16-bit entry {0, 7-bit byte address, byte}, where the address is
// 4*row + byte-within-row, in ascending address order, two entries per 32-bit
// word with the lower address in the low half. An odd last entry has a zero
// high half. The entries are followed by zero pad words so that the event
// keeps the length of an unsuppressed LHCb event (36 32-bit words), as in the
// document's worked example. The header's ZS flag is set and its word count
// gives the number of 32-bit words holding entries. ALICE events are never
// suppressed (the document notes their fiducial bytes are always present).
// An LHCb event with more than 64 non-zero bytes does not fit in the 32 words
// and is stored unsuppressed with the ZS flag clear (this design's choice).
//
// L1 header (Table 1): event id 30:16 (per-channel event counter, cleared by
// reset or the L1 fast reset), memory bank id 15:13 (bank_id input, the index
// of the memory the channel writes into), ALICE flag 12, ZS flag 11, ZS word
// count 10:0. The event id source, the bank id meaning and the zero pad value
// are this design's choices.
//
// Timing: an event is started only when the output FIFO has room for the
// largest output event (520 words). Unsuppressed events stream through at one
// word per cycle after a 3-cycle start; suppressed events are first loaded
// (70 cycles) and then written (72 cycles).
module zs_encoder
  import l1_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        l1_rst,        // fast reset: clears the event id counter
  input  logic        zs_enable,
  input  logic [2:0]  bank_id,
  // descriptor queue {alice, parity_error, length in 16-bit words}, 1-cycle read latency
  input  logic        desc_empty,
  output logic        desc_rd,
  input  logic [11:0] desc_dout,
  // ingress FIFO, 1-cycle read latency
  input  logic        in_empty,
  output logic        in_rd,
  input  fifo_word_t  in_dout,
  // zero-suppressed FIFO
  output logic        out_wr,
  output fifo_word_t  out_din,
  input  logic [10:0] out_free,
  output logic        event_done
);
  typedef enum logic [2:0] {S_IDLE, S_DESC, S_HDR, S_PASS, S_LOAD, S_ZOUT} state_t;
  state_t state;

  localparam int unsigned PIX_W16 = 2 * LHCB_ROWS;       // 64
  localparam int unsigned LHCB_W16 = 2 * LHCB_IN_W32;    // 70

  logic [14:0] event_id;
  logic        alice, zs_out;
  logic [9:0]  n16, rd_left, got;
  logic        vld_q;
  logic [15:0] l0   [4];
  logic [15:0] raw  [PIX_W16];
  logic [15:0] ent  [2*PIX_W16];
  logic [15:0] par  [2];
  logic [7:0]  nent;
  logic [6:0]  oi;
  l1_header_t  hdr;
  logic        hdr_idx;

  // ---- header --------------------------------------------------------------
  always_comb begin
    hdr.reserved = 1'b0;
    hdr.event_id = event_id;
    hdr.bank_id  = bank_id;
    hdr.alice    = alice;
    hdr.zs       = zs_out;
    hdr.zs_count = zs_out ? 11'(({1'b0, nent} + 9'd1) >> 1) : 11'd0;
  end

  // ---- non-zero byte detection of the incoming pixel half-word --------------
  logic [9:0] pix_k;         // index of the pixel half-word being loaded
  logic       b0_nz, b1_nz;
  logic [6:0] a0, a1;
  assign pix_k = got - 10'd4;
  assign b0_nz = (in_dout.data[7:0]  != 8'h00);
  assign b1_nz = (in_dout.data[15:8] != 8'h00);
  assign a0    = {pix_k[5:0], 1'b0};
  assign a1    = {pix_k[5:0], 1'b1};

  // ---- output word of the suppressed/buffered event --------------------------
  logic [15:0] zword;
  logic [6:0]  bk;
  always_comb begin
    bk = oi - 7'd6;
    if (oi < 7'd2)       zword = oi[0] ? hdr[31:16] : hdr[15:0];
    else if (oi < 7'd6)  zword = l0[oi[1:0] - 2'd2];
    else if (oi < 7'd70) zword = zs_out ? ((8'(bk) < nent) ? ent[bk] : 16'h0000) : raw[bk[5:0]];
    else                 zword = par[oi[0]];
  end

  assign desc_rd = (state == S_IDLE) && !desc_empty && (out_free >= 11'(ALICE_OUT_W16));
  assign in_rd   = ((state == S_PASS) || (state == S_LOAD)) && (rd_left != 0) && !in_empty;

  always_comb begin
    out_wr  = 1'b0;
    out_din = '0;
    case (state)
      S_HDR: begin
        out_wr       = 1'b1;
        out_din.sof  = !hdr_idx;
        out_din.data = hdr_idx ? hdr[31:16] : hdr[15:0];
      end
      S_PASS: begin
        out_wr       = vld_q;
        out_din.eof  = (got == n16 - 10'd1);
        out_din.data = in_dout.data;
      end
      S_ZOUT: begin
        out_wr       = 1'b1;
        out_din.sof  = (oi == 7'd0);
        out_din.eof  = (oi == 7'(2 * LHCB_IN_W32 + 1));
        out_din.data = zword;
      end
      default: ;
    endcase
  end
  assign event_done = out_wr && out_din.eof;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      event_id <= '0;
      alice    <= 1'b0;
      zs_out   <= 1'b0;
      n16      <= '0;
      rd_left  <= '0;
      got      <= '0;
      vld_q    <= 1'b0;
      nent     <= '0;
      oi       <= '0;
      hdr_idx  <= 1'b0;
    end else begin
      vld_q <= in_rd;
      if (l1_rst) event_id <= '0;
      case (state)
        S_IDLE: if (desc_rd) state <= S_DESC;
        S_DESC: begin
          alice   <= desc_dout[11];
          n16     <= desc_dout[9:0];
          rd_left <= desc_dout[9:0];
          got     <= '0;
          nent    <= '0;
          hdr_idx <= 1'b0;
          zs_out  <= zs_enable && !desc_dout[11] && (desc_dout[9:0] == 10'(LHCB_W16));
          state   <= (zs_enable && !desc_dout[11] && (desc_dout[9:0] == 10'(LHCB_W16))) ? S_LOAD : S_HDR;
        end
        S_HDR: begin
          hdr_idx <= 1'b1;
          if (hdr_idx) state <= S_PASS;
        end
        S_PASS, S_LOAD: begin
          if (in_rd) rd_left <= rd_left - 1'b1;
          if (vld_q) begin
            got <= got + 1'b1;
            if (state == S_LOAD) begin
              if (got < 10'd4) l0[got[1:0]] <= in_dout.data;
              else if (got < 10'd68) begin
                raw[pix_k[5:0]] <= in_dout.data;
                if (b0_nz) ent[7'(nent)] <= {1'b0, a0, in_dout.data[7:0]};
                if (b1_nz) ent[7'(nent + 8'(b0_nz))] <= {1'b0, a1, in_dout.data[15:8]};
                nent <= nent + 8'(b0_nz) + 8'(b1_nz);
              end else par[got[0]] <= in_dout.data;
            end
            if (got == n16 - 10'd1) begin
              if (state == S_PASS) begin
                state    <= S_IDLE;
                event_id <= l1_rst ? '0 : event_id + 1'b1;
              end else begin
                state  <= S_ZOUT;
                oi     <= '0;
                zs_out <= (nent <= 8'(PIX_W16));
              end
            end
          end
        end
        S_ZOUT: begin
          oi <= oi + 1'b1;
          if (oi == 7'(2 * LHCB_IN_W32 + 1)) begin
            state    <= S_IDLE;
            event_id <= l1_rst ? '0 : event_id + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
