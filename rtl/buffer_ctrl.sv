// buffer_ctrl: controller of one group of three L1 buffer memories.
//
// The board has six external 256 Mbit L1 buffer memories; memories 0-2 share
// one controller and memories 3-5 another, so a controller keeps one write
// pointer, one complete-row counter and one last-row remainder for its three
// memories. A memory is seen as 2^24 16-bit words organised as 32768 rows of
// 512 words (1024 bytes, one Ethernet frame each), address = {row, column}.
//
// Writing: the three merged channel-pair streams are written in lockstep at
// the same address. A slot is written when every active stream (a pair with
// at least one non-inhibited channel) has a word; inactive memories are not
// written. Because every event is stored with a fixed length (36 32-bit words
// in LHCb mode, 260 in ALICE mode, zero-suppressed or not), streams that see
// the same triggers in the same mode advance together. Writing stops when the
// memory is full. The L1 fast reset clears the pointer without touching the
// memory contents.
//
// Reading: a read request (local memory 0-2, start row, row count minus one)
// transmits whole rows. Before each row the controller waits for the egress
// row buffer to be free, then reads the 512 words of the row at one per cycle
// and passes them on with the row number and a last-word flag. Writes wait
// while a row is being read.
//
// Status: rows_written = number of complete rows; remainder = number of
// 32-bit words in the partly written last row.
//
// The sharing of one controller and counter by three memories, the row size,
// the counters and the read request fields follow the document. The memory
// port (a simple synchronous SRAM-like port with MEM_RD_LAT = 1 cycle read
// latency instead of the SDRAM command protocol) and the lockstep write rule
// are this design's choices.
module buffer_ctrl
  import l1_pkg::*;
#(
  parameter int unsigned ROW_BITS = 15,   // 32768 rows of 1024 bytes = 256 Mbit
  parameter int unsigned COL_BITS = 9     // 512 16-bit words per row
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        l1_rst,
  // three merged channel-pair streams, FIFO style (1-cycle read latency)
  input  logic [2:0]  in_empty,
  output logic [2:0]  in_rd,
  input  fifo_word_t  in_dout [3],
  input  logic [2:0]  active,
  // read request
  input  logic        rd_start,           // one-cycle pulse
  input  logic [1:0]  rd_mem,             // 0..2
  input  logic [ROW_BITS-1:0] rd_row,
  input  logic [7:0]  rd_nrows_m1,
  // row stream to the egress
  input  logic        egress_free,
  output logic        out_valid,
  output logic [15:0] out_data,
  output logic        out_last,
  output logic [ROW_BITS-1:0] out_row,
  // memory port (shared address, per-memory data)
  output logic [ROW_BITS+COL_BITS-1:0] mem_addr,
  output logic [2:0]  mem_we,
  output logic [15:0] mem_wdata [3],
  output logic        mem_re,
  input  logic [15:0] mem_rdata [3],
  // status
  output logic [ROW_BITS-1:0] rows_written,
  output logic [7:0]  remainder,
  output logic        writing,
  output logic        reading
);
  localparam int unsigned AW = ROW_BITS + COL_BITS;

  typedef enum logic [1:0] {R_IDLE, R_WAIT, R_ROW} rstate_t;
  rstate_t rstate;

  logic [AW:0]           wptr;          // one extra bit: memory full
  logic                  wr_pend;
  logic [2:0]            wr_mask;
  logic                  can_write, slot_ready;
  logic [1:0]            sel;
  logic [ROW_BITS-1:0]   row;
  logic [7:0]            rows_left;
  logic [COL_BITS-1:0]   col;
  logic                  rd_vld, rd_lastq;
  logic [ROW_BITS-1:0]   rd_rowq;

  assign slot_ready = (active != 3'b000) && ((in_empty & active) == 3'b000);
  assign can_write  = slot_ready && !wptr[AW] && !(wr_pend && wptr[AW-1:0] == '1) &&
                      (rstate != R_ROW) &&
                      !(rstate == R_WAIT && egress_free);
  assign in_rd      = can_write ? active : 3'b000;

  assign rows_written = wptr[AW] ? {ROW_BITS{1'b1}} : wptr[AW-1:COL_BITS];
  assign remainder    = 8'(wptr[COL_BITS-1:1]);
  assign writing      = wr_pend;
  assign reading      = (rstate != R_IDLE);

  always_comb begin
    mem_we = 3'b000;
    mem_re = 1'b0;
    mem_addr = wptr[AW-1:0];
    for (int i = 0; i < 3; i++) mem_wdata[i] = in_dout[i].data;
    if (wr_pend) begin
      mem_we = wr_mask;
    end else if (rstate == R_ROW) begin
      mem_re   = 1'b1;
      mem_addr = {row, col};
    end
  end

  assign out_valid = rd_vld;
  assign out_data  = mem_rdata[sel];
  assign out_last  = rd_lastq;
  assign out_row   = rd_rowq;

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr      <= '0;
      wr_pend   <= 1'b0;
      wr_mask   <= '0;
      rstate    <= R_IDLE;
      sel       <= '0;
      row       <= '0;
      rows_left <= '0;
      col       <= '0;
      rd_vld    <= 1'b0;
      rd_lastq  <= 1'b0;
      rd_rowq   <= '0;
    end else begin
      // write pipeline: FIFO read now, memory write next cycle
      wr_pend <= can_write;
      wr_mask <= active;
      if (wr_pend) wptr <= wptr + 1'b1;
      if (l1_rst)  wptr <= '0;

      rd_vld   <= (rstate == R_ROW) && !wr_pend;
      rd_lastq <= (rstate == R_ROW) && !wr_pend && (col == '1);
      rd_rowq  <= row;
      case (rstate)
        R_IDLE: if (rd_start) begin
          sel       <= (rd_mem > 2'd2) ? 2'd2 : rd_mem;
          row       <= rd_row;
          rows_left <= rd_nrows_m1;
          col       <= '0;
          rstate    <= R_WAIT;
        end
        R_WAIT: if (egress_free && !wr_pend) rstate <= R_ROW;
        R_ROW: if (!wr_pend) begin
          col <= col + 1'b1;
          if (col == '1) begin
            row <= row + 1'b1;
            if (rows_left == 0) rstate <= R_IDLE;
            else begin
              rows_left <= rows_left - 1'b1;
              rstate    <= R_WAIT;
            end
          end
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end
endmodule
