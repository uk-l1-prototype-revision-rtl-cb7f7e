// sync_fifo: single-clock FIFO used as the 18 x 1024 channel buffers that sit
// before and after the zero-suppression unit of every input channel, and as
// small descriptor queues.
//
// Storage is a plain array (maps to block RAM). Writes are accepted when not
// full, reads when not empty. Read data is registered: dout is valid on the
// cycle after rd_en (one-cycle read latency). 'count' is the number of words
// held and 'free' the number of empty places, so a writer can reserve room for
// a whole event before it starts. Width and depth follow the document's 18 x
// 1024 figure; the interface and latency are this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 18,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst,      // synchronous, active high
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         din,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         dout,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic [$clog2(DEPTH+1)-1:0] free
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_wr, do_rd;

  assign empty = (count == 0);
  assign full  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign free  = DEPTH[$clog2(DEPTH+1)-1:0] - count;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= din;
    if (do_rd) dout <= mem[rp];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + $bits(count)'(do_wr) - $bits(count)'(do_rd);
    end
  end
endmodule
