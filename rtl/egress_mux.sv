// egress_mux: the multiplexer in front of the Ethernet transmitter.
//
// Each of the two buffer controllers (memories 0-2 and 3-5) delivers the rows
// of a read request as a word stream with a last-word flag and the row
// number. The mux passes the stream of the controller that owns the selected
// memory (sel = 0 for memories 0-2, 1 for 3-5); only one read request is
// active at a time, so no arbitration is needed. It also keeps two of the
// four egress flow-control counters of status register 15: frames (rows)
// entering the mux from either controller, bits 15:12, and frames leaving it,
// bits 11:8. Both are 4-bit wrapping counters that normally stay equal.
// Combinational data path; counters update on the last word of a row.
module egress_mux #(
  parameter int unsigned ROW_BITS = 15
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        sel,
  input  logic [1:0]  in_valid,
  input  logic [15:0] in_data [2],
  input  logic [1:0]  in_last,
  input  logic [ROW_BITS-1:0] in_row [2],
  output logic        out_valid,
  output logic [15:0] out_data,
  output logic        out_last,
  output logic [ROW_BITS-1:0] out_row,
  output logic [3:0]  frames_in,
  output logic [3:0]  frames_out
);
  assign out_valid = in_valid[sel];
  assign out_data  = in_data[sel];
  assign out_last  = in_last[sel];
  assign out_row   = in_row[sel];

  always_ff @(posedge clk) begin
    if (rst) begin
      frames_in  <= '0;
      frames_out <= '0;
    end else begin
      frames_in  <= frames_in + 4'(in_valid[0] && in_last[0]) + 4'(in_valid[1] && in_last[1]);
      if (out_valid && out_last) frames_out <= frames_out + 1'b1;
    end
  end
endmodule
