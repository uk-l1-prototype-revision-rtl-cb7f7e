// ttc_b_encoder: B-channel command serialiser of the board's TTC source encoder.
//
// Runs on clk40. A low-to-high transition of the trigger bit (control
// register 5 bit 0) sends one command on the serial B-channel output, one bit
// per clk40 cycle, most significant bit first. The line idles high.
//   short command (mode 0), 16 bits: 0, 0, D[7:0], 5 check bits, 1
//   long command  (mode 1), 42 bits: 0, 1, D[31:0], 7 check bits, 1
// D comes from control registers 6 (D[15:0]) and 7 (D[31:16]); a long
// command's D holds the TTCrx address, external flag, sub-address and data
// as the TTC system defines them. A trigger that arrives while a command is
// being sent is ignored. The check bits are a Hamming code with an overall
// parity bit: data bits take the codeword positions 3, 5, 6, 7, 9, ... (all
// that are not powers of two) in order from D[0]; check bit j is the XOR of
// the data bits whose position has bit j set; the last check bit is the XOR of
// all data and check bits. That construction, and the framing, are this
// design's reading of the TTC B-channel format, which the document uses
// without defining; compare with the TTC system specification before use.
// The short/long choice, the 32-bit D field and the trigger follow the
// document.
module ttc_b_encoder (
  input  logic        clk40,
  input  logic        rst,
  input  logic        trig,         // control register 5 bit 0 (any clock domain)
  input  logic        long_mode,
  input  logic [31:0] d,
  output logic        b_out,
  output logic        busy
);
  // Hamming check bits plus overall parity over the low NDATA bits of x
  function automatic logic [6:0] hamming(input logic [31:0] x, input int unsigned ndata,
                                         input int unsigned ncheck);
    logic [6:0]  h;
    logic [5:0]  pos;
    int unsigned k;
    h = '0;
    k = 0;
    for (int p = 3; p < 39; p++) begin
      pos = 6'(p);
      if ((pos & (pos - 6'd1)) != 0 && k < ndata) begin
        for (int j = 0; j < 6; j++)
          if (j < ncheck - 1 && pos[j]) h[j] ^= x[k];
        k++;
      end
    end
    h[ncheck-1] = ^(x & ((ndata == 32) ? 32'hFFFF_FFFF : 32'h0000_00FF)) ^ (^(h & 7'((1 << (ncheck - 1)) - 1)));
    return h;
  endfunction

  logic [2:0]  trig_s;
  logic [41:0] sh;
  logic [5:0]  left;
  logic [6:0]  h_short, h_long;

  assign h_short = hamming({24'h0, d[7:0]}, 8, 5);   // bits 6:5 are zero
  assign h_long  = hamming(d, 32, 7);

  assign busy = (left != 0);

  always_ff @(posedge clk40) begin
    if (rst) begin
      trig_s <= '0;
      sh     <= '1;
      left   <= '0;
      b_out  <= 1'b1;
    end else begin
      trig_s <= {trig_s[1:0], trig};
      if (left != 0) begin
        b_out <= sh[41];
        sh    <= {sh[40:0], 1'b1};
        left  <= left - 1'b1;
      end else begin
        b_out <= 1'b1;
        if (trig_s[1] && !trig_s[2]) begin
          if (long_mode) begin
            sh   <= {2'b01, d, h_long, 1'b1};
            left <= 6'd42;
          end else begin
            sh   <= {2'b00, d[7:0], h_short[4:0], 1'b1, 26'h3FF_FFFF};
            left <= 6'd16;
          end
        end
      end
    end
  end
endmodule
