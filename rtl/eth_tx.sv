// eth_tx: egress RAM, Ethernet frame builder and 100baseTX MII transmitter.
//
// One L1 buffer row (512 16-bit words = 1024 bytes) is collected in the
// egress RAM and then sent as one Ethernet frame through the MII nibble
// interface of the external 100baseTX PHY. There is no flow control: rows are
// sent back to back with the standard 12-byte inter-frame gap.
//
// Frame layout (bytes on the wire):
//   7 x 0x55 preamble, 0xD5 start delimiter
//   Ethernet header: destination MAC, source MAC, type 0x0800
//   IPv4 header (20 bytes): version/length 0x45, DSF 0, total length
//     (20 + 22 + 1024 + PAD_BYTES), id = row number, flags/fragment 0, TTL,
//     protocol, header checksum, source address {IP_HI, 0, ip_low[14:0]},
//     destination address
//   MEP header: 22 bytes of dummy (zero) values
//   1024 payload bytes: each 16-bit memory word low byte first, so 32-bit
//     event words read correctly on a little-endian host
//   PAD_BYTES zero bytes, then the 4-byte CRC-32 frame check sequence
// The frame structure (Ethernet, IP and padded MEP header, 1024-byte payload,
// extra padding), the source IP rule and the byte order follow the document;
// the MAC and destination addresses, TTL, protocol number, the id field,
// PAD_BYTES and the zero dummy values are this design's choices.
//
// Timing: words are written into the RAM one per cycle while the RAM is
// free ('row_free' high only when no row is held). Transmission advances one
// nibble (low nibble first) per cycle in which mii_ce is high; mii_ce marks
// the 25 MHz transmit clock of the PHY in the system clock domain.
// It also records the last two payload words sent (debug outputs, unused by
// the board top) and counts rows entering and leaving the egress RAM
// (status register 15).
module eth_tx
  import l1_pkg::*;
#(
  parameter int unsigned ROW_BITS  = 15,
  parameter int unsigned PAD_BYTES = 4,
  parameter logic [47:0] DST_MAC   = 48'hFFFF_FFFF_FFFF,
  parameter logic [47:0] SRC_MAC   = 48'h0200_0000_0010,
  parameter logic [15:0] IP_HI     = 16'hC0A8,            // 192.168
  parameter logic [31:0] DST_IP    = 32'hC0A8_0202,       // 192.168.2.2
  parameter logic [7:0]  IP_TTL    = 8'h40,
  parameter logic [7:0]  IP_PROTO  = 8'hF2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [14:0] ip_low,
  // row stream in
  input  logic        in_valid,
  input  logic [15:0] in_data,
  input  logic        in_last,
  input  logic [ROW_BITS-1:0] in_row,
  output logic        row_free,
  // MII
  input  logic        mii_ce,
  output logic [3:0]  mii_txd,
  output logic        mii_tx_en,
  // status
  output logic [15:0] last_word,
  output logic [15:0] last_but_one_word,
  output logic [3:0]  rows_in,
  output logic [3:0]  rows_out,
  output logic        busy
);
  localparam int unsigned HDR_BYTES  = 14 + 20 + 22;                 // 56
  localparam int unsigned PRE_BYTES  = 8;
  localparam int unsigned DATA_START = PRE_BYTES + HDR_BYTES;        // 64
  localparam int unsigned PAD_START  = DATA_START + ROW_BYTES;       // 1088
  localparam int unsigned FCS_START  = PAD_START + PAD_BYTES;
  localparam int unsigned IFG_START  = FCS_START + 4;
  localparam int unsigned FRAME_END  = IFG_START + 12;
  localparam logic [15:0] IP_LEN     = 16'(20 + 22 + ROW_BYTES + PAD_BYTES);

  typedef enum logic [1:0] {E_FREE, E_LOAD, E_SEND} estate_t;
  estate_t state;

  logic [15:0] ram [ROW_W16];
  logic [8:0]  waddr;
  logic [15:0] ip_id;
  logic [10:0] bi;          // byte index in the frame
  logic        nib;         // 0: low nibble next
  logic [31:0] crc;
  logic [7:0]  cur_byte;
  logic [15:0] ip_csum;

  assign row_free = (state == E_FREE);
  assign busy     = (state != E_FREE);

  // IPv4 header checksum (one's complement of the one's complement sum)
  always_comb begin
    logic [19:0] s;
    s = 20'h04500 + 20'(IP_LEN) + 20'(ip_id) + 20'({IP_TTL, IP_PROTO}) + 20'(IP_HI) +
        20'({1'b0, ip_low}) + 20'(DST_IP[31:16]) + 20'(DST_IP[15:0]);
    s = 20'(s[15:0]) + 20'(s[19:16]);
    s = 20'(s[15:0]) + 20'(s[19:16]);
    ip_csum = ~s[15:0];
  end

  function automatic logic [7:0] hdr_byte(input int unsigned i, input logic [15:0] id,
                                          input logic [15:0] csum, input logic [14:0] lo);
    logic [7:0] b;
    b = 8'h00;
    if (i < 6)       b = DST_MAC[8*(5-i) +: 8];
    else if (i < 12) b = SRC_MAC[8*(11-i) +: 8];
    else if (i == 12) b = 8'h08;
    else if (i == 13) b = 8'h00;
    else begin
      case (i - 14)
        0:  b = 8'h45;
        1:  b = 8'h00;
        2:  b = IP_LEN[15:8];
        3:  b = IP_LEN[7:0];
        4:  b = id[15:8];
        5:  b = id[7:0];
        8:  b = IP_TTL;
        9:  b = IP_PROTO;
        10: b = csum[15:8];
        11: b = csum[7:0];
        12: b = IP_HI[15:8];
        13: b = IP_HI[7:0];
        14: b = {1'b0, lo[14:8]};
        15: b = lo[7:0];
        16: b = DST_IP[31:24];
        17: b = DST_IP[23:16];
        18: b = DST_IP[15:8];
        19: b = DST_IP[7:0];
        default: b = 8'h00;      // flags, fragment offset, MEP dummy bytes
      endcase
    end
    return b;
  endfunction

  // byte on the wire at index bi
  always_comb begin
    logic [10:0] d;
    logic [31:0] fcs;
    d   = bi - 11'(DATA_START);
    fcs = ~crc;
    if (bi < 11'(PRE_BYTES - 1))   cur_byte = 8'h55;
    else if (bi < 11'(PRE_BYTES))  cur_byte = 8'hD5;
    else if (bi < 11'(DATA_START)) cur_byte = hdr_byte(32'(bi) - PRE_BYTES, ip_id, ip_csum, ip_low);
    else if (bi < 11'(PAD_START))  cur_byte = d[0] ? ram[d[9:1]][15:8] : ram[d[9:1]][7:0];
    else if (bi < 11'(FCS_START))  cur_byte = 8'h00;
    else if (bi < 11'(IFG_START))  cur_byte = fcs[8*(bi - 11'(FCS_START)) +: 8];
    else                           cur_byte = 8'h00;
  end

  always_ff @(posedge clk) begin
    if (state != E_SEND && in_valid) ram[waddr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state             <= E_FREE;
      waddr             <= '0;
      ip_id             <= '0;
      bi                <= '0;
      nib               <= 1'b0;
      crc               <= 32'hFFFF_FFFF;
      mii_txd           <= '0;
      mii_tx_en         <= 1'b0;
      last_word         <= '0;
      last_but_one_word <= '0;
      rows_in           <= '0;
      rows_out          <= '0;
    end else begin
      if (state != E_SEND && in_valid) begin
        waddr <= waddr + 1'b1;
        state <= E_LOAD;
        if (in_last) begin
          state   <= E_SEND;
          waddr   <= '0;
          ip_id   <= 16'(in_row);
          bi      <= '0;
          nib     <= 1'b0;
          crc     <= 32'hFFFF_FFFF;
          rows_in <= rows_in + 1'b1;
        end
      end
      if (state == E_SEND && mii_ce) begin
        mii_txd   <= nib ? cur_byte[7:4] : cur_byte[3:0];
        mii_tx_en <= (bi < 11'(IFG_START));
        nib       <= !nib;
        if (nib) begin
          bi <= bi + 1'b1;
          if (bi >= 11'(PRE_BYTES) && bi < 11'(FCS_START)) crc <= crc32_byte(crc, cur_byte);
          if (bi >= 11'(DATA_START) && bi < 11'(PAD_START) && bi[0]) begin
            last_but_one_word <= last_word;
            last_word         <= {cur_byte, ram[9'((bi - 11'(DATA_START)) >> 1)][7:0]};
          end
          if (bi == 11'(FRAME_END - 1)) begin
            state    <= E_FREE;
            rows_out <= rows_out + 1'b1;
          end
        end
      end
    end
  end
endmodule
