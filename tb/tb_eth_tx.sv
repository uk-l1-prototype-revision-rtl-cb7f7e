// tb_eth_tx: loads rows into the egress RAM and captures the MII nibbles.
// The captured frames are compared byte by byte with frames built here from
// the field definitions: preamble, Ethernet and IPv4 headers (checksum
// computed here), 22 dummy MEP bytes, the 1024 payload bytes in little-endian
// order, padding and the CRC-32 (bit-serial LFSR written here). Also checks
// the inter-frame gap, that a new row is accepted only after the frame has
// left, the last-two-words registers and the row counters, and the rate of
// one nibble per mii_ce.
module tb_eth_tx;
  import l1_pkg::*;
  localparam int PAD = 4;
  localparam logic [47:0] DMAC = 48'hFFFF_FFFF_FFFF, SMAC = 48'h0200_0000_0010;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic        in_valid, in_last, row_free, mii_ce, tx_en, busy;
  logic [15:0] in_data, lw, lbo;
  logic [14:0] in_row, ip_low;
  logic [3:0]  txd, rin, rout;

  eth_tx #(.ROW_BITS(15), .PAD_BYTES(PAD)) dut (.clk, .rst, .ip_low, .in_valid, .in_data,
    .in_last, .in_row, .row_free, .mii_ce, .mii_txd(txd), .mii_tx_en(tx_en),
    .last_word(lw), .last_but_one_word(lbo), .rows_in(rin), .rows_out(rout), .busy);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // MII clock enable every 4th cycle
  int cc = 0;
  logic ce_q = 0;
  always @(posedge clk) begin
    cc <= cc + 1;
    mii_ce <= (cc % 4 == 3);
    ce_q <= mii_ce;
  end

  // capture
  logic [7:0] frames [$][$];
  logic [7:0] cur [$];
  logic [3:0] lo_nib;
  bit   have_lo = 0, in_frame = 0;
  int   idle_nibbles = 0, min_gap = 1000;
  always @(posedge clk) begin
    if (ce_q && !rst) begin
      if (tx_en) begin
        if (!in_frame && frames.size() > 0 && idle_nibbles < min_gap) min_gap = idle_nibbles;
        in_frame = 1;
        idle_nibbles = 0;
        if (!have_lo) begin lo_nib = txd; have_lo = 1; end
        else begin cur.push_back({txd, lo_nib}); have_lo = 0; end
      end else begin
        if (in_frame) begin frames.push_back(cur); cur = {}; in_frame = 0; end
        idle_nibbles++;
      end
    end
  end

  function automatic logic [31:0] crc_bits(input logic [7:0] b [$], input int from, input int to);
    logic [31:0] c = 32'hFFFF_FFFF;
    for (int i = from; i < to; i++)
      for (int k = 0; k < 8; k++) begin
        logic fb = c[0] ^ b[i][k];
        c = c >> 1;
        if (fb) c = c ^ 32'hEDB8_8320;
      end
    return ~c;
  endfunction

  function automatic void build(input logic [15:0] w [512], input logic [15:0] id,
                                output logic [7:0] f [$]);
    logic [15:0] iph [10];
    logic [31:0] sum, crc;
    int len = 20 + 22 + 1024 + PAD;
    f = {};
    repeat (7) f.push_back(8'h55);
    f.push_back(8'hD5);
    for (int i = 5; i >= 0; i--) f.push_back(DMAC[8*i +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(SMAC[8*i +: 8]);
    f.push_back(8'h08); f.push_back(8'h00);
    iph = '{16'h4500, 16'(len), id, 16'h0000, 16'h40F2, 16'h0000, 16'hC0A8,
            {1'b0, ip_low}, 16'hC0A8, 16'h0202};
    sum = 0;
    foreach (iph[i]) sum += iph[i];
    while (sum >> 16) sum = (sum & 32'hFFFF) + (sum >> 16);
    iph[5] = ~sum[15:0];
    foreach (iph[i]) begin f.push_back(iph[i][15:8]); f.push_back(iph[i][7:0]); end
    repeat (22) f.push_back(8'h00);
    for (int i = 0; i < 512; i++) begin f.push_back(w[i][7:0]); f.push_back(w[i][15:8]); end
    repeat (PAD) f.push_back(8'h00);
    crc = crc_bits(f, 8, f.size());
    for (int i = 0; i < 4; i++) f.push_back(crc[8*i +: 8]);
  endfunction

  logic [15:0] rowd [2][512];
  task automatic load(input int r, input logic [14:0] rownum);
    wait (row_free);
    @(posedge clk); #1;
    for (int i = 0; i < 512; i++) begin
      in_valid = 1; in_data = rowd[r][i]; in_last = (i == 511); in_row = rownum;
      @(posedge clk); #1;
    end
    in_valid = 0; in_last = 0;
  endtask

  int t0, t1;
  initial begin
    in_valid = 0; in_last = 0; in_data = 0; in_row = 0; ip_low = 15'h0210;
    for (int r = 0; r < 2; r++) for (int i = 0; i < 512; i++) rowd[r][i] = 16'($urandom);
    repeat (3) @(posedge clk);
    #1 rst = 0;
    load(0, 15'd5);
    t0 = $time;
    @(posedge clk); #1;
    chk(!row_free, "row buffer busy while sending");
    load(1, 15'd6);           // waits for the first frame to leave
    wait (frames.size() == 2);
    t1 = $time;
    repeat (200) @(posedge clk);
    begin
      logic [7:0] e [$];
      for (int k = 0; k < 2; k++) begin
        int bad = 0;
        build(rowd[k], 16'(5 + k), e);
        chk(frames[k].size() == e.size(), $sformatf("frame %0d length %0d vs %0d", k, frames[k].size(), e.size()));
        for (int i = 0; i < e.size() && i < frames[k].size(); i++)
          if (frames[k][i] !== e[i]) begin
            if (bad < 5) $display("frame %0d byte %0d: got %h exp %h", k, i, frames[k][i], e[i]);
            bad++;
          end
        chk(bad == 0, "frame bytes");
      end
      chk(e.size() == 8 + 14 + 20 + 22 + 1024 + PAD + 4, "frame size");
    end
    chk(min_gap >= 24, "inter-frame gap of 12 bytes");
    chk(lw == rowd[1][511] && lbo == rowd[1][510], "last two transmitted words");
    chk(rin == 2 && rout == 2, "row counters");
    chk(row_free, "free after sending");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
