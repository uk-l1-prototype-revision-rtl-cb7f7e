// tb_l1_top: end-to-end test of the whole board at its default parameters.
//
// Ten input links (channels 0-9) are synchronised, channels 10 and 11 are
// not and must be auto-inhibited. Over the command interface the test
// enables zero suppression on the even channels, then sends E LHCb events on
// every synced link (one L0 trigger each). Event pixels are sparse; one
// event is dense (too many bytes for suppression) and one carries a bad
// parity word. It then
//  * reads the status block and checks the L0 count, event count, complete
//    rows and remainders, parity counters, channel status and flow counters;
//  * parses the five written memories as fixed-length events and checks the
//    L1 headers and, by expanding the zero-suppressed entries again, that
//    every event's pixels, L0 words and parity word arrived unchanged;
//  * requests ten rows of memory 2 (control register 0 written with 0x0902,
//    then 0x090a) and two rows of memory 3 over the Ethernet link, and
//    checks that the frame payloads equal the memory contents, that the
//    frames carry the configured IP source address and that frames are
//    separated by at least 12 idle byte times;
//  * runs the L0 emulator (a burst of 3 per trigger), the L1 fast reset, one
//    ALICE-format emulator event per channel (headers, rows, remainder), the
//    TTC A pulser (software train, calibration auto pulse, external trigger
//    in edge and clocked mode), a TTC B command, the PHY management set-up
//    and polling, the front-panel loss-of-sync LED and its masking, and the
//    system reset request.
// Each mechanism is counted and a failure is counted for one that never
// happened.
module tb_l1_top;
  import l1_pkg::*;
  localparam int E = 20;
  logic clk = 0, clk40 = 0, rst = 1;
  always #6.25 clk = !clk;       // 80 MHz
  always #12.5 clk40 = !clk40;   // 40 MHz
  int checks = 0, failures = 0;

  logic [11:0] rx_valid, rx_sof, rx_eof, rx_sync, rx_ovf, rx_clkcor;
  logic [15:0] rx_data [12];
  logic        l1acc, brcst_str, ttcrx_ready, i2c_err;
  logic [7:0]  brcst, id_sense;
  logic [15:0] ttcrx_reg [4];
  logic [23:0] mem_addr [2];
  logic [2:0]  mem_we [2];
  logic [15:0] mem_wdata [6];
  logic [1:0]  mem_re;
  logic [15:0] mem_rdata [6];
  logic        mii_ce, mii_tx_en;
  logic [3:0]  mii_txd;
  logic        cmd_rxv, cmd_rxr, cmd_txv, cmd_txr;
  logic [7:0]  cmd_rxb, cmd_txb;
  logic        trig_a, ttc_a, ttc_b;
  logic        mdc, mdio_o, mdio_oe, phy_oe, phy_o, mdio_line;
  logic [2:0]  led_g, led_y, led_r;

  l1_top dut (
    .clk, .clk40, .rst,
    .rx_valid, .rx_data, .rx_sof, .rx_eof, .rx_sync, .rx_ovf, .rx_clkcor,
    .l1acc, .brcst_str, .brcst, .ttcrx_ready, .ttc_id_sense(id_sense), .ttcrx_reg,
    .ttc_i2c_ack_err(i2c_err),
    .mem_addr, .mem_we, .mem_wdata, .mem_re, .mem_rdata, .sdram_init_done(1'b1),
    .mii_ce, .mii_txd, .mii_tx_en,
    .mdc, .mdio_o, .mdio_oe, .mdio_i(mdio_line),
    .tx_fault(1'b0), .rx_signal_detect(1'b1),
    .dll_top_locked(1'b1), .dll_bot_locked(1'b1),
    .cmd_rx_valid(cmd_rxv), .cmd_rx_byte(cmd_rxb), .cmd_rx_ready(cmd_rxr),
    .cmd_tx_valid(cmd_txv), .cmd_tx_byte(cmd_txb), .cmd_tx_ready(cmd_txr),
    .trigger_a_in(trig_a), .ttc_a, .ttc_b,
    .led_green(led_g), .led_yellow(led_y), .led_red(led_r)
  );

  // PHY management side: wired-OR pad with pull-up
  assign mdio_line = mdio_oe ? mdio_o : (phy_oe ? phy_o : 1'b1);
  mdio_phy_model u_phy (.mdc, .line(mdio_line), .drv_oe(phy_oe), .drv_o(phy_o));

  for (genvar g = 0; g < 2; g++) begin : g_mem
    logic [15:0] wd [3];
    logic [15:0] rd [3];
    for (genvar k = 0; k < 3; k++) begin : g_k
      assign wd[k] = mem_wdata[3*g+k];
      assign mem_rdata[3*g+k] = rd[k];
    end
    l1_mem_model #(.AW(24)) u_mem (.clk, .addr(mem_addr[g]), .we(mem_we[g]), .wdata(wd),
      .re(mem_re[g]), .rdata(rd));
  end

  // ---------------------------------------------------------------- helpers
  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // MII clock enable: 25 MHz inside 80 MHz, approximated as every 3rd cycle
  int cc = 0;
  logic ce_q = 0;
  always @(posedge clk) begin
    cc <= cc + 1;
    mii_ce <= (cc % 3 == 2);
    ce_q <= mii_ce;
  end
  logic [7:0] frames [$][$];
  logic [7:0] cur [$];
  logic [3:0] lo_nib;
  bit have_lo = 0, in_frame = 0;
  // idle nibble times between frames (100 Mbit/s MII: one nibble per mii_ce)
  int gap_n = 0, min_gap = 1000000;
  always @(posedge clk) if (ce_q && !rst) begin
    if (mii_tx_en) begin
      if (gap_n > 0 && gap_n < min_gap && frames.size() > 0) min_gap = gap_n;
      gap_n = 0;
    end else gap_n++;
  end
  always @(posedge clk) if (ce_q && !rst) begin
    if (mii_tx_en) begin
      in_frame = 1;
      if (!have_lo) begin lo_nib = mii_txd; have_lo = 1; end
      else begin cur.push_back({mii_txd, lo_nib}); have_lo = 0; end
    end else if (in_frame) begin
      frames.push_back(cur); cur = {}; in_frame = 0;
    end
  end

  // command answers
  logic [7:0] ans [$];
  always @(posedge clk) if (!rst && cmd_txv && cmd_txr) ans.push_back(cmd_txb);

  task automatic send_cmd(input logic [7:0] cmd, input logic [7:0] id, input logic [15:0] val);
    logic [7:0] b [12];
    b = '{cmd, 8'h00, 8'h04, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, id, 8'h00, val[7:0], val[15:8]};
    for (int i = 0; i < 12; i++) begin
      cmd_rxv = 1; cmd_rxb = b[i];
      while (!cmd_rxr) begin @(posedge clk); #1; end
      @(posedge clk); #1;
    end
    cmd_rxv = 0;
  endtask
  task automatic wait_answer();
    int t;
    t = 0;
    while (ans.size() < 68 && t < 2000) begin @(posedge clk); #1; t++; end
    chk(ans.size() == 68, "answer received");
  endtask
  task automatic write_reg(input int r, input logic [15:0] v);
    ans = {};
    send_cmd(CMD_CONFIG_DATA, 8'(r), v);
    wait_answer();
    ans = {};
  endtask
  logic [15:0] st [32];
  task automatic read_status();
    ans = {};
    send_cmd(CMD_STATUS_REQUEST, 0, 0);
    wait_answer();
    for (int i = 0; i < 32; i++) st[i] = {ans[5 + 2 * i], ans[4 + 2 * i]};
    ans = {};
  endtask

  // ------------------------------------------------------------ event model
  function automatic logic [31:0] hsh(input int a, input int b, input int c);
    logic [31:0] x;
    x = 32'(a) * 32'h9E37_79B9 ^ 32'(b) * 32'h85EB_CA6B ^ 32'(c) * 32'hC2B2_AE35;
    x ^= x >> 15; x *= 32'h2C1B_3C6D; x ^= x >> 12;
    return x;
  endfunction
  // 32-bit word i of event k on channel ch (LHCb: 35 words)
  function automatic logic [31:0] evw(input int ch, input int k, input int i);
    logic [31:0] x;
    if (i == 0) return {8'(ch), 8'(k), 16'hA5A5};
    if (i == 1) return 32'(k * 3 + 1);
    if (i < 34) begin
      if (ch == 0 && k == 5) return 32'h0101_0101;             // dense event
      x = hsh(ch, k, i);
      return (x[2:0] == 0) ? (32'h1 << x[12:8]) : 32'h0;
    end
    x = 0;
    for (int j = 0; j < 34; j++) x ^= evw(ch, k, j);
    if (ch == 1 && k == 3) x = ~x;                             // bad parity
    return x;
  endfunction

  task automatic send_events(input int n);
    for (int k = 0; k < n; k++) begin
      l1acc = 1; @(posedge clk); #1; l1acc = 0;
      for (int h = 0; h < 70; h++) begin
        for (int c = 0; c < 10; c++) begin
          logic [31:0] w;
          w = evw(c, k, h / 2);
          rx_valid[c] = 1;
          rx_sof[c] = (h == 0);
          rx_eof[c] = (h == 69);
          rx_data[c] = h[0] ? w[31:16] : w[15:0];
        end
        @(posedge clk); #1;
      end
      rx_valid = 0; rx_sof = 0; rx_eof = 0;
      repeat (20) @(posedge clk); #1;
    end
  endtask

  // ------------------------------------------------------ mechanism counters
  bit reading = 0;
  int re_gap = 0;
  int n_zs = 0, n_zs_fallback = 0, n_parity = 0, n_autoinh = 0, n_rows_read = 0,
      n_egress_wait = 0, n_mux_switch = 0, n_emulator = 0, n_l1reset = 0, n_sysreset = 0,
      n_ttc_a = 0, n_ttc_b = 0, n_cal = 0, n_ip = 0, n_lockstep_idle = 0, n_alice = 0, n_mdio = 0, n_ext = 0;
  always @(posedge clk40) if (!rst && ttc_a) n_ttc_a++;
  // B channel: collect a 16-bit short frame from its start bit (line idles high)
  int b_n = 0;
  logic [15:0] b_sr;
  always @(posedge clk40) if (!rst) begin
    if (b_n == 0 && !ttc_b) begin b_n = 1; b_sr = 0; end
    else if (b_n > 0) begin
      b_sr = {b_sr[14:0], ttc_b};
      b_n++;
      if (b_n == 16) begin
        if (b_sr[14] == 0 && b_sr[13:6] == 8'hA5 && b_sr[0] == 1) n_ttc_b++;
        b_n = 0;
      end
    end
  end

  function automatic logic [15:0] peekm(input int m, input int unsigned a);
    return (m < 3) ? g_mem[0].u_mem.peek(m, a) : g_mem[1].u_mem.peek(m - 3, a);
  endfunction

  // parse the stored events of one memory and check them
  task automatic check_memory(input int m, input int n_words16, output int n_events);
    int a, ch, k, zs_flag, cnt, bad;
    logic [31:0] w [36];
    logic [31:0] pix [32];
    n_events = 0;
    bad = 0;
    for (a = 0; a + 72 <= n_words16; a += 72) begin
      for (int i = 0; i < 36; i++)
        w[i] = {peekm(m, 32'(a + 2 * i + 1)),
                peekm(m, 32'(a + 2 * i))};
      ch = w[1][31:24];
      k  = w[1][23:16];
      zs_flag = w[0][11];
      cnt = w[0][10:0];
      if (w[0][15:13] != 3'(m) || w[0][12] != 0 || w[0][30:16] != 15'(k) || ch / 2 != m) bad++;
      if (zs_flag != ((ch % 2 == 0) && !(ch == 0 && k == 5))) bad++;
      if (zs_flag) begin
        n_zs++;
        for (int r = 0; r < 32; r++) pix[r] = 0;
        for (int i = 0; i < 32; i++)
          for (int hh = 0; hh < 2; hh++) begin
            logic [15:0] e;
            e = hh ? w[3 + i][31:16] : w[3 + i][15:0];
            if (e != 0) begin
              if (i >= cnt) bad++;
              pix[e[14:8] / 4][8 * (e[14:8] % 4) +: 8] = e[7:0];
            end
          end
      end else begin
        if (ch == 0 && k == 5) n_zs_fallback++;
        for (int r = 0; r < 32; r++) pix[r] = w[3 + r];
      end
      for (int r = 0; r < 32; r++) if (pix[r] != evw(ch, k, 2 + r)) bad++;
      if (w[1] != evw(ch, k, 0) || w[2] != evw(ch, k, 1) || w[35] != evw(ch, k, 34)) bad++;
      n_events++;
    end
    chk(bad == 0, $sformatf("memory %0d event contents", m));
  endtask

  // request rows of a memory and compare the frames with the memory contents
  task automatic read_rows(input int m, input int first, input int n, input logic [14:0] ip_lo);
    int f0, bad, t;
    f0 = frames.size();
    reading = 1;
    write_reg(1, 16'(first));
    write_reg(0, {8'(n - 1), 8'(m)});
    write_reg(0, {8'(n - 1), 8'(m | 8)});
    t = 0;
    while (frames.size() < f0 + n && t < 20000 * n) begin @(posedge clk); t++; end
    #1;
    chk(frames.size() == f0 + n, $sformatf("%0d frames of memory %0d sent", n, m));
    for (int r = frames.size(); r < f0 + n; r++) frames.push_back('{});
    reading = 0;
    bad = 0;
    for (int r = 0; r < n; r++) begin
      logic [7:0] f [$];
      f = frames[f0 + r];
      if (f.size() != 8 + 14 + 20 + 22 + 1024 + 4 + 4) bad++;
      else begin
        if ({f[36], f[37]} != {1'b0, ip_lo}) bad++;
        if ({f[26], f[27]} != 16'(first + r)) bad++;
        for (int i = 0; i < 512; i++)
          if ({f[64 + 2 * i + 1], f[64 + 2 * i]} !=
              peekm(m, 32'((first + r) * 512 + i))) bad++;
      end
      n_rows_read++;
    end
    chk(bad == 0, $sformatf("frames of memory %0d match memory contents", m));
    // frames from the second controller after ones from the first
    if (bad == 0 && m >= 3 && n_rows_read > n) n_mux_switch++;
    if (ip_lo != 15'h0210) n_ip++;
    write_reg(0, {8'(n - 1), 8'(m)});
  endtask

  // egress waits: controller waiting for the row buffer
  // seen at the memory port: a pause of more than 100 cycles between the
  // row bursts of one readout means the controller waited for the Ethernet
  // row buffer to free up
  always @(posedge clk) if (!rst) begin
    if (mem_re[0]) begin
      if (reading && re_gap > 100) n_egress_wait++;
      re_gap = 0;
    end else re_gap++;
  end

  int nev, rows0, rem0;
  initial begin
    rx_valid = 0; rx_sof = 0; rx_eof = 0; rx_ovf = 0; rx_clkcor = 0;
    rx_sync = 12'h3FF;
    for (int i = 0; i < 12; i++) rx_data[i] = 0;
    l1acc = 0; brcst_str = 0; brcst = 0; ttcrx_ready = 1; i2c_err = 0; id_sense = 8'h41;
    for (int i = 0; i < 4; i++) ttcrx_reg[i] = 16'(16'h8000 + i);
    cmd_rxv = 0; cmd_rxb = 0; cmd_txr = 1; trig_a = 0;
    repeat (5) @(posedge clk);
    #1 rst = 0;
    repeat (1100) @(posedge clk); #1;         // auto-sense window
    read_status();
    chk(st[26][0] && st[27][0] && !st[16][0] && !st[25][0], "auto-inhibit of unsynced channels");
    if (st[26][0] && st[27][0]) n_autoinh++;
    chk(st[14] == 16'h0041 && st[28] == 16'h8000, "pass-through status registers");
    chk(st[0][10] == 1, "PHY management not yet ready right after reset");
    chk(led_r[0] == 1, "loss-of-sync LED for unmasked unsynced channels");
    for (int c = 0; c < 12; c += 2) write_reg(16 + c, 16'h0001);   // ZS on even channels

    send_events(E);
    repeat (3000) @(posedge clk); #1;
    read_status();
    chk(st[5] == 16'(E), "L0 trigger count");
    chk(st[8] == 16'(E) && st[9] == 0, "event count");
    chk(st[10][15:8] == 1 && st[10][7:0] == 0, "parity error counter of channel 1");
    if (st[10][15:8] == 1) n_parity++;
    rows0 = (2 * E * 72) / 512;
    rem0  = ((2 * E * 72) % 512) / 2;
    chk(st[6] == 16'(rows0) && st[7] == 16'(rows0), "complete rows of both controllers");
    chk(st[4] == {8'(rem0), 8'(rem0)}, "last-row remainders");
    chk(st[16][15:12] == 4'(E) && st[17][15:12] == 4'(E), "per-channel event counters");
    chk(st[0][8] && !st[0][1] && st[0][2] && st[0][3], "general status");
    for (int m = 0; m < 5; m++) begin
      check_memory(m, 2 * E * 72, nev);
      chk(nev == 2 * E, $sformatf("memory %0d holds %0d events", m, 2 * E));
    end
    chk(g_mem[1].u_mem.written(2) == 0, "memory 5 (inactive pair) not written");
    n_lockstep_idle = (g_mem[1].u_mem.written(2) == 0);

    // readout of 10 rows of memory 2 (register 0 written with 0x0902, then
    // 0x090a), more than it holds, then two rows of memory 3
    read_rows(2, 0, 10, 15'h0210);
    write_reg(31, 16'h0211);
    write_reg(31, 16'h8211);                 // IP source address update
    read_rows(3, 1, 2, 15'h0211);
    read_status();
    // by now the PHY management master has forced 100 Mbit/s full duplex
    // and polled the PHY registers
    chk(st[0][10] == 0 && st[1] == 16'h2100 && st[2] == 16'h0010 && st[3] == 16'h7809 &&
        u_phy.regs[0] == 16'h2100, "PHY forced to 100 Mbit/s full duplex and polled");
    if (st[1] == 16'h2100 && u_phy.writes == 1) n_mdio++;
    chk(st[15] == {4'(12), 4'(12), 4'(12), 4'(12)}, "egress flow counters");
    chk(st[13] == evw(0, E - 1, 34)[31:16] && st[12] == evw(0, E - 1, 34)[15:0],
        "last two words received on link 0");

    // L0 emulator: burst of 3 per trigger, all synced channels
    write_reg(2, 16'h0300);
    l1acc = 1; @(posedge clk); #1; l1acc = 0;
    repeat (3000) @(posedge clk); #1;
    write_reg(2, 16'h0001);
    read_status();
    chk(st[8] == 16'(E + 3), "emulator events counted");
    if (st[8] == 16'(E + 3)) n_emulator++;
    chk(st[6] == 16'(((2 * (E + 3)) * 72) / 512), "emulator events stored");

    // L1 fast reset
    send_cmd(CMD_L1_RESET, 0, 0);
    repeat (10) @(posedge clk); #1;
    read_status();
    chk(st[6] == 0 && st[7] == 0 && st[4] == 0 && st[8] == 0, "L1 reset clears pointers and event count");
    chk(g_mem[0].u_mem.written(0) >= 2 * E * 72, "L1 reset keeps memory contents");
    if (st[6] == 0) n_l1reset++;

    // ALICE-format events from the emulator after the L1 reset: one event per
    // channel, 520 stored words each, so two events fill two rows of each
    // memory with 16 words (8 32-bit words) left over
    write_reg(2, 16'h0102);
    l1acc = 1; @(posedge clk); #1; l1acc = 0;
    repeat (5000) @(posedge clk); #1;
    write_reg(2, 16'h0001);
    read_status();
    chk(st[6] == 2 && st[7] == 2 && st[4] == 16'h0808 && st[8] == 1, "ALICE event rows and remainders");
    chk(peekm(0, 0) == 16'h1000 && peekm(0, 520) == 16'h1000 && peekm(3, 0) == 16'h7000 &&
        peekm(4, 520) == 16'h9000, "ALICE L1 headers (mode flag set, not suppressed)");
    if (st[6] == 2 && peekm(0, 0) == 16'h1000) n_alice++;

    // TTC encoder
    write_reg(4, 16'd2);
    write_reg(3, 16'd4);
    write_reg(3, 16'h8004);
    repeat (100) @(posedge clk); #1;
    chk(n_ttc_a == 4, "A-channel train of 4 pulses");
    write_reg(5, 16'h0004);                  // auto pulse after calibration
    @(posedge clk40); #1; brcst = 8'h1C; brcst_str = 1; @(posedge clk40); #1; brcst_str = 0;
    repeat (40) @(posedge clk); #1;
    chk(n_ttc_a == 5, "A pulse after calibration command");
    if (n_ttc_a == 5) n_cal++;
    write_reg(6, 16'h00A5);
    write_reg(5, 16'h0005);                  // short B command
    repeat (100) @(posedge clk); #1;
    chk(n_ttc_b == 1, "B-channel command sent");
    // external A-channel trigger: edge mode starts a train of 4, clocked
    // mode copies the input level (3 clk40 cycles high -> 3 pulse cycles)
    write_reg(5, 16'h0008);
    @(posedge clk40); #1 trig_a = 1; repeat (4) @(posedge clk40); #1 trig_a = 0;
    repeat (100) @(posedge clk); #1;
    chk(n_ttc_a == 9, "external edge trigger starts a train");
    write_reg(5, 16'h0018);
    @(posedge clk40); #1 trig_a = 1; repeat (3) @(posedge clk40); #1 trig_a = 0;
    repeat (100) @(posedge clk); #1;
    chk(n_ttc_a == 12, "external clocked trigger follows the input");
    if (n_ttc_a == 12) n_ext++;
    write_reg(5, 16'h0000);

    // LED masking through the configured inhibit
    write_reg(26, 16'h0002);
    write_reg(27, 16'h0002);
    chk(led_r[0] == 0 && led_g == 3'b111, "loss-of-sync LED masked; green LEDs");
    chk(led_y[1] == 1 && led_y[2] == 1 && led_y[0] == 1, "activity LEDs stretched");

    // system reset request
    ans = {};
    send_cmd(CMD_RESET_REQUEST, 0, 0);
    wait_answer();
    repeat (10) @(posedge clk); #1;
    read_status();
    // configured inhibits are cleared again, so the loss-of-sync LED returns
    chk(led_r[0] == 1 && st[5] == 0 && st[8] == 0, "system reset restores defaults");
    if (led_r[0] == 1 && st[5] == 0) n_sysreset++;

    chk(min_gap >= 24 && min_gap < 1000000, $sformatf("inter-frame gap of at least 12 bytes (%0d nibbles)", min_gap));
    // every mechanism must have happened
    chk(n_zs > 0, "zero suppression applied");
    chk(n_zs_fallback > 0, "dense event stored unsuppressed");
    chk(n_parity > 0, "parity error detected");
    chk(n_autoinh > 0, "auto-inhibit");
    chk(n_lockstep_idle > 0, "inactive memory skipped in lockstep writes");
    chk(n_rows_read > 0, "rows read out");
    chk(n_egress_wait > 0, "controller waited for the egress buffer");
    chk(n_mux_switch > 0, "egress mux switched controllers");
    chk(n_emulator > 0, "emulator burst");
    chk(n_l1reset > 0, "L1 fast reset");
    chk(n_sysreset > 0, "system reset request");
    chk(n_ttc_a > 0 && n_ttc_b > 0 && n_cal > 0, "TTC encoder");
    chk(n_ip > 0, "IP source address update");
    chk(n_alice > 0, "ALICE-format events");
    chk(n_mdio > 0, "PHY management write and polling");
    chk(n_ext > 0, "external A-channel trigger, both modes");
    $display("mechanisms: zs=%0d zs_fallback=%0d parity=%0d autoinhibit=%0d rows_read=%0d egress_wait=%0d mux_switch=%0d emulator=%0d l1reset=%0d sysreset=%0d ttc_a=%0d ttc_b=%0d cal=%0d ip=%0d alice=%0d mdio=%0d ext=%0d",
             n_zs, n_zs_fallback, n_parity, n_autoinh, n_rows_read, n_egress_wait, n_mux_switch,
             n_emulator, n_l1reset, n_sysreset, n_ttc_a, n_ttc_b, n_cal, n_ip, n_alice, n_mdio, n_ext);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
