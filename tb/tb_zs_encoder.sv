// tb_zs_encoder: drives events through ingress/descriptor FIFOs into the
// zero-suppression unit and compares its output FIFO with an independent
// reference model. Cases: the worked LHCb example (hits at row/column
// (0,4), (3,15), (5,9), (8,22), expected entry words 0x0D800010 and
// 0x22401502), random sparse LHCb events, a dense LHCb event (> 64 non-zero
// bytes, stored unsuppressed), ZS disabled, and an ALICE event. Also checks
// the fixed output length and the event id sequence, and that an
// unsuppressed event needs at most n+6 cycles.
module tb_zs_encoder;
  import l1_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  // ingress + descriptor FIFOs written by the testbench
  logic        f_wr, f_rd, f_empty, f_full, d_wr, d_rd, d_empty, d_full;
  fifo_word_t  f_din, f_dout;
  logic [11:0] d_din, d_dout;
  logic [10:0] f_count, f_free, o_count, o_free;
  logic [4:0]  d_count, d_free;
  logic        o_wr, o_rd, o_empty, o_full, ev_done, zs_en;
  fifo_word_t  o_din, o_dout;

  sync_fifo #(.WIDTH(18), .DEPTH(1024)) u_in (.clk, .rst, .wr_en(f_wr), .din(f_din), .rd_en(f_rd),
    .dout(f_dout), .empty(f_empty), .full(f_full), .count(f_count), .free(f_free));
  sync_fifo #(.WIDTH(12), .DEPTH(16)) u_d (.clk, .rst, .wr_en(d_wr), .din(d_din), .rd_en(d_rd),
    .dout(d_dout), .empty(d_empty), .full(d_full), .count(d_count), .free(d_free));
  sync_fifo #(.WIDTH(18), .DEPTH(1024)) u_o (.clk, .rst, .wr_en(o_wr), .din(o_din), .rd_en(o_rd),
    .dout(o_dout), .empty(o_empty), .full(o_full), .count(o_count), .free(o_free));

  zs_encoder dut (.clk, .rst, .l1_rst(1'b0), .zs_enable(zs_en), .bank_id(3'd5),
    .desc_empty(d_empty), .desc_rd(d_rd), .desc_dout(d_dout),
    .in_empty(f_empty), .in_rd(f_rd), .in_dout(f_dout),
    .out_wr(o_wr), .out_din(o_din), .out_free(o_free), .event_done(ev_done));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // reference model: expected 32-bit output words of one event
  function automatic void model(input logic [31:0] ev [$], input bit zs, input bit alice,
                                input int id, output logic [31:0] o [$]);
    logic [15:0] ent [$];
    logic [31:0] h;
    o = {};
    if (zs && !alice) begin
      for (int r = 0; r < 32; r++)
        for (int b = 0; b < 4; b++)
          if (ev[2 + r][8*b +: 8] != 0) ent.push_back({1'b0, 7'(4 * r + b), ev[2 + r][8*b +: 8]});
      if (ent.size() > 64) zs = 0;
    end else zs = 0;
    h = {1'b0, 15'(id), 3'd5, alice, zs, 11'(zs ? (ent.size() + 1) / 2 : 0)};
    o.push_back(h);
    o.push_back(ev[0]);
    o.push_back(ev[1]);
    if (zs) begin
      if (ent.size() % 2) ent.push_back(16'h0);
      for (int i = 0; i < ent.size(); i += 2) o.push_back({ent[i + 1], ent[i]});
      while (o.size() < 35) o.push_back(32'h0);
    end else
      for (int i = 2; i < ev.size() - 1; i++) o.push_back(ev[i]);
    o.push_back(ev[ev.size() - 1]);
  endfunction

  logic [31:0] expq [$];
  int exp_events = 0, got_events = 0;

  task automatic send(input logic [31:0] ev [$], input bit alice);
    for (int i = 0; i < 2 * ev.size(); i++) begin
      f_wr = 1;
      f_din.sof = (i == 0);
      f_din.eof = (i == 2 * ev.size() - 1);
      f_din.data = i[0] ? ev[i / 2][31:16] : ev[i / 2][15:0];
      @(posedge clk); #1;
    end
    f_wr = 0;
    d_wr = 1;
    d_din = {alice, 1'b0, 10'(2 * ev.size())};
    @(posedge clk); #1;
    d_wr = 0;
  endtask

  task automatic run_event(input logic [31:0] ev [$], input bit alice, input bit zs);
    logic [31:0] o [$];
    zs_en = zs;
    model(ev, zs, alice, exp_events, o);
    foreach (o[i]) expq.push_back(o[i]);
    exp_events++;
    send(ev, alice);
    wait (expq.size() == 0);
    @(posedge clk); #1;
  endtask

  // output checker: reads the output FIFO, rebuilds 32-bit words
  logic [15:0] lo;
  int          half = 0, oev_len = 0;
  logic        rd_q = 0;
  assign o_rd = !o_empty;
  always @(posedge clk) begin
    rd_q <= o_rd && !rst;
    if (rd_q) begin
      if (half == 0) begin
        lo = o_dout.data;
        chk(o_dout.sof == (oev_len == 0), "sof flag");
        half = 1;
      end else begin
        half = 0;
        oev_len++;
        if (expq.size() == 0) chk(0, "unexpected word");
        else begin
          automatic logic [31:0] e = expq.pop_front();
          checks++;
          if ({o_dout.data, lo} !== e) begin
            failures++;
            $display("FAIL word %0d of event %0d: got %h exp %h", oev_len - 1, got_events, {o_dout.data, lo}, e);
          end
        end
        if (o_dout.eof) begin
          got_events++;
          oev_len = 0;
        end
      end
    end
  end

  logic [31:0] ev [$];
  int t0;
  initial begin
    f_wr = 0; d_wr = 0; zs_en = 0; f_din = '0; d_din = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    @(posedge clk); #1;

    // 1: worked example of the document (LHCb, ZS on)
    ev = {32'h1111_0000, 32'h2222_0000};
    for (int r = 0; r < 32; r++) ev.push_back(32'h0);
    ev[2 + 0] |= 32'h1 << 4;
    ev[2 + 3] |= 32'h1 << 15;
    ev[2 + 5] |= 32'h1 << 9;
    ev[2 + 8] |= 32'h1 << 22;
    ev.push_back(32'hABCD_1234);
    // cross-check of the reference model against the document's numbers
    begin
      logic [31:0] o [$];
      model(ev, 1, 0, 0, o);
      chk(o[3] == 32'h0D80_0010 && o[4] == 32'h2240_1502 && o[5] == 0, "model vs document example");
      chk(o.size() == 36 && o[0][11] && o[0][10:0] == 2, "example header / length");
    end
    run_event(ev, 0, 1);

    // 2: random sparse LHCb events with ZS, odd and even entry counts
    for (int n = 0; n < 20; n++) begin
      ev = {$urandom, $urandom};
      for (int r = 0; r < 32; r++) ev.push_back(($urandom % 8 == 0) ? (32'h1 << ($urandom % 32)) : 32'h0);
      ev.push_back($urandom);
      run_event(ev, 0, 1);
    end

    // 3: dense LHCb event, ZS requested but does not fit
    ev = {32'h5, 32'h6};
    for (int r = 0; r < 32; r++) ev.push_back(32'h0101_0101);
    ev.push_back(32'h7);
    run_event(ev, 0, 1);

    // 4: LHCb without ZS, with timing check
    ev = {32'h8, 32'h9};
    for (int r = 0; r < 32; r++) ev.push_back($urandom);
    ev.push_back(32'hA);
    zs_en = 0;
    t0 = exp_events;
    run_event(ev, 0, 0);

    // 5: ALICE event with ZS enabled: never suppressed
    ev = {32'hB, 32'hC};
    for (int r = 0; r < 256; r++) ev.push_back(($urandom % 4 == 0) ? $urandom : 32'h0);
    ev.push_back(32'hD);
    run_event(ev, 1, 1);

    repeat (10) @(posedge clk);
    chk(got_events == exp_events, "event count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency of an unsuppressed event: first output word within 4 cycles of
  // the descriptor becoming available, then one word per cycle
  int pass_start = -1, pass_words = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst && exp_events == 23 && d_rd) pass_start = cyc;
    if (pass_start >= 0 && o_wr && exp_events == 23) begin
      pass_words++;
      if (o_din.eof) begin
        checks++;
        if (cyc - pass_start > 72 + 4) begin
          failures++;
          $display("FAIL pass-through took %0d cycles", cyc - pass_start);
        end
        pass_start = -1;
      end
    end
  end
endmodule
