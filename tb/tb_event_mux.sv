// tb_event_mux: fills the two channel FIFOs of a pair with events of random
// lengths while the consumer reads with random pauses, and checks that the
// merged stream carries whole events, that each channel's events appear in
// order with all their words, and that the channels alternate when both have
// events waiting. Also checks full-rate reading (one word per cycle) of a
// single channel.
module tb_event_mux;
  import l1_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic [1:0]  f_wr, f_rd, f_empty, f_full;
  fifo_word_t  f_din [2];
  fifo_word_t  f_dout [2];
  logic [10:0] f_cnt [2];
  logic [10:0] f_free [2];
  logic        o_empty, o_rd;
  fifo_word_t  o_dout;

  for (genvar i = 0; i < 2; i++) begin : g_f
    sync_fifo #(.WIDTH(18), .DEPTH(1024)) u_f (.clk, .rst, .wr_en(f_wr[i]), .din(f_din[i]),
      .rd_en(f_rd[i]), .dout(f_dout[i]), .empty(f_empty[i]), .full(f_full[i]),
      .count(f_cnt[i]), .free(f_free[i]));
  end
  event_mux dut (.clk, .rst, .in_empty(f_empty), .in_rd(f_rd), .in_dout(f_dout),
    .out_empty(o_empty), .out_rd(o_rd), .out_dout(o_dout));

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

  // data word = {channel, event number (7 bits), word index (8 bits)}
  int nev [2] = '{0, 0};
  int exp_ev [2] = '{0, 0};
  task automatic put(input int ch, input int len);
    for (int i = 0; i < len; i++) begin
      f_wr[ch] = 1;
      f_din[ch].sof = (i == 0);
      f_din[ch].eof = (i == len - 1);
      f_din[ch].data = {1'(ch), 7'(nev[ch]), 8'(i)};
      @(posedge clk); #1;
    end
    f_wr[ch] = 0;
    nev[ch]++;
  endtask

  // consumer
  logic rd_q = 0;
  int   cur_ch = -1, widx = 0, last_ch = -1, alternations = 0, events_out = 0;
  bit   pause = 0;
  assign o_rd = !o_empty && !pause;
  always @(posedge clk) begin
    rd_q <= o_rd && !rst;
    if (rd_q) begin
      if (o_dout.sof) begin
        chk(widx == 0, "event starts after previous ended");
        cur_ch = o_dout.data[15];
        if (last_ch >= 0 && cur_ch != last_ch) alternations++;
      end
      chk(o_dout.data[15] == cur_ch, "word from the channel of the current event");
      chk(o_dout.data[14:8] == 7'(exp_ev[cur_ch]), "event order per channel");
      chk(o_dout.data[7:0] == 8'(widx), "word order");
      widx++;
      if (o_dout.eof) begin
        widx = 0;
        exp_ev[cur_ch]++;
        last_ch = cur_ch;
        events_out++;
      end
    end
  end

  int t0, t1;
  initial begin
    f_wr = 0; f_din[0] = '0; f_din[1] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // both channels loaded before reading: strict alternation expected
    pause = 1;
    for (int e = 0; e < 6; e++) begin put(0, 5 + e); put(1, 9 + 2 * e); end
    pause = 0;
    wait (events_out == 12);
    chk(alternations == 11, "alternation with both channels busy");
    // full rate on one channel
    put(0, 200);
    @(posedge clk);
    t0 = $time;
    wait (events_out == 13);
    t1 = $time;
    chk((t1 - t0) / 10 <= 200 + 6, "one word per cycle");
    // random traffic with consumer pauses
    fork
      for (int e = 0; e < 30; e++) put(0, 1 + $urandom % 40);
      for (int e = 0; e < 30; e++) put(1, 1 + $urandom % 40);
      for (int c = 0; c < 3000; c++) begin pause = ($urandom % 3 == 0); @(posedge clk); #1; end
    join
    pause = 0;
    wait (events_out == 73);
    repeat (5) @(posedge clk);
    chk(exp_ev[0] == 37 && exp_ev[1] == 36, "all events delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
