// tb_rx_channel: sends framed events into an input channel front end and
// checks what it writes to the ingress FIFO and the descriptor queue:
// LHCb and ALICE events with good and bad parity (mode by length), forced
// mode, the parity error counter, whole-event drop when the FIFO lacks room,
// the configuration inhibit, the auto-inhibit of a channel without link sync
// at the end of the sense window, the status register counters and the
// masked loss-of-sync output. FIFO writes must happen in the cycle of the
// input word.
module tb_rx_channel;
  import l1_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  chan_cfg_t   cfg;
  logic        v, sof, eof, sync, ovf, cc, zsev;
  logic [15:0] data;
  logic        f_wr, d_wr, inh, los;
  fifo_word_t  f_din;
  logic [11:0] d_din;
  logic [10:0] f_free;
  logic        d_full;
  logic [15:0] status;
  logic [7:0]  perr;

  rx_channel #(.SENSE_CYCLES(16)) dut (.clk, .rst, .cfg, .rx_valid(v), .rx_data(data),
    .rx_sof(sof), .rx_eof(eof), .rx_sync(sync), .rx_ovf_pulse(ovf), .rx_clkcor_pulse(cc),
    .zs_event_pulse(zsev), .fifo_wr(f_wr), .fifo_din(f_din), .fifo_free(f_free),
    .desc_wr(d_wr), .desc_din(d_din), .desc_full(d_full), .status, .parity_errors(perr),
    .inhibited(inh), .los_masked(los));

  // second channel whose link never syncs
  logic        inh2, los2, f_wr2, d_wr2;
  fifo_word_t  f_din2;
  logic [11:0] d_din2;
  logic [15:0] status2;
  logic [7:0]  perr2;
  rx_channel #(.SENSE_CYCLES(16)) dut2 (.clk, .rst, .cfg('0), .rx_valid(v), .rx_data(data),
    .rx_sof(sof), .rx_eof(eof), .rx_sync(1'b0), .rx_ovf_pulse(1'b0), .rx_clkcor_pulse(1'b0),
    .zs_event_pulse(1'b0), .fifo_wr(f_wr2), .fifo_din(f_din2), .fifo_free(11'd1024),
    .desc_wr(d_wr2), .desc_din(d_din2), .desc_full(1'b0), .status(status2), .parity_errors(perr2),
    .inhibited(inh2), .los_masked(los2));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // monitor of what the DUT writes
  fifo_word_t wq [$];
  logic [11:0] dq [$];
  int wr2 = 0;
  always @(posedge clk) begin
    if (f_wr) begin
      wq.push_back(f_din);
      chk(v && f_din.data == data, "write in cycle of input word");
    end
    if (d_wr) dq.push_back(d_din);
    if (f_wr2) wr2++;
  end

  task automatic send(input int n32, input bit bad_parity);
    logic [31:0] w, x;
    x = 0;
    for (int i = 0; i < n32; i++) begin
      w = (i == n32 - 1) ? (bad_parity ? ~x : x) : $urandom;
      x ^= w;
      for (int h = 0; h < 2; h++) begin
        v = 1; sof = (i == 0 && h == 0); eof = (i == n32 - 1 && h == 1);
        data = h ? w[31:16] : w[15:0];
        @(posedge clk); #1;
      end
    end
    v = 0; sof = 0; eof = 0;
    repeat (3) @(posedge clk); #1;
  endtask

  task automatic expect_event(input int n16, input bit alice, input bit perr_exp, input string what);
    chk(wq.size() == n16, {what, ": words written"});
    if (wq.size() > 0) chk(wq[0].sof && wq[wq.size() - 1].eof, {what, ": flags"});
    chk(dq.size() == 1, {what, ": one descriptor"});
    if (dq.size() == 1) begin
      chk(dq[0][11] == alice, {what, ": mode"});
      chk(dq[0][10] == perr_exp, {what, ": parity flag"});
      chk(dq[0][9:0] == n16, {what, ": length"});
    end
    wq = {}; dq = {};
  endtask

  initial begin
    cfg = '0; v = 0; sof = 0; eof = 0; data = 0; sync = 1; ovf = 0; cc = 0; zsev = 0;
    f_free = 11'd1024; d_full = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // data before the sense window ends is dropped
    send(35, 0);
    chk(wq.size() == 0, "dropped while sensing");
    repeat (20) @(posedge clk); #1;
    chk(!inh && inh2, "auto-inhibit of the unsynced channel only");
    chk(status2[1:0] == 2'b11, "unsynced channel status: inhibited, loss of sync");
    chk(los2 && !los, "auto-inhibit does not mask loss of sync");

    send(35, 0);  expect_event(70, 0, 0, "LHCb");
    send(259, 0); expect_event(518, 1, 0, "ALICE");
    send(35, 1);  expect_event(70, 0, 1, "LHCb bad parity");
    send(259, 1); expect_event(518, 1, 1, "ALICE bad parity");
    chk(perr == 2, "parity error counter");
    cfg.force_mode = 1; cfg.alice = 1;
    send(35, 0);  expect_event(70, 1, 0, "forced ALICE");
    cfg.force_mode = 0;
    // not enough room: the whole event is dropped
    f_free = 11'd517;
    send(35, 0);
    chk(wq.size() == 0 && dq.size() == 0, "drop without room");
    f_free = 11'd1024;
    d_full = 1;
    send(35, 0);
    chk(wq.size() == 0 && dq.size() == 0, "drop without descriptor room");
    d_full = 0;
    cfg.inhibit = 1;
    send(35, 0);
    chk(wq.size() == 0 && inh && status[0], "configured inhibit");
    cfg.inhibit = 0;
    chk(wr2 == 0, "auto-inhibited channel wrote nothing");
    // status counters
    for (int i = 0; i < 3; i++) begin ovf = 1; @(posedge clk); #1; ovf = 0; end
    for (int i = 0; i < 5; i++) begin cc = 1; @(posedge clk); #1; cc = 0; end
    for (int i = 0; i < 7; i++) begin zsev = 1; @(posedge clk); #1; zsev = 0; end
    chk(status[7:4] == 3 && status[11:8] == 5 && status[15:12] == 7, "status counters");
    sync = 0; #1;
    chk(los && status[1], "loss of sync");
    cfg.inhibit = 1; #1;
    chk(!los, "loss of sync masked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
