// tb_l0_emulator: triggers the event generator and checks the events it
// produces: burst length (0 counts as 1), LHCb and ALICE lengths, framing
// flags, the XOR parity trailer, the event numbering in L0[0], the single
// hit per event, the minimum gap between events, that the inhibit bit
// suppresses generation and that triggers during a burst are queued.
module tb_l0_emulator;
  localparam int GAP = 20;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic inhibit, alice, trig, v, sof, eof, busy;
  logic [4:0] burst;
  logic [15:0] data;

  l0_emulator #(.GAP_CYCLES(GAP)) dut (.clk, .rst, .inhibit, .alice, .burst, .l0_trig(trig),
    .valid(v), .data, .sof, .eof, .busy);

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

  // event collector
  logic [31:0] w [$];
  logic [15:0] lo;
  int n16 = 0, events = 0, lens [$], gaps [$], last_end = -1, cyc = 0, hits [$];
  bit parity_ok [$];
  always @(posedge clk) begin
    cyc++;
    if (v && !rst) begin
      if (sof) begin
        if (last_end >= 0) gaps.push_back(cyc - last_end - 1);
        w = {}; n16 = 0;
      end
      if (n16 % 2 == 0) lo = data; else w.push_back({data, lo});
      n16++;
      if (eof) begin
        logic [31:0] x;
        int h;
        x = 0;
        h = 0;
        for (int i = 0; i < w.size() - 1; i++) x ^= w[i];
        for (int i = 2; i < w.size() - 1; i++) h += $countones(w[i]);
        parity_ok.push_back(x == w[w.size() - 1] && w[0] == {16'hE000, 16'(events)});
        hits.push_back(h);
        lens.push_back(n16);
        events++;
        last_end = cyc;
      end
    end
  end

  task automatic pulse();
    trig = 1; @(posedge clk); #1; trig = 0;
  endtask

  initial begin
    inhibit = 1; alice = 0; burst = 0; trig = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    pulse();
    repeat (100) @(posedge clk); #1;
    chk(events == 0 && !busy, "inhibited: no events");
    inhibit = 0;
    pulse();
    repeat (200) @(posedge clk); #1;
    chk(events == 1 && lens[0] == 70, "burst 0 gives one LHCb event of 70 words");
    burst = 4;
    pulse();
    repeat (3) @(posedge clk); #1;
    pulse();                       // queued during the burst
    wait (!busy);
    repeat (5) @(posedge clk); #1;
    chk(events == 9, "burst of 4 plus a queued burst of 4");
    alice = 1; burst = 2;
    pulse();
    wait (!busy);
    repeat (5) @(posedge clk); #1;
    chk(events == 11 && lens[10] == 518 && lens[9] == 518, "ALICE events of 518 words");
    foreach (parity_ok[i]) chk(parity_ok[i], "parity trailer and event number");
    foreach (hits[i]) chk(hits[i] == 1, "one hit per event");
    foreach (gaps[i]) chk(gaps[i] >= GAP, "inter-event gap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
