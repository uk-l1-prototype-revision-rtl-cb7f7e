// tb_ttc_a_pulser: checks the A-channel pulser: number and spacing of the
// pulses of a software-triggered train (including interval 0, consecutive
// pulses, and count 0), an external edge-triggered train, the external
// clocked mode, and the single pulse 'interval' cycles after a calibration
// broadcast when the auto mode is on (and none when it is off). The output
// rises interval+1 cycles after the strobe edge; 'times' records it one
// cycle later, hence interval+2.
module tb_ttc_a_pulser;
  logic clk = 0, rst = 1;
  always #12.5 clk = !clk;
  int checks = 0, failures = 0;
  logic sw, auto_cal, ext_en, ext_mode, ext_in, bstr, a, busy;
  logic [14:0] count;
  logic [15:0] interval;
  logic [7:0]  bc;

  ttc_a_pulser #(.CALIB_CMD(8'h1C)) dut (.clk40(clk), .rst, .sw_trig(sw), .count, .interval,
    .auto_cal_en(auto_cal), .ext_en, .ext_mode, .ext_in, .brcst_str(bstr), .brcst(bc),
    .a_out(a), .train_busy(busy));

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

  int cyc = 0;
  int times [$];
  always @(posedge clk) begin
    cyc++;
    if (a && !rst) times.push_back(cyc);
  end

  task automatic check_train(input int n, input int iv, input string what);
    chk(times.size() == n, $sformatf("%s: %0d pulses, got %0d", what, n, times.size()));
    for (int i = 1; i < times.size(); i++)
      chk(times[i] - times[i - 1] == iv + 1, {what, ": spacing"});
    times = {};
  endtask

  initial begin
    sw = 0; auto_cal = 0; ext_en = 0; ext_mode = 0; ext_in = 0; bstr = 0; bc = 0;
    count = 0; interval = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (5) @(posedge clk); #1;
    count = 5; interval = 3;
    sw = 1; repeat (60) @(posedge clk); #1;
    check_train(5, 3, "train 5/3");
    sw = 0; repeat (5) @(posedge clk); #1;
    count = 7; interval = 0;
    sw = 1; repeat (60) @(posedge clk); #1;
    check_train(7, 0, "consecutive");
    sw = 0; repeat (5) @(posedge clk); #1;
    count = 0;
    sw = 1; repeat (30) @(posedge clk); #1;
    check_train(0, 0, "count 0");
    sw = 0;
    // external edge trigger
    count = 3; interval = 10; ext_en = 1; ext_mode = 0;
    repeat (5) @(posedge clk); #1;
    ext_in = 1; repeat (80) @(posedge clk); #1;
    check_train(3, 10, "external edge");
    ext_in = 0; repeat (5) @(posedge clk); #1;
    // external clocked mode: one pulse per cycle the input is high
    ext_mode = 1;
    ext_in = 1; repeat (6) @(posedge clk); #1; ext_in = 0;
    repeat (10) @(posedge clk); #1;
    check_train(6, 0, "external clocked");
    ext_en = 0;
    // calibration broadcast
    interval = 12; auto_cal = 1;
    bc = 8'h1C; bstr = 1; @(posedge clk); #1; bstr = 0;
    begin
      int t;
      t = cyc;
      repeat (40) @(posedge clk); #1;
      chk(times.size() == 1 && times[0] - t == 12 + 2, "auto pulse after calibration command");
      times = {};
    end
    bc = 8'h1D; bstr = 1; @(posedge clk); #1; bstr = 0;
    repeat (40) @(posedge clk); #1;
    check_train(0, 0, "other broadcast");
    auto_cal = 0;
    bc = 8'h1C; bstr = 1; @(posedge clk); #1; bstr = 0;
    repeat (40) @(posedge clk); #1;
    check_train(0, 0, "auto mode off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
