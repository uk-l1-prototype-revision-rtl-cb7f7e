// tb_cmd_if: sends command messages as byte streams and checks the actions
// and answers: a configuration write (register id and 16-bit value, little
// endian), the status answer (type, length 64 and the 32 status words
// little-endian, sampled when the command completes), the reset request
// pulse with an answer, the L1 reset pulse without an answer, that input is
// held off while an answer is being sent, and answer flow control.
module tb_cmd_if;
  import l1_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic rxv, rxr, txv, txr, rwr, sysr, l1r;
  logic [7:0] rxb, txb;
  logic [4:0] rid;
  logic [15:0] rdat;
  logic [15:0] status [32];

  cmd_if dut (.clk, .rst, .rx_valid(rxv), .rx_byte(rxb), .rx_ready(rxr), .tx_valid(txv),
    .tx_byte(txb), .tx_ready(txr), .reg_wr(rwr), .reg_id(rid), .reg_data(rdat),
    .sys_reset_req(sysr), .l1_reset_req(l1r), .status);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [7:0] ans [$];
  int writes = 0, sys_pulses = 0, l1_pulses = 0;
  logic [4:0] last_id;
  logic [15:0] last_data;
  always @(posedge clk) if (!rst) begin
    if (txv && txr) ans.push_back(txb);
    if (rwr) begin writes++; last_id = rid; last_data = rdat; end
    if (sysr) sys_pulses++;
    if (l1r) l1_pulses++;
  end

  task automatic send(input logic [7:0] cmd, input logic [7:0] reg_id, input logic [15:0] val);
    logic [7:0] b [12];
    b = '{cmd, 8'h00, 8'h04, 8'h00, 8'h11, 8'h22, 8'h33, 8'h44, reg_id, 8'h00, val[7:0], val[15:8]};
    for (int i = 0; i < 12; i++) begin
      rxv = 1; rxb = b[i];
      @(posedge clk);
      while (!rxr) @(posedge clk);
      #1;
    end
    rxv = 0;
  endtask

  task automatic check_answer(input string what);
    int t;
    t = 0;
    while (ans.size() < 68 && t < 1000) begin @(posedge clk); #1; t++; end
    chk(ans.size() == 68, {what, ": answer length"});
    if (ans.size() == 68) begin
      bit ok;
      ok = 1;
      chk(ans[0] == 8'h81 && ans[2] == 8'd64 && ans[3] == 0, {what, ": answer header"});
      for (int i = 0; i < 32; i++) if ({ans[5 + 2 * i], ans[4 + 2 * i]} != status[i]) ok = 0;
      chk(ok, {what, ": status words"});
    end
    ans = {};
  endtask

  initial begin
    rxv = 0; rxb = 0; txr = 1;
    for (int i = 0; i < 32; i++) status[i] = 16'(i * 16'h0101 + 16'h1000);
    repeat (3) @(posedge clk);
    #1 rst = 0;
    send(CMD_CONFIG_DATA, 8'd17, 16'hBEEF);
    repeat (2) @(posedge clk); #1;
    chk(writes == 1 && last_id == 17 && last_data == 16'hBEEF, "configuration write");
    check_answer("config");
    send(CMD_STATUS_REQUEST, 0, 0);
    // status changes after the command: the answer keeps the sampled values
    @(posedge clk); #1;
    begin
      logic [15:0] keep;
      keep = status[7];
      status[7] = 16'hFFFF;
      txr = 0; repeat (10) @(posedge clk); #1; txr = 1;   // flow control
      status[7] = keep;
    end
    check_answer("status");
    chk(writes == 1 && sys_pulses == 0, "status request has no side effect");
    send(CMD_RESET_REQUEST, 0, 0);
    repeat (2) @(posedge clk); #1;
    chk(sys_pulses == 1, "reset request pulse");
    check_answer("reset");
    send(CMD_L1_RESET, 0, 0);
    repeat (100) @(posedge clk); #1;
    chk(l1_pulses == 1 && ans.size() == 0, "L1 reset: pulse, no answer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
