// tb_ctrl_regs: writes all control registers and reads them back, checks
// the reset values, the one-cycle read_start pulse on a low-to-high change of
// register 0 bit 3 (and none when the same value is written again), and that
// the IP source address low bits change only on a low-to-high change of
// register 31 bit 15.
module tb_ctrl_regs;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic wr, rs;
  logic [4:0] id;
  logic [15:0] wd;
  logic [15:0] regs [32];
  logic [14:0] ip;

  ctrl_regs #(.IP_LOW_DEFAULT(15'h0210)) dut (.clk, .rst, .wr, .wr_id(id), .wr_data(wd),
    .regs, .read_start(rs), .ip_low(ip));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int starts = 0;
  always @(posedge clk) if (rs && !rst) starts++;

  task automatic write(input int r, input logic [15:0] v);
    wr = 1; id = 5'(r); wd = v; @(posedge clk); #1; wr = 0;
    repeat (2) @(posedge clk); #1;
  endtask

  logic [15:0] shadow [32];
  initial begin
    wr = 0; id = 0; wd = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    chk(regs[2] == 16'h0001 && regs[31] == 16'h0210 && regs[0] == 0 && ip == 15'h0210, "reset values");
    for (int r = 1; r < 31; r++) begin shadow[r] = 16'($urandom); write(r, shadow[r]); end
    for (int r = 1; r < 31; r++) chk(regs[r] == shadow[r], "read back");
    write(0, 16'h0902);
    chk(starts == 0, "no start without bit 3");
    write(0, 16'h090A);
    chk(starts == 1, "start on rising bit 3");
    write(0, 16'h090A);
    chk(starts == 1, "no start when bit 3 stays high");
    write(0, 16'h0902);
    write(0, 16'h090A);
    chk(starts == 2, "second start");
    write(31, 16'h0213);
    chk(ip == 15'h0210, "IP unchanged without trigger");
    write(31, 16'h8213);
    chk(ip == 15'h0213, "IP updated on rising bit 15");
    write(31, 16'h8555);
    chk(ip == 15'h0213, "no update while bit 15 stays high");
    write(31, 16'h0555);
    chk(ip == 15'h0213, "no update on falling bit 15");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
