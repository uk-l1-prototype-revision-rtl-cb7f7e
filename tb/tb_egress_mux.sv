// tb_egress_mux: passes row streams from either input and checks the
// selection and the two frame counters (rows entering from both inputs,
// rows leaving the selected one), including their 4-bit wrap-around.
module tb_egress_mux;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;
  logic sel, ov, ol;
  logic [1:0] iv, il;
  logic [15:0] id [2];
  logic [15:0] od;
  logic [14:0] ir [2];
  logic [14:0] orow;
  logic [3:0] fin, fout;

  egress_mux #(.ROW_BITS(15)) dut (.clk, .rst, .sel, .in_valid(iv), .in_data(id), .in_last(il),
    .in_row(ir), .out_valid(ov), .out_data(od), .out_last(ol), .out_row(orow),
    .frames_in(fin), .frames_out(fout));

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

  task automatic row(input int src, input int n);
    for (int i = 0; i < n; i++) begin
      iv = 0; il = 0;
      iv[src] = 1; il[src] = (i == n - 1);
      id[src] = 16'($urandom); ir[src] = 15'(src * 100 + i);
      #1;
      chk(ov == (src == sel) && (!ov || (od == id[src] && orow == ir[src] && ol == il[src])), "pass-through");
      @(posedge clk); #1;
    end
    iv = 0; il = 0;
  endtask

  initial begin
    iv = 0; il = 0; sel = 0; id = '{0, 0}; ir = '{0, 0};
    repeat (3) @(posedge clk);
    #1 rst = 0;
    row(0, 8); row(0, 5);
    chk(fin == 2 && fout == 2, "counters after two rows");
    sel = 1;
    row(1, 6);
    row(0, 4);          // not selected: enters, does not leave
    chk(fin == 4 && fout == 3, "counters with an unselected row");
    for (int i = 0; i < 14; i++) row(1, 2);
    chk(fin == 4'(18) && fout == 4'(17), "4-bit wrap-around");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
