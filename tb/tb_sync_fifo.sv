// tb_sync_fifo: random pushes and pops against a queue model; checks data,
// the one-cycle read latency, count, free, empty and full.
module tb_sync_fifo;
  localparam int W = 18, D = 16;
  logic clk = 0, rst = 1;
  logic wr, rd, empty, full;
  logic [W-1:0] din, dout;
  logic [$clog2(D+1)-1:0] count, free;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  logic [W-1:0] exp_q;
  logic exp_v;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst, .wr_en(wr), .din, .rd_en(rd), .dout,
    .empty, .full, .count, .free);

  always #5 clk = !clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t size=%0d count=%0d", what, $time, model.size(), count); end
  endtask

  initial begin
    wr = 0; rd = 0; din = 0; exp_v = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 3000; i++) begin
      // phase-dependent bias so the FIFO fills up and drains
      wr  = ($urandom % 100) < ((i / 500) % 2 ? 30 : 70);
      rd  = ($urandom % 100) < ((i / 500) % 2 ? 70 : 30);
      din = W'($urandom);
      @(negedge clk);
      // state before the edge
      chk(count == model.size(), "count");
      chk(free == D - model.size(), "free");
      chk(empty == (model.size() == 0), "empty");
      chk(full == (model.size() == D), "full");
      @(posedge clk);
      exp_v = 0;
      if (wr && model.size() < D) begin
        model.push_back(din);
        if (rd && model.size() > 1) begin exp_q = model.pop_front(); exp_v = 1; end
      end else if (rd && model.size() > 0) begin exp_q = model.pop_front(); exp_v = 1; end
      #1;
      if (exp_v) chk(dout == exp_q, "data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
