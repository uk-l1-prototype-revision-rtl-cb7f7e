// tb_buffer_ctrl: one L1 buffer controller with three source FIFOs, a
// memory model (ROW_BITS reduced to 3, i.e. 8 rows of 512 words per memory)
// and an egress model that accepts one row at a time. Checks: lockstep writes
// at one slot per cycle, memory contents, the complete-row counter and the
// last-row remainder, the stall when an active stream has no data, writes of
// only the active memories, readout of two rows from a chosen start row
// (data, row numbers, last flags, waiting for the egress buffer), no write
// while a row is read, the L1 fast reset and the memory-full stop.
module tb_buffer_ctrl;
  import l1_pkg::*;
  localparam int RB = 3, CB = 9, AW = RB + CB;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  int checks = 0, failures = 0;

  logic [2:0]  f_wr, f_rd, f_empty, f_full, active;
  fifo_word_t  f_din [3];
  fifo_word_t  f_dout [3];
  logic [12:0] f_cnt [3];
  logic [12:0] f_free [3];
  logic        l1_rst, rd_start, egress_free, o_valid, o_last, m_re, writing, reading;
  logic [1:0]  rd_mem;
  logic [RB-1:0] rd_row, o_row, rows;
  logic [7:0]  nrows_m1, rem;
  logic [15:0] o_data;
  logic [AW-1:0] m_addr;
  logic [2:0]  m_we;
  logic [15:0] m_wdata [3];
  logic [15:0] m_rdata [3];

  for (genvar i = 0; i < 3; i++) begin : g_f
    sync_fifo #(.WIDTH(18), .DEPTH(4096)) u_f (.clk, .rst, .wr_en(f_wr[i]), .din(f_din[i]),
      .rd_en(f_rd[i]), .dout(f_dout[i]), .empty(f_empty[i]), .full(f_full[i]),
      .count(f_cnt[i]), .free(f_free[i]));
  end

  buffer_ctrl #(.ROW_BITS(RB), .COL_BITS(CB)) dut (.clk, .rst, .l1_rst,
    .in_empty(f_empty), .in_rd(f_rd), .in_dout(f_dout), .active,
    .rd_start, .rd_mem, .rd_row, .rd_nrows_m1(nrows_m1), .egress_free,
    .out_valid(o_valid), .out_data(o_data), .out_last(o_last), .out_row(o_row),
    .mem_addr(m_addr), .mem_we(m_we), .mem_wdata(m_wdata), .mem_re(m_re), .mem_rdata(m_rdata),
    .rows_written(rows), .remainder(rem), .writing, .reading);

  // memory model, one-cycle read latency
  logic [15:0] mem [3][1 << AW];
  always @(posedge clk) begin
    for (int i = 0; i < 3; i++) begin
      if (m_we[i]) mem[i][m_addr] <= m_wdata[i];
      if (m_re)    m_rdata[i] <= mem[i][m_addr];
    end
  end

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

  function automatic logic [15:0] pat(input int m, input int i);
    return 16'((m << 13) ^ (i * 7) ^ (i >> 3));
  endfunction

  int sent [3] = '{0, 0, 0};
  task automatic fill(input logic [2:0] which, input int n);
    for (int k = 0; k < n; k++) begin
      for (int i = 0; i < 3; i++) begin
        f_wr[i] = which[i];
        f_din[i] = '{sof: 1'b0, eof: 1'b0, data: pat(i, sent[i])};
        if (which[i]) sent[i]++;
      end
      @(posedge clk); #1;
    end
    f_wr = 0;
  endtask

  // egress model: takes one row, then is busy for a while
  int got = 0, rows_got = 0, hold = 0, bad_rows = 0;
  logic [RB-1:0] exp_row;
  int exp_mem;
  always @(posedge clk) begin
    if (rst) begin
      got = 0;
    end else if (o_valid) begin
      egress_free <= 0;
      if (o_data !== mem[exp_mem][{exp_row, CB'(got % 512)}]) bad_rows++;
      if (o_row !== exp_row) bad_rows++;
      if (o_last !== (got % 512 == 511)) bad_rows++;
      got++;
      if (o_last) begin
        rows_got++;
        exp_row <= exp_row + 1'b1;
        hold = 20;
      end
    end else if (hold > 0) begin
      hold--;
      if (hold == 0) egress_free <= 1;
    end
    if (!rst && (m_we != 0) && m_re) bad_rows++;
  end

  int t0, t1;
  initial begin
    f_wr = 0; active = 3'b111; l1_rst = 0; rd_start = 0; rd_mem = 0; rd_row = 0; nrows_m1 = 0;
    egress_free = 1; exp_row = 0; exp_mem = 0;
    for (int i = 0; i < 3; i++) f_din[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // lockstep write of 1300 words
    t0 = $time;
    fill(3'b111, 1300);
    wait (f_empty == 3'b111);
    repeat (3) @(posedge clk); #1;
    t1 = $time;
    chk((t1 - t0) / 10 <= 1300 + 6, "one slot per cycle");
    chk(rows == 2, "complete rows");
    chk(rem == 8'((1300 - 1024) / 2), "last-row remainder in 32-bit words");
    begin
      int bad = 0;
      for (int i = 0; i < 3; i++)
        for (int a = 0; a < 1300; a++) if (mem[i][a] !== pat(i, a)) bad++;
      chk(bad == 0, "memory contents");
    end
    // stall when an active stream is empty
    fill(3'b011, 100);
    repeat (10) @(posedge clk); #1;
    chk(f_cnt[0] == 100 && f_cnt[1] == 100, "stall while memory 2 stream is empty");
    begin
      logic [15:0] m2 = mem[2][1300];
      active = 3'b011;
      wait (f_empty[1:0] == 2'b11);
      repeat (3) @(posedge clk); #1;
      chk(rem == 8'((1400 - 1024) / 2), "pointer after two-memory writes");
      chk(mem[2][1300] === m2, "inactive memory not written");
      chk(mem[1][1399] === pat(1, 1399), "active memory written");
    end
    active = 3'b111;
    // read two rows of memory 1 starting at row 1, while new data arrives
    exp_mem = 1; exp_row = 1;
    rd_mem = 1; rd_row = 1; nrows_m1 = 1;
    rd_start = 1; @(posedge clk); #1; rd_start = 0;
    fill(3'b111, 300);
    wait (rows_got == 2);
    repeat (30) @(posedge clk); #1;
    chk(got == 1024, "two rows read");
    chk(bad_rows == 0, "read data, row numbers, last flags, no write during read");
    chk(!reading, "read finished");
    wait (f_empty == 3'b111);
    repeat (3) @(posedge clk); #1;
    chk(rem == 8'((1700 % 512) / 2) && rows == 3, "writes resumed after the read");
    // L1 fast reset
    l1_rst = 1; @(posedge clk); #1; l1_rst = 0;
    chk(rows == 0 && rem == 0, "L1 reset clears the pointer");
    chk(mem[0][5] === pat(0, 5), "L1 reset keeps the contents");
    // fill the memory completely and beyond
    fill(3'b111, 4096 + 50);
    repeat (10) @(posedge clk); #1;
    chk(rows == 3'(7) && f_cnt[0] == 50, "memory full: writing stops");
    chk(mem[0][0] === pat(0, 1700), "no wrap-around write when full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
