// l1_mem_model: behavioural model of three L1 buffer memories that share one
// address bus, for simulation only. Each memory holds 16-bit words in a
// sparse (associative) array, so the full 256 Mbit size costs only what is
// written. Writes take effect at the clock edge; reads return data one cycle
// after mem_re, as buffer_ctrl expects; unwritten words read as zero; written(m) gives the
// number of words ever written to memory m.
module l1_mem_model #(
  parameter int unsigned AW = 24
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [2:0]    we,
  input  logic [15:0]   wdata [3],
  input  logic          re,
  output logic [15:0]   rdata [3]
);
  logic [15:0] mem [3][int unsigned];

  function automatic logic [15:0] peek(input int m, input int unsigned a);
    return mem[m].exists(a) ? mem[m][a] : 16'h0000;
  endfunction

  function automatic int written(input int m);
    return mem[m].num();
  endfunction

  initial for (int i = 0; i < 3; i++) rdata[i] = '0;

  always @(posedge clk) begin
    for (int i = 0; i < 3; i++) begin
      if (we[i]) mem[i][addr] = wdata[i];
      if (re)    rdata[i] <= peek(i, addr);
    end
  end
endmodule
