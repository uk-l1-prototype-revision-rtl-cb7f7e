// tb_ttc_b_encoder: triggers short and long B-channel commands with random
// data and decodes the serial output: idle level, start bit, format bit,
// data, stop bit, frame length, and the check bits, verified here through
// the Hamming syndrome (the XOR of the codeword positions of all set bits
// must be zero) and the overall parity. Also checks that only a rising edge
// of the trigger sends a command.
module tb_ttc_b_encoder;
  logic clk = 0, rst = 1;
  always #12.5 clk = !clk;
  int checks = 0, failures = 0;
  logic trig, long_mode, b, busy;
  logic [31:0] d;

  ttc_b_encoder dut (.clk40(clk), .rst, .trig, .long_mode, .d, .b_out(b), .busy);

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

  // receive one frame; returns bits after the start bit, up to nbits
  task automatic receive(input int nbits, output logic [63:0] bits, output int wait_cycles);
    wait_cycles = 0;
    bits = '0;
    while (b) begin @(posedge clk); #1; wait_cycles++; if (wait_cycles > 50) return; end
    for (int i = 0; i < nbits; i++) begin
      @(posedge clk); #1;
      bits = {bits[62:0], b};
    end
  endtask

  function automatic bit code_ok(input logic [31:0] data, input int nd, input logic [6:0] h, input int nc);
    int pos = 2, k = 0, syn = 0;
    bit par = 0;
    for (int j = 0; j < nc - 1; j++) if (h[j]) syn ^= (1 << j);
    while (k < nd) begin
      pos++;
      if ((pos & (pos - 1)) != 0) begin
        if (data[k]) syn ^= pos;
        par ^= data[k];
        k++;
      end
    end
    for (int j = 0; j < nc; j++) par ^= h[j];
    return syn == 0 && par == 0;
  endfunction

  logic [63:0] bits;
  int w;
  initial begin
    trig = 0; long_mode = 0; d = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (3) @(posedge clk); #1;
    chk(b == 1, "idle high");
    for (int n = 0; n < 40; n++) begin
      long_mode = n % 2;
      d = $urandom;
      trig = 1;
      if (long_mode) begin
        receive(41, bits, w);
        chk(w < 8, "command starts soon after the trigger edge");
        chk(bits[40] == 1'b1, "long format bit");
        chk(bits[39:8] == d, "long data");
        chk(bits[0] == 1'b1, "long stop bit");
        chk(code_ok(d, 32, 7'(bits[7:1]), 7), "long check bits");
      end else begin
        receive(15, bits, w);
        chk(w < 8, "command starts soon after the trigger edge");
        chk(bits[14] == 1'b0, "short format bit");
        chk(bits[13:6] == d[7:0], "short data");
        chk(bits[0] == 1'b1, "short stop bit");
        chk(code_ok({24'h0, d[7:0]}, 8, 7'(bits[5:1]), 5), "short check bits");
      end
      @(posedge clk); #1;
      chk(b == 1 && !busy, "back to idle");
      // trigger held high: no second command
      repeat (20) begin @(posedge clk); #1; if (!b) chk(0, "level does not retrigger"); end
      trig = 0;
      repeat (4) @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
