// cmd_if: configuration and control message interface.
//
// The board is configured through fixed-length 12-byte command messages
// arriving over a byte stream (from the USB interface):
//   byte 0 cmd, 1 dummy, 2-3 length, 4-7 uc[4], 8 RegisterId, 9 dummy2,
//   10-11 ConfigurationData (16-bit fields little-endian)
// Message types: StatusRequest (answer only), ResetRequest (system reset
// request pulse, answer), ConfigurationData (write RegisterId with
// ConfigurationData, answer), L1ResetRequest (L1 fast reset pulse, no
// answer). The length field is not checked. Unknown types are ignored.
// Every answer is the status message: cmd = Status, dummy 0, length 64,
// then the 32 16-bit status registers, little-endian, sampled when the
// answer starts. It is sent as a byte stream with valid/ready; a new command
// is not decoded until the answer has been sent, so one answer is always
// read before the next command.
//
// The message layouts, the four types and which of them answer follow the
// document. The numeric type codes (l1_pkg::cmd_t), the byte order and the
// byte-stream transport are this design's choices.
module cmd_if
  import l1_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // command bytes in
  input  logic        rx_valid,
  input  logic [7:0]  rx_byte,
  output logic        rx_ready,
  // answer bytes out
  output logic        tx_valid,
  output logic [7:0]  tx_byte,
  input  logic        tx_ready,
  // actions
  output logic        reg_wr,
  output logic [4:0]  reg_id,
  output logic [15:0] reg_data,
  output logic        sys_reset_req,
  output logic        l1_reset_req,
  input  logic [15:0] status [32]
);
  localparam int unsigned CMD_BYTES  = 12;
  localparam int unsigned RESP_BYTES = 4 + 64;

  logic [7:0]  pkt [CMD_BYTES];
  logic [3:0]  rx_cnt;
  logic        sending;
  logic [6:0]  tx_cnt;
  logic [15:0] snap [32];
  logic        done;
  cmd_t        cmd;

  assign rx_ready = !sending;
  assign done     = rx_valid && rx_ready && (rx_cnt == 4'(CMD_BYTES - 1));
  assign cmd      = cmd_t'(pkt[0]);

  always_comb begin
    logic [5:0] k;
    k = 6'((tx_cnt - 7'd4) >> 1);
    case (tx_cnt)
      7'd0:    tx_byte = CMD_STATUS;
      7'd1:    tx_byte = 8'h00;
      7'd2:    tx_byte = 8'(RESP_BYTES - 4);
      7'd3:    tx_byte = 8'h00;
      default: tx_byte = tx_cnt[0] ? snap[k[4:0]][15:8] : snap[k[4:0]][7:0];
    endcase
  end
  assign tx_valid = sending;

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_cnt        <= '0;
      sending       <= 1'b0;
      tx_cnt        <= '0;
      reg_wr        <= 1'b0;
      reg_id        <= '0;
      reg_data      <= '0;
      sys_reset_req <= 1'b0;
      l1_reset_req  <= 1'b0;
      for (int i = 0; i < CMD_BYTES; i++) pkt[i] <= '0;
      for (int i = 0; i < 32; i++) snap[i] <= '0;
    end else begin
      reg_wr        <= 1'b0;
      sys_reset_req <= 1'b0;
      l1_reset_req  <= 1'b0;
      if (rx_valid && rx_ready) begin
        pkt[rx_cnt] <= rx_byte;
        rx_cnt      <= done ? 4'd0 : rx_cnt + 1'b1;
      end
      if (done) begin
        // pkt[11] is the byte arriving now
        case (cmd)
          CMD_STATUS_REQUEST: sending <= 1'b1;
          CMD_RESET_REQUEST: begin
            sys_reset_req <= 1'b1;
            sending       <= 1'b1;
          end
          CMD_CONFIG_DATA: begin
            reg_wr   <= 1'b1;
            reg_id   <= pkt[8][4:0];
            reg_data <= {rx_byte, pkt[10]};
            sending  <= 1'b1;
          end
          CMD_L1_RESET: l1_reset_req <= 1'b1;
          default: ;
        endcase
        tx_cnt <= '0;
      end
      if (done && (cmd == CMD_STATUS_REQUEST || cmd == CMD_RESET_REQUEST || cmd == CMD_CONFIG_DATA))
        for (int i = 0; i < 32; i++) snap[i] <= status[i];
      if (sending && tx_ready) begin
        tx_cnt <= tx_cnt + 1'b1;
        if (tx_cnt == 7'(RESP_BYTES - 1)) sending <= 1'b0;
      end
    end
  end
endmodule
