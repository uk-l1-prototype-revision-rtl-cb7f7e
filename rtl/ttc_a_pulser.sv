// ttc_a_pulser: A-channel pulse generator of the board's TTC source encoder.
//
// Runs on clk40, the 40 MHz clock recovered by the TTCrx. Its A-channel output
// is driven off the board through LVDS to an external TTC encoder module.
//  * Pulse train: a low-to-high transition of the software trigger bit
//    (control register 3 bit 15) or, in external edge mode, of the external
//    trigger input starts a train of 'count' one-cycle pulses spaced
//    'interval'+1 clk40 cycles apart, so interval 0 gives consecutive pulses.
//    A count of 0 sends nothing.
//  * External clocked mode: the output follows the external trigger input,
//    registered on clk40 (one pulse per cycle in which it is high).
//  * Auto pulse: when enabled, a calibration command received by the TTCrx
//    (broadcast strobe with data CALIB_CMD) produces a single A pulse
//    'interval'+1 clk40 cycles after the strobe, the same step as the
//    spacing of a train.
// The count and interval ranges, the trigger sources, the edge/clocked modes
// and the calibration-to-pulse delay follow the document. The spacing rule,
// the two-stage synchronisers on the asynchronous inputs and the CALIB_CMD
// value are this design's choices.
module ttc_a_pulser #(
  parameter logic [7:0] CALIB_CMD = 8'h1C
) (
  input  logic        clk40,
  input  logic        rst,
  input  logic        sw_trig,       // control register 3 bit 15 (any clock domain)
  input  logic [14:0] count,
  input  logic [15:0] interval,
  input  logic        auto_cal_en,
  input  logic        ext_en,
  input  logic        ext_mode,      // 0 = edge, 1 = clocked
  input  logic        ext_in,        // external LVDS trigger (asynchronous)
  input  logic        brcst_str,     // TTCrx broadcast strobe (clk40 domain)
  input  logic [7:0]  brcst,
  output logic        a_out,
  output logic        train_busy
);
  logic [2:0]  sw_s, ext_s;
  logic        sw_edge, ext_edge, start;
  logic [14:0] left;
  logic [15:0] wait_cnt;
  logic        cal_pend;
  logic [15:0] cal_cnt;

  assign sw_edge    = sw_s[1] && !sw_s[2];
  assign ext_edge   = ext_s[1] && !ext_s[2];
  assign start      = sw_edge || (ext_en && !ext_mode && ext_edge);
  assign train_busy = (left != 0);

  always_ff @(posedge clk40) begin
    if (rst) begin
      sw_s     <= '0;
      ext_s    <= '0;
      left     <= '0;
      wait_cnt <= '0;
      cal_pend <= 1'b0;
      cal_cnt  <= '0;
      a_out    <= 1'b0;
    end else begin
      sw_s  <= {sw_s[1:0], sw_trig};
      ext_s <= {ext_s[1:0], ext_in};
      a_out <= 1'b0;

      if (start) begin
        left     <= count;
        wait_cnt <= '0;
      end else if (left != 0) begin
        if (wait_cnt == 0) begin
          a_out    <= 1'b1;
          left     <= left - 1'b1;
          wait_cnt <= interval;
        end else begin
          wait_cnt <= wait_cnt - 1'b1;
        end
      end

      if (auto_cal_en && brcst_str && brcst == CALIB_CMD) begin
        cal_pend <= 1'b1;
        cal_cnt  <= interval;
      end else if (cal_pend) begin
        if (cal_cnt == 0) begin
          a_out    <= 1'b1;
          cal_pend <= 1'b0;
        end else cal_cnt <= cal_cnt - 1'b1;
      end

      if (ext_en && ext_mode && ext_s[1]) a_out <= 1'b1;
    end
  end
endmodule
