// l1_top: firmware of the L1 readout board (revision 3 prototype).
//
// The board buffers HPD pixel events from 12 optical input channels for a
// later, software-requested readout over Fast Ethernet:
//
//   12 x (link receive buffer -> rx_channel -> 18x1024 FIFO -> zs_encoder
//         -> 18x1024 FIFO)
//   6 x event_mux (channels 2m, 2m+1 -> memory m)
//   2 x buffer_ctrl (memories 0-2, memories 3-5; external memory ports)
//   egress_mux -> eth_tx (egress RAM, frame builder, MII to the PHY)
//
// plus the control side: cmd_if (command/answer messages), ctrl_regs (32
// control registers), the 32 status registers assembled here, the L0 event
// emulator, the TTC source encoder (ttc_a_pulser, ttc_b_encoder), the PHY
// management master (mdio_master) and the front-panel LEDs.
//
// Clocks: everything runs on clk (the 80 MHz system clock) except the TTC
// encoder, which runs on clk40 from the TTCrx. mii_ce marks the PHY's 25 MHz
// transmit clock in the clk domain. Resets: rst (power-up / board reset) and
// the ResetRequest message reset everything except the command interface,
// which must still send the answer; the L1ResetRequest message clears the
// buffer write pointers, the event ids and the event counter only.
//
// Parts outside the FPGA logic appear as ports: the optical transceivers and
// their receive buffers (rx_*), the TTCrx chip (l1acc, brcst*, ttcrx_*), the
// six L1 buffer memories (mem_*), the 100baseTX PHY (mii_*, mdc/mdio_*), the USB
// microcontroller (cmd_* byte streams) and the clock managers (dll_*_locked).
//
// Follows the document: the data flow, the channel/memory pairing, the
// register maps and the LED meanings. Own choices: when the L0 emulator is
// not inhibited its events replace the link data on all 12 channels; the
// event counter counts events of the lowest-numbered non-inhibited channel
// among channels 0-5 and is cleared by the L1 reset; 'global ready' is the
// AND of the two clock-manager locks and the memory initialisation flag;
// status registers 12 and 13 show the last two words received on input
// link 0 (the register table calls them both 'transmitted' and 'receiver
// data'; the receive-side reading and the choice of link 0 are this design's);
// LED pulses are stretched to 2^LED_STRETCH_BITS cycles.
module l1_top
  import l1_pkg::*;
#(
  parameter int unsigned ROW_BITS        = 15,
  parameter int unsigned SENSE_CYCLES    = 1024,
  parameter int unsigned LED_STRETCH_BITS = 22,
  parameter int unsigned EMU_GAP_CYCLES  = 72
) (
  input  logic        clk,
  input  logic        clk40,
  input  logic        rst,
  // optical input channels (after the transceiver receive buffers)
  input  logic [11:0] rx_valid,
  input  logic [15:0] rx_data [12],
  input  logic [11:0] rx_sof,
  input  logic [11:0] rx_eof,
  input  logic [11:0] rx_sync,
  input  logic [11:0] rx_ovf,
  input  logic [11:0] rx_clkcor,
  // TTCrx
  input  logic        l1acc,           // L0 trigger, one clk pulse
  input  logic        brcst_str,       // clk40 domain
  input  logic [7:0]  brcst,
  input  logic        ttcrx_ready,
  input  logic [7:0]  ttc_id_sense,
  input  logic [15:0] ttcrx_reg [4],   // status registers 28-31
  input  logic        ttc_i2c_ack_err,
  // L1 buffer memories: [0] drives memories 0-2, [1] memories 3-5
  output logic [ROW_BITS+8:0] mem_addr [2],
  output logic [2:0]  mem_we [2],
  output logic [15:0] mem_wdata [6],
  output logic [1:0]  mem_re,
  input  logic [15:0] mem_rdata [6],
  input  logic        sdram_init_done,
  // 100baseTX PHY
  input  logic        mii_ce,
  output logic [3:0]  mii_txd,
  output logic        mii_tx_en,
  output logic        mdc,             // PHY management clock
  output logic        mdio_o,          // PHY management data, output side
  output logic        mdio_oe,         //   its output enable
  input  logic        mdio_i,          //   pad input
  input  logic        tx_fault,
  input  logic        rx_signal_detect,
  // clock managers
  input  logic        dll_top_locked,
  input  logic        dll_bot_locked,
  // command interface byte streams
  input  logic        cmd_rx_valid,
  input  logic [7:0]  cmd_rx_byte,
  output logic        cmd_rx_ready,
  output logic        cmd_tx_valid,
  output logic [7:0]  cmd_tx_byte,
  input  logic        cmd_tx_ready,
  // TTC source encoder
  input  logic        trigger_a_in,
  output logic        ttc_a,
  output logic        ttc_b,
  // front panel
  output logic [2:0]  led_green,
  output logic [2:0]  led_yellow,
  output logic [2:0]  led_red
);
  // ---------------------------------------------------------------- resets
  logic        sys_reset_req, l1_rst, sys_rst;
  logic [1:0]  rst40_s;
  logic        rst40;
  always_ff @(posedge clk) sys_rst <= rst || sys_reset_req;
  always_ff @(posedge clk40) rst40_s <= {rst40_s[0], sys_rst};
  assign rst40 = rst40_s[1];

  // ------------------------------------------------------- control registers
  logic        reg_wr;
  logic [4:0]  reg_id;
  logic [15:0] reg_data;
  logic [15:0] creg [32];
  logic [15:0] sreg [32];
  logic        read_start;
  logic [14:0] ip_low;

  cmd_if u_cmd (
    .clk, .rst,
    .rx_valid(cmd_rx_valid), .rx_byte(cmd_rx_byte), .rx_ready(cmd_rx_ready),
    .tx_valid(cmd_tx_valid), .tx_byte(cmd_tx_byte), .tx_ready(cmd_tx_ready),
    .reg_wr, .reg_id, .reg_data, .sys_reset_req, .l1_reset_req(l1_rst),
    .status(sreg)
  );

  ctrl_regs u_regs (
    .clk, .rst(sys_rst), .wr(reg_wr), .wr_id(reg_id), .wr_data(reg_data),
    .regs(creg), .read_start, .ip_low
  );

  // ------------------------------------------------------------ L0 emulator
  logic        emu_valid, emu_sof, emu_eof, emu_busy;
  logic [15:0] emu_data;
  l0_emulator #(.GAP_CYCLES(EMU_GAP_CYCLES)) u_emu (
    .clk, .rst(sys_rst),
    .inhibit(creg[2][0]), .alice(creg[2][1]), .burst(creg[2][12:8]),
    .l0_trig(l1acc),
    .valid(emu_valid), .data(emu_data), .sof(emu_sof), .eof(emu_eof), .busy(emu_busy)
  );

  // --------------------------------------------------------- input channels
  logic [11:0] ch_inh, ch_los, zs_done;
  logic [15:0] ch_status [12];
  logic [7:0]  perr [12];
  fifo_word_t  zs_dout [12];
  logic [11:0] zs_empty, zs_rd;

  for (genvar c = 0; c < 12; c++) begin : g_ch
    chan_cfg_t   cfg;
    logic        i_valid, i_sof, i_eof;
    logic [15:0] i_data;
    logic        f_wr, f_rd, f_empty, f_full, d_wr, d_rd, d_empty, d_full;
    fifo_word_t  f_din, f_dout;
    logic [10:0] f_free, f_count, z_free, z_count;
    logic [11:0] d_din, d_dout;
    logic [4:0]  d_count, d_free;
    logic        z_wr, z_full;
    fifo_word_t  z_din;

    assign cfg     = chan_cfg_t'(creg[16 + c]);
    assign i_valid = creg[2][0] ? rx_valid[c] : emu_valid;
    assign i_data  = creg[2][0] ? rx_data[c]  : emu_data;
    assign i_sof   = creg[2][0] ? rx_sof[c]   : emu_sof;
    assign i_eof   = creg[2][0] ? rx_eof[c]   : emu_eof;

    rx_channel #(.SENSE_CYCLES(SENSE_CYCLES)) u_rx (
      .clk, .rst(sys_rst), .cfg,
      .rx_valid(i_valid), .rx_data(i_data), .rx_sof(i_sof), .rx_eof(i_eof),
      .rx_sync(rx_sync[c]), .rx_ovf_pulse(rx_ovf[c]), .rx_clkcor_pulse(rx_clkcor[c]),
      .zs_event_pulse(zs_done[c]),
      .fifo_wr(f_wr), .fifo_din(f_din), .fifo_free(f_free),
      .desc_wr(d_wr), .desc_din(d_din), .desc_full(d_full),
      .status(ch_status[c]), .parity_errors(perr[c]),
      .inhibited(ch_inh[c]), .los_masked(ch_los[c])
    );

    sync_fifo #(.WIDTH(18), .DEPTH(1024)) u_in_fifo (
      .clk, .rst(sys_rst), .wr_en(f_wr), .din(f_din), .rd_en(f_rd), .dout(f_dout),
      .empty(f_empty), .full(f_full), .count(f_count), .free(f_free)
    );

    sync_fifo #(.WIDTH(12), .DEPTH(16)) u_desc (
      .clk, .rst(sys_rst), .wr_en(d_wr), .din(d_din), .rd_en(d_rd), .dout(d_dout),
      .empty(d_empty), .full(d_full), .count(d_count), .free(d_free)
    );

    zs_encoder u_zs (
      .clk, .rst(sys_rst), .l1_rst, .zs_enable(cfg.zs_enable), .bank_id(3'(c / 2)),
      .desc_empty(d_empty), .desc_rd(d_rd), .desc_dout(d_dout),
      .in_empty(f_empty), .in_rd(f_rd), .in_dout(f_dout),
      .out_wr(z_wr), .out_din(z_din), .out_free(z_free), .event_done(zs_done[c])
    );

    sync_fifo #(.WIDTH(18), .DEPTH(1024)) u_zs_fifo (
      .clk, .rst(sys_rst), .wr_en(z_wr), .din(z_din), .rd_en(zs_rd[c]), .dout(zs_dout[c]),
      .empty(zs_empty[c]), .full(z_full), .count(z_count), .free(z_free)
    );
  end

  // ------------------------------------------------- pair muxes and memories
  logic [5:0]  m_empty, m_rd, m_active;
  fifo_word_t  m_dout [6];

  for (genvar m = 0; m < 6; m++) begin : g_pair
    fifo_word_t pin [2];
    assign pin[0]      = zs_dout[2*m];
    assign pin[1]      = zs_dout[2*m+1];
    assign m_active[m] = !(ch_inh[2*m] && ch_inh[2*m+1]);
    event_mux u_mux (
      .clk, .rst(sys_rst),
      .in_empty(zs_empty[2*m+1:2*m]), .in_rd(zs_rd[2*m+1:2*m]), .in_dout(pin),
      .out_empty(m_empty[m]), .out_rd(m_rd[m]), .out_dout(m_dout[m])
    );
  end

  logic [1:0]          bc_start, bc_valid, bc_last, bc_writing, bc_reading;
  logic [15:0]         bc_data [2];
  logic [ROW_BITS-1:0] bc_row [2];
  logic [ROW_BITS-1:0] rows_written [2];
  logic [7:0]          remainder [2];
  logic                row_free, egress_sel;
  logic [2:0]          rd_mem;

  assign rd_mem      = creg[0][2:0];
  assign bc_start[0] = read_start && (rd_mem < 3'd3);
  assign bc_start[1] = read_start && (rd_mem >= 3'd3) && (rd_mem < 3'd6);
  always_ff @(posedge clk) begin
    if (sys_rst)         egress_sel <= 1'b0;
    else if (read_start) egress_sel <= (rd_mem >= 3'd3);
  end

  for (genvar g = 0; g < 2; g++) begin : g_bc
    fifo_word_t  gin [3];
    logic [15:0] gwd [3];
    logic [15:0] grd [3];
    for (genvar k = 0; k < 3; k++) begin : g_k
      assign gin[k]            = m_dout[3*g+k];
      assign mem_wdata[3*g+k]  = gwd[k];
      assign grd[k]            = mem_rdata[3*g+k];
    end
    buffer_ctrl #(.ROW_BITS(ROW_BITS)) u_bc (
      .clk, .rst(sys_rst), .l1_rst,
      .in_empty(m_empty[3*g+2:3*g]), .in_rd(m_rd[3*g+2:3*g]), .in_dout(gin),
      .active(m_active[3*g+2:3*g]),
      .rd_start(bc_start[g]),
      .rd_mem(2'((g == 0) ? rd_mem : rd_mem - 3'd3)),
      .rd_row(creg[1][ROW_BITS-1:0]), .rd_nrows_m1(creg[0][15:8]),
      .egress_free(row_free),
      .out_valid(bc_valid[g]), .out_data(bc_data[g]), .out_last(bc_last[g]), .out_row(bc_row[g]),
      .mem_addr(mem_addr[g]), .mem_we(mem_we[g]), .mem_wdata(gwd), .mem_re(mem_re[g]),
      .mem_rdata(grd),
      .rows_written(rows_written[g]), .remainder(remainder[g]),
      .writing(bc_writing[g]), .reading(bc_reading[g])
    );
  end

  // ----------------------------------------------------------------- egress
  logic                e_valid, e_last, tx_busy;
  logic [15:0]         e_data;
  logic [ROW_BITS-1:0] e_row;
  logic [3:0]          mux_in, mux_out, ram_in, ram_out;

  egress_mux #(.ROW_BITS(ROW_BITS)) u_emux (
    .clk, .rst(sys_rst), .sel(egress_sel),
    .in_valid(bc_valid), .in_data(bc_data), .in_last(bc_last), .in_row(bc_row),
    .out_valid(e_valid), .out_data(e_data), .out_last(e_last), .out_row(e_row),
    .frames_in(mux_in), .frames_out(mux_out)
  );

  eth_tx #(.ROW_BITS(ROW_BITS)) u_eth (
    .clk, .rst(sys_rst), .ip_low,
    .in_valid(e_valid), .in_data(e_data), .in_last(e_last), .in_row(e_row),
    .row_free, .mii_ce, .mii_txd, .mii_tx_en,
    .last_word(), .last_but_one_word(),
    .rows_in(ram_in), .rows_out(ram_out), .busy(tx_busy)
  );

  // ------------------------------------------------------------ TTC encoder
  logic a_busy, b_busy;
  ttc_a_pulser u_ttc_a (
    .clk40, .rst(rst40),
    .sw_trig(creg[3][15]), .count(creg[3][14:0]), .interval(creg[4]),
    .auto_cal_en(creg[5][2]), .ext_en(creg[5][3]), .ext_mode(creg[5][4]),
    .ext_in(trigger_a_in), .brcst_str, .brcst,
    .a_out(ttc_a), .train_busy(a_busy)
  );
  ttc_b_encoder u_ttc_b (
    .clk40, .rst(rst40),
    .trig(creg[5][0]), .long_mode(creg[5][1]), .d({creg[7], creg[6]}),
    .b_out(ttc_b), .busy(b_busy)
  );

  // --------------------------------------------------------------- counters
  logic [15:0] l0_count;
  logic [23:0] event_count;
  logic        ev_inc;

  always_comb begin
    ev_inc = 1'b0;
    for (int c = 5; c >= 0; c--)
      if (!ch_inh[c]) ev_inc = zs_done[c];
  end

  always_ff @(posedge clk) begin
    if (sys_rst) begin
      l0_count    <= '0;
      event_count <= '0;
    end else begin
      if (l1acc) l0_count <= l0_count + 1'b1;
      if (l1_rst)      event_count <= '0;
      else if (ev_inc) event_count <= event_count + 1'b1;
    end
  end

  // ------------------------------------------------- PHY management (MDIO)
  logic [15:0] e100_reg0, e100_reg16, e100_reg1;
  logic        e100_ready;
  mdio_master u_mdio (
    .clk, .rst(sys_rst), .mdc, .mdio_o, .mdio_oe, .mdio_i,
    .reg0(e100_reg0), .reg16(e100_reg16), .reg1(e100_reg1), .ready(e100_ready)
  );

  // last two words received on input link 0 (status registers 12, 13)
  logic [15:0] last_word, last_but_one;
  always_ff @(posedge clk) begin
    if (sys_rst) begin
      last_word    <= '0;
      last_but_one <= '0;
    end else if (rx_valid[0]) begin
      last_word    <= rx_data[0];
      last_but_one <= last_word;
    end
  end

  // -------------------------------------------------------- status registers
  logic ready;
  assign ready = dll_top_locked && dll_bot_locked && sdram_init_done;

  always_comb begin
    for (int i = 0; i < 32; i++) sreg[i] = '0;
    sreg[0]  = {4'h0, rx_signal_detect, !e100_ready, tx_fault, sdram_init_done,
                3'b000, ttcrx_ready, dll_bot_locked, dll_top_locked, !ready, sys_rst};
    sreg[1]  = e100_reg0;
    sreg[2]  = e100_reg16;
    sreg[3]  = e100_reg1;
    sreg[4]  = {remainder[1], remainder[0]};
    sreg[5]  = l0_count;
    sreg[6]  = 16'(rows_written[0]);
    sreg[7]  = 16'(rows_written[1]);
    sreg[8]  = event_count[15:0];
    sreg[9]  = {8'h00, event_count[23:16]};
    sreg[10] = {perr[1], perr[0]};
    sreg[11] = {perr[3], perr[2]};
    sreg[12] = last_but_one;
    sreg[13] = last_word;
    sreg[14] = {8'h00, ttc_id_sense};
    sreg[15] = {mux_in, mux_out, ram_in, ram_out};
    for (int i = 0; i < 12; i++) sreg[16 + i] = ch_status[i];
    for (int i = 0; i < 4; i++)  sreg[28 + i] = ttcrx_reg[i];
  end

  // ------------------------------------------------------------------- LEDs
  logic [LED_STRETCH_BITS-1:0] st_l0, st_wr, st_rd;
  always_ff @(posedge clk) begin
    if (sys_rst) begin
      st_l0 <= '0;
      st_wr <= '0;
      st_rd <= '0;
    end else begin
      st_l0 <= l1acc               ? '1 : (st_l0 != 0 ? st_l0 - 1'b1 : st_l0);
      st_wr <= (|bc_writing)       ? '1 : (st_wr != 0 ? st_wr - 1'b1 : st_wr);
      st_rd <= (|bc_reading)       ? '1 : (st_rd != 0 ? st_rd - 1'b1 : st_rd);
    end
  end
  assign led_green  = {ready, dll_top_locked && dll_bot_locked, 1'b1};
  assign led_yellow = {st_rd != 0, st_wr != 0, st_l0 != 0};
  assign led_red    = {ttc_i2c_ack_err, !ttcrx_ready, |ch_los};
endmodule
