// lin_controller - LIN slave-node controller on AHB.
//
// The processor configures the controller through registers (ahb_slave_if +
// lin_regs) and is interrupted on events; the controller core handles a whole
// frame in hardware:
//   lin_rx_filter   synchronises RXD and removes glitches
//   lin_header_rx   finds the break/sync pair and measures the bit time
//   lin_data_rx     samples PID, data and checksum bytes with that bit time
//   lin_framer      checks parity and checksum, decides to receive, publish
//                   or ignore, detects bit errors, handles go-to-sleep
//   lin_transmitter drives TXD one byte at a time
// All bus timing runs on a tick of clk/(PRESCALE+1), so the measured bit time
// (BIT_TIME register) is in ticks; at 24 MHz and 20 kbit/s with PRESCALE 0 a
// bit is 1200 ticks and a 13-bit break 15600, within the 16-bit counters.
// lin_tx is 1 (recessive) when idle; lin_rx is expected to see the bus,
// including this node's own transmission, through the PHY.
module lin_controller
  import soc_pkg::*;
  import lin_pkg::*;
#(
  parameter int unsigned CNT_W      = 16,
  parameter int unsigned BREAK_BITS = 13
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     hsel,
  input  ahb_m2s_t hreq,
  input  logic     hready,
  output ahb_s2m_t hrsp,
  input  logic     lin_rx,
  output logic     lin_tx,
  output logic     irq
);
  logic               reg_we, reg_re;
  logic [5:2]         reg_addr;
  logic [31:0]        reg_wdata, reg_rdata;
  logic               cfg_en, cfg_pub, cfg_classic, cmd_abort;
  logic [5:0]         cfg_id;
  logic [3:0]         cfg_len;
  logic [15:0]        cfg_prescale;
  logic [7:0]         cfg_filt;
  logic [63:0]        data;
  framer_state_e      fstate;
  logic [7:0]         last_pid;
  logic [CNT_W-1:0]   bit_time;
  logic [NUM_IRQ-1:0] irq_set;
  logic               wr_en;
  logic [2:0]         wr_idx;
  logic [7:0]         wr_byte;
  logic               rx_f, tick, hdr_ok, rx_arm, rx_vld, rx_ferr;
  logic [7:0]         rx_byte, tx_byte;
  logic               tx_start, tx_abort, tx_busy;
  logic [15:0]        pre_cnt;

  ahb_slave_if #(.AW(6)) u_if (
    .clk, .rst_n, .hsel, .hreq, .hready, .hrsp,
    .reg_we, .reg_re, .reg_addr, .reg_wdata, .reg_rdata);

  lin_regs #(.CNT_W(CNT_W)) u_regs (
    .clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .cfg_en, .cfg_pub, .cfg_classic, .cmd_abort, .cfg_id, .cfg_len,
    .cfg_prescale, .cfg_filt, .data, .fstate, .last_pid, .bit_time,
    .irq_set, .wr_en, .wr_idx, .wr_byte, .irq);

  // prescaler: one tick every PRESCALE+1 clocks
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     pre_cnt <= '0;
    else if (pre_cnt >= cfg_prescale) pre_cnt <= '0;
    else                            pre_cnt <= pre_cnt + 16'd1;
  end
  assign tick = (pre_cnt >= cfg_prescale);

  lin_rx_filter u_filt (.clk, .rst_n, .rx_i(lin_rx), .filt(cfg_filt), .rx_o(rx_f));

  lin_header_rx #(.CNT_W(CNT_W), .BREAK_BITS(BREAK_BITS)) u_hdr (
    .clk, .rst_n, .en(cfg_en && fstate != F_SLEEP), .tick, .rx(rx_f),
    .hdr_ok, .bit_time);

  lin_data_rx #(.CNT_W(CNT_W)) u_drx (
    .clk, .rst_n, .en(rx_arm), .tick, .rx(rx_f), .bit_time,
    .byte_vld(rx_vld), .rx_byte, .ferr(rx_ferr));

  lin_framer #(.CNT_W(CNT_W)) u_framer (
    .clk, .rst_n, .tick, .bit_time, .en(cfg_en), .cfg_pub, .cfg_classic, .cfg_id, .cfg_len,
    .stop_req(cmd_abort), .tx_data(data),
    .hdr_ok, .rx_vld, .rx_byte, .rx_ferr, .rx_level(rx_f), .rx_arm,
    .tx_busy, .tx_start, .tx_byte, .tx_abort,
    .wr_en, .wr_idx, .wr_byte, .irq_set, .state(fstate), .last_pid);

  lin_transmitter #(.CNT_W(CNT_W)) u_tx (
    .clk, .rst_n, .tick, .bit_time, .start(tx_start), .data(tx_byte),
    .stop_req(tx_abort), .busy(tx_busy), .tx(lin_tx));

  // reg_re is unused: no register has read side effects
  logic unused_re;
  assign unused_re = reg_re;
endmodule
