// lin_framer - frame sequencer of the LIN slave controller.
//
// After the header receiver reports a break/sync pair the framer takes the
// next byte from the data receiver as the protected identifier (PID) and
// checks its two parity bits. A valid PID raises the header flag and selects
// what follows:
//   * ID equal to the Frame ID register, publish bit set: the framer publishes
//     DATA_LEN bytes from the data registers and the checksum. Each byte is
//     read back from the bus by the data receiver and compared with what was
//     sent (bit error detection); a mismatch aborts the response.
//   * ID equal to the Frame ID register, publish bit clear: DATA_LEN bytes are
//     received into the data registers and the checksum byte is checked.
//   * ID 0x3C (master request): eight bytes and a classic checksum are
//     received; a first data byte of 0x00 is the go-to-sleep command and puts
//     the node to sleep, where a dominant level raises the wake-up flag.
//   * any other ID: the frame is ignored.
// The checksum is the inverted 8-bit sum with end-around carry, over the PID
// and the data (enhanced) unless the classic bit of the control register
// leaves the PID out. A new header restarts the sequence from any state but
// sleep; the abort command (stop_req) returns to idle and stops the transmitter.
// The PID is taken at the middle of its stop bit, so a published response
// waits another half bit time (tick/bit_time) and starts when the master's
// stop bit has ended; the following bytes start back to back.
// Error and event flags are one-clock pulses on irq_set (bit positions in
// lin_pkg). The frame rules follow the LIN protocol; the go-to-sleep frame,
// per-byte read-back comparison and abort command are this design's reading
// of the block names Go to Sleep, Bit Error Detection and Tx Control Logic.
module lin_framer
  import lin_pkg::*;
#(
  parameter int unsigned CNT_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tick,
  input  logic [CNT_W-1:0]   bit_time,
  // configuration
  input  logic               en,
  input  logic               cfg_pub,
  input  logic               cfg_classic,
  input  logic [5:0]         cfg_id,
  input  logic [3:0]         cfg_len,
  input  logic               stop_req,
  input  logic [63:0]        tx_data,
  // receiver side
  input  logic               hdr_ok,
  input  logic               rx_vld,
  input  logic [7:0]         rx_byte,
  input  logic               rx_ferr,
  input  logic               rx_level,
  output logic               rx_arm,
  // transmitter side
  input  logic               tx_busy,
  output logic               tx_start,
  output logic [7:0]         tx_byte,
  output logic               tx_abort,
  // data register write port
  output logic               wr_en,
  output logic [2:0]         wr_idx,
  output logic [7:0]         wr_byte,
  // status
  output logic [NUM_IRQ-1:0] irq_set,
  output framer_state_e      state,
  output logic [7:0]         last_pid
);
  framer_state_e st;
  logic [3:0]    len_q, idx;
  logic [7:0]    cks, sent_q;
  logic          sleep_chk, first_zero, tx_pend;
  logic [5:0]    rid;
  logic [3:0]    len_cfg;
  logic [CNT_W-1:0] space;

  assign state    = st;
  assign rid      = rx_byte[5:0];
  assign len_cfg  = (cfg_len == 4'd0) ? 4'd1 : (cfg_len > 4'd8) ? 4'd8 : cfg_len;
  assign rx_arm   = (st == F_PID || st == F_RX || st == F_TX) && !hdr_ok;
  assign tx_byte  = (idx < len_q) ? tx_data[8*idx[2:0] +: 8] : ~cks;
  assign tx_start = (st == F_TX) && tx_pend && space == '0 && !tx_busy && !hdr_ok && !stop_req && en;
  assign tx_abort = stop_req || !en || (hdr_ok && st == F_TX) ||
                    (st == F_TX && rx_vld && (rx_ferr || rx_byte != sent_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= F_IDLE;
      len_q      <= 4'd1;
      idx        <= '0;
      cks        <= '0;
      sent_q     <= '0;
      sleep_chk  <= 1'b0;
      first_zero <= 1'b0;
      tx_pend    <= 1'b0;
      space      <= '0;
      last_pid   <= '0;
      irq_set    <= '0;
      wr_en      <= 1'b0;
      wr_idx     <= '0;
      wr_byte    <= '0;
    end else begin
      irq_set <= '0;
      wr_en   <= 1'b0;
      if (tick && space != '0) space <= space - 1'b1;
      if (tx_start) begin
        sent_q  <= tx_byte;
        tx_pend <= 1'b0;
      end
      if (!en || stop_req) begin
        st      <= F_IDLE;
        tx_pend <= 1'b0;
      end else if (hdr_ok && st != F_SLEEP) begin
        st      <= F_PID;
        tx_pend <= 1'b0;
      end else begin
        unique case (st)
          F_IDLE: ;
          F_PID: if (rx_vld) begin
            last_pid  <= rx_byte;
            idx       <= '0;
            sleep_chk <= 1'b0;
            if (rx_ferr) begin
              irq_set[IRQ_FRAME] <= 1'b1;
              st <= F_IDLE;
            end else if (rx_byte != lin_pid(rid)) begin
              irq_set[IRQ_PARITY] <= 1'b1;
              st <= F_IDLE;
            end else begin
              irq_set[IRQ_HEADER] <= 1'b1;
              cks <= cfg_classic ? 8'h00 : rx_byte;
              if (rid == cfg_id) begin
                len_q   <= len_cfg;
                st      <= cfg_pub ? F_TX : F_RX;
                tx_pend <= cfg_pub;
                space   <= bit_time >> 1;    // rest of the PID stop bit
              end else if (rid == ID_MASTER_REQ) begin
                len_q     <= 4'd8;
                cks       <= 8'h00;
                sleep_chk <= 1'b1;
                st        <= F_RX;
              end else begin
                st <= F_IDLE;
              end
            end
          end
          F_RX: if (rx_vld) begin
            if (rx_ferr) begin
              irq_set[IRQ_FRAME] <= 1'b1;
              st <= F_IDLE;
            end else if (idx < len_q) begin
              if (!sleep_chk) begin
                wr_en   <= 1'b1;
                wr_idx  <= idx[2:0];
                wr_byte <= rx_byte;
              end
              if (idx == 4'd0) first_zero <= (rx_byte == 8'h00);
              cks <= lin_cksum_add(cks, rx_byte);
              idx <= idx + 4'd1;
            end else if (rx_byte != ~cks) begin
              irq_set[IRQ_CKSUM] <= 1'b1;
              st <= F_IDLE;
            end else if (sleep_chk) begin
              if (first_zero) begin
                irq_set[IRQ_SLEEP] <= 1'b1;
                st <= F_SLEEP;
              end else begin
                st <= F_IDLE;
              end
            end else begin
              irq_set[IRQ_RX_DONE] <= 1'b1;
              st <= F_IDLE;
            end
          end
          F_TX: if (rx_vld) begin
            if (rx_ferr || rx_byte != sent_q) begin
              irq_set[IRQ_BITERR] <= 1'b1;
              tx_pend <= 1'b0;
              st <= F_IDLE;
            end else if (idx < len_q) begin
              cks     <= lin_cksum_add(cks, rx_byte);
              idx     <= idx + 4'd1;
              tx_pend <= 1'b1;
            end else begin
              irq_set[IRQ_TX_DONE] <= 1'b1;
              st <= F_IDLE;
            end
          end
          F_SLEEP: if (!rx_level) begin
            irq_set[IRQ_WAKE] <= 1'b1;
            st <= F_IDLE;
          end
          default: st <= F_IDLE;
        endcase
      end
    end
  end
endmodule
