// lin_header_rx - break/sync pair detector and bit-rate estimator.
//
// Every dominant (low) pulse on the filtered bus is measured in prescaler
// ticks and kept as a break candidate. The next falling edge after it is taken
// as the start bit of the sync byte 0x55, whose frame has falling edges at bit
// positions 0, 2, 4, 6 and 8; the time from the first to the fifth of them is
// eight bit times. From it the bit time is derived and the candidate is
// accepted as a break if it lasts at least BREAK_BITS-1/2 bit times (13-bit
// break per the protocol; the half-bit tolerance is this design's choice).
// A rejected pattern makes the dominant pulse in progress the next candidate,
// so the search restarts without losing a header. No UART byte can pass: its
// longest dominant run is 9 bits.
//
// hdr_ok pulses for one clock at the fifth sync falling edge, i.e. during the
// last data bit of the sync byte; bit_time is updated in the same cycle and
// held until the next valid header. Counters saturate at 2**CNT_W-1.
module lin_header_rx #(
  parameter int unsigned CNT_W      = 16,
  parameter int unsigned BREAK_BITS = 13
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             tick,
  input  logic             rx,
  output logic             hdr_ok,
  output logic [CNT_W-1:0] bit_time
);
  typedef enum logic [1:0] {H_WAIT, H_DEL, H_SYNC} hstate_e;
  hstate_e          st;
  logic             rx_q;
  logic [CNT_W-1:0] low_cnt, brk, t8;
  logic [1:0]       nfall;
  logic             fall, rise;
  logic [CNT_W-1:0] bt_est;
  logic [CNT_W+5:0] lhs, rhs;

  localparam logic [CNT_W-1:0] CMAX = '1;

  assign fall   = rx_q && !rx;
  assign rise   = !rx_q && rx;
  assign bt_est = (t8 + CNT_W'(4)) >> 3;
  assign lhs    = {5'd0, brk, 1'b0};
  assign rhs    = (CNT_W+6)'(2*BREAK_BITS-1) * {6'd0, bt_est};

  // length of the dominant pulse in progress (or of the last one)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                               low_cnt <= '0;
    else if (fall)                            low_cnt <= '0;
    else if (!rx && tick && low_cnt != CMAX)  low_cnt <= low_cnt + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= H_WAIT;
      rx_q     <= 1'b1;
      brk      <= '0;
      t8       <= '0;
      nfall    <= '0;
      hdr_ok   <= 1'b0;
      bit_time <= '0;
    end else begin
      rx_q   <= rx;
      hdr_ok <= 1'b0;
      if (!en) begin
        st <= H_WAIT;
      end else begin
        unique case (st)
          // a dominant pulse has ended: it is the break candidate
          H_WAIT: if (rise) begin
            brk <= low_cnt;
            st  <= H_DEL;
          end
          // delimiter: the next falling edge starts the sync byte
          H_DEL: if (fall) begin
            t8    <= '0;
            nfall <= '0;
            st    <= H_SYNC;
          end
          H_SYNC: begin
            if (tick && t8 != CMAX) t8 <= t8 + 1'b1;
            if (fall) begin
              nfall <= nfall + 2'd1;
              if (nfall == 2'd3) begin
                // eight bit times have passed since the sync start edge
                if (bt_est != '0 && lhs >= rhs) begin
                  hdr_ok   <= 1'b1;
                  bit_time <= bt_est;
                end
                st <= H_WAIT;
              end
            end else if (t8 >= brk) begin
              // longer than the candidate: it cannot have been a break; the
              // pulse in progress is measured by low_cnt and becomes the next
              st <= H_WAIT;
            end
          end
          default: st <= H_WAIT;
        endcase
      end
    end
  end
endmodule
