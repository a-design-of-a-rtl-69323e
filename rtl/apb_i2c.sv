// apb_i2c - I2C master with byte-level commands on APB.
//
// Registers: 0x0 PRESCALE - clocks per quarter SCL period minus one (reset
// 59: 100 kHz at 24 MHz); 0x4 CMD - a write while idle runs, in this order,
// an optional START [0], one byte WRITE [2] of pwdata[15:8] or READ [3]
// (answering with ACK, or NACK if [4] is set), and an optional STOP [1];
// 0x8 STATUS - [0] busy, [1] ACK bit received after a write (0 = ACK), [2]
// done flag (write 1 to clear); 0xC RXDATA - last byte read. irq follows the
// done flag when enabled by CMD[5] of the last command.
// Every bit takes four quarter periods: SCL low with SDA set up, SCL
// released, SCL high with SDA sampled, SCL low. A START pulls SDA low while
// SCL is high, a STOP releases SDA while SCL is high. The slave may stretch
// the clock: the second quarter waits until SCL reads high. Pins are open
// drain: *_oe = 1 pulls the line low. The block is only named by the
// processor description; its command interface is this design's.
module apb_i2c
  import soc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     psel,
  input  apb_m2s_t preq,
  output apb_s2m_t prsp,
  input  logic     scl_i,
  input  logic     sda_i,
  output logic     scl_oe,
  output logic     sda_oe,
  output logic     irq
);
  typedef enum logic [2:0] {I_IDLE, I_START, I_BITS, I_STOP} istate_e;
  istate_e    st;
  logic [15:0] pre, cnt;
  logic [1:0]  q;          // quarter within the bit
  logic [3:0]  bitn;       // 0..8 within a byte
  logic        c_stop, c_write, c_read, c_nack, ie;
  logic [7:0]  txd, rxd;
  logic [8:0]  sh;
  logic        rx_ack, done;
  logic        scl, sda;   // 1 = released
  logic        qend, wr;
  logic        sda_bit;

  assign wr      = psel && preq.penable && preq.pwrite;
  assign qend    = (cnt == pre) && !(q == 2'd1 && !scl_i);
  assign sda_bit = c_write ? ((bitn < 4'd8) ? txd[3'd7 - bitn[2:0]] : 1'b1)
                           : ((bitn < 4'd8) ? 1'b1 : c_nack);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= I_IDLE; pre <= 16'd59; cnt <= '0; q <= '0; bitn <= '0;
      c_stop <= 1'b0; c_write <= 1'b0; c_read <= 1'b0; c_nack <= 1'b0; ie <= 1'b0;
      txd <= '0; rxd <= '0; sh <= '0; rx_ack <= 1'b1; done <= 1'b0;
      scl <= 1'b1; sda <= 1'b1;
    end else begin
      if (wr && preq.paddr[3:2] == 2'd0) pre <= preq.pwdata[15:0];
      if (wr && preq.paddr[3:2] == 2'd2 && preq.pwdata[2]) done <= 1'b0;
      if (st == I_IDLE) begin
        cnt <= '0;
        q   <= '0;
        if (wr && preq.paddr[3:2] == 2'd1 &&
            (preq.pwdata[0] || preq.pwdata[1] || preq.pwdata[2] || preq.pwdata[3])) begin
          c_stop  <= preq.pwdata[1];
          c_write <= preq.pwdata[2];
          c_read  <= preq.pwdata[3] && !preq.pwdata[2];
          c_nack  <= preq.pwdata[4];
          ie      <= preq.pwdata[5];
          txd     <= preq.pwdata[15:8];
          bitn    <= '0;
          st      <= preq.pwdata[0] ? I_START :
                     (preq.pwdata[2] || preq.pwdata[3]) ? I_BITS : I_STOP;
        end
      end else begin
        cnt <= qend ? '0 : (cnt == pre ? cnt : cnt + 16'd1);
        unique case (st)
          I_START: begin
            unique case (q)
              2'd0: begin sda <= 1'b1; end
              2'd1: begin scl <= 1'b1; end
              2'd2: begin sda <= 1'b0; end
              default: begin scl <= 1'b0; end
            endcase
            if (qend) begin
              q <= q + 2'd1;
              if (q == 2'd3) st <= (c_write || c_read) ? I_BITS : (c_stop ? I_STOP : I_IDLE);
            end
          end
          I_BITS: begin
            unique case (q)
              2'd0: begin scl <= 1'b0; sda <= sda_bit; end
              2'd1: begin scl <= 1'b1; end
              2'd2: begin scl <= 1'b1; end
              default: begin scl <= 1'b0; end
            endcase
            if (qend) begin
              q <= q + 2'd1;
              if (q == 2'd2) sh <= {sh[7:0], sda_i};
              if (q == 2'd3) begin
                if (bitn == 4'd8) begin
                  rxd    <= sh[8:1];
                  rx_ack <= sh[0];
                  bitn   <= '0;
                  st     <= c_stop ? I_STOP : I_IDLE;
                  if (!c_stop) done <= 1'b1;
                end else begin
                  bitn <= bitn + 4'd1;
                end
              end
            end
          end
          I_STOP: begin
            unique case (q)
              2'd0: begin scl <= 1'b0; sda <= 1'b0; end
              2'd1: begin scl <= 1'b1; end
              2'd2: begin sda <= 1'b1; end
              default: ;
            endcase
            if (qend) begin
              q <= q + 2'd1;
              if (q == 2'd3) begin
                st   <= I_IDLE;
                done <= 1'b1;
              end
            end
          end
          default: st <= I_IDLE;
        endcase
      end
    end
  end

  assign scl_oe = !scl;
  assign sda_oe = !sda;

  always_comb begin
    unique case (preq.paddr[3:2])
      2'd0: prsp.prdata = {16'd0, pre};
      2'd1: prsp.prdata = '0;
      2'd2: prsp.prdata = {29'd0, done, rx_ack, st != I_IDLE};
      default: prsp.prdata = {24'd0, rxd};
    endcase
  end
  assign prsp.pready  = 1'b1;
  assign prsp.pslverr = 1'b0;
  assign irq = done && ie;
endmodule
