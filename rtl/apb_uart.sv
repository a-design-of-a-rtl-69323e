// apb_uart - 8N1 UART on APB.
//
// Registers (byte offsets): 0x0 DATA - a write sends a byte if the
// transmitter is idle, a read returns the last received byte and empties the
// one-byte receive buffer; 0x4 STATUS - [0] transmitter busy, [1] receive
// buffer full, [2] overrun (write 1 to clear); 0x8 BAUDDIV - clocks per bit
// (reset 208: 115200 bit/s at 24 MHz); 0xC CTRL - [0] receive interrupt
// enable. irq is high while the buffer is full and enabled. The frame is
// sampled mid-bit after a two-flop synchroniser. The byte engines are the
// same start/8 data/stop shifter and sampler the LIN controller uses. The
// UART is only named by the processor description: registers and format are
// this design's.
module apb_uart
  import soc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     psel,
  input  apb_m2s_t preq,
  output apb_s2m_t prsp,
  input  logic     uart_rx,
  output logic     uart_tx,
  output logic     irq
);
  logic [15:0] div;
  logic        rx_ie, rx_full, overrun, tx_busy, rx_s, rx_vld, rx_ferr;
  logic [7:0]  rx_buf, rx_byte;
  logic        wr, rd;

  assign wr = psel && preq.penable && preq.pwrite;
  assign rd = psel && preq.penable && !preq.pwrite;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div     <= 16'd208;
      rx_ie   <= 1'b0;
      rx_full <= 1'b0;
      overrun <= 1'b0;
      rx_buf  <= '0;
    end else begin
      if (wr && preq.paddr[3:2] == 2'd2) div   <= preq.pwdata[15:0];
      if (wr && preq.paddr[3:2] == 2'd3) rx_ie <= preq.pwdata[0];
      if (wr && preq.paddr[3:2] == 2'd1 && preq.pwdata[2]) overrun <= 1'b0;
      if (rd && preq.paddr[3:2] == 2'd0) rx_full <= 1'b0;
      if (rx_vld && !rx_ferr) begin
        rx_buf  <= rx_byte;
        rx_full <= 1'b1;
        if (rx_full && !(rd && preq.paddr[3:2] == 2'd0)) overrun <= 1'b1;
      end
    end
  end

  lin_rx_filter u_sync (.clk, .rst_n, .rx_i(uart_rx), .filt(8'd0), .rx_o(rx_s));

  lin_data_rx #(.CNT_W(16)) u_rx (
    .clk, .rst_n, .en(1'b1), .tick(1'b1), .rx(rx_s), .bit_time(div),
    .byte_vld(rx_vld), .rx_byte, .ferr(rx_ferr));

  lin_transmitter #(.CNT_W(16)) u_tx (
    .clk, .rst_n, .tick(1'b1), .bit_time(div),
    .start(wr && preq.paddr[3:2] == 2'd0), .data(preq.pwdata[7:0]),
    .stop_req(1'b0), .busy(tx_busy), .tx(uart_tx));

  always_comb begin
    unique case (preq.paddr[3:2])
      2'd0: prsp.prdata = {24'd0, rx_buf};
      2'd1: prsp.prdata = {29'd0, overrun, rx_full, tx_busy};
      2'd2: prsp.prdata = {16'd0, div};
      default: prsp.prdata = {31'd0, rx_ie};
    endcase
  end
  assign prsp.pready  = 1'b1;
  assign prsp.pslverr = 1'b0;
  assign irq = rx_ie && rx_full;
endmodule
