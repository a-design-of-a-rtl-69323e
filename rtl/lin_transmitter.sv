// lin_transmitter - sends one UART-format byte on the LIN transmit pin.
//
// A start strobe while idle loads {stop=1, data, start=0}; the frame is then
// shifted out LSB first, each bit lasting bit_time prescaler ticks, so a byte
// takes 10 bit times. tx is recessive (1) when idle. stop_req stops the byte at
// once and releases the line. The framer sequences the bytes of a response;
// one byte per strobe is this design's split of the work.
module lin_transmitter #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick,
  input  logic [CNT_W-1:0] bit_time,
  input  logic             start,
  input  logic [7:0]       data,
  input  logic             stop_req,
  output logic             busy,
  output logic             tx
);
  logic [9:0]       sh;
  logic [3:0]       n;
  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] full;

  assign full = (bit_time == '0) ? CNT_W'(1) : bit_time;
  assign tx   = busy ? sh[0] : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      sh   <= '1;
      n    <= '0;
      cnt  <= '0;
    end else if (stop_req) begin
      busy <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        sh   <= {1'b1, data, 1'b0};
        n    <= '0;
        cnt  <= '0;
        busy <= 1'b1;
      end
    end else if (tick) begin
      if (cnt >= full - 1'b1) begin
        cnt <= '0;
        sh  <= {1'b1, sh[9:1]};
        if (n == 4'd9) busy <= 1'b0;
        else           n    <= n + 4'd1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
