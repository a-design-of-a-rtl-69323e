// lin_rx_filter - noise filter for the LIN receive pin.
//
// The raw RXD level is brought into the clock domain by two flip-flops and
// then passed on only once it has differed from the filtered level for
// filt+1 consecutive clocks; shorter pulses are dropped. The filter length
// therefore scales with the bus clock and the filter counter register, as the
// controller description asks; the synchroniser-plus-counter structure is this
// design's choice. Latency from a clean edge on rx_i to rx_o: filt+3 clocks.
// The line resets recessive (1).
module lin_rx_filter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_i,
  input  logic [7:0] filt,
  output logic       rx_o
);
  logic       s1, s2;
  logic [7:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1   <= 1'b1;
      s2   <= 1'b1;
      rx_o <= 1'b1;
      cnt  <= '0;
    end else begin
      s1 <= rx_i;
      s2 <= s1;
      if (s2 == rx_o) begin
        cnt <= '0;
      end else if (cnt >= filt) begin
        rx_o <= s2;
        cnt  <= '0;
      end else begin
        cnt <= cnt + 8'd1;
      end
    end
  end
endmodule
