// tb_lin_rx_filter - glitch suppression and latency of the LIN rx filter.
// Pulses shorter than filt+1 clocks (after synchronisation) must not pass;
// longer ones must appear after filt+3 clocks.
`timescale 1ns/1ps
module tb_lin_rx_filter;
  logic clk = 1'b0, rst_n = 1'b0, rx_i = 1'b1, rx_o;
  logic [7:0] filt;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  lin_rx_filter dut (.clk, .rst_n, .rx_i, .filt, .rx_o);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // drive a low pulse of w clocks and report whether rx_o went low, and when
  task automatic pulse(input int w, output bit seen, output int lat);
    seen = 0; lat = -1;
    @(posedge clk) rx_i <= 1'b0;
    for (int i = 0; i < w + 40; i++) begin
      @(posedge clk);
      if (i == w - 1) rx_i <= 1'b1;
      @(negedge clk);
      if (!seen && rx_o === 1'b0) begin seen = 1; lat = i + 1; end
    end
  endtask

  initial begin
    bit seen; int lat;
    filt = 8'd5;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(rx_o === 1'b1, "recessive after reset");
    for (int f = 1; f < 12; f += 3) begin
      filt = 8'(f);
      repeat (30) @(posedge clk);
      pulse(f, seen, lat);
      check(!seen, $sformatf("filt=%0d: %0d-clock glitch must be removed", f, f));
      pulse(f + 1, seen, lat);
      check(seen, $sformatf("filt=%0d: %0d-clock pulse must pass", f, f + 1));
      pulse(f + 20, seen, lat);
      check(seen && lat == f + 3, $sformatf("filt=%0d: latency %0d expected %0d", f, lat, f + 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
