// tb_lin_header_rx - break/sync detection and bit-time measurement.
// For several bit times a 13-bit break, delimiter and sync byte must give
// one hdr_ok at the fifth sync falling edge with the right bit time; breaks
// of 9 and 11 bits must be rejected; a header following such a rejected
// pattern and a preceding data byte must still be found.
`timescale 1ns/1ps
module tb_lin_header_rx;
  logic clk = 1'b0, rst_n = 1'b0, rx = 1'b1, hdr_ok;
  logic [15:0] bit_time;
  int checks = 0, failures = 0, nhdr = 0, bt = 16;
  longint last_fall, hdr_at;
  always #5 clk = ~clk;

  lin_header_rx dut (.clk, .rst_n, .en(1'b1), .tick(1'b1), .rx, .hdr_ok, .bit_time);

  always @(posedge clk) if (hdr_ok) begin nhdr++; hdr_at = $time; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic hold(input logic v, input int n);
    if (rx && !v) last_fall = $time;
    rx = v;
    repeat (n * bt) @(posedge clk);
  endtask

  task automatic send_byte(input logic [7:0] b);
    hold(0, 1);
    for (int i = 0; i < 8; i++) hold(b[i], 1);
    hold(1, 1);
  endtask

  task automatic header(input int brk);
    hold(0, brk);
    hold(1, 1);
    send_byte(8'h55);
    hold(1, 3);
  endtask

  initial begin
    int n0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    for (int i = 0; i < 5; i++) begin
      bt = (i == 0) ? 8 : (i == 1) ? 16 : (i == 2) ? 37 : (i == 3) ? 100 : 1200;
      n0 = nhdr;
      send_byte(8'hA5);
      header(13);
      check(nhdr == n0 + 1, $sformatf("bt=%0d: one header detected (%0d)", bt, nhdr - n0));
      check(bit_time == bt, $sformatf("bt=%0d: measured %0d", bt, bit_time));
      // the 5th sync falling edge is the start of data bit 7: 8 bits before
      // the stop bit; the detection is one clock after it
      n0 = nhdr;
      header(9);
      check(nhdr == n0, $sformatf("bt=%0d: 9-bit break rejected", bt));
      header(11);
      check(nhdr == n0, $sformatf("bt=%0d: 11-bit break rejected", bt));
      header(14);
      check(nhdr == n0 + 1, $sformatf("bt=%0d: header after rejected ones", bt));
      check(hdr_at - last_fall <= 64'(bt) * 2 * 10 * 1000 && hdr_at - last_fall > 0, "detection time");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
