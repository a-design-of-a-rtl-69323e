// tb_lin_data_rx - byte sampling with the measured bit time.
// Random bytes at several bit times must be received exactly, with byte_vld
// about 9.5 bit times after the start edge; a dominant stop bit must raise
// ferr; with en low nothing may be received.
`timescale 1ns/1ps
module tb_lin_data_rx;
  logic clk = 1'b0, rst_n = 1'b0, rx = 1'b1, en = 1'b1, vld, ferr;
  logic [7:0]  b;
  logic [15:0] bt = 16;
  int checks = 0, failures = 0, nv = 0;
  longint t_start, t_vld;
  logic [7:0] got; logic got_ferr;
  always #5 clk = ~clk;

  lin_data_rx dut (.clk, .rst_n, .en, .tick(1'b1), .rx, .bit_time(bt), .byte_vld(vld), .rx_byte(b), .ferr);

  always @(posedge clk) if (vld) begin nv++; got = b; got_ferr = ferr; t_vld = $time; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic hold(input logic v);
    rx = v;
    repeat (int'(bt)) @(posedge clk);
  endtask

  task automatic send(input logic [7:0] d, input logic stop);
    t_start = $time;
    hold(0);
    for (int i = 0; i < 8; i++) hold(d[i]);
    hold(stop);
    rx = 1'b1;
    repeat (int'(bt)) @(posedge clk);
  endtask

  initial begin
    logic [7:0] d;
    int n0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    for (int k = 0; k < 4; k++) begin
      bt = (k == 0) ? 16'd8 : (k == 1) ? 16'd16 : (k == 2) ? 16'd33 : 16'd120;
      for (int j = 0; j < 6; j++) begin
        d = 8'($urandom);
        n0 = nv;
        send(d, 1'b1);
        check(nv == n0 + 1 && got == d && !got_ferr, $sformatf("bt=%0d byte %h got %h", bt, d, got));
        check(t_vld - t_start >= longint'(bt) * 90 * 10 / 10 * 1 && t_vld - t_start <= longint'(bt) * 100 * 10,
              "sampling point of the stop bit");
      end
      n0 = nv;
      send(8'h3C, 1'b0);
      check(nv == n0 + 1 && got_ferr, $sformatf("bt=%0d frame error flagged", bt));
    end
    en = 1'b0;
    n0 = nv;
    send(8'h00, 1'b1);
    check(nv == n0, "disabled receiver stays idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
