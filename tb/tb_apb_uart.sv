// tb_apb_uart - UART in loopback (tx wired to rx) plus an external sender:
// bytes written to DATA must come back in the receive buffer with the RX
// interrupt; the bit time on the line must equal BAUDDIV; overrun is flagged.
`timescale 1ns/1ps
module tb_apb_uart;
  import soc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, psel, tx, irq, ext = 1'b1, loop = 1'b1;
  apb_m2s_t preq; apb_s2m_t prsp;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  apb_bfm u_apb (.clk, .psel, .req(preq), .rsp(prsp));
  apb_uart dut (.clk, .rst_n, .psel, .preq, .prsp, .uart_rx(loop ? tx : ext), .uart_tx(tx), .irq);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] v; logic [7:0] d; int t0, lowlen;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    u_apb.read(12'h8, v); check(v == 208, "reset divisor 208");
    u_apb.write(12'h8, 12);
    u_apb.write(12'hC, 1);
    for (int k = 0; k < 10; k++) begin
      d = (k == 0) ? 8'h01 : 8'($urandom);
      fork
        u_apb.write(12'h0, {24'd0, d});
        if (k == 0) begin
          @(negedge tx) t0 = int'($time);
          @(posedge tx) lowlen = (int'($time) - t0) / 10;
          check(lowlen == 12, $sformatf("bit time %0d clocks", lowlen));
        end
      join
      t0 = 0;
      while (!irq && t0 < 400) begin @(posedge clk); t0++; end
      check(irq, "rx interrupt");
      u_apb.read(12'h0, v);
      check(v[7:0] == d, $sformatf("loopback %h got %h", d, v[7:0]));
      u_apb.read(12'h4, v);
      check(v[1] == 1'b0, "buffer emptied by the read");
      while (v[0]) u_apb.read(12'h4, v);
    end
    // overrun: two bytes without reading
    u_apb.write(12'h0, 32'h11);
    repeat (12 * 11) @(posedge clk);
    u_apb.write(12'h0, 32'h22);
    repeat (12 * 11) @(posedge clk);
    u_apb.read(12'h4, v); check(v[2:1] == 2'b11, "overrun flagged");
    u_apb.read(12'h0, v); check(v[7:0] == 8'h22, "newest byte kept");
    u_apb.write(12'h4, 4); u_apb.read(12'h4, v); check(v[2] == 1'b0, "overrun cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
