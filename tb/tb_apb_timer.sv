// tb_apb_timer - reload period (RELOAD+1 clocks between expiries) for several
// reload values, register read-back, interrupt enable and clear, counting
// and stopping. Periods are measured between interrupt edges in clocks.
`timescale 1ns/1ps
module tb_apb_timer;
  import soc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, psel, irq;
  apb_m2s_t preq; apb_s2m_t prsp;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  apb_bfm u_apb (.clk, .psel, .req(preq), .rsp(prsp));
  apb_timer dut (.clk, .rst_n, .psel, .preq, .prsp, .irq);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] v; longint t1, t2;
    int rl [4] = '{9, 20, 37, 130};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    u_apb.write(12'h8, 49);
    u_apb.write(12'h4, 49);
    u_apb.write(12'h0, 3);
    u_apb.read(12'h4, v);
    check(v < 49 && v > 40, $sformatf("counting down: %0d", v));
    @(posedge irq); t1 = $time;
    u_apb.write(12'hC, 1);
    check(!irq, "interrupt cleared");
    @(posedge irq); t2 = $time;
    check(t2 - t1 == 50 * 10, $sformatf("period %0d ns", t2 - t1));
    u_apb.write(12'hC, 1);
    u_apb.read(12'h0, v);
    check(v == 3, $sformatf("CTRL read-back %h", v));
    u_apb.read(12'h8, v);
    check(v == 49, $sformatf("RELOAD read-back %0d", v));
    // further reload values: two periods each
    foreach (rl[k]) begin
      u_apb.write(12'h8, rl[k]);
      @(posedge irq); u_apb.write(12'hC, 1);   // the period in progress may be the old one
      @(posedge irq); t1 = $time; u_apb.write(12'hC, 1);
      @(posedge irq); t2 = $time; u_apb.write(12'hC, 1);
      check(t2 - t1 == (rl[k] + 1) * 10, $sformatf("reload %0d: period %0d ns", rl[k], t2 - t1));
    end
    u_apb.write(12'h0, 1);   // interrupts off
    repeat (300) @(posedge clk);
    u_apb.read(12'hC, v);
    check(v[0] && !irq, "flag without interrupt when disabled");
    u_apb.write(12'h0, 0);
    u_apb.read(12'h4, v);
    repeat (20) @(posedge clk);
    begin
      logic [31:0] v2;
      u_apb.read(12'h4, v2);
      check(v2 == v, "stopped timer holds its value");
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
