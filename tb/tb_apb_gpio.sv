// tb_apb_gpio - output data and enable registers, synchronised input.
`timescale 1ns/1ps
module tb_apb_gpio;
  import soc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, psel;
  apb_m2s_t preq; apb_s2m_t prsp;
  logic [15:0] gi = '0, go, goe;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  apb_bfm u_apb (.clk, .psel, .req(preq), .rsp(prsp));
  apb_gpio #(.NGPIO(16)) dut (.clk, .rst_n, .psel, .preq, .prsp, .gpio_i(gi), .gpio_o(go), .gpio_oe(goe));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] v, d;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(go == 0 && goe == 0, "outputs off after reset");
    for (int k = 0; k < 10; k++) begin
      d = $urandom;
      u_apb.write(12'h0, d); u_apb.write(12'h4, ~d);
      @(negedge clk);
      check(go == d[15:0] && goe == ~d[15:0], "outputs follow registers");
      u_apb.read(12'h0, v); check(v == {16'd0, d[15:0]}, "DATAOUT read back");
      u_apb.read(12'h4, v); check(v == {16'd0, ~d[15:0]}, "OUTEN read back");
      gi = 16'($urandom);
      repeat (3) @(posedge clk);
      u_apb.read(12'h8, v); check(v == {16'd0, gi}, "DATAIN");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
