// tb_apb_i2c - I2C master against i2c_slave_model: addressed write and read
// back, NACK for a wrong address, SCL period 4*(PRESCALE+1) clocks, START and
// STOP counts, random bytes written and read back over two-byte reads (the
// master's ACK then NACK seen by the slave), the busy flag, and a transfer
// with clock stretching.
`timescale 1ns/1ps
module tb_apb_i2c;
  import soc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, psel, scl_oe, sda_oe, irq, s_sda_low, s_scl_low, scl, sda;
  apb_m2s_t preq; apb_s2m_t prsp;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  assign scl = !(scl_oe || s_scl_low);
  assign sda = !(sda_oe || s_sda_low);

  apb_bfm u_apb (.clk, .psel, .req(preq), .rsp(prsp));
  apb_i2c dut (.clk, .rst_n, .psel, .preq, .prsp, .scl_i(scl), .sda_i(sda), .scl_oe, .sda_oe, .irq);
  i2c_slave_model #(.ADDR(7'h50)) u_slv (.scl, .sda, .sda_low(s_sda_low), .scl_low(s_scl_low));

  localparam logic [31:0] START = 1, STOP = 2, WR = 4, RD = 8, NACK = 16, IE = 32;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cmd(input logic [31:0] c, input logic [7:0] d, output logic [31:0] status);
    u_apb.write(12'h4, c | IE | {16'd0, d, 8'd0});
    while (!irq) @(posedge clk);
    u_apb.read(12'h8, status);
    u_apb.write(12'h8, 4);
  endtask

  longint t_r1, t_r2;
  int n0_start, n0_stop;
  initial begin
    logic [31:0] s, v;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    n0_start = u_slv.nstart; n0_stop = u_slv.nstop;   // power-up levels are arbitrary
    u_apb.read(12'h0, v); check(v == 59, "reset prescale 59");
    u_apb.write(12'h0, 4);
    cmd(START | WR, {7'h50, 1'b0}, s);  check(s[1] == 1'b0, "address acknowledged");
    cmd(WR | STOP, 8'hC3, s);           check(s[1] == 1'b0, "data acknowledged");
    check(u_slv.reg_val == 8'hC3, $sformatf("slave stored %h", u_slv.reg_val));
    fork
      cmd(START | WR, {7'h50, 1'b1}, s);
      begin @(posedge scl); t_r1 = $time; @(posedge scl); t_r2 = $time; end
    join
    check(s[1] == 1'b0, "read address acknowledged");
    check(t_r2 - t_r1 == 4 * 5 * 10, $sformatf("SCL period %0d ns", t_r2 - t_r1));
    cmd(RD | NACK | STOP, 8'h00, s);
    u_apb.read(12'hC, v);               check(v[7:0] == 8'hC3, $sformatf("read %h", v[7:0]));
    cmd(START | WR | STOP, {7'h23, 1'b0}, s); check(s[1] == 1'b1, "wrong address not acknowledged");
    check(u_slv.nstart - n0_start == 3 && u_slv.nstop - n0_stop == 3, $sformatf("starts %0d stops %0d", u_slv.nstart - n0_start, u_slv.nstop - n0_stop));
    // random bytes: write, then a two-byte read (ACK then NACK) returns them
    for (int k = 0; k < 6; k++) begin
      automatic logic [7:0] b = 8'($urandom);
      cmd(START | WR, {7'h50, 1'b0}, s);
      u_apb.write(12'h4, WR | STOP | IE | {16'd0, b, 8'd0});
      @(posedge clk);
      u_apb.read(12'h8, v);              check(v[0], "busy during a transfer");
      while (!irq) @(posedge clk);
      u_apb.write(12'h8, 4);
      check(u_slv.reg_val == b, $sformatf("random byte %h stored as %h", b, u_slv.reg_val));
      cmd(START | WR, {7'h50, 1'b1}, s);
      cmd(RD, 8'h00, s);
      u_apb.read(12'hC, v);
      check(v[7:0] == b && u_slv.m_ack, $sformatf("first read %h with ACK", v[7:0]));
      cmd(RD | NACK | STOP, 8'h00, s);
      u_apb.read(12'hC, v);
      check(v[7:0] == b && !u_slv.m_ack, $sformatf("second read %h with NACK", v[7:0]));
      u_apb.read(12'h8, v);              check(!v[0] && !irq, "idle and done flag cleared");
    end
    // clock stretching
    u_slv.stretch = 1'b1;
    cmd(START | WR, {7'h50, 1'b0}, s);  check(s[1] == 1'b0, "stretched: address acknowledged");
    cmd(WR | STOP, 8'h96, s);           check(s[1] == 1'b0 && u_slv.reg_val == 8'h96, "stretched: data written");
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
