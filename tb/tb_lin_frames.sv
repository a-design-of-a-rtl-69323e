// tb_lin_frames - LIN frame sweep through the whole processor at its default
// parameters: 24 MHz clock, LIN at 20 kbit/s (1200 clocks per bit) and at
// 1 kbit/s (24000 clocks per bit, PRESCALE 4 so that a break fits the 16-bit
// counters).
//
// For every response length from 1 to 8 bytes the node first subscribes to a
// frame sent by the master model (lin_bfm) and then publishes one that the
// model reads back. Odd lengths use the classic checksum, even lengths the
// enhanced one. Checked: received data registers, RX_DONE/TX_DONE flags, the
// published bytes and checksum (computed in the model), the measured
// BIT_TIME, and the byte spacing of the published response: each byte must
// follow the previous one after 10 to 10.5 bit times (the transmitter sends
// back to back). The AHB master port is driven by ahb_bfm in place of the
// core; the memory and peripheral pins are tied off.
`timescale 1ns/1ps
module tb_lin_frames;
  import soc_pkg::*;
  import lin_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #20.833 clk = ~clk;           // 24 MHz

  ahb_m2s_t m_req; ahb_s2m_t m_rsp;
  logic [4:0] irq;
  logic lin_tx, lin_bus, lin_drv;
  logic [18:0] sram_addr; logic [15:0] sram_dq_o;
  logic sram_dq_oe, sram_ce_n, sram_oe_n, sram_we_n, sram_ub_n, sram_lb_n;
  logic flash_cs_n, flash_sck, flash_mosi;
  logic uart_tx, spi_sck, spi_mosi, spi_cs_n, scl_oe, sda_oe;
  logic [15:0] gpio_o, gpio_oe;

  assign lin_bus = lin_drv & lin_tx;   // wired-AND LIN bus

  lnp_top dut (
    .clk, .rst_n, .m_req, .m_rsp, .irq, .lin_tx, .lin_rx(lin_bus),
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i(16'h0000), .sram_ce_n, .sram_oe_n,
    .sram_we_n, .sram_ub_n, .sram_lb_n,
    .flash_cs_n, .flash_sck, .flash_mosi, .flash_miso(1'b1),
    .uart_tx, .uart_rx(1'b1), .spi_sck, .spi_mosi, .spi_miso(1'b0), .spi_cs_n,
    .i2c_scl_i(1'b1), .i2c_sda_i(1'b1), .i2c_scl_oe(scl_oe), .i2c_sda_oe(sda_oe),
    .gpio_i(16'h0000), .gpio_o, .gpio_oe);

  ahb_bfm u_cpu (.clk, .req(m_req), .rsp(m_rsp));
  lin_bfm u_lin (.clk, .bus(lin_bus), .drv(lin_drv));

  localparam logic [31:0] LIN = 32'h5000_0000;

  int checks = 0, failures = 0;
  longint cyc = 0;                     // clock counter for timing checks
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic lw(input logic [3:0] r, input logic [31:0] d);
    u_cpu.write(LIN | {26'd0, r, 2'b00}, d);
  endtask
  task automatic lr(input logic [3:0] r, output logic [31:0] d);
    u_cpu.read(LIN | {26'd0, r, 2'b00}, d);
  endtask

  // service the LIN interrupt until a flag in mask is seen or n clocks have
  // passed; f collects every flag read (and cleared)
  task automatic wait_irq(output logic [31:0] f, input logic [31:0] mask, input int n);
    logic [31:0] r;
    automatic int w = 0;
    f = '0;
    while ((f & mask) == 0 && w < n) begin
      if (irq[0]) begin
        lr(R_IRQ, r);
        lw(R_IRQ, r);
        f |= r;
      end else begin
        @(posedge clk);
        w++;
      end
    end
  endtask

  // one subscribed and one published frame of n bytes at bit time bt clocks;
  // the LIN tick is clk/(pre+1), so BIT_TIME must read bt/(pre+1)
  task automatic frame_pair(input int n, input int bt, input int pre);
    logic [63:0] d, pub, got;
    logic [31:0] v, f, lo, hi;
    logic [7:0] b;
    bit ok, enh;
    longint t_prev, t_now, dt;
    enh = (n % 2 == 0);
    d   = {$urandom, $urandom};
    pub = {$urandom, $urandom};
    // subscribe: ID 0x10+n
    lw(R_FRAME_ID, 32'(6'h10 + n)); lw(R_DATA_LEN, n);
    lw(R_DATA0, 0); lw(R_DATA1, 0);
    lw(R_CTRL, enh ? 32'h1 : 32'h5);
    u_lin.send_header(6'(6'h10 + n));
    wait_irq(f, 32'h1FF, 4 * bt);
    check(f == 32'(1 << IRQ_HEADER), $sformatf("n=%0d bt=%0d header flag %h", n, bt, f));
    lr(R_BIT_TIME, v);
    check(v == 32'(bt / (pre + 1)), $sformatf("n=%0d BIT_TIME %0d expected %0d", n, v, bt / (pre + 1)));
    u_lin.send_response(d, n, enh);
    wait_irq(f, 32'h1FE, 4 * bt);
    check(f == 32'(1 << IRQ_RX_DONE), $sformatf("n=%0d bt=%0d subscribe flags %h", n, bt, f));
    lr(R_DATA0, lo); lr(R_DATA1, hi);
    got = {hi, lo};
    for (int i = 0; i < n; i++)
      check(got[8*i +: 8] == d[8*i +: 8],
            $sformatf("n=%0d bt=%0d received byte %0d %h expected %h", n, bt, i, got[8*i +: 8], d[8*i +: 8]));
    // publish: ID 0x20+n
    lw(R_DATA0, pub[31:0]); lw(R_DATA1, pub[63:32]);
    lw(R_FRAME_ID, 32'(6'h20 + n)); lw(R_DATA_LEN, n);
    lw(R_CTRL, enh ? 32'h3 : 32'h7);
    u_lin.send_header(6'(6'h20 + n));
    t_prev = 0;
    for (int i = 0; i <= n; i++) begin
      u_lin.recv_byte(b, ok, 20 * bt);
      t_now = cyc;
      if (i < n)
        check(ok && b == pub[8*i +: 8], $sformatf("n=%0d bt=%0d published byte %0d %h", n, bt, i, b));
      else
        check(ok && b == u_lin.cksum(u_lin.last_pid, pub, n, enh),
              $sformatf("n=%0d bt=%0d published checksum %h", n, bt, b));
      if (i > 0) begin
        dt = t_now - t_prev;
        check(dt >= 10 * bt - 2 && dt <= 10 * bt + bt / 2,
              $sformatf("n=%0d bt=%0d byte spacing %0d clocks", n, bt, dt));
      end
      t_prev = t_now;
    end
    wait_irq(f, 32'h1FA, 4 * bt);
    check(f[IRQ_TX_DONE] && (f & ~32'h5) == 0, $sformatf("n=%0d bt=%0d publish flags %h", n, bt, f));
  endtask

  initial begin
    u_lin.set_timing(1200);
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    lw(R_IRQ_EN, 32'h1FF);

    // 20 kbit/s at 24 MHz, PRESCALE 0: lengths 1..8
    for (int n = 1; n <= 8; n++) frame_pair(n, 1200, 0);

    // 1 kbit/s: PRESCALE 4 gives 4800 ticks per bit, 62400 per break
    lw(R_PRESCALE, 4);
    u_lin.set_timing(24000);
    frame_pair(8, 24000, 4);
    frame_pair(1, 24000, 4);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
