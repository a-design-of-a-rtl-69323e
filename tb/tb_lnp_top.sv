// tb_lnp_top - end-to-end test of the local network processor at its default
// parameters. The testbench plays the processor on the AHB master port
// (ahb_bfm) and the board around the chip: external SRAM, SPI flash, a LIN
// master on a wired-AND bus that also carries the chip's own transmission
// (lin_bfm, 1200 clocks per bit = 20 kbit/s at 24 MHz), UART, SPI and GPIO
// loopbacks and an I2C slave.
//
// Sequence: boot copy of a program image from flash to external SRAM and
// on-chip memory with read-back; an unmapped access; the LIN node set up from
// the processor and driven through a small schedule (subscribe, publish,
// foreign ID, glitch on the bus, parity, checksum and frame errors, a bit
// error, a short break, go-to-sleep and wake-up), serviced by interrupt;
// then one transfer on each APB peripheral with its interrupt.
// Every mechanism is counted; one that never happened counts as a failure.
`timescale 1ns/1ps
module tb_lnp_top;
  import soc_pkg::*;
  import lin_pkg::*;

  localparam int BIT = 1200;           // clocks per LIN bit
  localparam int BOOT_WORDS = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #20.833 clk = ~clk;           // 24 MHz

  ahb_m2s_t m_req; ahb_s2m_t m_rsp;
  logic [4:0] irq;
  logic lin_tx, lin_bus, lin_drv, force_dom = 1'b0, glitch = 1'b0;
  logic [18:0] sram_addr; logic [15:0] sram_dq_o, sram_dq_i;
  logic sram_dq_oe, sram_ce_n, sram_oe_n, sram_we_n, sram_ub_n, sram_lb_n;
  logic flash_cs_n, flash_sck, flash_mosi, flash_miso;
  logic uart_tx, spi_sck, spi_mosi, spi_cs_n;
  logic scl_oe, sda_oe, scl, sda, s_sda_low, s_scl_low;
  logic [15:0] gpio_o, gpio_oe;

  assign lin_bus = lin_drv & lin_tx & ~force_dom & ~glitch;
  assign scl = !(scl_oe || s_scl_low);
  assign sda = !(sda_oe || s_sda_low);

  lnp_top dut (
    .clk, .rst_n, .m_req, .m_rsp, .irq, .lin_tx, .lin_rx(lin_bus),
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i, .sram_ce_n, .sram_oe_n,
    .sram_we_n, .sram_ub_n, .sram_lb_n,
    .flash_cs_n, .flash_sck, .flash_mosi, .flash_miso,
    .uart_tx, .uart_rx(uart_tx), .spi_sck, .spi_mosi, .spi_miso(spi_mosi), .spi_cs_n,
    .i2c_scl_i(scl), .i2c_sda_i(sda), .i2c_scl_oe(scl_oe), .i2c_sda_oe(sda_oe),
    .gpio_i(gpio_o ^ 16'h00FF), .gpio_o, .gpio_oe);

  ahb_bfm         u_cpu   (.clk, .req(m_req), .rsp(m_rsp));
  lin_bfm         u_lin   (.clk, .bus(lin_bus), .drv(lin_drv));
  ext_sram_model  u_sram  (.addr(sram_addr), .dq_in(sram_dq_oe ? sram_dq_o : 16'hFFFF), .dq_out(sram_dq_i),
                           .ce_n(sram_ce_n), .oe_n(sram_oe_n), .we_n(sram_we_n), .ub_n(sram_ub_n), .lb_n(sram_lb_n));
  spi_flash_model u_flash (.cs_n(flash_cs_n), .sck(flash_sck), .mosi(flash_mosi), .miso(flash_miso));
  i2c_slave_model u_i2c   (.scl, .sda, .sda_low(s_sda_low), .scl_low(s_scl_low));

  int checks = 0, failures = 0;

  // mechanism counters
  typedef enum int {
    M_BOOT_COPY, M_AHB_ERROR, M_EXT_WAIT, M_FLASH_WAIT, M_APB_WAIT,
    M_HEADER, M_RX_DONE, M_TX_DONE, M_PARITY, M_CKSUM, M_FRAME, M_BITERR,
    M_SLEEP, M_WAKE, M_SHORT_BREAK, M_GLITCH, M_LIN_IRQ, M_FOREIGN_ID,
    M_UART, M_TIMER, M_SPI, M_I2C, M_GPIO, M_NUM
  } mech_e;
  int mech [M_NUM];

  localparam logic [31:0] LIN  = 32'h5000_0000;
  localparam logic [31:0] UART = 32'h4000_0000, TIMER = 32'h4000_1000, SPI = 32'h4000_2000,
                          I2C = 32'h4000_3000, GPIO = 32'h4000_4000;

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

  // interrupt service: read and clear the LIN flags, count them
  task automatic lin_isr(output logic [31:0] f);
    lr(R_IRQ, f);
    lw(R_IRQ, f);
    if (f[IRQ_HEADER])  mech[M_HEADER]++;
    if (f[IRQ_RX_DONE]) mech[M_RX_DONE]++;
    if (f[IRQ_TX_DONE]) mech[M_TX_DONE]++;
    if (f[IRQ_PARITY])  mech[M_PARITY]++;
    if (f[IRQ_CKSUM])   mech[M_CKSUM]++;
    if (f[IRQ_FRAME])   mech[M_FRAME]++;
    if (f[IRQ_BITERR])  mech[M_BITERR]++;
    if (f[IRQ_SLEEP])   mech[M_SLEEP]++;
    if (f[IRQ_WAKE])    mech[M_WAKE]++;
  endtask

  // service LIN interrupts until one of the flags in mask has been seen or
  // n clocks have passed; acc collects every flag serviced
  task automatic lin_expect(input logic [31:0] mask, output logic [31:0] acc, input int n = 200 * BIT);
    logic [31:0] f;
    automatic int w = 0;
    acc = '0;
    while ((acc & mask) == 0 && w < n) begin
      if (irq[0]) begin
        mech[M_LIN_IRQ]++;
        lin_isr(f);
        acc |= f;
      end else begin
        @(posedge clk);
        w++;
      end
    end
  endtask

  initial begin
    logic [31:0] v, e, f;
    logic [7:0] b;
    bit ok;
    logic [63:0] pub = 64'h0102_0304_A1B2_C3D4;
    foreach (mech[i]) mech[i] = 0;
    u_lin.set_timing(BIT);
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // ---- boot: copy the program image from flash to external SRAM and on-chip memory
    for (int i = 0; i < BOOT_WORDS; i++) begin
      u_cpu.read(32'h3000_0000 + 32'(4 * i), v);
      if (u_cpu.nwait > 0) mech[M_FLASH_WAIT]++;
      u_cpu.write(32'h2000_0000 + 32'(4 * i), v);
      if (u_cpu.nwait > 0) mech[M_EXT_WAIT]++;
      u_cpu.write(32'h0000_0000 + 32'(4 * i), v);
    end
    for (int i = 0; i < BOOT_WORDS; i++) begin
      for (int j = 0; j < 4; j++) e[8*j +: 8] = u_flash.content(4 * i + j);
      u_cpu.read(32'h2000_0000 + 32'(4 * i), v);
      check(v == e, $sformatf("ext SRAM word %0d %h expected %h", i, v, e));
      u_cpu.read(32'h0000_0000 + 32'(4 * i), v);
      check(v == e, $sformatf("on-chip word %0d %h expected %h", i, v, e));
      if (v == e) mech[M_BOOT_COPY]++;
    end
    u_cpu.write(32'h2000_0041, 32'h0000_5A00, 3'd0);       // byte store
    u_cpu.read(32'h2000_0040, v);
    for (int j = 0; j < 4; j++) e[8*j +: 8] = u_flash.content(64 + j);
    e[15:8] = 8'h5A;
    check(v == e, "byte store to external SRAM");
    u_cpu.read(32'h9000_0000, v);
    check(u_cpu.last_err, "unmapped address answered with ERROR");
    if (u_cpu.last_err) mech[M_AHB_ERROR]++;

    // ---- LIN node set-up (the schedule of a small LIN cluster)
    lw(R_IRQ_EN, 32'h1FF);
    lw(R_FILTER, 8);
    lr(R_FILTER, v);
    check(v == 8, "LIN filter register");

    // subscribe to ID 0x21, 4 bytes
    lw(R_FRAME_ID, 6'h21); lw(R_DATA_LEN, 4); lw(R_CTRL, 32'h1);
    fork
      begin u_lin.send_header(6'h21); u_lin.send_response(64'h8765_4321, 4); end
      lin_expect(32'(1 << IRQ_RX_DONE), f);
    join
    check(f == 32'h3, $sformatf("LIN subscribe flags %h", f));
    lr(R_DATA0, v);
    check(v == 32'h8765_4321, $sformatf("LIN received %h", v));
    lr(R_BIT_TIME, v);
    check(v == BIT, $sformatf("LIN bit time %0d expected %0d", v, BIT));

    // publish on ID 0x30, 8 bytes: the master's monitor reads the response
    lw(R_DATA0, pub[31:0]); lw(R_DATA1, pub[63:32]);
    lw(R_FRAME_ID, 6'h30); lw(R_DATA_LEN, 8); lw(R_CTRL, 32'h3);
    u_lin.send_header(6'h30);
    for (int i = 0; i < 8; i++) begin
      u_lin.recv_byte(b, ok, 20 * BIT);
      check(ok && b == pub[8*i +: 8], $sformatf("LIN published byte %0d = %h", i, b));
    end
    u_lin.recv_byte(b, ok, 20 * BIT);
    check(ok && b == u_lin.cksum(u_lin.last_pid, pub, 8, 1'b1), "LIN published checksum");
    lin_expect(32'(1 << IRQ_TX_DONE), f);
    check(f[IRQ_TX_DONE], "LIN publish done");

    // foreign ID: header only
    u_lin.send_header(6'h01);
    lin_expect(32'h1, f);
    repeat (20 * BIT) @(posedge clk);
    lr(R_IRQ, v);
    check(f == 32'h1 && v == 0 && lin_tx, "foreign ID: header flag only, no response");
    if (f == 32'h1 && v == 0) mech[M_FOREIGN_ID]++;

    // glitch of 4 clocks on the idle bus: removed by the filter
    glitch = 1'b1; repeat (4) @(posedge clk); glitch = 1'b0;
    repeat (20 * BIT) @(posedge clk);
    lr(R_IRQ, v);
    check(v == 0 && !irq[0], "glitch filtered");
    if (v == 0) mech[M_GLITCH]++;

    // parity error
    u_lin.send_header(6'h30, 13, 1'b1);
    lin_expect(32'(1 << IRQ_PARITY), f);
    check(f[IRQ_PARITY], "parity error reported");

    // checksum error on a subscribed frame
    lw(R_FRAME_ID, 6'h21); lw(R_DATA_LEN, 2); lw(R_CTRL, 32'h1);
    u_lin.send_header(6'h21);
    u_lin.send_response(64'h55AA, 2, 1'b1, 1'b1);
    lin_expect(32'(1 << IRQ_CKSUM), f);
    check(f[IRQ_CKSUM], "checksum error reported");

    // frame error
    u_lin.send_header(6'h21);
    u_lin.send_byte(8'h10, 1'b0);
    u_lin.hold(1'b1, 2);
    lin_expect(32'(1 << IRQ_FRAME), f);
    check(f[IRQ_FRAME], "frame error reported");

    // bit error: the master overwrites a recessive bit of the response
    lw(R_FRAME_ID, 6'h30); lw(R_DATA_LEN, 8); lw(R_CTRL, 32'h3);
    u_lin.send_header(6'h30);
    repeat (3 * BIT) @(posedge clk);
    force_dom = 1'b1; repeat (2 * BIT) @(posedge clk); force_dom = 1'b0;
    lin_expect(32'(1 << IRQ_BITERR), f);
    check(f[IRQ_BITERR], "bit error reported");
    repeat (20 * BIT) @(posedge clk);

    // short break (10 bits): not a header
    u_lin.send_header(6'h30, 10);
    repeat (20 * BIT) @(posedge clk);
    lr(R_IRQ, v);
    check(v == 0, "short break ignored");
    if (v == 0) mech[M_SHORT_BREAK]++;

    // go to sleep, then wake-up by a dominant pulse
    u_lin.send_header(ID_MASTER_REQ);
    u_lin.send_response(64'hFFFF_FFFF_FFFF_FF00, 8, 1'b0);
    lin_expect(32'(1 << IRQ_SLEEP), f);
    lr(R_STATUS, v);
    check(f[IRQ_SLEEP] && v[1], "node asleep");
    u_lin.hold(1'b0, 5);
    u_lin.hold(1'b1, 5);
    lin_expect(32'(1 << IRQ_WAKE), f);
    check(f[IRQ_WAKE], "wake-up reported");

    // ---- APB peripherals
    u_cpu.write(UART + 8, 16); u_cpu.write(UART + 12, 1);
    if (u_cpu.nwait > 0) mech[M_APB_WAIT]++;
    u_cpu.write(UART, 32'h6B);
    while (!irq[1]) @(posedge clk);
    u_cpu.read(UART, v);
    check(v[7:0] == 8'h6B, "UART loopback");
    if (v[7:0] == 8'h6B) mech[M_UART]++;

    u_cpu.write(TIMER + 8, 99); u_cpu.write(TIMER + 4, 99); u_cpu.write(TIMER, 3);
    while (!irq[2]) @(posedge clk);
    u_cpu.write(TIMER + 12, 1); u_cpu.write(TIMER, 0);
    mech[M_TIMER]++;

    u_cpu.write(SPI + 8, 1); u_cpu.write(SPI + 12, 2);
    u_cpu.write(SPI, 32'hC6);
    while (!irq[3]) @(posedge clk);
    u_cpu.read(SPI, v);
    check(v[7:0] == 8'hC6, "SPI loopback");
    if (v[7:0] == 8'hC6) mech[M_SPI]++;

    u_cpu.write(I2C, 9);
    u_cpu.write(I2C + 4, 32'h25 | {16'd0, 7'h50, 1'b0, 8'd0});   // START, WRITE addr, IE
    while (!irq[4]) @(posedge clk);
    u_cpu.write(I2C + 8, 4);
    u_cpu.write(I2C + 4, 32'h26 | {16'd0, 8'h3E, 8'd0});         // WRITE data, STOP, IE
    while (!irq[4]) @(posedge clk);
    u_cpu.read(I2C + 8, v);
    check(v[1] == 1'b0 && u_i2c.reg_val == 8'h3E, "I2C write");
    if (u_i2c.reg_val == 8'h3E) mech[M_I2C]++;

    u_cpu.write(GPIO, 32'hA5C3); u_cpu.write(GPIO + 4, 32'hFFFF);
    repeat (4) @(posedge clk);
    u_cpu.read(GPIO + 8, v);
    check(v == (32'hA5C3 ^ 32'h00FF) && gpio_oe == 16'hFFFF, "GPIO loopback");
    if (v == (32'hA5C3 ^ 32'h00FF)) mech[M_GPIO]++;

    for (int i = 0; i < M_NUM; i++) begin
      automatic mech_e m = mech_e'(i);
      $display("mechanism %-14s %0d", m.name(), mech[i]);
      check(mech[i] > 0, $sformatf("mechanism %s never happened", m.name()));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
