// tb_lin_controller - block-level test of the LIN slave controller.
//
// The processor is played by ahb_bfm (register reads and writes, IRQ line)
// and the LIN master by lin_bfm; the bus is the wired AND of the model and
// the controller's transmit pin. Scenarios: subscribe (receive) with
// enhanced checksum, publish 8 bytes and check them and the bit time on the
// bus, ignored ID, parity, checksum and frame errors, a bit error forced by
// the master, a too-short break, a second bit rate, the abort command and
// go-to-sleep followed by wake-up.
`timescale 1ns/1ps
module tb_lin_controller;
  import soc_pkg::*;
  import lin_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ahb_m2s_t hreq;
  ahb_s2m_t hrsp;
  logic     lin_tx, irq, bus, drv, force_dom;
  int       checks = 0, failures = 0;

  assign bus = drv & lin_tx & ~force_dom;

  ahb_bfm u_ahb (.clk, .req(hreq), .rsp(hrsp));
  lin_bfm u_lin (.clk, .bus, .drv);

  lin_controller dut (
    .clk, .rst_n, .hsel(1'b1), .hreq, .hready(hrsp.hreadyout), .hrsp,
    .lin_rx(bus), .lin_tx, .irq);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] ra(input logic [3:0] r);
    return {26'd0, r, 2'b00};
  endfunction

  task automatic wr(input logic [3:0] r, input logic [31:0] d);
    u_ahb.write(ra(r), d);
  endtask

  task automatic rd(input logic [3:0] r, output logic [31:0] d);
    u_ahb.read(ra(r), d);
  endtask

  task automatic expect_flags(input logic [31:0] exp, input string what);
    logic [31:0] f;
    repeat (24) @(posedge clk);
    rd(R_IRQ, f);
    check(f == exp, $sformatf("%s: flags %h expected %h", what, f, exp));
    wr(R_IRQ, 32'h1FF);
  endtask

  // measure the duration of the first dominant pulse on lin_tx
  int unsigned low_len;
  task automatic measure_low();
    low_len = 0;
    while (lin_tx !== 1'b0) @(posedge clk);
    while (lin_tx === 1'b0) begin
      @(posedge clk);
      low_len++;
    end
  endtask

  logic [31:0] v;
  logic [7:0]  b;
  bit          ok;
  logic [63:0] pub_data = 64'h8877_6655_4433_2211;

  initial begin
    force_dom = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    wr(R_FILTER, 1);
    wr(R_IRQ_EN, 32'h1FF);

    // 1. subscribe: ID 0x12, 4 bytes, enhanced checksum
    wr(R_FRAME_ID, 6'h12);
    wr(R_DATA_LEN, 4);
    wr(R_CTRL, 32'h1);
    u_lin.send_header(6'h12);
    u_lin.send_response(64'hDEAD_BEEF, 4);
    repeat (4) @(posedge clk);
    check(irq === 1'b1, "irq line after reception");
    rd(R_DATA0, v);
    check(v == 32'hDEAD_BEEF, $sformatf("received data %h", v));
    rd(R_BIT_TIME, v);
    check(v == 16, $sformatf("measured bit time %0d expected 16", v));
    rd(R_STATUS, v);
    check(v[15:8] == 8'h92 && v[1:0] == 2'b00, $sformatf("status %h", v));
    expect_flags(32'h003, "subscribe");
    @(negedge clk);
    check(irq === 1'b0, "irq line cleared");

    // 2. publish: ID 0x22, 8 bytes, read on the bus by the monitor
    wr(R_DATA0, pub_data[31:0]);
    wr(R_DATA1, pub_data[63:32]);
    wr(R_FRAME_ID, 6'h22);
    wr(R_DATA_LEN, 8);
    wr(R_CTRL, 32'h3);
    fork
      u_lin.send_header(6'h22);
      measure_low();
    join
    // first start bit + bit0 of 0x11 (=1): the pulse is exactly one bit
    check(low_len >= 15 && low_len <= 17, $sformatf("published bit time %0d clocks", low_len));
    repeat (16 * 8 + 8) @(posedge clk);   // rest of byte 0
    for (int i = 1; i < 8; i++) begin
      u_lin.recv_byte(b, ok, 400);
      check(ok && b == pub_data[8*i +: 8], $sformatf("published byte %0d = %h", i, b));
    end
    u_lin.recv_byte(b, ok, 400);
    check(ok && b == u_lin.cksum(u_lin.last_pid, pub_data, 8, 1'b1), $sformatf("published checksum %h", b));
    expect_flags(32'h005, "publish");

    // 3. ignored ID: header only, nothing transmitted
    fork
      u_lin.send_header(6'h05);
      begin
        automatic int unsigned lows = 0;
        repeat (30 * 16) begin @(posedge clk); if (!lin_tx) lows++; end
        check(lows == 0, "no transmission for a foreign ID");
      end
    join
    u_lin.send_response(64'h1234, 2);
    expect_flags(32'h001, "ignored ID");

    // 4. parity error
    u_lin.send_header(6'h22, 13, 1'b1);
    expect_flags(32'h008, "parity error");

    // 5. checksum error on a subscribed frame (classic checksum selected)
    wr(R_FRAME_ID, 6'h12);
    wr(R_DATA_LEN, 2);
    wr(R_CTRL, 32'h5);
    u_lin.send_header(6'h12);
    u_lin.send_response(64'hA5A5, 2, 1'b0, 1'b1);
    expect_flags(32'h021, "checksum error");
    u_lin.send_header(6'h12);
    u_lin.send_response(64'h5A5A, 2, 1'b0, 1'b0);
    expect_flags(32'h003, "classic checksum accepted");

    // 6. frame error: dominant stop bit in the response
    u_lin.send_header(6'h12);
    u_lin.send_byte(8'h01, 1'b0);
    u_lin.hold(1'b1, 2);
    expect_flags(32'h011, "frame error");

    // 7. bit error: master forces a recessive data bit dominant
    wr(R_FRAME_ID, 6'h22);
    wr(R_CTRL, 32'h3);
    u_lin.send_header(6'h22);
    repeat (16 * 3) @(posedge clk);
    force_dom = 1'b1;
    repeat (16 * 2) @(posedge clk);
    force_dom = 1'b0;
    repeat (16 * 40) @(posedge clk);
    expect_flags(32'h041, "bit error");
    rd(R_STATUS, v);
    check(v[0] == 1'b0, "idle after bit error");

    // 8. break too short (9 bits): no header accepted
    u_lin.send_header(6'h22, 9);
    repeat (16 * 20) @(posedge clk);
    expect_flags(32'h000, "short break rejected");

    // 9. second bit rate: 24 clocks per bit
    u_lin.set_timing(24);
    wr(R_FRAME_ID, 6'h12);
    wr(R_DATA_LEN, 1);
    wr(R_CTRL, 32'h1);
    u_lin.send_header(6'h12);
    u_lin.send_response(64'h3C, 1);
    rd(R_BIT_TIME, v);
    check(v == 24, $sformatf("bit time %0d expected 24", v));
    expect_flags(32'h003, "24-clock bit rate");
    u_lin.set_timing(16);

    // 10. abort command during a published response
    wr(R_FRAME_ID, 6'h22);
    wr(R_DATA_LEN, 8);
    wr(R_CTRL, 32'h3);
    u_lin.send_header(6'h22);
    repeat (16 * 15) @(posedge clk);
    wr(R_CTRL, 32'h3 | 32'h8);
    repeat (4) @(posedge clk);
    begin
      automatic int unsigned lows = 0;
      repeat (16 * 80) begin @(posedge clk); if (!lin_tx) lows++; end
      check(lows == 0, "transmitter silent after abort");
    end
    rd(R_STATUS, v);
    check(v[0] == 1'b0, "framer idle after abort");
    expect_flags(32'h001, "abort");

    // 11. go to sleep (ID 0x3C, first byte 0x00, classic checksum), then wake-up
    u_lin.send_header(ID_MASTER_REQ);
    u_lin.send_response(64'hFFFF_FFFF_FFFF_FF00, 8, 1'b0);
    repeat (4) @(posedge clk);
    rd(R_STATUS, v);
    check(v[1] == 1'b1, "status shows sleep");
    expect_flags(32'h081, "go to sleep");
    u_lin.hold(1'b0, 3);
    u_lin.hold(1'b1, 2);
    rd(R_STATUS, v);
    check(v[1] == 1'b0, "awake after wake-up pulse");
    expect_flags(32'h100, "wake-up");

    // 12. prescaler: PRESCALE=1 halves the tick rate, the bit time reads 8
    wr(R_PRESCALE, 1);
    wr(R_DATA_LEN, 1);
    wr(R_FRAME_ID, 6'h12);
    wr(R_CTRL, 32'h1);
    u_lin.send_header(6'h12);
    u_lin.send_response(64'h77, 1);
    rd(R_BIT_TIME, v);
    check(v == 8, $sformatf("bit time with prescale 1: %0d", v));
    expect_flags(32'h003, "prescaled reception");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
