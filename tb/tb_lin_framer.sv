// tb_lin_framer - frame sequencing, checksums and error flags.
// The receiver and transmitter are replaced by direct strobes: hdr_ok and
// rx_vld/rx_byte are driven by the test, and every byte the framer starts is
// echoed back as the received byte (or corrupted to force a bit error).
// Reference PIDs and checksums are computed here. With tick always high and
// bit_time 20, a published response must start half a bit (10 ticks) after
// the PID byte.
`timescale 1ns/1ps
module tb_lin_framer;
  import lin_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b1, cfg_pub = 1'b0, cfg_classic = 1'b0, stop_req = 1'b0;
  logic [5:0] cfg_id = 6'h10;
  logic [3:0] cfg_len = 4'd4;
  logic [63:0] tx_data = 64'h0807_0605_0403_0201;
  logic hdr_ok = 1'b0, rx_vld = 1'b0, rx_ferr = 1'b0, rx_level = 1'b1, tx_busy = 1'b0;
  logic [7:0] rx_byte = '0;
  logic tick = 1'b1;
  logic [15:0] bit_time = 16'd20;      // response waits bit_time/2 = 10 ticks
  int cyc = 0, t_pid = 0, t_first = 0;
  logic rx_arm, tx_start, tx_abort, wr_en;
  logic [7:0] tx_byte, wr_byte, last_pid;
  logic [2:0] wr_idx;
  logic [NUM_IRQ-1:0] irq_set, flags;
  framer_state_e state;
  logic [63:0] wdata;
  logic [7:0]  sent [$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  lin_framer dut (.*);

  always @(posedge clk) begin
    flags <= flags | irq_set;
    if (wr_en) wdata[8*wr_idx +: 8] <= wr_byte;
    if (tx_start && sent.size() == 0) t_first <= cyc;
    if (tx_start) sent.push_back(tx_byte);
    cyc <= cyc + 1;
    if (rx_vld && state == F_PID) t_pid <= cyc;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] pid(input logic [5:0] id);
    return {~(id[1] ^ id[3] ^ id[4] ^ id[5]), id[0] ^ id[1] ^ id[2] ^ id[4], id};
  endfunction

  function automatic logic [7:0] ck(input logic [7:0] p, input logic [63:0] d, input int n);
    int s = int'(p);
    for (int i = 0; i < n; i++) begin s += int'(d[8*i +: 8]); if (s > 255) s -= 255; end
    return ~s[7:0];
  endfunction

  task automatic give(input logic [7:0] b, input logic fe = 1'b0);
    @(posedge clk) begin rx_vld <= 1'b1; rx_byte <= b; rx_ferr <= fe; end
    @(posedge clk) rx_vld <= 1'b0;
    repeat (3) @(posedge clk);
  endtask

  task automatic header(input logic [7:0] p);
    flags = '0;
    @(posedge clk) hdr_ok <= 1'b1;
    @(posedge clk) hdr_ok <= 1'b0;
    give(p);
  endtask

  initial begin
    logic [63:0] d;
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    flags = '0;
    // subscribe, enhanced
    d = 64'hC0FFEE11;
    header(pid(6'h10));
    check(flags == 9'h001 && state == F_RX && last_pid == pid(6'h10), "header accepted, receiving");
    for (int i = 0; i < 4; i++) give(d[8*i +: 8]);
    give(ck(pid(6'h10), d, 4));
    check(flags == 9'h003 && state == F_IDLE, $sformatf("rx done flags %h", flags));
    check(wdata[31:0] == d[31:0], "data written to registers");
    // wrong checksum
    header(pid(6'h10));
    for (int i = 0; i < 4; i++) give(d[8*i +: 8]);
    give(ck(pid(6'h10), d, 4) ^ 8'h10);
    check(flags == 9'h021, $sformatf("checksum error flags %h", flags));
    // classic checksum
    cfg_classic = 1'b1;
    header(pid(6'h10));
    for (int i = 0; i < 4; i++) give(d[8*i +: 8]);
    give(ck(8'h00, d, 4));
    check(flags == 9'h003, $sformatf("classic rx done flags %h", flags));
    cfg_classic = 1'b0;
    // parity error
    header(pid(6'h10) ^ 8'h40);
    check(flags == 9'h008 && state == F_IDLE, "parity error");
    // frame error in PID and in data
    header(pid(6'h10));
    give(8'h00, 1'b1);
    check(flags == 9'h011, "frame error in response");
    // foreign ID ignored
    header(pid(6'h11));
    check(flags == 9'h001 && state == F_IDLE, "foreign ID ignored");
    // publish 8 bytes with echo
    cfg_pub = 1'b1; cfg_len = 4'd8;
    sent.delete();
    header(pid(6'h10));
    check(state == F_TX, "publishing");
    check(sent.size() == 0, "response waits for the end of the PID stop bit");
    wait (sent.size() > 0);
    @(negedge clk);
    check(t_first - t_pid == 11, $sformatf("first byte %0d clocks after the PID (11)", t_first - t_pid));
    n = 0;
    while (state == F_TX && n < 20) begin
      wait (sent.size() > n);
      tx_busy = 1'b1;
      repeat (2) @(posedge clk);
      tx_busy = 1'b0;
      give(sent[n]);
      n++;
    end
    check(n == 9, $sformatf("9 bytes published (%0d)", n));
    check(sent.size() == 9 && sent[8] == ck(pid(6'h10), tx_data, 8), "published checksum");
    for (int i = 0; i < 8 && i < sent.size(); i++) check(sent[i] == tx_data[8*i +: 8], $sformatf("published byte %0d", i));
    check(flags == 9'h005, $sformatf("tx done flags %h", flags));
    // bit error: echo differs
    sent.delete();
    header(pid(6'h10));
    wait (sent.size() > 0);
    give(sent[0] ^ 8'h04);
    check(flags == 9'h041 && state == F_IDLE, $sformatf("bit error flags %h", flags));
    // abort while publishing
    header(pid(6'h10));
    @(posedge clk) stop_req <= 1'b1;
    @(posedge clk) stop_req <= 1'b0;
    @(negedge clk);
    check(state == F_IDLE, "stop_req returns to idle");
    cfg_pub = 1'b0;
    // go to sleep and wake
    header(pid(6'h3C));
    d = 64'hFFFF_FFFF_FFFF_FF00;
    for (int i = 0; i < 8; i++) give(d[8*i +: 8]);
    give(ck(8'h00, d, 8));
    check(flags == 9'h081 && state == F_SLEEP, $sformatf("go to sleep flags %h", flags));
    header(pid(6'h10));
    check(state == F_SLEEP, "headers ignored while asleep");
    @(posedge clk) rx_level <= 1'b0;
    @(posedge clk) rx_level <= 1'b1;
    @(posedge clk);
    @(negedge clk);
    check(flags[IRQ_WAKE] && state == F_IDLE, "wake-up");
    // a master request that is not go-to-sleep
    header(pid(6'h3C));
    d = 64'h1;
    for (int i = 0; i < 8; i++) give(d[8*i +: 8]);
    give(ck(8'h00, d, 8));
    check(flags == 9'h001 && state == F_IDLE, "other diagnostic frame");
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
