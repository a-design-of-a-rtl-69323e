// tb_lin_transmitter - UART-format byte output at the programmed bit time.
// Each bit is sampled mid-bit; busy must last exactly 10 bit times; abort
// must release the line at once; a start while busy is ignored.
`timescale 1ns/1ps
module tb_lin_transmitter;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, stop_req = 1'b0, busy, tx;
  logic [7:0]  data;
  logic [15:0] bt = 16;
  int checks = 0, failures = 0, busy_cnt = 0;
  always @(posedge clk) if (start && !busy) busy_cnt <= 0; else if (busy) busy_cnt <= busy_cnt + 1;
  always #5 clk = ~clk;

  lin_transmitter dut (.clk, .rst_n, .tick(1'b1), .bit_time(bt), .start, .data, .stop_req, .busy, .tx);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [9:0] frame;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(tx === 1'b1 && !busy, "idle recessive");
    for (int k = 0; k < 8; k++) begin
      bt = 16'(4 + $urandom_range(0, 40));
      data = 8'($urandom);
      @(posedge clk) begin start <= 1'b1; end
      @(posedge clk) start <= 1'b0;
      // sample mid-bit
      repeat (int'(bt) / 2) @(negedge clk);
      for (int i = 0; i < 10; i++) begin
        frame[i] = tx;
        if (i < 9) repeat (int'(bt)) @(negedge clk);
      end
      check(frame == {1'b1, data, 1'b0}, $sformatf("bt=%0d frame %b for %h", bt, frame, data));
      while (busy) @(posedge clk);
      @(negedge clk);
      check(busy_cnt == 10 * int'(bt), $sformatf("byte lasts 10 bit times (%0d clocks, bt %0d)", busy_cnt, bt));
      check(tx === 1'b1, "line released after the stop bit");
    end
    // abort
    data = 8'h00;
    @(posedge clk) start <= 1'b1;
    @(posedge clk) start <= 1'b0;
    repeat (3 * int'(bt)) @(posedge clk);
    check(tx === 1'b0, "dominant during zero byte");
    @(posedge clk) stop_req <= 1'b1;
    @(posedge clk) stop_req <= 1'b0;
    @(negedge clk);
    check(tx === 1'b1 && !busy, "stop_req releases the line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
