// tb_lin_regs - register read/write, reset values, IRQ flags and framer
// write port of the LIN register block.
`timescale 1ns/1ps
module tb_lin_regs;
  import lin_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic reg_we = 1'b0;
  logic [5:2] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic cfg_en, cfg_pub, cfg_classic, cmd_abort;
  logic [5:0] cfg_id; logic [3:0] cfg_len; logic [15:0] cfg_prescale; logic [7:0] cfg_filt;
  logic [63:0] data;
  framer_state_e fstate = F_RX;
  logic [7:0] last_pid = 8'h92;
  logic [15:0] bit_time = 16'd1200;
  logic [NUM_IRQ-1:0] irq_set = '0;
  logic wr_en = 1'b0; logic [2:0] wr_idx = '0; logic [7:0] wr_byte = '0;
  logic irq;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  lin_regs dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(posedge clk) begin reg_we <= 1'b1; reg_addr <= a; reg_wdata <= d; end
    @(posedge clk) reg_we <= 1'b0;
    @(negedge clk);
  endtask

  task automatic rd(input logic [3:0] a, output logic [31:0] d);
    @(posedge clk) reg_addr <= a;
    @(negedge clk) d = reg_rdata;
  endtask

  initial begin
    logic [31:0] v;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    rd(R_CTRL, v);     check(v == 0, "CTRL reset 0");
    rd(R_DATA_LEN, v); check(v == 1, "DATA_LEN reset 1");
    rd(R_FILTER, v);   check(v == 3, "FILTER reset 3");
    rd(R_BIT_TIME, v); check(v == 1200, "BIT_TIME shows measurement");
    rd(R_STATUS, v);   check(v == {16'd0, 8'h92, 3'd0, 3'(F_RX), 1'b0, 1'b1}, $sformatf("STATUS %h", v));
    wr(R_CTRL, 32'h7);
    check(cfg_en && cfg_pub && cfg_classic && !cmd_abort, "CTRL fields");
    wr(R_CTRL, 32'h9);
    @(negedge clk);
    check(!cmd_abort, "abort is a one-clock pulse");
    rd(R_CTRL, v); check(v == 1, "CTRL read back");
    wr(R_FRAME_ID, 32'hFF);  rd(R_FRAME_ID, v); check(v == 32'h3F && cfg_id == 6'h3F, "FRAME_ID 6 bits");
    wr(R_DATA_LEN, 32'h8);   rd(R_DATA_LEN, v); check(v == 8 && cfg_len == 8, "DATA_LEN");
    wr(R_PRESCALE, 32'h1_2345); rd(R_PRESCALE, v); check(v == 32'h2345 && cfg_prescale == 16'h2345, "PRESCALE 16 bits");
    wr(R_FILTER, 32'h17);    rd(R_FILTER, v); check(v == 32'h17 && cfg_filt == 8'h17, "FILTER");
    wr(R_DATA0, 32'h4433_2211); wr(R_DATA1, 32'h8877_6655);
    check(data == 64'h8877_6655_4433_2211, "DATA registers");
    @(posedge clk) begin wr_en <= 1'b1; wr_idx <= 3'd5; wr_byte <= 8'hAB; end
    @(posedge clk) wr_en <= 1'b0;
    rd(R_DATA1, v); check(v == 32'h8877_AB55, "framer writes data byte 5");
    // IRQ flags
    @(posedge clk) irq_set <= 9'h012;
    @(posedge clk) irq_set <= '0;
    rd(R_IRQ, v); check(v == 32'h012, "flags set by framer");
    check(!irq, "no irq while disabled");
    wr(R_IRQ_EN, 32'h010);
    @(negedge clk); check(irq, "irq when enabled");
    wr(R_IRQ, 32'h010);
    rd(R_IRQ, v); check(v == 32'h002, "write one to clear");
    @(negedge clk); check(!irq, "irq dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
