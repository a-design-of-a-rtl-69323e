// i2c_slave_model - behavioural I2C slave with one data register, for
// testbenches. Answers address ADDR: a write stores the data byte in
// reg_val, a read returns reg_val. With stretch set it holds SCL low for
// 300 ns after every acknowledge bit. Outputs pull the lines low when 1.
`timescale 1ns/1ps
module i2c_slave_model #(
  parameter logic [6:0] ADDR = 7'h50
) (
  input  logic scl,
  input  logic sda,
  output logic sda_low,
  output logic scl_low
);
  typedef enum int {S_IDLE, S_ADDR, S_WRITE, S_READ} sst_e;
  sst_e       st = S_IDLE;
  int         bitcnt = 0, nstart = 0, nstop = 0;
  logic [7:0] sh = '0, reg_val = 8'h00;
  logic       rw = 1'b0, m_ack = 1'b0;
  bit         stretch = 1'b0;

  initial begin sda_low = 1'b0; scl_low = 1'b0; end

  always @(negedge sda) if (scl) begin st = S_ADDR; bitcnt = 0; nstart++; sda_low = 1'b0; end
  always @(posedge sda) if (scl) begin st = S_IDLE; nstop++; sda_low = 1'b0; end

  always @(posedge scl) if (st != S_IDLE) begin
    if (bitcnt < 8) sh = {sh[6:0], sda};
    else m_ack = !sda;
    bitcnt++;
  end

  always @(negedge scl) if (st != S_IDLE) begin
    if (bitcnt == 8) begin
      if (st == S_ADDR) begin
        if (sh[7:1] == ADDR) begin sda_low = 1'b1; rw = sh[0]; end
        else st = S_IDLE;
      end else if (st == S_WRITE) begin
        reg_val = sh;
        sda_low = 1'b1;
      end else begin
        sda_low = 1'b0;             // master acknowledges
      end
    end else if (bitcnt == 9) begin
      bitcnt  = 0;
      sda_low = 1'b0;
      if (st == S_ADDR) st = rw ? S_READ : S_WRITE;
      else if (st == S_READ && !m_ack) st = S_IDLE;
      if (st == S_READ) sda_low = !reg_val[7];
      if (stretch) begin
        scl_low = 1'b1;
        #300 scl_low = 1'b0;
      end
    end else if (st == S_READ) begin
      sda_low = !reg_val[7 - bitcnt];
    end
  end
endmodule
