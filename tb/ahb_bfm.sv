// ahb_bfm - AHB-Lite master bus functional model for testbenches.
//
// Plays the processor: single, non-pipelined transfers. Each task must be
// called just after a rising clock edge and returns just after the rising
// edge that completes the transfer. The slave response is sampled on the
// falling edge so that it is stable. last_err holds HRESP of the last
// transfer; nwait counts the wait states it saw.
module ahb_bfm
  import soc_pkg::*;
(
  input  logic     clk,
  output ahb_m2s_t req,
  input  ahb_s2m_t rsp
);
  logic last_err;
  int   nwait;

  initial begin
    req      = '0;
    last_err = 1'b0;
    nwait    = 0;
  end

  task automatic write(input logic [31:0] a, input logic [31:0] d, input logic [2:0] size = 3'd2);
    req.haddr  <= a;
    req.htrans <= HTRANS_NONSEQ;
    req.hwrite <= 1'b1;
    req.hsize  <= size;
    @(posedge clk);
    req.htrans <= HTRANS_IDLE;
    req.hwdata <= d;
    nwait = 0;
    @(negedge clk);
    while (!rsp.hreadyout) begin
      nwait++;
      @(negedge clk);
    end
    last_err = rsp.hresp;
    @(posedge clk);
  endtask

  task automatic read(input logic [31:0] a, output logic [31:0] d, input logic [2:0] size = 3'd2);
    req.haddr  <= a;
    req.htrans <= HTRANS_NONSEQ;
    req.hwrite <= 1'b0;
    req.hsize  <= size;
    @(posedge clk);
    req.htrans <= HTRANS_IDLE;
    nwait = 0;
    @(negedge clk);
    while (!rsp.hreadyout) begin
      nwait++;
      @(negedge clk);
    end
    d        = rsp.hrdata;
    last_err = rsp.hresp;
    @(posedge clk);
  endtask
endmodule
