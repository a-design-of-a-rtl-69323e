// apb_bfm - APB3 master bus functional model for peripheral testbenches.
// write/read perform one setup and one or more access cycles; tasks are
// called after a rising edge and return 1 ns after the completing one,
// when the slave's registers show the effect of the transfer.
module apb_bfm
  import soc_pkg::*;
(
  input  logic     clk,
  output logic     psel,
  output apb_m2s_t req,
  input  apb_s2m_t rsp
);
  initial begin
    psel = 1'b0;
    req  = '0;
  end

  task automatic write(input logic [11:0] a, input logic [31:0] d);
    psel <= 1'b1; req.paddr <= a; req.pwrite <= 1'b1; req.pwdata <= d; req.penable <= 1'b0;
    @(posedge clk);
    req.penable <= 1'b1;
    @(negedge clk);
    while (!rsp.pready) @(negedge clk);
    @(posedge clk);
    psel <= 1'b0; req.penable <= 1'b0;
    #1;
  endtask

  task automatic read(input logic [11:0] a, output logic [31:0] d);
    psel <= 1'b1; req.paddr <= a; req.pwrite <= 1'b0; req.penable <= 1'b0;
    @(posedge clk);
    req.penable <= 1'b1;
    @(negedge clk);
    while (!rsp.pready) @(negedge clk);
    d = rsp.prdata;
    @(posedge clk);
    psel <= 1'b0; req.penable <= 1'b0;
    #1;
  endtask
endmodule
