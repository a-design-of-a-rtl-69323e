// ahb_slave_if - AHB-Lite slave front end for a register block.
//
// Registers the address phase of each selected transfer and, in the data
// phase, presents a word address with a write strobe (HWDATA is valid then)
// or a read strobe. Read data come back from the register block in the same
// cycle, so every transfer completes with zero wait states and an OKAY
// response. Only word accesses are meaningful to the register blocks that use
// it; byte and halfword writes are passed on as whole-word writes. Wait-state
// free operation and OKAY-only responses are this design's choice.
module ahb_slave_if
  import soc_pkg::*;
#(
  parameter int unsigned AW = 6   // register address bits (byte address)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            hsel,
  input  ahb_m2s_t        hreq,
  input  logic            hready,
  output ahb_s2m_t        hrsp,
  output logic            reg_we,
  output logic            reg_re,
  output logic [AW-1:2]   reg_addr,
  output logic [31:0]     reg_wdata,
  input  logic [31:0]     reg_rdata
);
  logic          act_q, wr_q;
  logic [AW-1:2] addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_q  <= 1'b0;
      wr_q   <= 1'b0;
      addr_q <= '0;
    end else if (hready) begin
      act_q  <= hsel && hreq.htrans[1];
      wr_q   <= hreq.hwrite;
      addr_q <= hreq.haddr[AW-1:2];
    end
  end

  assign reg_we    = act_q && wr_q;
  assign reg_re    = act_q && !wr_q;
  assign reg_addr  = addr_q;
  assign reg_wdata = hreq.hwdata;
  assign hrsp.hrdata    = reg_rdata;
  assign hrsp.hreadyout = 1'b1;
  assign hrsp.hresp     = 1'b0;
endmodule
