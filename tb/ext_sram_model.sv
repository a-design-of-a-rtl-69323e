// ext_sram_model - behavioural model of a 16-bit asynchronous SRAM with
// byte enables (board part, not synthesizable). Writes take effect on the
// rising edge of WE# with CE# low; reads return the addressed half-word while
// CE# and OE# are low. nwrites counts write strobes.
module ext_sram_model #(
  parameter int unsigned AW = 19
) (
  input  logic [AW-1:0] addr,
  input  logic [15:0]   dq_in,
  output logic [15:0]   dq_out,
  input  logic          ce_n,
  input  logic          oe_n,
  input  logic          we_n,
  input  logic          ub_n,
  input  logic          lb_n
);
  logic [15:0] mem [2**AW];
  int nwrites = 0;

  always @(posedge we_n) if (!ce_n) begin
    if (!lb_n) mem[addr][7:0]  = dq_in[7:0];
    if (!ub_n) mem[addr][15:8] = dq_in[15:8];
    nwrites++;
  end

  assign dq_out = (!ce_n && !oe_n) ? mem[addr] : 16'h0000;
endmodule
