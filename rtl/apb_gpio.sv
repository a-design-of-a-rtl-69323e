// apb_gpio - general-purpose I/O on APB.
//
// Registers: 0x0 DATAOUT, 0x4 OUTEN (1 = pin driven), 0x8 DATAIN (pins
// after a two-flop synchroniser, read only). Pin count NGPIO is this
// design's choice; the block is only named by the processor description.
module apb_gpio
  import soc_pkg::*;
#(
  parameter int unsigned NGPIO = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             psel,
  input  apb_m2s_t         preq,
  output apb_s2m_t         prsp,
  input  logic [NGPIO-1:0] gpio_i,
  output logic [NGPIO-1:0] gpio_o,
  output logic [NGPIO-1:0] gpio_oe
);
  logic [NGPIO-1:0] s1, s2;
  logic             wr;

  assign wr = psel && preq.penable && preq.pwrite;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gpio_o  <= '0;
      gpio_oe <= '0;
      s1      <= '0;
      s2      <= '0;
    end else begin
      s1 <= gpio_i;
      s2 <= s1;
      if (wr && preq.paddr[3:2] == 2'd0) gpio_o  <= preq.pwdata[NGPIO-1:0];
      if (wr && preq.paddr[3:2] == 2'd1) gpio_oe <= preq.pwdata[NGPIO-1:0];
    end
  end

  always_comb begin
    unique case (preq.paddr[3:2])
      2'd0:    prsp.prdata = 32'(gpio_o);
      2'd1:    prsp.prdata = 32'(gpio_oe);
      2'd2:    prsp.prdata = 32'(s2);
      default: prsp.prdata = '0;
    endcase
  end
  assign prsp.pready  = 1'b1;
  assign prsp.pslverr = 1'b0;
endmodule
