// apb_timer - 32-bit reload timer on APB.
//
// Registers: 0x0 CTRL - [0] enable, [1] interrupt enable; 0x4 VALUE - the
// down counter (writable); 0x8 RELOAD; 0xC INTSTAT - [0] expired flag, write
// 1 to clear. While enabled VALUE decrements every clock; when it is 0 it is
// reloaded from RELOAD on the next clock and the flag is set, so the period
// is RELOAD+1 clocks. irq = flag AND interrupt enable. The timer is only
// named by the processor description; its registers are this design's.
module apb_timer
  import soc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     psel,
  input  apb_m2s_t preq,
  output apb_s2m_t prsp,
  output logic     irq
);
  logic        en, ie, flag;
  logic [31:0] value, reload;
  logic        wr;

  assign wr = psel && preq.penable && preq.pwrite;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en     <= 1'b0;
      ie     <= 1'b0;
      flag   <= 1'b0;
      value  <= '0;
      reload <= '0;
    end else begin
      if (en) begin
        if (value == 32'd0) begin
          value <= reload;
          flag  <= 1'b1;
        end else begin
          value <= value - 32'd1;
        end
      end
      if (wr) begin
        unique case (preq.paddr[3:2])
          2'd0: begin en <= preq.pwdata[0]; ie <= preq.pwdata[1]; end
          2'd1: value  <= preq.pwdata;
          2'd2: reload <= preq.pwdata;
          default: if (preq.pwdata[0]) flag <= 1'b0;
        endcase
      end
    end
  end

  always_comb begin
    unique case (preq.paddr[3:2])
      2'd0: prsp.prdata = {30'd0, ie, en};
      2'd1: prsp.prdata = value;
      2'd2: prsp.prdata = reload;
      default: prsp.prdata = {31'd0, flag};
    endcase
  end
  assign prsp.pready  = 1'b1;
  assign prsp.pslverr = 1'b0;
  assign irq = flag && ie;
endmodule
