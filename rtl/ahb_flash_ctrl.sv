// ahb_flash_ctrl - memory-mapped read of an external SPI NOR flash.
//
// The program is stored in the board's flash and copied into SRAM at reset.
// This controller makes the flash readable on AHB: each read transfer sends
// the READ command (0x03) and a 24-bit byte address (word aligned) in SPI
// mode 0, then clocks in four bytes, which are returned little-endian (first
// byte in HRDATA[7:0]). SCK runs at clk/2, so a read takes 64 SCK periods,
// 129 clocks of wait states. MISO is sampled on the clock edge that raises
// SCK. Writes complete at once and are ignored (the flash is programmed
// through the debug port). The SPI interface, command and timing are this
// design's choice; the flash controller itself is only named.
module ahb_flash_ctrl
  import soc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     hsel,
  input  ahb_m2s_t hreq,
  input  logic     hready,
  output ahb_s2m_t hrsp,
  output logic     flash_cs_n,
  output logic     flash_sck,
  output logic     flash_mosi,
  input  logic     flash_miso
);
  logic        busy;
  logic [6:0]  k;        // SCK rising edges so far
  logic [31:0] sh_out, sh_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      k         <= '0;
      flash_sck <= 1'b0;
      sh_out    <= '0;
      sh_in     <= '0;
    end else if (!busy) begin
      flash_sck <= 1'b0;
      if (hsel && hready && hreq.htrans[1] && !hreq.hwrite) begin
        busy   <= 1'b1;
        k      <= '0;
        sh_out <= {8'h03, hreq.haddr[23:2], 2'b00};
      end
    end else if (!flash_sck) begin
      if (k == 7'd64) begin
        busy <= 1'b0;            // last falling edge done: deselect
      end else begin
        flash_sck <= 1'b1;       // rising edge: flash samples MOSI
        k         <= k + 7'd1;
        if (k >= 7'd32) sh_in <= {sh_in[30:0], flash_miso};
      end
    end else begin
      flash_sck <= 1'b0;         // falling edge: next MOSI bit
      sh_out    <= {sh_out[30:0], 1'b0};
    end
  end

  assign flash_cs_n = !busy;
  assign flash_mosi = sh_out[31];

  assign hrsp.hrdata    = {sh_in[7:0], sh_in[15:8], sh_in[23:16], sh_in[31:24]};
  assign hrsp.hreadyout = !busy;
  assign hrsp.hresp     = 1'b0;
endmodule
