// apb_spi - SPI master (mode 0, MSB first, 8-bit transfers) on APB.
//
// Registers: 0x0 DATA - a write starts a transfer of pwdata[7:0] when idle,
// a read returns the last received byte; 0x4 STATUS - [0] busy, [1] done
// flag (write 1 to clear); 0x8 CLKDIV - SCK half period in clocks minus one;
// 0xC CTRL - [0] chip select output level (reset 1 = deselected), [1]
// interrupt enable. MOSI changes while SCK is low, MISO is sampled on the
// clock edge that raises SCK. A transfer lasts 16*(CLKDIV+1) clocks. The SPI
// block is only named by the processor description; mode, width and
// registers are this design's.
module apb_spi
  import soc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     psel,
  input  apb_m2s_t preq,
  output apb_s2m_t prsp,
  output logic     spi_sck,
  output logic     spi_mosi,
  input  logic     spi_miso,
  output logic     spi_cs_n,
  output logic     irq
);
  logic [7:0] div, cnt, sh_out, sh_in, rx;
  logic [3:0] edges;
  logic       busy, done, ie;
  logic       wr;

  assign wr = psel && preq.penable && preq.pwrite;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div      <= 8'd3;
      cnt      <= '0;
      sh_out   <= '0;
      sh_in    <= '0;
      rx       <= '0;
      edges    <= '0;
      busy     <= 1'b0;
      done     <= 1'b0;
      ie       <= 1'b0;
      spi_cs_n <= 1'b1;
      spi_sck  <= 1'b0;
    end else begin
      if (wr) begin
        unique case (preq.paddr[3:2])
          2'd0: if (!busy) begin
            sh_out <= preq.pwdata[7:0];
            busy   <= 1'b1;
            cnt    <= '0;
            edges  <= '0;
          end
          2'd1: if (preq.pwdata[1]) done <= 1'b0;
          2'd2: div <= preq.pwdata[7:0];
          default: begin spi_cs_n <= preq.pwdata[0]; ie <= preq.pwdata[1]; end
        endcase
      end
      if (busy) begin
        if (cnt == div) begin
          cnt   <= '0;
          edges <= edges + 4'd1;
          if (!spi_sck) begin
            spi_sck <= 1'b1;
            sh_in   <= {sh_in[6:0], spi_miso};
          end else begin
            spi_sck <= 1'b0;
            sh_out  <= {sh_out[6:0], 1'b0};
            if (edges == 4'd15) begin
              busy <= 1'b0;
              done <= 1'b1;
              rx   <= sh_in;
            end
          end
        end else begin
          cnt <= cnt + 8'd1;
        end
      end
    end
  end

  assign spi_mosi = sh_out[7];

  always_comb begin
    unique case (preq.paddr[3:2])
      2'd0: prsp.prdata = {24'd0, rx};
      2'd1: prsp.prdata = {30'd0, done, busy};
      2'd2: prsp.prdata = {24'd0, div};
      default: prsp.prdata = {30'd0, ie, spi_cs_n};
    endcase
  end
  assign prsp.pready  = 1'b1;
  assign prsp.pslverr = 1'b0;
  assign irq = done && ie;
endmodule
