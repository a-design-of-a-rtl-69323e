// ahb_ext_sram - AHB-Lite interface to an external asynchronous SRAM.
//
// The board SRAM holds code and data. It is taken here to be 16 bits wide
// with upper/lower byte enables (the width is this design's choice). A word
// transfer becomes two half-word accesses (low half first), a byte or
// halfword transfer one. Each access lasts WAIT+2 clocks with the address and
// chip enable stable: for a write, WE# is low for the first WAIT+1 clocks and
// rises one clock before the address changes; for a read, OE# is low and the
// data are latched on the last clock. HREADYOUT is low for the whole access
// and the response is always OKAY. The data bus is split into dq_o/dq_oe
// (output) and dq_i (input) for an I/O pad.
module ahb_ext_sram
  import soc_pkg::*;
#(
  parameter int unsigned AW   = 19,   // half-word address bits (1 MiB)
  parameter int unsigned WAIT = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          hsel,
  input  ahb_m2s_t      hreq,
  input  logic          hready,
  output ahb_s2m_t      hrsp,
  output logic [AW-1:0] sram_addr,
  output logic [15:0]   sram_dq_o,
  output logic          sram_dq_oe,
  input  logic [15:0]   sram_dq_i,
  output logic          sram_ce_n,
  output logic          sram_oe_n,
  output logic          sram_we_n,
  output logic          sram_ub_n,
  output logic          sram_lb_n
);
  localparam int unsigned CW = $clog2(WAIT + 2);

  logic          busy, wr_q, half, last_half;
  logic [AW-1:0] base_q;   // half-word address of the low half
  logic [3:0]    mask_q;
  logic [CW-1:0] cnt;
  logic [31:0]   rdata_q;
  logic [1:0]    lanes;

  assign lanes     = half ? mask_q[3:2] : mask_q[1:0];
  assign last_half = (mask_q[3:2] == 2'b00) || half;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      wr_q    <= 1'b0;
      half    <= 1'b0;
      base_q  <= '0;
      mask_q  <= '0;
      cnt     <= '0;
      rdata_q <= '0;
    end else if (!busy) begin
      if (hsel && hready && hreq.htrans[1]) begin
        busy   <= 1'b1;
        wr_q   <= hreq.hwrite;
        base_q <= {hreq.haddr[AW:2], 1'b0};
        mask_q <= ahb_byte_mask(hreq.hsize, hreq.haddr[1:0]);
        half   <= (ahb_byte_mask(hreq.hsize, hreq.haddr[1:0]) & 4'b0011) == 4'b0000;
        cnt    <= '0;
      end
    end else begin
      if (cnt == CW'(WAIT + 1)) begin
        cnt <= '0;
        if (!wr_q) rdata_q[16*half +: 16] <= sram_dq_i;
        if (last_half) busy <= 1'b0;
        else           half <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  assign sram_addr  = base_q | AW'(half);
  assign sram_ce_n  = !busy;
  assign sram_oe_n  = !(busy && !wr_q);
  assign sram_we_n  = !(busy && wr_q && cnt != CW'(WAIT + 1));
  assign sram_ub_n  = !(busy && lanes[1]);
  assign sram_lb_n  = !(busy && lanes[0]);
  assign sram_dq_oe = busy && wr_q;
  assign sram_dq_o  = half ? hreq.hwdata[31:16] : hreq.hwdata[15:0];

  assign hrsp.hrdata    = rdata_q;
  assign hrsp.hreadyout = !busy;
  assign hrsp.hresp     = 1'b0;
endmodule
