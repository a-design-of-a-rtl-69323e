// ahb_sram - on-chip memory on AHB-Lite.
//
// A MEM_BYTES array of 32-bit words with byte-lane writes (byte, halfword
// and word transfers, little-endian). The address phase is registered; a
// write lands at the end of its data phase, a read returns the registered
// word in its data phase. No wait states, always OKAY. The memory is named in
// the processor's block diagram without a size; 16 KiB is this design's
// default.
module ahb_sram
  import soc_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 16384
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     hsel,
  input  ahb_m2s_t hreq,
  input  logic     hready,
  output ahb_s2m_t hrsp
);
  localparam int unsigned WORDS = MEM_BYTES / 4;
  localparam int unsigned AW    = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic          wr_q;
  logic [AW-1:0] addr_q;
  logic [3:0]    mask_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q   <= 1'b0;
      addr_q <= '0;
      mask_q <= '0;
    end else if (hready) begin
      wr_q   <= hsel && hreq.htrans[1] && hreq.hwrite;
      addr_q <= hreq.haddr[AW+1:2];
      mask_q <= ahb_byte_mask(hreq.hsize, hreq.haddr[1:0]);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_q) begin
      for (int i = 0; i < 4; i++)
        if (mask_q[i]) mem[addr_q][8*i +: 8] <= hreq.hwdata[8*i +: 8];
    end
  end

  assign hrsp.hrdata    = mem[addr_q];
  assign hrsp.hreadyout = 1'b1;
  assign hrsp.hresp     = 1'b0;
endmodule
