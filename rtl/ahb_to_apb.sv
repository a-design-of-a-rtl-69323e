// ahb_to_apb - AHB-Lite to APB3 bridge.
//
// An AHB transfer to the APB region is turned into an APB setup cycle
// (PSEL high) and access cycles (PENABLE high) that last until the selected
// slave raises PREADY; the read data are then registered and returned with
// HREADYOUT, so a transfer costs at least three clocks. PSLVERR, or an
// address outside the NPS slaves (PADDR bits [14:12] pick the slave, 4 KiB
// each), gives the two-cycle AHB ERROR response. PWDATA is taken from HWDATA,
// which the master holds during the wait states. The bridge's function is the
// processor description's; the APB3 protocol details are this design's.
// Concurrent assertions state the APB setup/access order and the two-cycle
// ERROR response.
module ahb_to_apb
  import soc_pkg::*;
#(
  parameter int unsigned NPS = NUM_APB_SLAVES
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           hsel,
  input  ahb_m2s_t       hreq,
  input  logic           hready,
  output ahb_s2m_t       hrsp,
  output apb_m2s_t       preq,
  output logic [NPS-1:0] psel,
  input  apb_s2m_t       prsp [NPS]
);
  typedef enum logic [2:0] {B_IDLE, B_SETUP, B_ACCESS, B_ERR1, B_ERR2} bstate_e;
  bstate_e     st;
  logic [14:0] addr_q;
  logic        wr_q;
  logic [31:0] rdata_q;
  logic [2:0]  idx;
  logic        valid_idx;

  assign idx       = addr_q[14:12];
  assign valid_idx = 32'(idx) < NPS;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= B_IDLE;
      addr_q  <= '0;
      wr_q    <= 1'b0;
      rdata_q <= '0;
    end else begin
      unique case (st)
        B_IDLE, B_ERR2: if (hsel && hready && hreq.htrans[1]) begin
          addr_q <= hreq.haddr[14:0];
          wr_q   <= hreq.hwrite;
          st     <= B_SETUP;
        end else st <= B_IDLE;
        B_SETUP: st <= valid_idx ? B_ACCESS : B_ERR1;
        B_ACCESS: if (prsp[idx].pready) begin
          rdata_q <= prsp[idx].prdata;
          st      <= prsp[idx].pslverr ? B_ERR1 : B_IDLE;
        end
        B_ERR1: st <= B_ERR2;
        default: st <= B_IDLE;
      endcase
    end
  end

  always_comb begin
    psel = '0;
    if ((st == B_SETUP || st == B_ACCESS) && valid_idx) psel[idx] = 1'b1;
  end

  assign preq.paddr   = addr_q[11:0];
  assign preq.pwrite  = wr_q;
  assign preq.penable = (st == B_ACCESS);
  assign preq.pwdata  = hreq.hwdata;

  assign hrsp.hrdata    = rdata_q;
  assign hrsp.hreadyout = (st == B_IDLE || st == B_ERR2);
  assign hrsp.hresp     = (st == B_ERR1 || st == B_ERR2);

  // protocol rules: an APB setup cycle is always followed by an access cycle
  // to the same slave, and an AHB ERROR response takes two cycles
  a_setup_access: assert property (@(posedge clk) disable iff (!rst_n)
    (|psel && !preq.penable) |=> (preq.penable && psel == $past(psel)));
  a_error_two_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    (hrsp.hresp && !hrsp.hreadyout) |=> (hrsp.hresp && hrsp.hreadyout));
endmodule
