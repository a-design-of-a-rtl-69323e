// ahb_interconnect - single-master AHB-Lite decoder and response multiplexer.
//
// The address decoder selects one of the NS slaves from the upper address
// nibble (map in soc_pkg); the slave index of each accepted address phase is
// registered and steers the read data and response back to the master during
// the data phase. An active transfer to an unmapped address is answered by a
// built-in default slave with the two-cycle AHB ERROR response. HREADY seen
// by every slave is the multiplexed HREADYOUT of the slave in the data phase.
// The bus itself is named in the processor's block diagram; the map and the
// default slave are this design's choices.
// An assertion states the two-cycle ERROR rule on the master side.
module ahb_interconnect
  import soc_pkg::*;
#(
  parameter int unsigned NS = NUM_AHB_SLAVES
) (
  input  logic            clk,
  input  logic            rst_n,
  input  ahb_m2s_t        m_req,
  output ahb_s2m_t        m_rsp,
  output logic [NS-1:0]   hsel,
  output logic            hready,
  input  ahb_s2m_t        s_rsp [NS]
);
  localparam int unsigned IW = (NS > 1) ? $clog2(NS) : 1;

  logic          hit;
  logic [IW-1:0] idx, idx_q;
  logic          sel_q;
  logic [1:0]    err_q;   // 1: first ERROR cycle, 2: second

  always_comb begin
    hit = 1'b1;
    idx = '0;
    unique case (m_req.haddr[31:28])
      4'h0: idx = IW'(S_ONCHIP);
      4'h2: idx = IW'(S_EXTRAM);
      4'h3: idx = IW'(S_FLASH);
      4'h4: idx = IW'(S_APB);
      4'h5: idx = IW'(S_LIN);
      default: hit = 1'b0;
    endcase
    if (32'(idx) >= NS) hit = 1'b0;
    hsel = '0;
    if (hit) hsel[idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q <= '0;
      sel_q <= 1'b0;
      err_q <= 2'd0;
    end else begin
      if (err_q == 2'd1) err_q <= 2'd2;
      else if (hready) begin
        sel_q <= hit;
        idx_q <= idx;
        err_q <= (!hit && m_req.htrans[1]) ? 2'd1 : 2'd0;
      end
    end
  end

  always_comb begin
    if (err_q == 2'd1)      m_rsp = '{hrdata: '0, hreadyout: 1'b0, hresp: 1'b1};
    else if (err_q == 2'd2) m_rsp = '{hrdata: '0, hreadyout: 1'b1, hresp: 1'b1};
    else if (sel_q)         m_rsp = s_rsp[idx_q];
    else                    m_rsp = '{hrdata: '0, hreadyout: 1'b1, hresp: 1'b0};
  end

  assign hready = m_rsp.hreadyout;

  // a data phase to the default slave always ends in the two-cycle ERROR
  a_default_error: assert property (@(posedge clk) disable iff (!rst_n)
    (m_rsp.hresp && !m_rsp.hreadyout) |=> (m_rsp.hresp && m_rsp.hreadyout));
endmodule
