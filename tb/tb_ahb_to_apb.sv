// tb_ahb_to_apb - the bridge against five APB register models. Checks the
// APB setup/access sequence (assertion), slave selection, write/read data,
// PREADY wait states, PSLVERR and out-of-range slave numbers as AHB ERROR.
`timescale 1ns/1ps
module tb_ahb_to_apb;
  import soc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  ahb_m2s_t hreq; ahb_s2m_t hrsp;
  apb_m2s_t preq; logic [4:0] psel; apb_s2m_t prsp [5];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ahb_bfm u_ahb (.clk, .req(hreq), .rsp(hrsp));
  ahb_to_apb #(.NPS(5)) dut (.clk, .rst_n, .hsel(1'b1), .hreq, .hready(hrsp.hreadyout), .hrsp, .preq, .psel, .prsp);

  // APB protocol: PENABLE only with a selected slave, and only after a setup cycle
  logic [4:0] psel_q; logic pen_q;
  always @(posedge clk) begin
    psel_q <= psel; pen_q <= preq.penable;
    if (rst_n) begin
      assert (!preq.penable || psel != 0) else begin failures++; $display("FAIL: PENABLE without PSEL"); end
      assert (!(preq.penable && !pen_q) || psel_q == psel) else begin failures++; $display("FAIL: no setup cycle"); end
      assert ($countones(psel) <= 1) else begin failures++; $display("FAIL: two PSEL"); end
    end
  end

  for (genvar i = 0; i < 5; i++) begin : g_s
    logic [31:0] regs [4];
    int w;
    initial begin w = 0; foreach (regs[j]) regs[j] = 0; end
    always @(posedge clk) if (psel[i] && preq.penable) begin
      if (w < i) w <= w + 1;
      else begin
        w <= 0;
        if (preq.pwrite) regs[preq.paddr[3:2]] <= preq.pwdata;
      end
    end
    assign prsp[i] = '{prdata: regs[preq.paddr[3:2]], pready: (w >= i), pslverr: (preq.paddr[3:2] == 2'd3)};
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] v, refm [5][3];
    foreach (refm[i, j]) refm[i][j] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int k = 0; k < 80; k++) begin
      automatic int s = $urandom_range(0, 4), r = $urandom_range(0, 2);
      automatic logic [31:0] a = 32'h4000_0000 | 32'(s << 12) | 32'(r << 2);
      if (k < 15 || $urandom_range(0, 1)) begin
        v = $urandom;
        u_ahb.write(a, v);
        refm[s][r] = v;
        check(!u_ahb.last_err && u_ahb.nwait == 2 + s, $sformatf("write slave %0d waits %0d", s, u_ahb.nwait));
      end else begin
        u_ahb.read(a, v);
        check(v == refm[s][r] && !u_ahb.last_err, $sformatf("read slave %0d reg %0d: %h", s, r, v));
      end
    end
    u_ahb.read(32'h4000_000C, v);
    check(u_ahb.last_err, "PSLVERR gives ERROR");
    u_ahb.read(32'h4000_7000, v);
    check(u_ahb.last_err, "slave number out of range gives ERROR");
    u_ahb.read(32'h4000_1000, v);
    check(!u_ahb.last_err, "OKAY afterwards");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
