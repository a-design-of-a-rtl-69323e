// tb_ahb_ext_sram - AHB to external 16-bit SRAM: random sized writes and word
// reads against a reference; the number of wait states per word access and
// the number of SRAM write strobes per transfer size are checked.
`timescale 1ns/1ps
module tb_ahb_ext_sram;
  import soc_pkg::*;
  localparam int AW = 10, WAIT = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  ahb_m2s_t hreq; ahb_s2m_t hrsp;
  logic [AW-1:0] a; logic [15:0] dq_o, dq_i; logic dq_oe, ce_n, oe_n, we_n, ub_n, lb_n;
  int checks = 0, failures = 0;
  logic [7:0] ref_m [2048];
  always #5 clk = ~clk;

  ahb_bfm u_ahb (.clk, .req(hreq), .rsp(hrsp));
  ahb_ext_sram #(.AW(AW), .WAIT(WAIT)) dut (.clk, .rst_n, .hsel(1'b1), .hreq, .hready(hrsp.hreadyout), .hrsp,
    .sram_addr(a), .sram_dq_o(dq_o), .sram_dq_oe(dq_oe), .sram_dq_i(dq_i),
    .sram_ce_n(ce_n), .sram_oe_n(oe_n), .sram_we_n(we_n), .sram_ub_n(ub_n), .sram_lb_n(lb_n));
  ext_sram_model #(.AW(AW)) u_mem (.addr(a), .dq_in(dq_oe ? dq_o : 16'hFFFF), .dq_out(dq_i),
    .ce_n, .oe_n, .we_n, .ub_n, .lb_n);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] v, e;
    int nw;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int b = 0; b < 2048; b += 4) begin
      v = $urandom;
      nw = u_mem.nwrites;
      u_ahb.write(32'(b), v);
      check(u_mem.nwrites == nw + 2, "word write = two SRAM writes");
      for (int i = 0; i < 4; i++) ref_m[b + i] = v[8*i +: 8];
    end
    for (int k = 0; k < 300; k++) begin
      automatic int b = $urandom_range(0, 2047);
      automatic int sz = $urandom_range(0, 2);
      b = b & ~((1 << sz) - 1);
      if ($urandom_range(0, 1)) begin
        v = $urandom;
        nw = u_mem.nwrites;
        u_ahb.write(32'(b), v << (8 * (b % 4)), 3'(sz));
        check(u_mem.nwrites == nw + ((sz == 2) ? 2 : 1), "SRAM writes per transfer");
        for (int i = 0; i < (1 << sz); i++) ref_m[b + i] = v[8*i +: 8];
      end else begin
        u_ahb.read(32'(b & ~3), v);
        e = {ref_m[(b & ~3) + 3], ref_m[(b & ~3) + 2], ref_m[(b & ~3) + 1], ref_m[b & ~3]};
        check(v == e, $sformatf("read %h: %h expected %h", b, v, e));
        check(u_ahb.nwait == 2 * (WAIT + 2), $sformatf("word read wait states %0d", u_ahb.nwait));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
