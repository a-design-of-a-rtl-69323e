// tb_ahb_interconnect - address decoding, response multiplexing and the
// default slave. Five simple slave models (each returns its index in the
// read data and inserts index-many wait states) sit behind the decoder.
`timescale 1ns/1ps
module tb_ahb_interconnect;
  import soc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  ahb_m2s_t hreq; ahb_s2m_t m_rsp;
  logic [4:0] hsel; logic hready;
  ahb_s2m_t s_rsp [5];
  int checks = 0, failures = 0;
  int nacc [5];
  always #5 clk = ~clk;

  ahb_bfm u_ahb (.clk, .req(hreq), .rsp(m_rsp));
  ahb_interconnect #(.NS(5)) dut (.clk, .rst_n, .m_req(hreq), .m_rsp, .hsel, .hready, .s_rsp);

  // slave models: data phase lasts i+1 clocks, read data = {i, address}
  for (genvar i = 0; i < 5; i++) begin : g_s
    logic act; int w; logic [31:0] aq;
    initial begin act = 0; w = 0; aq = 0; end
    always @(posedge clk) begin
      if (act && w > 0) w <= w - 1;
      else if (act) act <= 1'b0;
      if (hready && hsel[i] && hreq.htrans[1]) begin act <= 1'b1; w <= i; aq <= hreq.haddr; nacc[i]++; end
    end
    assign s_rsp[i] = '{hrdata: {8'(i), aq[23:0]}, hreadyout: !(act && w > 0), hresp: 1'b0};
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] v;
    logic [3:0] nib [5] = '{4'h0, 4'h2, 4'h3, 4'h4, 4'h5};
    foreach (nacc[i]) nacc[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int k = 0; k < 50; k++) begin
      automatic int s = $urandom_range(0, 4);
      automatic logic [31:0] a = {nib[s], 4'h0, 24'($urandom)};
      u_ahb.read(a, v);
      check(v == {8'(s), a[23:0]} && !u_ahb.last_err, $sformatf("slave %0d read %h", s, v));
      check(u_ahb.nwait == s, $sformatf("slave %0d wait states %0d", s, u_ahb.nwait));
    end
    // unmapped regions: ERROR, no slave touched
    for (int k = 0; k < 5; k++) begin
      automatic int tot = nacc[0] + nacc[1] + nacc[2] + nacc[3] + nacc[4];
      u_ahb.read({4'h6 + 4'(k), 28'h10}, v);
      check(u_ahb.last_err && u_ahb.nwait == 1, "default slave ERROR response");
      check(tot == nacc[0] + nacc[1] + nacc[2] + nacc[3] + nacc[4], $sformatf("no slave selected %0d %0d %0d %0d %0d %0d", tot, nacc[0], nacc[1], nacc[2], nacc[3], nacc[4]));
    end
    u_ahb.read(32'h4000_0000, v);
    check(!u_ahb.last_err && v[31:24] == 8'd3, "OKAY after an error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
