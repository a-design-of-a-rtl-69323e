// tb_ahb_sram - on-chip memory: random byte/halfword/word writes and reads
// against a reference model, zero wait states.
`timescale 1ns/1ps
module tb_ahb_sram;
  import soc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  ahb_m2s_t hreq; ahb_s2m_t hrsp;
  int checks = 0, failures = 0;
  logic [7:0] ref_m [1024];
  always #5 clk = ~clk;

  ahb_bfm u_ahb (.clk, .req(hreq), .rsp(hrsp));
  ahb_sram #(.MEM_BYTES(1024)) dut (.clk, .rst_n, .hsel(1'b1), .hreq, .hready(hrsp.hreadyout), .hrsp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] v, e;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int a = 0; a < 1024; a += 4) begin
      v = $urandom;
      u_ahb.write(32'(a), v);
      for (int i = 0; i < 4; i++) ref_m[a + i] = v[8*i +: 8];
    end
    for (int k = 0; k < 400; k++) begin
      automatic int a = $urandom_range(0, 1023);
      automatic int sz = $urandom_range(0, 2);
      a = a & ~((1 << sz) - 1);
      if ($urandom_range(0, 1)) begin
        v = $urandom;
        u_ahb.write(32'(a), v << (8 * (a % 4)), 3'(sz));
        for (int i = 0; i < (1 << sz); i++) ref_m[a + i] = v[8*i +: 8];
      end else begin
        u_ahb.read(32'(a & ~3), v);
        e = {ref_m[(a & ~3) + 3], ref_m[(a & ~3) + 2], ref_m[(a & ~3) + 1], ref_m[a & ~3]};
        check(v == e && u_ahb.nwait == 0, $sformatf("read %h: %h expected %h", a, v, e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
