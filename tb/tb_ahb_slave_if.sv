// tb_ahb_slave_if - AHB-Lite to register-bus conversion.
// A small register array behind the interface is written and read back
// through AHB; the strobes must appear in the data phase only for selected,
// active transfers, with zero wait states and OKAY responses.
`timescale 1ns/1ps
module tb_ahb_slave_if;
  import soc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, hsel;
  ahb_m2s_t hreq; ahb_s2m_t hrsp;
  logic reg_we, reg_re; logic [5:2] reg_addr; logic [31:0] reg_wdata, reg_rdata;
  logic [31:0] mem [16];
  int checks = 0, failures = 0, nwe = 0;
  always #5 clk = ~clk;

  ahb_bfm u_ahb (.clk, .req(hreq), .rsp(hrsp));
  ahb_slave_if #(.AW(6)) dut (.clk, .rst_n, .hsel, .hreq, .hready(hrsp.hreadyout), .hrsp,
                              .reg_we, .reg_re, .reg_addr, .reg_wdata, .reg_rdata);

  always @(posedge clk) if (reg_we) begin mem[reg_addr] <= reg_wdata; nwe++; end
  assign reg_rdata = mem[reg_addr];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] v, ref_m [16];
    hsel = 1'b1;
    for (int i = 0; i < 16; i++) begin mem[i] = 0; ref_m[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int k = 0; k < 40; k++) begin
      automatic int a = $urandom_range(0, 15);
      if ($urandom_range(0, 1)) begin
        v = $urandom;
        u_ahb.write(32'(a * 4), v);
        ref_m[a] = v;
      end else begin
        u_ahb.read(32'(a * 4), v);
        check(v == ref_m[a], $sformatf("read %0d: %h expected %h", a, v, ref_m[a]));
      end
      check(u_ahb.nwait == 0 && !u_ahb.last_err, "zero wait, OKAY");
    end
    // deselected: writes ignored
    hsel = 1'b0;
    @(negedge clk);
    v = nwe;
    @(posedge clk);
    u_ahb.write(32'h4, 32'hFFFF_FFFF);
    repeat (2) @(posedge clk);
    check(nwe == int'(v), "no write strobe when not selected");
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
