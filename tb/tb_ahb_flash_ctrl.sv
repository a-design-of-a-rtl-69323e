// tb_ahb_flash_ctrl - memory-mapped SPI flash reads: words at random
// addresses must match the flash model's generated content, little-endian,
// with READ commands only and 129 wait states per word.
`timescale 1ns/1ps
module tb_ahb_flash_ctrl;
  import soc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  ahb_m2s_t hreq; ahb_s2m_t hrsp;
  logic cs_n, sck, mosi, miso;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ahb_bfm u_ahb (.clk, .req(hreq), .rsp(hrsp));
  ahb_flash_ctrl dut (.clk, .rst_n, .hsel(1'b1), .hreq, .hready(hrsp.hreadyout), .hrsp,
    .flash_cs_n(cs_n), .flash_sck(sck), .flash_mosi(mosi), .flash_miso(miso));
  spi_flash_model u_flash (.cs_n, .sck, .mosi, .miso);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] v, e;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int k = 0; k < 30; k++) begin
      automatic int a = (k < 5) ? 4 * k : 4 * $urandom_range(0, 16383);
      u_ahb.read(32'h3000_0000 + 32'(a), v);
      for (int i = 0; i < 4; i++) e[8*i +: 8] = u_flash.content(a + i);
      check(v == e, $sformatf("flash word %h: %h expected %h", a, v, e));
      check(u_ahb.nwait == 129, $sformatf("wait states %0d", u_ahb.nwait));
    end
    check(u_flash.bad_cmd == 0 && u_flash.nreads == 30, "READ commands only");
    u_ahb.write(32'h3000_0000, 32'h1234);
    check(u_ahb.nwait == 0 && cs_n, "write ignored at once");
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
