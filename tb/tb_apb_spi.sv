// tb_apb_spi - SPI master against a mode-0 slave model (shift register that
// returns the previous byte): MOSI bytes, MISO bytes, transfer length
// 16*(CLKDIV+1) clocks, chip select and done interrupt.
`timescale 1ns/1ps
module tb_apb_spi;
  import soc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, psel, sck, mosi, miso, cs_n, irq;
  apb_m2s_t preq; apb_s2m_t prsp;
  int checks = 0, failures = 0;
  logic [7:0] slv_sh = 8'hA5, slv_rx;
  always #5 clk = ~clk;

  apb_bfm u_apb (.clk, .psel, .req(preq), .rsp(prsp));
  apb_spi dut (.clk, .rst_n, .psel, .preq, .prsp, .spi_sck(sck), .spi_mosi(mosi), .spi_miso(miso), .spi_cs_n(cs_n), .irq);

  // mode-0 slave: sample on rising, shift out on falling
  assign miso = slv_sh[7];
  always @(posedge sck) slv_rx = {slv_rx[6:0], mosi};
  always @(negedge sck) slv_sh = {slv_sh[6:0], slv_rx[0]};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] v; logic [7:0] d, prev; int t;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(cs_n, "deselected after reset");
    u_apb.write(12'hC, 2'b10);
    check(!cs_n, "chip select driven");
    for (int div = 0; div < 4; div++) begin
      u_apb.write(12'h8, div);
      for (int k = 0; k < 4; k++) begin
        d = 8'($urandom);
        prev = slv_sh;
        u_apb.write(12'h0, {24'd0, d});
        t = 1;
        while (!irq) begin @(posedge clk); t++; end
        check(t - 16 * (div + 1) >= 0 && t - 16 * (div + 1) <= 3, $sformatf("transfer %0d clocks, div %0d", t, div));
        check(slv_rx == d, $sformatf("slave got %h expected %h", slv_rx, d));
        u_apb.read(12'h0, v);
        check(v[7:0] == prev, $sformatf("master got %h expected %h", v[7:0], prev));
        u_apb.write(12'h4, 2);
        check(!irq, "done cleared");
      end
    end
    u_apb.write(12'hC, 1);
    check(cs_n, "chip select released");
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
