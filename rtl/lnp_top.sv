// lnp_top - local network processor for a zonal vehicle network.
//
// A LIN node processor: one AHB-Lite bus carries on-chip memory, an external
// SRAM interface, a flash controller, the LIN controller and an AHB-to-APB
// bridge with UART, timer, SPI, I2C and GPIO. The bus master, a Cortex-M0
// core, is licensed IP and not part of this RTL: its AHB master port is
// m_req/m_rsp and its interrupt inputs are irq. The LIN PHY, the SRAM and the
// flash are board parts reached through the pins below. The block structure
// is the processor description's; the address map (soc_pkg) and the pin-level
// details of memories and peripherals are this design's.
//   0x0000_0000 on-chip memory   0x2000_0000 external SRAM
//   0x3000_0000 flash (read)     0x4000_0000 APB: +0x0000 UART, +0x1000 timer,
//   0x5000_0000 LIN controller        +0x2000 SPI, +0x3000 I2C, +0x4000 GPIO
// irq: [0] LIN, [1] UART, [2] timer, [3] SPI, [4] I2C.
module lnp_top
  import soc_pkg::*;
#(
  parameter int unsigned ONCHIP_BYTES = 16384,
  parameter int unsigned EXT_SRAM_AW  = 19,
  parameter int unsigned NGPIO        = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // processor bus master port and interrupts
  input  ahb_m2s_t               m_req,
  output ahb_s2m_t               m_rsp,
  output logic [4:0]             irq,
  // LIN PHY
  output logic                   lin_tx,
  input  logic                   lin_rx,
  // external SRAM
  output logic [EXT_SRAM_AW-1:0] sram_addr,
  output logic [15:0]            sram_dq_o,
  output logic                   sram_dq_oe,
  input  logic [15:0]            sram_dq_i,
  output logic                   sram_ce_n,
  output logic                   sram_oe_n,
  output logic                   sram_we_n,
  output logic                   sram_ub_n,
  output logic                   sram_lb_n,
  // SPI flash
  output logic                   flash_cs_n,
  output logic                   flash_sck,
  output logic                   flash_mosi,
  input  logic                   flash_miso,
  // peripherals
  output logic                   uart_tx,
  input  logic                   uart_rx,
  output logic                   spi_sck,
  output logic                   spi_mosi,
  input  logic                   spi_miso,
  output logic                   spi_cs_n,
  input  logic                   i2c_scl_i,
  input  logic                   i2c_sda_i,
  output logic                   i2c_scl_oe,
  output logic                   i2c_sda_oe,
  input  logic [NGPIO-1:0]       gpio_i,
  output logic [NGPIO-1:0]       gpio_o,
  output logic [NGPIO-1:0]       gpio_oe
);
  logic [NUM_AHB_SLAVES-1:0] hsel;
  logic                      hready;
  ahb_s2m_t                  s_rsp [NUM_AHB_SLAVES];
  apb_m2s_t                  preq;
  logic [NUM_APB_SLAVES-1:0] psel;
  apb_s2m_t                  prsp [NUM_APB_SLAVES];

  ahb_interconnect #(.NS(NUM_AHB_SLAVES)) u_bus (
    .clk, .rst_n, .m_req, .m_rsp, .hsel, .hready, .s_rsp);

  ahb_sram #(.MEM_BYTES(ONCHIP_BYTES)) u_onchip (
    .clk, .rst_n, .hsel(hsel[S_ONCHIP]), .hreq(m_req), .hready, .hrsp(s_rsp[S_ONCHIP]));

  ahb_ext_sram #(.AW(EXT_SRAM_AW)) u_extram (
    .clk, .rst_n, .hsel(hsel[S_EXTRAM]), .hreq(m_req), .hready, .hrsp(s_rsp[S_EXTRAM]),
    .sram_addr, .sram_dq_o, .sram_dq_oe, .sram_dq_i, .sram_ce_n, .sram_oe_n,
    .sram_we_n, .sram_ub_n, .sram_lb_n);

  ahb_flash_ctrl u_flash (
    .clk, .rst_n, .hsel(hsel[S_FLASH]), .hreq(m_req), .hready, .hrsp(s_rsp[S_FLASH]),
    .flash_cs_n, .flash_sck, .flash_mosi, .flash_miso);

  ahb_to_apb #(.NPS(NUM_APB_SLAVES)) u_bridge (
    .clk, .rst_n, .hsel(hsel[S_APB]), .hreq(m_req), .hready, .hrsp(s_rsp[S_APB]),
    .preq, .psel, .prsp);

  lin_controller u_lin (
    .clk, .rst_n, .hsel(hsel[S_LIN]), .hreq(m_req), .hready, .hrsp(s_rsp[S_LIN]),
    .lin_rx, .lin_tx, .irq(irq[0]));

  apb_uart u_uart (
    .clk, .rst_n, .psel(psel[P_UART]), .preq, .prsp(prsp[P_UART]),
    .uart_rx, .uart_tx, .irq(irq[1]));

  apb_timer u_timer (
    .clk, .rst_n, .psel(psel[P_TIMER]), .preq, .prsp(prsp[P_TIMER]), .irq(irq[2]));

  apb_spi u_spi (
    .clk, .rst_n, .psel(psel[P_SPI]), .preq, .prsp(prsp[P_SPI]),
    .spi_sck, .spi_mosi, .spi_miso, .spi_cs_n, .irq(irq[3]));

  apb_i2c u_i2c (
    .clk, .rst_n, .psel(psel[P_I2C]), .preq, .prsp(prsp[P_I2C]),
    .scl_i(i2c_scl_i), .sda_i(i2c_sda_i), .scl_oe(i2c_scl_oe), .sda_oe(i2c_sda_oe), .irq(irq[4]));

  apb_gpio #(.NGPIO(NGPIO)) u_gpio (
    .clk, .rst_n, .psel(psel[P_GPIO]), .preq, .prsp(prsp[P_GPIO]),
    .gpio_i, .gpio_o, .gpio_oe);
endmodule
