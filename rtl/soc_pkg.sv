// soc_pkg - types and constants shared by the local network processor.
//
// AHB-Lite and APB3 signal bundles are carried as packed structs so that a
// slave port is three signals: select, request, response. The address map is
// this design's choice: the processor description names the slaves but gives
// no addresses.
package soc_pkg;

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  // Master to slave: address phase fields plus write data (data phase).
  typedef struct packed {
    logic [31:0] haddr;
    htrans_e     htrans;
    logic        hwrite;
    logic [2:0]  hsize;
    logic [31:0] hwdata;
  } ahb_m2s_t;

  // Slave to master.
  typedef struct packed {
    logic [31:0] hrdata;
    logic        hreadyout;
    logic        hresp;      // 0 OKAY, 1 ERROR
  } ahb_s2m_t;

  typedef struct packed {
    logic [11:0] paddr;
    logic        pwrite;
    logic        penable;
    logic [31:0] pwdata;
  } apb_m2s_t;

  typedef struct packed {
    logic [31:0] prdata;
    logic        pready;
    logic        pslverr;
  } apb_s2m_t;

  // AHB slave indices and address regions (upper address nibble).
  localparam int unsigned NUM_AHB_SLAVES = 5;
  localparam int unsigned S_ONCHIP = 0;   // 0x0xxx_xxxx on-chip memory
  localparam int unsigned S_EXTRAM = 1;   // 0x2xxx_xxxx external SRAM
  localparam int unsigned S_FLASH  = 2;   // 0x3xxx_xxxx flash read window
  localparam int unsigned S_APB    = 3;   // 0x4xxx_xxxx APB peripherals
  localparam int unsigned S_LIN    = 4;   // 0x5xxx_xxxx LIN controller

  // APB slave indices, selected by PADDR bits [14:12] inside the APB region.
  localparam int unsigned NUM_APB_SLAVES = 5;
  localparam int unsigned P_UART  = 0;
  localparam int unsigned P_TIMER = 1;
  localparam int unsigned P_SPI   = 2;
  localparam int unsigned P_I2C   = 3;
  localparam int unsigned P_GPIO  = 4;

  // Byte-lane write mask of an AHB transfer (little-endian).
  function automatic logic [3:0] ahb_byte_mask(input logic [2:0] hsize, input logic [1:0] a);
    unique case (hsize)
      3'd0:    return 4'b0001 << a;
      3'd1:    return a[1] ? 4'b1100 : 4'b0011;
      default: return 4'b1111;
    endcase
  endfunction

endpackage
