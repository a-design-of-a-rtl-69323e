// lin_pkg - LIN protocol constants and the LIN controller's register map.
//
// The frame format (13-bit break, sync byte 0x55, protected identifier with
// two parity bits, 1..8 data bytes and an inverted modulo-256-with-carry
// checksum) follows the LIN protocol. Register offsets and bit fields are this
// design's choice; the register names are those of the controller's block
// diagram (Control, Status, Frame ID, Data Len., Prescale, Bit Time, Data,
// IRQ) plus the receive filter counter.
package lin_pkg;

  // Word offsets (byte address bits [5:2]) of the registers.
  localparam logic [3:0] R_CTRL     = 4'h0;  // [0] enable [1] publish [2] classic cksum, [3] abort (W, self clearing)
  localparam logic [3:0] R_STATUS   = 4'h1;  // RO: [0] busy [1] sleep [4:2] framer state [15:8] last PID
  localparam logic [3:0] R_FRAME_ID = 4'h2;  // [5:0] frame ID handled by this node
  localparam logic [3:0] R_DATA_LEN = 4'h3;  // [3:0] response length, 1..8 bytes
  localparam logic [3:0] R_PRESCALE = 4'h4;  // [15:0] tick = clk / (PRESCALE+1)
  localparam logic [3:0] R_BIT_TIME = 4'h5;  // RO: bit time measured from the sync field, in ticks
  localparam logic [3:0] R_DATA0    = 4'h6;  // data bytes 0..3 (byte 0 in [7:0])
  localparam logic [3:0] R_DATA1    = 4'h7;  // data bytes 4..7
  localparam logic [3:0] R_IRQ      = 4'h8;  // flags, write 1 to clear
  localparam logic [3:0] R_IRQ_EN   = 4'h9;  // interrupt enables
  localparam logic [3:0] R_FILTER   = 4'hA;  // [7:0] rx filter counter, in clocks

  // Interrupt flag positions.
  localparam int unsigned IRQ_HEADER  = 0;  // valid header received (ID in STATUS)
  localparam int unsigned IRQ_RX_DONE = 1;  // response received, checksum correct
  localparam int unsigned IRQ_TX_DONE = 2;  // response published
  localparam int unsigned IRQ_PARITY  = 3;  // PID parity error
  localparam int unsigned IRQ_FRAME   = 4;  // stop bit dominant
  localparam int unsigned IRQ_CKSUM   = 5;  // checksum mismatch
  localparam int unsigned IRQ_BITERR  = 6;  // read-back differs from transmitted byte
  localparam int unsigned IRQ_SLEEP   = 7;  // go-to-sleep command received
  localparam int unsigned IRQ_WAKE    = 8;  // dominant level while asleep
  localparam int unsigned NUM_IRQ     = 9;

  localparam logic [5:0] ID_MASTER_REQ = 6'h3C;  // diagnostic frame carrying go-to-sleep

  typedef enum logic [2:0] {
    F_IDLE  = 3'd0,
    F_PID   = 3'd1,
    F_RX    = 3'd2,
    F_TX    = 3'd3,
    F_SLEEP = 3'd4
  } framer_state_e;

  // Protected identifier: P0 = ID0^ID1^ID2^ID4, P1 = !(ID1^ID3^ID4^ID5).
  function automatic logic [7:0] lin_pid(input logic [5:0] id);
    logic p0, p1;
    p0 = id[0] ^ id[1] ^ id[2] ^ id[4];
    p1 = ~(id[1] ^ id[3] ^ id[4] ^ id[5]);
    return {p1, p0, id};
  endfunction

  // One step of the LIN checksum: 8-bit add with the carry folded back in.
  function automatic logic [7:0] lin_cksum_add(input logic [7:0] acc, input logic [7:0] b);
    logic [8:0] s;
    s = {1'b0, acc} + {1'b0, b};
    return s[7:0] + {7'd0, s[8]};
  endfunction

endpackage
