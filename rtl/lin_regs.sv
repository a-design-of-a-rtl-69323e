// lin_regs - register block of the LIN controller.
//
// Holds the control, frame ID, data length, prescale, filter counter, data
// and interrupt-enable registers written by the processor, shows the framer
// status and the measured bit time, and collects the framer's event pulses
// into sticky interrupt flags that the processor clears by writing ones. The
// interrupt request is the OR of the enabled flags. The data registers are
// written by the processor (bytes to publish) and by the framer (bytes
// received); a framer write in the same cycle as a processor write wins.
// Register names follow the controller's block diagram; the offsets, bit
// fields and reset values (controller disabled, length 1, prescale 0, filter
// 3) are this design's choice and are listed in lin_pkg.
// Access: one-cycle register bus from ahb_slave_if, read data combinational.
module lin_regs
  import lin_pkg::*;
#(
  parameter int unsigned CNT_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  // register bus
  input  logic               reg_we,
  input  logic [5:2]         reg_addr,
  input  logic [31:0]        reg_wdata,
  output logic [31:0]        reg_rdata,
  // configuration out
  output logic               cfg_en,
  output logic               cfg_pub,
  output logic               cfg_classic,
  output logic               cmd_abort,
  output logic [5:0]         cfg_id,
  output logic [3:0]         cfg_len,
  output logic [15:0]        cfg_prescale,
  output logic [7:0]         cfg_filt,
  output logic [63:0]        data,
  // status in
  input  framer_state_e      fstate,
  input  logic [7:0]         last_pid,
  input  logic [CNT_W-1:0]   bit_time,
  input  logic [NUM_IRQ-1:0] irq_set,
  input  logic               wr_en,
  input  logic [2:0]         wr_idx,
  input  logic [7:0]         wr_byte,
  output logic               irq
);
  logic [NUM_IRQ-1:0] flags, irq_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_en       <= 1'b0;
      cfg_pub      <= 1'b0;
      cfg_classic  <= 1'b0;
      cmd_abort    <= 1'b0;
      cfg_id       <= '0;
      cfg_len      <= 4'd1;
      cfg_prescale <= '0;
      cfg_filt     <= 8'd3;
      data         <= '0;
      flags        <= '0;
      irq_en       <= '0;
    end else begin
      cmd_abort <= 1'b0;
      if (reg_we) begin
        unique case (reg_addr)
          R_CTRL: begin
            cfg_en      <= reg_wdata[0];
            cfg_pub     <= reg_wdata[1];
            cfg_classic <= reg_wdata[2];
            cmd_abort   <= reg_wdata[3];
          end
          R_FRAME_ID: cfg_id       <= reg_wdata[5:0];
          R_DATA_LEN: cfg_len      <= reg_wdata[3:0];
          R_PRESCALE: cfg_prescale <= reg_wdata[15:0];
          R_DATA0:    data[31:0]   <= reg_wdata;
          R_DATA1:    data[63:32]  <= reg_wdata;
          R_IRQ_EN:   irq_en       <= reg_wdata[NUM_IRQ-1:0];
          R_FILTER:   cfg_filt     <= reg_wdata[7:0];
          default: ;
        endcase
      end
      if (wr_en) data[8*wr_idx +: 8] <= wr_byte;
      flags <= (flags & ~((reg_we && reg_addr == R_IRQ) ? reg_wdata[NUM_IRQ-1:0] : '0)) | irq_set;
    end
  end

  assign irq = |(flags & irq_en);

  always_comb begin
    reg_rdata = '0;
    unique case (reg_addr)
      R_CTRL:     reg_rdata = {29'd0, cfg_classic, cfg_pub, cfg_en};
      R_STATUS:   reg_rdata = {16'd0, last_pid, 3'd0, fstate,
                               fstate == F_SLEEP, fstate != F_IDLE && fstate != F_SLEEP};
      R_FRAME_ID: reg_rdata = {26'd0, cfg_id};
      R_DATA_LEN: reg_rdata = {28'd0, cfg_len};
      R_PRESCALE: reg_rdata = {16'd0, cfg_prescale};
      R_BIT_TIME: reg_rdata = 32'(bit_time);
      R_DATA0:    reg_rdata = data[31:0];
      R_DATA1:    reg_rdata = data[63:32];
      R_IRQ:      reg_rdata = 32'(flags);
      R_IRQ_EN:   reg_rdata = 32'(irq_en);
      R_FILTER:   reg_rdata = {24'd0, cfg_filt};
      default:    reg_rdata = '0;
    endcase
  end
endmodule
