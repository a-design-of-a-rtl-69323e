// lin_data_rx - UART-format byte receiver for the PID, data and checksum.
//
// While enabled, a falling edge starts a byte. The start bit is checked half
// a bit time later (a recessive level there is taken as a glitch), then the
// eight data bits (LSB first) and the stop bit are sampled one bit time apart,
// using the bit time the header receiver measured. byte_vld pulses for one
// clock at the stop-bit sample; ferr is set with it when the stop bit is
// dominant (frame error). Clearing en returns the receiver to idle at once.
// Timing units are prescaler ticks. The mid-bit sampling point is this
// design's choice.
module lin_data_rx #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             tick,
  input  logic             rx,
  input  logic [CNT_W-1:0] bit_time,
  output logic             byte_vld,
  output logic [7:0]       rx_byte,
  output logic             ferr
);
  typedef enum logic [1:0] {D_IDLE, D_START, D_DATA, D_STOP} dstate_e;
  dstate_e          st;
  logic             rx_q;
  logic [CNT_W-1:0] cnt;
  logic [2:0]       bitn;
  logic [7:0]       sh;
  logic [CNT_W-1:0] half, full;

  assign full = (bit_time == '0) ? CNT_W'(1) : bit_time;
  assign half = (full >> 1) == '0 ? CNT_W'(1) : (full >> 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= D_IDLE;
      rx_q     <= 1'b1;
      cnt      <= '0;
      bitn     <= '0;
      sh       <= '0;
      byte_vld <= 1'b0;
      rx_byte  <= '0;
      ferr     <= 1'b0;
    end else begin
      rx_q     <= rx;
      byte_vld <= 1'b0;
      ferr     <= 1'b0;
      if (!en) begin
        st <= D_IDLE;
      end else begin
        unique case (st)
          D_IDLE: if (rx_q && !rx) begin
            cnt <= '0;
            st  <= D_START;
          end
          D_START: if (tick) begin
            if (cnt >= half - 1'b1) begin
              cnt  <= '0;
              bitn <= '0;
              st   <= rx ? D_IDLE : D_DATA;
            end else cnt <= cnt + 1'b1;
          end
          D_DATA: if (tick) begin
            if (cnt >= full - 1'b1) begin
              cnt  <= '0;
              sh   <= {rx, sh[7:1]};
              bitn <= bitn + 3'd1;
              if (bitn == 3'd7) st <= D_STOP;
            end else cnt <= cnt + 1'b1;
          end
          D_STOP: if (tick) begin
            if (cnt >= full - 1'b1) begin
              cnt      <= '0;
              byte_vld <= 1'b1;
              rx_byte  <= sh;
              ferr     <= !rx;
              st       <= D_IDLE;
            end else cnt <= cnt + 1'b1;
          end
          default: st <= D_IDLE;
        endcase
      end
    end
  end
endmodule
