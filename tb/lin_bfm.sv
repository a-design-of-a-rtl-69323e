// lin_bfm - LIN bus functional model (master node and frame monitor).
//
// drv is this model's contribution to the wired-AND bus (1 = recessive);
// bus is the resolved bus level. Tasks:
//   set_timing(c)          bit time in clock cycles
//   send_header(id, brk)   break of brk bits, delimiter, sync 0x55, PID with
//                          parity computed here from the ID
//   send_byte(b, stop)     one UART-format byte; stop=0 gives a frame error
//   send_response(d, n, enhanced, bad)  n data bytes of d (byte 0 first) and
//                          the checksum over the last PID (enhanced) or the
//                          data only (classic); bad=1 corrupts it
//   recv_byte(b, ok, max)  waits up to max clocks for a start bit on the bus
//                          and samples a byte mid-bit; ok=0 on timeout or a
//                          dominant stop bit
// Parity and checksum are computed here independently of the RTL.
module lin_bfm (
  input  logic clk,
  input  logic bus,
  output logic drv
);
  int unsigned bit_clks = 16;
  logic [7:0]  last_pid;

  initial begin
    drv      = 1'b1;
    last_pid = '0;
  end

  function automatic logic [7:0] pid_of(input logic [5:0] id);
    return {~(id[1] ^ id[3] ^ id[4] ^ id[5]), id[0] ^ id[1] ^ id[2] ^ id[4], id};
  endfunction

  function automatic logic [7:0] cksum(input logic [7:0] pid, input logic [63:0] d, input int n, input bit enh);
    int unsigned s;
    s = enh ? int'(pid) : 0;
    for (int i = 0; i < n; i++) begin
      s = s + int'(d[8*i +: 8]);
      if (s > 255) s = s - 255;
    end
    return ~s[7:0];
  endfunction

  task automatic set_timing(input int unsigned c);
    bit_clks = c;
  endtask

  task automatic hold(input logic v, input int unsigned nbits);
    drv = v;
    repeat (nbits * bit_clks) @(posedge clk);
  endtask

  task automatic send_byte(input logic [7:0] b, input bit stop = 1'b1);
    hold(1'b0, 1);
    for (int i = 0; i < 8; i++) hold(b[i], 1);
    hold(stop, 1);
    drv = 1'b1;
  endtask

  task automatic send_header(input logic [5:0] id, input int unsigned brk = 13, input bit bad_parity = 1'b0);
    hold(1'b0, brk);
    hold(1'b1, 1);
    send_byte(8'h55);
    last_pid = pid_of(id) ^ (bad_parity ? 8'h80 : 8'h00);
    send_byte(last_pid);
  endtask

  task automatic send_response(input logic [63:0] d, input int n, input bit enh = 1'b1, input bit bad = 1'b0);
    for (int i = 0; i < n; i++) send_byte(d[8*i +: 8]);
    send_byte(cksum(last_pid, d, n, enh) ^ (bad ? 8'h01 : 8'h00));
  endtask

  task automatic recv_byte(output logic [7:0] b, output bit ok, input int unsigned max_clks);
    int unsigned w;
    w  = 0;
    ok = 1'b0;
    b  = '0;
    while (bus !== 1'b0 && w < max_clks) begin
      @(posedge clk);
      w++;
    end
    if (w >= max_clks) return;
    repeat (bit_clks / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      repeat (bit_clks) @(posedge clk);
      b[i] = bus;
    end
    repeat (bit_clks) @(posedge clk);
    ok = bus;
  endtask
endmodule
