// spi_flash_model - behavioural model of a SPI NOR flash answering the READ
// command 0x03 (mode 0). Its content is generated: byte i holds
// (i*7 + 3) mod 256 ^ (i >> 8), so testbenches can compute any expected word.
// bad_cmd counts commands other than 0x03.
module spi_flash_model #(
  parameter int unsigned BYTES = 65536
) (
  input  logic cs_n,
  input  logic sck,
  input  logic mosi,
  output logic miso
);
  int unsigned bitc = 0, bad_cmd = 0, nreads = 0;
  logic [31:0] hdr = '0;

  function automatic logic [7:0] content(input int unsigned i);
    return 8'((i * 7 + 3) % 256) ^ 8'(i >> 8);
  endfunction

  initial miso = 1'b0;

  always @(negedge cs_n) bitc = 0;

  always @(posedge sck) if (!cs_n) begin
    if (bitc < 32) hdr = {hdr[30:0], mosi};
    bitc++;
    if (bitc == 32) begin
      nreads++;
      if (hdr[31:24] != 8'h03) bad_cmd++;
    end
  end

  always @(negedge sck) if (!cs_n && bitc >= 32) begin
    int unsigned k;
    logic [7:0] b;
    k = bitc - 32;
    b = content((int'(hdr[23:0]) + k / 8) % BYTES);
    miso = b[7 - k % 8];
  end
endmodule
