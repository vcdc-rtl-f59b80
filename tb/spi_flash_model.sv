// spi_flash_model: behavioural model of a SPI NOR flash for the testbenches.
//
// A small subset of a standard SPI NOR command set, in SPI mode 0 (MOSI read
// on rising SCK, MISO changed on falling SCK):
//   0x03 READ   24-bit address, then bytes from consecutive addresses
//   0x06 WREN   sets the write enable latch
//   0x02 PP     24-bit address and data bytes; needs the latch, starts a busy
//               time of BUSY_CYCLES clocks, clears the latch
//   0x05 RDSR   status byte: bit 0 write in progress, bit 1 write enable latch
// Unwritten bytes read as pattern(addr); programmed bytes are stored in an
// associative array (programming only clears bits, as in NOR flash). Counters
// report the commands seen and errors (a command while busy, PP without WREN).
module spi_flash_model #(
  parameter int BUSY_CYCLES = 20
) (
  input  logic clk,
  input  logic sck,
  input  logic cs_n,
  input  logic mosi,
  output logic miso,
  output int   n_read,
  output int   n_pp,
  output int   n_wren,
  output int   n_rdsr,
  output int   n_err
);
  logic [7:0] mem [int];
  logic [7:0] cmd;
  logic [23:0] addr;
  logic [7:0]  sh, obyte;
  int          nbits, busy_left;
  logic        wel;

  function automatic logic [7:0] pattern(input int a);
    return 8'(a * 7 + (a >> 8) + 8'h5A);
  endfunction

  function automatic logic [7:0] rd(input int a);
    return mem.exists(a) ? mem[a] : pattern(a);
  endfunction

  initial begin
    miso = 1'b0; n_read = 0; n_pp = 0; n_wren = 0; n_rdsr = 0; n_err = 0;
    nbits = 0; wel = 1'b0; busy_left = 0; cmd = '0; addr = '0; sh = '0; obyte = '0;
  end

  always @(posedge clk) if (busy_left > 0) busy_left <= busy_left - 1;

  always @(negedge cs_n) begin
    nbits = 0;
    miso  = 1'b0;
  end

  always @(posedge sck) if (!cs_n) begin
    sh = {sh[6:0], mosi};
    nbits++;
    if (nbits == 8) begin
      cmd = sh;
      if (busy_left > 0 && cmd != 8'h05) n_err++;
      if (cmd == 8'h06) begin wel = 1'b1; n_wren++; end
      if (cmd == 8'h05) n_rdsr++;
    end
    if (nbits == 16) addr[23:16] = sh;
    if (nbits == 24) addr[15:8]  = sh;
    if (nbits == 32) begin
      addr[7:0] = sh;
      if (cmd == 8'h03) n_read++;
    end
    if (cmd == 8'h02 && nbits >= 40 && nbits % 8 == 0) begin
      if (!wel) n_err++;
      else begin
        mem[int'(addr)] = rd(int'(addr)) & sh;
        addr++;
      end
    end
  end

  // output side: load a byte at a byte boundary, then shift it out MSB first
  always @(negedge sck) if (!cs_n) begin
    if (nbits % 8 == 0) begin
      if (cmd == 8'h03 && nbits >= 32) begin
        obyte = rd(int'(addr));
        addr++;
      end else if (cmd == 8'h05 && nbits >= 8)
        obyte = {6'd0, wel, busy_left > 0};
      else
        obyte = 8'h00;
    end
    miso  = obyte[7];
    obyte = {obyte[6:0], 1'b0};
  end

  always @(posedge cs_n) begin
    if (cmd == 8'h02 && nbits >= 40 && wel) begin
      n_pp++;
      wel       = 1'b0;
      busy_left = BUSY_CYCLES;
    end
    cmd = 8'h00;
  end
endmodule
