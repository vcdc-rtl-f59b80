// tb_spi_master: runs the SPI controller (SCK = clk/4) against the flash
// model. Checks READ transactions of 1..4 bytes against the flash contents,
// the WREN / PP / RDSR sequence (status busy, then idle, data programmed),
// the number of cycles per transaction (2*HALF*8*B + 2 from start to done),
// that cs_n is high between transactions and that busy covers the transfer.
module tb_spi_master;
  localparam int H = 2;
  logic clk = 0, rst_n = 0;
  logic start, busy, done, sck, cs_n, mosi, miso;
  logic [2:0] tx_bytes, rx_bytes;
  logic [39:0] tx_data;
  logic [31:0] rx_data;
  int n_read, n_pp, n_wren, n_rdsr, n_err;
  int checks = 0, failures = 0;

  spi_master #(.HALF(H)) dut (.*);
  spi_flash_model #(.BUSY_CYCLES(100)) u_flash (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one transaction; returns received data and the cycle count start -> done
  task automatic xact(input logic [39:0] tx, input int ntx, input int nrx,
                      output logic [31:0] rx, output int cyc);
    #1;
    start = 1; tx_data = tx; tx_bytes = 3'(ntx); rx_bytes = 3'(nrx);
    @(posedge clk); #1;
    start = 0;
    cyc = 1;
    check(busy && !cs_n, "busy and cs_n low after start");
    while (!done && cyc < 1000) begin @(posedge clk); #1; cyc++; end
    rx = rx_data;
    check(cs_n && !busy, "cs_n high and idle at done");
  endtask

  function automatic logic [7:0] pat(input int a);
    return 8'(a * 7 + (a >> 8) + 8'h5A);
  endfunction

  initial begin
    logic [31:0] rx, exp;
    int cyc;
    start = 0; tx_data = '0; tx_bytes = '0; rx_bytes = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 1; n <= 4; n++) begin
      automatic int a = 24'h01_2340 + 17 * n;
      xact({8'h03, 24'(a), 8'h00}, 4, n, rx, cyc);
      exp = '0;
      for (int i = 0; i < n; i++) exp = {exp[23:0], pat(a + i)};
      check(rx == exp, $sformatf("read %0d bytes: %h exp %h", n, rx, exp));
      check(cyc == 2 * H * 8 * (4 + n) + 2, $sformatf("read %0d cycles %0d", n, cyc));
    end
    // write enable, program one byte, poll status
    xact({8'h06, 32'h0}, 1, 0, rx, cyc);
    check(cyc == 2 * H * 8 + 2, "WREN cycles");
    xact({8'h05, 32'h0}, 1, 1, rx, cyc);
    check(rx[1:0] == 2'b10, $sformatf("status after WREN %b", rx[1:0]));
    xact({8'h02, 24'h00_0100, 8'h3C}, 5, 0, rx, cyc);
    xact({8'h05, 32'h0}, 1, 1, rx, cyc);
    check(rx[0] == 1'b1, "busy right after PP");
    repeat (120) @(posedge clk);
    xact({8'h05, 32'h0}, 1, 1, rx, cyc);
    check(rx[1:0] == 2'b00, "idle and latch cleared after PP");
    xact({8'h03, 24'h00_0100, 8'h00}, 4, 1, rx, cyc);
    check(rx[7:0] == (pat(24'h100) & 8'h3C), $sformatf("programmed byte %h", rx[7:0]));
    check(n_read == 5 && n_pp == 1 && n_wren == 1 && n_rdsr == 3 && n_err == 0,
          $sformatf("flash saw read %0d pp %0d wren %0d rdsr %0d err %0d", n_read, n_pp, n_wren, n_rdsr, n_err));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
