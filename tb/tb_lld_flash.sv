// tb_lld_flash: drives instructions into the flash low layer driver with the
// flash model on its SPI pins. Checks reads of 1..4 bytes (data packed from
// bit 31, last equal to the final bit, cpu and dev copied), a one-byte write
// (WREN, PP, status polled until the flash is idle, one write answer) and a
// read back of the written byte, that an unknown instruction is skipped
// without an answer, and that answers come back in instruction order.
module tb_lld_flash;
  import vcdc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ins_valid, ins_ready, rsp_valid, rsp_ready;
  flit_t ins, rsp;
  logic spi_sck, spi_cs_n, spi_mosi, spi_miso;
  int n_read, n_pp, n_wren, n_rdsr, n_err;
  int checks = 0, failures = 0;
  flit_t got[$];

  lld_flash #(.FIFO_DEPTH(4), .SPI_HALF(1)) dut (.*);
  spi_flash_model #(.BUSY_CYCLES(200)) u_flash (
    .clk, .sck(spi_sck), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso),
    .n_read, .n_pp, .n_wren, .n_rdsr, .n_err);

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

  always @(posedge clk) begin
    if (rst_n && rsp_valid && rsp_ready) got.push_back(rsp);
    rsp_ready <= ($urandom_range(0, 3) != 0);
  end

  task automatic send(input int cpu, input logic [31:0] w[$]);
    bit acc;
    #1;
    for (int i = 0; i < w.size(); i++) begin
      ins_valid = 1;
      ins = '{cpu: 8'(cpu), dev: 4'(DEV_FLASH), last: (i == w.size()-1), data: w[i]};
      do begin @(negedge clk); acc = ins_ready; @(posedge clk); end while (!acc);
      #1;
    end
    ins_valid = 0;
  endtask

  task automatic wait_got(input int n);
    int t = 0;
    while (got.size() < n && t < 5000) begin @(posedge clk); t++; end
    repeat (5) @(posedge clk);
    #1;
  endtask

  function automatic logic [7:0] pat(input int a);
    return 8'(a * 7 + (a >> 8) + 8'h5A);
  endfunction

  function automatic logic [31:0] packed_bytes(input int a, input int n);
    logic [31:0] r = '0;
    for (int i = 0; i < n; i++) r[31 - 8*i -: 8] = pat(a + i);
    return r;
  endfunction

  initial begin
    ins_valid = 0; ins = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    // four reads, the last one final; an unknown instruction in between
    for (int n = 1; n <= 4; n++) begin
      send(n, '{{INS_FL_RD, 7'd0, (n == 4), 14'd0, 2'(n - 1)}, 32'(24'h00_1000 + 8 * n)});
      if (n == 2) send(7, '{32'h7700_0000, 32'h1});
    end
    wait_got(4);
    check(got.size() == 4, $sformatf("four answers, got %0d", got.size()));
    if (got.size() == 4)
      for (int n = 1; n <= 4; n++) begin
        check(got[n-1].cpu == 8'(n) && got[n-1].dev == 4'(DEV_FLASH), $sformatf("answer %0d routed", n));
        check(got[n-1].last == (n == 4), $sformatf("answer %0d last", n));
        check(got[n-1].data == packed_bytes(24'h1000 + 8 * n, n),
              $sformatf("answer %0d data %h", n, got[n-1].data));
      end
    check(n_read == 4, "four READ commands");
    got.delete();
    // one-byte write then read back
    send(5, '{{INS_FL_WR, 24'd0}, 32'h00_2345, 32'h0000_00A5});
    send(6, '{{INS_FL_RD, 7'd0, 1'b1, 14'd0, 2'd0}, 32'h00_2345});
    wait_got(2);
    check(got.size() == 2, $sformatf("write and read answers, got %0d", got.size()));
    if (got.size() == 2) begin
      check(got[0].cpu == 5 && got[0].last && got[0].data == {RSP_FL_WRITE, 24'd0}, "write answer");
      check(got[1].cpu == 6 && got[1].data == {pat(24'h2345) & 8'hA5, 24'd0},
            $sformatf("read back %h", got[1].data));
    end
    check(n_wren == 1 && n_pp == 1, "WREN and PP sent once");
    check(n_rdsr >= 2, $sformatf("status polled until idle (%0d polls)", n_rdsr));
    check(n_err == 0, "no command while the flash was busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
