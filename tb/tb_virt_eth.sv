// tb_virt_eth: down part - a transmitted packet leaves with the last byte of
// its source IP replaced by the CPU id and every other word unchanged, control
// operations pass unchanged. Up part - control answers pass unchanged; a
// received frame is held until its trailer arrives, then returned whole to the
// CPU named by its destination IP with the byte count in the header.
module tb_virt_eth;
  import vcdc_pkg::*;
  import eth_frame_pkg::*;
  logic clk = 0, rst_n = 0;
  logic down_in_valid, down_in_ready, down_out_valid, down_out_ready;
  logic up_in_valid, up_in_ready, up_out_valid, up_out_ready;
  flit_t down_in, down_out, up_in, up_out;
  int checks = 0, failures = 0;

  virt_eth #(.BUF_WORDS(512)) dut (.*);
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

  task automatic tx_packet(input int cpu, input int len);
    bytes_t f = make_frame(len, 8'(cpu * 7), 8'd1, 8'd200);
    words_t w = to_words(f);
    bytes_t e = f;
    words_t we;
    e[29] = 8'(cpu);
    we = to_words(e);
    down_in_valid = 1;
    down_in = '{cpu: 8'(cpu), dev: 4'd0, last: 0, data: {OP_ETH_TX, 8'd0, 16'(len)}};
    #1; check(down_out_valid && down_out == down_in, "tx header unchanged");
    @(posedge clk); #1;
    for (int i = 0; i < w.size(); i++) begin
      down_in = '{cpu: 8'(cpu), dev: 4'd0, last: (i == w.size()-1), data: w[i]};
      #1;
      check(down_out.data == we[i] && down_out.last == down_in.last,
            $sformatf("cpu %0d tx word %0d: %h exp %h", cpu, i, down_out.data, we[i]));
      @(posedge clk); #1;
    end
    down_in_valid = 0;
  endtask

  task automatic ctrl_msg(input int cpu);
    logic [31:0] m[3] = '{{OP_ETH_CTRL_WR, 24'd0}, 32'h0000_0404, 32'hDEAD_0007};
    down_in_valid = 1;
    for (int i = 0; i < 3; i++) begin
      down_in = '{cpu: 8'(cpu), dev: 4'd0, last: (i == 2), data: m[i]};
      #1; check(down_out == down_in, "control flit unchanged");
      @(posedge clk); #1;
    end
    down_in_valid = 0;
  endtask

  task automatic rx_frame(input int dst, input int len);
    bytes_t f = make_frame(len, 8'(dst + 3), 8'd200, 8'(dst));
    words_t w = to_words(f);
    up_in_valid = 1;
    up_in = '{cpu: 8'd0, dev: 4'd0, last: 0, data: {RSP_ETH_RX, 24'd0}};
    @(posedge clk); #1;
    for (int i = 0; i < w.size(); i++) begin
      up_in = '{cpu: 8'd0, dev: 4'd0, last: 0, data: w[i]};
      #1; check(!up_out_valid, "nothing leaves before the frame is whole");
      @(posedge clk); #1;
    end
    up_in = '{cpu: 8'd0, dev: 4'd0, last: 1, data: 32'(len)};
    @(posedge clk); #1;
    up_in_valid = 0;
    check(up_out_valid && up_out.cpu == 8'(dst) && up_out.data == {RSP_ETH_RX, 8'd0, 16'(len)}
          && !up_out.last, $sformatf("rx header to cpu %0d", dst));
    @(posedge clk); #1;
    for (int i = 0; i < w.size(); i++) begin
      if (i == 3) begin   // one stall cycle
        up_out_ready = 0; @(posedge clk); #1; up_out_ready = 1; #1;
      end
      check(up_out_valid && up_out.cpu == 8'(dst) && up_out.data == w[i]
            && up_out.last == (i == w.size()-1), $sformatf("rx word %0d", i));
      @(posedge clk); #1;
    end
    check(!up_out_valid, "rx frame ended");
  endtask

  initial begin
    down_in_valid = 0; down_in = '0; down_out_ready = 1;
    up_in_valid = 0; up_in = '0; up_out_ready = 1;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    tx_packet(5, 64);
    ctrl_msg(2);
    tx_packet(15, 1024);
    tx_packet(0, 61);
    // control answer forwarded
    up_in_valid = 1;
    up_in = '{cpu: 8'd4, dev: 4'd0, last: 0, data: {RSP_ETH_CTRL_RD, 24'd0}};
    #1; check(up_out_valid && up_out == up_in, "ctrl answer header forwarded");
    @(posedge clk); #1;
    up_in = '{cpu: 8'd4, dev: 4'd0, last: 1, data: 32'h5555_AAAA};
    #1; check(up_out_valid && up_out == up_in, "ctrl answer data forwarded");
    @(posedge clk); #1;
    up_in_valid = 0;
    rx_frame(3, 64);
    rx_frame(12, 1024);
    rx_frame(7, 63);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
