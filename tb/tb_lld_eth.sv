// tb_lld_eth: drives instructions into the Ethernet low layer driver with the
// Ethernet subsystem model attached. Checks AXI-Lite writes and reads (data
// and response codes, including an error), that a transmitted frame reaches
// the model with the right length (tkeep of the last word), that it comes back
// framed as header / words / trailer{bytes}, and that instructions finish in
// the order given.
module tb_lld_eth;
  import vcdc_pkg::*;
  import eth_frame_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ins_valid, ins_ready, rsp_valid, rsp_ready;
  flit_t ins, rsp;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] awaddr, wdata, araddr, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  logic tx_tvalid, tx_tready, tx_tlast, rx_tvalid, rx_tready, rx_tlast;
  logic [31:0] tx_tdata, rx_tdata;
  logic [3:0] tx_tkeep, rx_tkeep;
  int tx_frames;
  logic [7:0] last_src_byte;
  int checks = 0, failures = 0;
  flit_t got[$];

  lld_eth #(.FIFO_DEPTH(4), .DEV_ID(0)) dut (.*);
  eth_sub_model #(.GAP(8)) u_model (.*);

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

  // response collector with random back-pressure
  always @(posedge clk) begin
    if (rst_n && rsp_valid && rsp_ready) got.push_back(rsp);
    rsp_ready <= ($urandom_range(0, 3) != 0);
  end

  task automatic send(input int cpu, input logic [31:0] w[$]);
    bit acc;
    #1;  // never change inputs on a clock edge
    for (int i = 0; i < w.size(); i++) begin
      ins_valid = 1;
      ins = '{cpu: 8'(cpu), dev: 4'd0, last: (i == w.size()-1), data: w[i]};
      do begin @(negedge clk); acc = ins_ready; @(posedge clk); end while (!acc);
      #1;
    end
    ins_valid = 0;
  endtask

  task automatic wait_got(input int n);
    int t = 0;
    while (got.size() < n && t < 5000) begin @(posedge clk); t++; end
    #1;
  endtask

  initial begin
    words_t w;
    bytes_t f, e;
    ins_valid = 0; ins = '0;
    repeat (3) @(posedge clk); rst_n = 1; #1;
    // register write then read back
    send(3, '{{OP_ETH_CTRL_WR, 24'd0}, 32'h8, 32'hCAFE_F00D});
    send(3, '{{OP_ETH_CTRL_RD, 24'd0}, 32'h8});
    send(9, '{{OP_ETH_CTRL_RD, 24'd0}, 32'h100});
    wait_got(5);
    check(got.size() == 5, $sformatf("five answer flits, got %0d", got.size()));
    if (got.size() == 5) begin
      check(got[0].cpu == 3 && got[0].last && got[0].data == {RSP_ETH_CTRL_WR, 24'd0}, "write ack OKAY");
      check(got[1].cpu == 3 && !got[1].last && got[1].data == {RSP_ETH_CTRL_RD, 24'd0}, "read header OKAY");
      check(got[2].last && got[2].data == 32'hCAFE_F00D, "read data = written data");
      check(got[3].cpu == 9 && got[3].data == {RSP_ETH_CTRL_RD, 22'd0, 2'b10}, "read outside -> SLVERR");
      check(got[4].cpu == 9 && got[4].last, "read error data flit");
    end
    got.delete();
    // transmit frames of several lengths; each is looped back
    for (int k = 0; k < 3; k++) begin
      automatic int len = (k == 0) ? 61 : (k == 1) ? 64 : 1024;
      f = make_frame(len, 8'(k), 8'(k + 1), 8'd77);
      w = to_words(f);
      w.push_front({OP_ETH_TX, 8'd0, 16'(len)});
      send(k + 1, w);
      wait_got(w.size() + 1);
      check(tx_frames == k + 1 && last_src_byte == 8'(k + 1), "frame reached the model");
      e = f;
      for (int b = 26; b < 30; b++) begin automatic byte unsigned t = e[b]; e[b] = e[b+4]; e[b+4] = t; end
      w = to_words(e);
      check(got.size() == w.size() + 2, $sformatf("rx framing size %0d", got.size()));
      if (got.size() == w.size() + 2) begin
        check(got[0].data == {RSP_ETH_RX, 24'd0} && !got[0].last, "rx header");
        for (int i = 0; i < w.size(); i++)
          check(got[i+1].data == w[i] && !got[i+1].last, $sformatf("rx word %0d", i));
        check(got[w.size()+1].last && got[w.size()+1].data == 32'(len), "trailer byte count");
      end
      got.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
