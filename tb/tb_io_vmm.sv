// tb_io_vmm: two I/O VMMs with four CPU groups each, one with the Ethernet
// and one with the VGA virtualization module.
//  - latency: a lone flit takes three cycles from the hardware manager side
//    to the driver side
//  - VGA VMM: requests queued from four CPUs leave whole, with the
//    coordinate moved to each VM's section, first in fixed-priority order and
//    then in round-robin order
//  - Ethernet VMM: a transmitted packet gets the CPU id in its source IP; a
//    received frame and control answers are returned to the right CPU;
//    flits for a CPU with no group are dropped
module tb_io_vmm;
  import vcdc_pkg::*;
  import eth_frame_pkg::*;
  localparam int NC = 4;
  logic clk = 0, rst_n = 0;
  sched_policy_e policy;
  int checks = 0, failures = 0;
  int cyc = 0;

  // one set of wires per instance: index 0 Ethernet, 1 VGA
  logic  hq_v[2], hq_r[2], hr_v[2], hr_r[2], li_v[2], li_r[2], lr_v[2], lr_r[2];
  flit_t hq[2], hr[2], li[2], lr[2];
  flit_t got_li[2][$];
  flit_t got_hr[2][$];

  io_vmm #(.KIND(VIRT_ETH), .NUM_CPUS(NC), .FIFO_DEPTH(4), .ETH_BUF_WORDS(512)) u_eth (
    .clk, .rst_n, .policy,
    .hm_req_valid(hq_v[0]), .hm_req_ready(hq_r[0]), .hm_req(hq[0]),
    .hm_rsp_valid(hr_v[0]), .hm_rsp_ready(hr_r[0]), .hm_rsp(hr[0]),
    .lld_ins_valid(li_v[0]), .lld_ins_ready(li_r[0]), .lld_ins(li[0]),
    .lld_rsp_valid(lr_v[0]), .lld_rsp_ready(lr_r[0]), .lld_rsp(lr[0]));

  io_vmm #(.KIND(VIRT_VGA), .NUM_CPUS(NC), .FIFO_DEPTH(4)) u_vga (
    .clk, .rst_n, .policy,
    .hm_req_valid(hq_v[1]), .hm_req_ready(hq_r[1]), .hm_req(hq[1]),
    .hm_rsp_valid(hr_v[1]), .hm_rsp_ready(hr_r[1]), .hm_rsp(hr[1]),
    .lld_ins_valid(li_v[1]), .lld_ins_ready(li_r[1]), .lld_ins(li[1]),
    .lld_rsp_valid(lr_v[1]), .lld_rsp_ready(lr_r[1]), .lld_rsp(lr[1]));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n)
    for (int k = 0; k < 2; k++) begin
      if (li_v[k] && li_r[k]) got_li[k].push_back(li[k]);
      if (hr_v[k] && hr_r[k]) got_hr[k].push_back(hr[k]);
    end

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

  task automatic send(input int k, input int cpu, input logic [31:0] w[$]);
    bit acc;
    #1;  // never change inputs on a clock edge
    for (int i = 0; i < w.size(); i++) begin
      hq_v[k] = 1;
      hq[k] = '{cpu: 8'(cpu), dev: 4'(k), last: (i == w.size()-1), data: w[i]};
      do begin @(negedge clk); acc = hq_r[k]; @(posedge clk); end while (!acc);
      #1;
    end
    hq_v[k] = 0;
  endtask

  task automatic give(input int k, input flit_t w[$]);
    bit acc;
    #1;  // never change inputs on a clock edge
    for (int i = 0; i < w.size(); i++) begin
      lr_v[k] = 1; lr[k] = w[i];
      do begin @(negedge clk); acc = lr_r[k]; @(posedge clk); end while (!acc);
      #1;
    end
    lr_v[k] = 0;
  endtask

  // queue one VGA request from each CPU in 'order' with the driver stalled,
  // release it and return the CPU order of the instructions that came out
  task automatic vga_round(input int order[4], output int seen[$]);
    li_r[1] = 0;
    got_li[1].delete();
    for (int n = 0; n < 4; n++)
      send(1, order[n], '{32'h41 + order[n], 32'(n), 32'd5});
    repeat (20) @(posedge clk);
    #1; li_r[1] = 1;
    repeat (40) @(posedge clk);
    #1;
    seen.delete();
    check(got_li[1].size() == 12, "12 VGA instruction flits");
    for (int i = 0; i + 2 < got_li[1].size(); i += 3) begin
      automatic int c = int'(got_li[1][i].cpu);
      seen.push_back(c);
      check(got_li[1][i].data == 32'h41 + c && got_li[1][i+1].cpu == 8'(c)
            && got_li[1][i+2].cpu == 8'(c) && got_li[1][i+2].last
            && got_li[1][i+2].data == 32'(5 + 100 * c), $sformatf("VGA message of cpu %0d whole and moved", c));
    end
  endtask

  initial begin
    int seen[$];
    int t0;
    bytes_t f, e;
    words_t w;
    flit_t rx[$];
    policy = SCHED_FP;
    for (int k = 0; k < 2; k++) begin
      hq_v[k] = 0; hq[k] = '0; lr_v[k] = 0; lr[k] = '0; li_r[k] = 1; hr_r[k] = 1;
    end
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    // latency
    hq_v[1] = 1; hq[1] = '{cpu: 8'd2, dev: 4'd1, last: 0, data: 32'h20};
    t0 = cyc;
    @(posedge clk); #1; hq_v[1] = 0;
    while (!li_v[1]) @(posedge clk);
    check(cyc - t0 == 3, $sformatf("request latency %0d cycles", cyc - t0));
    send(1, 2, '{32'd0, 32'd0});
    repeat (10) @(posedge clk);
    // fixed priority: CPU 3 is served first (it is alone), CPU 1 next, then
    // the waiting CPUs 0 and 2 in priority order
    vga_round('{3, 1, 2, 0}, seen);
    check(seen.size() == 4 && seen[2] == 0 && seen[3] == 2, $sformatf("FP order %p", seen));
    // round robin: after CPU 1 the next in turn is 2, then 0
    policy = SCHED_RR;
    vga_round('{3, 1, 0, 2}, seen);
    check(seen.size() == 4 && seen[2] == 2 && seen[3] == 0, $sformatf("RR order %p", seen));

    // Ethernet: transmit from CPU 2
    got_li[0].delete();
    f = make_frame(64, 8'd9, 8'd1, 8'd50);
    w = to_words(f);
    w.push_front({OP_ETH_TX, 8'd0, 16'd64});
    send(0, 2, w);
    send(0, 9, '{{OP_ETH_CTRL_RD, 24'd0}, 32'h4});   // no such CPU group: dropped
    repeat (30) @(posedge clk);
    e = f; e[29] = 8'd2;
    w = to_words(e);
    check(got_li[0].size() == w.size() + 1, "eth instruction length");
    if (got_li[0].size() == w.size() + 1)
      for (int i = 0; i < w.size(); i++)
        check(got_li[0][i+1].data == w[i] && got_li[0][i+1].cpu == 8'd2, $sformatf("eth tx word %0d", i));
    // receive: a frame for CPU 3, then a control answer for CPU 1
    f = make_frame(100, 8'd4, 8'd50, 8'd3);
    w = to_words(f);
    rx.delete();
    rx.push_back('{cpu: 8'd0, dev: 4'd0, last: 0, data: {RSP_ETH_RX, 24'd0}});
    foreach (w[i]) rx.push_back('{cpu: 8'd0, dev: 4'd0, last: 0, data: w[i]});
    rx.push_back('{cpu: 8'd0, dev: 4'd0, last: 1, data: 32'd100});
    rx.push_back('{cpu: 8'd1, dev: 4'd0, last: 0, data: {RSP_ETH_CTRL_RD, 24'd0}});
    rx.push_back('{cpu: 8'd1, dev: 4'd0, last: 1, data: 32'h1234_5678});
    give(0, rx);
    repeat (60) @(posedge clk);
    check(got_hr[0].size() == w.size() + 3, $sformatf("eth answers %0d", got_hr[0].size()));
    if (got_hr[0].size() == w.size() + 3) begin
      check(got_hr[0][0].cpu == 3 && got_hr[0][0].data == {RSP_ETH_RX, 8'd0, 16'd100}, "rx header to cpu 3");
      for (int i = 0; i < w.size(); i++)
        check(got_hr[0][i+1].cpu == 3 && got_hr[0][i+1].data == w[i], $sformatf("rx word %0d", i));
      check(got_hr[0][w.size()+1].cpu == 1 && got_hr[0][w.size()+2].data == 32'h1234_5678
            && got_hr[0][w.size()+2].last, "control answer to cpu 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
