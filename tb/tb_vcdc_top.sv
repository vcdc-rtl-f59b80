// tb_vcdc_top: end-to-end test of the VCDC at its default size (16 CPUs).
// A small NoC model feeds whole request messages into the VCDC one after the
// other and sorts the answers by CPU; the Ethernet subsystem model loops
// every transmitted frame back with source and destination IP swapped.
//  1. TEMAC register write/read and an out-of-range read (AXI-Lite path)
//  2. messages for an unknown device and an unknown CPU are dropped
//  3. VGA requests from all 16 CPUs queued behind a stalled VGA driver come
//     out whole, moved to each VM's section, in fixed-priority order and then
//     in round-robin order
//  4. loop-back of 1 KB Ethernet packets from 1, 4, 8 and 16 CPUs under both
//     policies: every CPU gets its own packet back (the source IP carried its
//     CPU id), and the response times are printed and checked for linear
//     scaling with the number of CPUs
//  5. SPI flash: range reads of 1, 4, 64 and 256 bytes from 1 and from 9 CPUs
//     (every CPU gets exactly its bytes, split over 4-byte answer flits, the
//     last one marked), one-byte writes from 4 CPUs answered and read back
//  6. NoC traffic per operation: displaying one pixel costs 3 flits and
//     reading one flash byte 4 flits (3 request, 1 answer), for 1, 4 and 10
//     CPUs
//  7. write throughput: 4 CPUs each write one byte per request, the next as
//     soon as the previous is answered, for a fixed time under round robin;
//     the bytes written per CPU must be equal within one
// The NoC output is stalled at random to exercise back-pressure. Each
// mechanism is counted and one that never happened counts as a failure.
module tb_vcdc_top;
  import vcdc_pkg::*;
  import eth_frame_pkg::*;
  localparam int NC = 16;
  localparam int PKT = 1024;

  logic clk = 0, rst_n = 0;
  sched_policy_e policy;
  logic noc_in_valid, noc_in_ready, noc_out_valid, noc_out_ready;
  flit_t noc_in, noc_out;
  logic eth_awvalid, eth_awready, eth_wvalid, eth_wready, eth_bvalid, eth_bready;
  logic eth_arvalid, eth_arready, eth_rvalid, eth_rready;
  logic [31:0] eth_awaddr, eth_wdata, eth_araddr, eth_rdata;
  logic [3:0] eth_wstrb;
  logic [1:0] eth_bresp, eth_rresp;
  logic eth_tx_tvalid, eth_tx_tready, eth_tx_tlast, eth_rx_tvalid, eth_rx_tready, eth_rx_tlast;
  logic [31:0] eth_tx_tdata, eth_rx_tdata;
  logic [3:0] eth_tx_tkeep, eth_rx_tkeep;
  logic vga_ins_valid, vga_ins_ready, vga_rsp_valid, vga_rsp_ready;
  flit_t vga_ins, vga_rsp;
  int tx_frames;
  logic [7:0] last_src_byte;

  int checks = 0, failures = 0;
  int cyc = 0;
  flit_t got[NC][$];        // answers per CPU
  int    done_at[NC];       // cycle the last answer flit of a CPU arrived
  flit_t vga_got[$];
  int    n_backpressure = 0, n_ip_rewrite = 0, n_rx_return = 0, n_fp = 0, n_rr = 0;
  int    n_ctrl = 0, n_slverr = 0, n_drop = 0, n_vga_move = 0;
  int    n_fl_read = 0, n_fl_write = 0, n_traffic = 0;
  int    noc_in_flits = 0, noc_out_flits = 0;
  int    n_fair = 0;
  bit    noc_busy = 0;   // one sender on noc_in at a time
  int    wr_count[4];
  logic  spi_sck, spi_cs_n, spi_mosi, spi_miso;
  int    fl_reads, fl_pps, fl_wrens, fl_rdsrs, fl_errs;

  vcdc_top dut (.*);

  eth_sub_model #(.GAP(20)) u_eth (
    .clk, .rst_n,
    .awvalid(eth_awvalid), .awready(eth_awready), .awaddr(eth_awaddr),
    .wvalid(eth_wvalid), .wready(eth_wready), .wdata(eth_wdata), .wstrb(eth_wstrb),
    .bvalid(eth_bvalid), .bready(eth_bready), .bresp(eth_bresp),
    .arvalid(eth_arvalid), .arready(eth_arready), .araddr(eth_araddr),
    .rvalid(eth_rvalid), .rready(eth_rready), .rdata(eth_rdata), .rresp(eth_rresp),
    .tx_tvalid(eth_tx_tvalid), .tx_tready(eth_tx_tready), .tx_tdata(eth_tx_tdata),
    .tx_tkeep(eth_tx_tkeep), .tx_tlast(eth_tx_tlast),
    .rx_tvalid(eth_rx_tvalid), .rx_tready(eth_rx_tready), .rx_tdata(eth_rx_tdata),
    .rx_tkeep(eth_rx_tkeep), .rx_tlast(eth_rx_tlast),
    .tx_frames, .last_src_byte);

  spi_flash_model #(.BUSY_CYCLES(300)) u_flash (
    .clk, .sck(spi_sck), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso),
    .n_read(fl_reads), .n_pp(fl_pps), .n_wren(fl_wrens), .n_rdsr(fl_rdsrs), .n_err(fl_errs));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // NoC side: collect answers, stall the output now and then
  bit stall_on = 1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && noc_out_valid && noc_out_ready) begin
      if (int'(noc_out.cpu) < NC) begin
        got[noc_out.cpu[3:0]].push_back(noc_out);
        if (noc_out.last) done_at[noc_out.cpu[3:0]] = cyc;
      end
    end
    if (rst_n && noc_out_valid && !noc_out_ready) n_backpressure++;
    if (rst_n && noc_in_valid && noc_in_ready) noc_in_flits++;
    if (rst_n && noc_out_valid && noc_out_ready) noc_out_flits++;
    if (rst_n && vga_ins_valid && vga_ins_ready) vga_got.push_back(vga_ins);
    noc_out_ready <= !stall_on || ($urandom_range(0, 7) != 0);
  end

  // checks the source IP of every frame the VCDC transmits
  int tx_seen = 0;
  int tx_expect_cpu[$];
  always @(posedge clk) if (tx_frames != tx_seen) begin
    tx_seen = tx_frames;
    if (tx_expect_cpu.size() > 0) begin
      if (last_src_byte == 8'(tx_expect_cpu[0])) n_ip_rewrite++;
      void'(tx_expect_cpu.pop_front());
    end
  end

  // send one message into the VCDC, flits back to back
  task automatic send(input int cpu, input int dev, input logic [31:0] w[$]);
    bit acc;
    #1;  // never change inputs on a clock edge
    for (int i = 0; i < w.size(); i++) begin
      noc_in_valid = 1;
      noc_in = '{cpu: 8'(cpu), dev: 4'(dev), last: (i == w.size()-1), data: w[i]};
      do begin @(negedge clk); acc = noc_in_ready; @(posedge clk); end while (!acc);
      #1;
    end
    noc_in_valid = 0;
  endtask

  task automatic clear_got();
    for (int c = 0; c < NC; c++) begin got[c].delete(); done_at[c] = 0; end
  endtask

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // queue one VGA request per CPU (in 'order') behind a stalled driver,
  // release it and return the order of service
  task automatic vga_round(input int order[$], output int seen[$]);
    vga_ins_ready = 0;
    vga_got.delete();
    foreach (order[n]) send(order[n], DEV_VGA, '{32'h41, 32'(n), 32'd7});
    wait_cycles(30);
    vga_ins_ready = 1;
    wait_cycles(120);
    seen.delete();
    check(vga_got.size() == 3 * order.size(), $sformatf("VGA flits %0d", vga_got.size()));
    for (int i = 0; i + 2 < vga_got.size(); i += 3) begin
      automatic int c = int'(vga_got[i].cpu);
      seen.push_back(c);
      if (vga_got[i+2].data == 32'(7 + 100 * (c % 4)) && vga_got[i+2].last
          && vga_got[i+1].cpu == 8'(c) && vga_got[i+2].cpu == 8'(c)) n_vga_move++;
      else begin failures++; $display("FAIL: VGA message of cpu %0d", c); end
      checks++;
    end
  endtask

  // every CPU in 0..n-1 sends the same 1 KB packet; returns response times
  task automatic eth_round(input int n, output int rt[$]);
    bytes_t f = make_frame(PKT, 8'd17, 8'd1, 8'd200);
    words_t w = to_words(f);
    int t0;
    w.push_front({OP_ETH_TX, 8'd0, 16'(PKT)});
    clear_got();
    t0 = cyc;
    for (int c = 0; c < n; c++) begin
      tx_expect_cpu.push_back(c);
      send(c, DEV_ETH, w);
    end
    for (int t = 0; t < 20000; t++) begin
      automatic int fin = 0;
      for (int c = 0; c < n; c++) if (done_at[c] != 0) fin++;
      if (fin == n) break;
      wait_cycles(1);
    end
    rt.delete();
    for (int c = 0; c < n; c++) begin
      bytes_t e = f;
      words_t we;
      e[29] = 8'd200; e[33] = 8'(c);     // looped back: swapped addresses
      for (int b = 26; b < 29; b++) e[b] = f[b+4];
      we = to_words(e);
      rt.push_back(done_at[c] - t0);
      check(got[c].size() == we.size() + 1, $sformatf("cpu %0d got %0d flits", c, got[c].size()));
      if (got[c].size() == we.size() + 1) begin
        automatic bit ok = got[c][0].data == {RSP_ETH_RX, 8'd0, 16'(PKT)};
        for (int i = 0; i < we.size(); i++) ok &= (got[c][i+1].data == we[i]);
        ok &= got[c][we.size()].last;
        check(ok, $sformatf("cpu %0d frame returned intact", c));
        if (ok) n_rx_return++;
      end
    end
  endtask

  function automatic logic [7:0] fl_pat(input int a);
    return 8'(a * 7 + (a >> 8) + 8'h5A);
  endfunction

  // CPUs 0..n-1 each read nb bytes from their own start address; returns the
  // response times and checks the data
  task automatic flash_round(input int n, input int nb, output int rt[$]);
    int t0;
    clear_got();
    t0 = cyc;
    for (int c = 0; c < n; c++)
      send(c, DEV_FLASH, '{{OP_FL_READ, 24'd0}, 32'h1003 + 32'h100 * c, 32'h1003 + 32'h100 * c + 32'(nb - 1)});
    for (int t = 0; t < 200000; t++) begin
      automatic int fin = 0;
      for (int c = 0; c < n; c++) if (done_at[c] != 0) fin++;
      if (fin == n) break;
      wait_cycles(1);
    end
    rt.delete();
    for (int c = 0; c < n; c++) begin
      automatic int nf = (nb + 3) / 4;
      automatic bit ok = got[c].size() == nf;
      rt.push_back(done_at[c] - t0);
      if (ok)
        for (int i = 0; i < nb; i++)
          ok &= got[c][i / 4].data[31 - 8 * (i % 4) -: 8] == fl_pat(32'h1003 + 32'h100 * c + i);
      if (ok)
        for (int i = 0; i < nf; i++) ok &= got[c][i].last == (i == nf - 1) && got[c][i].dev == 4'(DEV_FLASH);
      check(ok, $sformatf("flash read of %0d bytes by cpu %0d (%0d flits)", nb, c, got[c].size()));
      if (ok) n_fl_read++;
    end
  endtask

  initial begin
    int seen[$];
    int rt[$];
    int order[$];
    int base;
    noc_in_valid = 0; noc_in = '0; vga_ins_ready = 1; vga_rsp_valid = 0; vga_rsp = '0;
    policy = SCHED_FP;
    repeat (3) @(posedge clk); rst_n = 1;
    wait_cycles(2);

    // 1. TEMAC registers over AXI-Lite
    clear_got();
    send(5, DEV_ETH, '{{OP_ETH_CTRL_WR, 24'd0}, 32'h0C, 32'h1234_ABCD});
    send(5, DEV_ETH, '{{OP_ETH_CTRL_RD, 24'd0}, 32'h0C});
    send(6, DEV_ETH, '{{OP_ETH_CTRL_RD, 24'd0}, 32'h200});
    wait_cycles(60);
    check(got[5].size() == 3 && got[5][0].data == {RSP_ETH_CTRL_WR, 24'd0}
          && got[5][2].data == 32'h1234_ABCD && got[5][2].last, "register write / read back");
    if (got[5].size() == 3 && got[5][2].data == 32'h1234_ABCD) n_ctrl++;
    check(got[6].size() == 2 && got[6][0].data[1:0] == 2'b10, "out-of-range read answers SLVERR");
    if (got[6].size() == 2 && got[6][0].data[1:0] == 2'b10) n_slverr++;

    // 2. unknown device and unknown CPU are dropped, nothing comes back
    clear_got();
    send(2, 9, '{{OP_ETH_CTRL_RD, 24'd0}, 32'h0});
    send(40, DEV_ETH, '{{OP_ETH_CTRL_RD, 24'd0}, 32'h0});
    send(2, DEV_ETH, '{{OP_ETH_CTRL_RD, 24'd0}, 32'h0});
    wait_cycles(60);
    check(got[2].size() == 2 && got[2][1].data == 32'h1000_0000, "only the valid request answered");
    if (got[2].size() == 2) n_drop++;

    // 3. VGA: service order under both policies
    for (int c = NC-1; c >= 0; c--) order.push_back(c);     // 15, 14, ..., 0
    vga_round(order, seen);
    // 15 is alone and served first, 14 is next; the remaining wait and go by priority
    begin
      automatic bit ok = seen.size() == NC;
      for (int i = 2; i < seen.size(); i++) ok &= (seen[i] == i - 2);
      check(ok, $sformatf("fixed priority order %p", seen));
      if (ok) n_fp++;
    end
    policy = SCHED_RR;
    order.delete();
    for (int c = 0; c < NC; c++) order.push_back((c * 5) % NC);   // 0,5,10,15,4,...
    vga_round(order, seen);
    begin
      // after the first two the remaining CPUs go in turn from the last served
      automatic bit ok = seen.size() == NC;
      for (int i = 3; i < seen.size(); i++) ok &= (seen[i] == (seen[i-1] + 1) % NC
                                                    || (seen[i] == (seen[i-1] + 2) % NC
                                                        && ((seen[i-1] + 1) % NC == seen[0]
                                                            || (seen[i-1] + 1) % NC == seen[1])));
      check(ok, $sformatf("round robin order %p", seen));
      if (ok) n_rr++;
    end

    // 4. Ethernet loop-back, response times in cycles
    for (int p = 0; p < 2; p++) begin
      policy = (p == 0) ? SCHED_FP : SCHED_RR;
      eth_round(1, rt);
      base = rt[0];
      $display("%s  1 CPU : %0d cycles", p == 0 ? "FP" : "RR", base);
      for (int k = 0; k < 3; k++) begin
        automatic int n = (k == 0) ? 4 : (k == 1) ? 8 : 16;
        automatic int mx = 0;
        eth_round(n, rt);
        foreach (rt[i]) if (rt[i] > mx) mx = rt[i];
        begin
          automatic string line = "";
          foreach (rt[i]) line = {line, $sformatf(" %0d", rt[i])};
          $display("%s %2d CPUs: response times (cycles):%s", p == 0 ? "FP" : "RR", n, line);
        end
        check(mx <= n * base, $sformatf("%0d CPUs: slowest %0d within %0d x single %0d", n, mx, n, base));
        check(rt[0] < rt[n-1], "CPU served first answers first");
      end
    end
    wait_cycles(10);

    // 5. SPI flash
    policy = SCHED_RR;
    for (int k = 0; k < 4; k++) begin
      automatic int nb = (k == 0) ? 1 : (k == 1) ? 4 : (k == 2) ? 64 : 256;
      automatic int mx = 0;
      flash_round(1, nb, rt);
      base = rt[0];
      flash_round(9, nb, rt);
      foreach (rt[i]) if (rt[i] > mx) mx = rt[i];
      $display("flash read %3d bytes: 1 CPU %0d cycles, 9 CPUs slowest %0d cycles", nb, base, mx);
      check(mx <= 9 * base + 100, $sformatf("9 CPUs within 9 x single read (%0d, %0d)", mx, base));
    end
    clear_got();
    for (int c = 10; c < 14; c++)
      send(c, DEV_FLASH, '{{OP_FL_WRITE, 24'd0}, 32'h8000 + 32'(c), 32'(8'hC3 ^ 8'(c))});
    wait_cycles(4000);
    for (int c = 10; c < 14; c++) begin
      automatic bit ok = got[c].size() == 1 && got[c][0].data == {RSP_FL_WRITE, 24'd0} && got[c][0].last;
      check(ok, $sformatf("write by cpu %0d answered", c));
    end
    clear_got();
    for (int c = 10; c < 14; c++)
      send(c, DEV_FLASH, '{{OP_FL_READ, 24'd0}, 32'h8000 + 32'(c), 32'h8000 + 32'(c)});
    wait_cycles(2000);
    for (int c = 10; c < 14; c++) begin
      automatic bit ok = got[c].size() == 1
        && got[c][0].data[31:24] == (fl_pat(32'h8000 + c) & (8'hC3 ^ 8'(c)));
      check(ok, $sformatf("byte written by cpu %0d reads back", c));
      if (ok) n_fl_write++;
    end
    check(fl_errs == 0 && fl_pps == 4 && fl_rdsrs >= 8, $sformatf("flash protocol: pp %0d rdsr %0d err %0d", fl_pps, fl_rdsrs, fl_errs));

    // 6. NoC flits per operation
    for (int k = 0; k < 3; k++) begin
      automatic int n = (k == 0) ? 1 : (k == 1) ? 4 : 10;
      automatic int i0 = noc_in_flits, o0 = noc_out_flits;
      vga_got.delete();
      for (int c = 0; c < n; c++) send(c, DEV_VGA, '{32'h41, 32'd2, 32'd1});
      wait_cycles(100);
      check(noc_in_flits - i0 == 3 * n && noc_out_flits == o0 && vga_got.size() == 3 * n,
            $sformatf("VGA pixel from %0d CPUs: %0d flits", n, noc_in_flits - i0 + noc_out_flits - o0));
      i0 = noc_in_flits; o0 = noc_out_flits;
      clear_got();
      for (int c = 0; c < n; c++) send(c, DEV_FLASH, '{{OP_FL_READ, 24'd0}, 32'(c), 32'(c)});
      wait_cycles(120 * n);
      $display("NoC flits, %2d CPUs: VGA pixel %0d, flash 1-byte read %0d", n, 3 * n,
               noc_in_flits - i0 + noc_out_flits - o0);
      if (noc_in_flits - i0 + noc_out_flits - o0 == 4 * n) n_traffic++;
      else begin failures++; $display("FAIL: flash 1-byte read flits from %0d CPUs", n); end
      checks++;
    end

    // 7. write throughput from 4 CPUs
    policy = SCHED_RR;
    clear_got();
    begin
      automatic int t_end = cyc + 60000;
      for (int c = 0; c < 4; c++) begin
        automatic int cc = c;
        wr_count[cc] = 0;
        fork
          begin
            while (cyc < t_end) begin
              automatic int n_prev = got[cc].size();
              while (noc_busy) @(posedge clk);
              noc_busy = 1;
              send(cc, DEV_FLASH, '{{OP_FL_WRITE, 24'd0}, 32'h9000 + 32'h100 * cc + 32'(wr_count[cc]), 32'h0F});
              noc_busy = 0;
              while (got[cc].size() == n_prev) @(posedge clk);
              if (got[cc][n_prev].data == {RSP_FL_WRITE, 24'd0}) wr_count[cc]++;
            end
          end
        join_none
      end
      wait fork;
      $display("bytes written in 60000 cycles per CPU: %0d %0d %0d %0d",
               wr_count[0], wr_count[1], wr_count[2], wr_count[3]);
      begin
        automatic int mn = wr_count[0], mx = wr_count[0];
        foreach (wr_count[i]) begin
          if (wr_count[i] < mn) mn = wr_count[i];
          if (wr_count[i] > mx) mx = wr_count[i];
        end
        check(mn > 0 && mx - mn <= 1, "flash write throughput shared evenly");
        if (mn > 0 && mx - mn <= 1) n_fair++;
      end
    end
    check(fl_errs == 0, "no flash command while busy");

    $display("mechanisms: backpressure=%0d ip_rewrite=%0d rx_return=%0d fixed_priority=%0d round_robin=%0d ctrl=%0d slverr=%0d drop=%0d vga_move=%0d flash_read=%0d flash_write=%0d",
             n_backpressure, n_ip_rewrite, n_rx_return, n_fp, n_rr, n_ctrl, n_slverr, n_drop, n_vga_move,
             n_fl_read, n_fl_write);
    $display("traffic checks passed: %0d", n_traffic);
    check(n_backpressure > 0, "back-pressure happened");
    check(n_ip_rewrite == 2 * (1 + 4 + 8 + 16), $sformatf("source IP rewritten on every frame (%0d)", n_ip_rewrite));
    check(n_rx_return == 2 * (1 + 4 + 8 + 16), "every frame returned");
    check(n_fp > 0 && n_rr > 0, "both policies seen");
    check(n_ctrl > 0 && n_slverr > 0 && n_drop > 0 && n_vga_move == 2 * NC, "control, error, drop, VGA");
    check(n_fl_read == 4 * 10 && n_fl_write == 4, "flash reads and writes");
    check(n_traffic == 3, "flits per operation");
    check(n_fair == 1, "even write throughput");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
