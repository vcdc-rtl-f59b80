// tb_hw_manager: request flits are routed by their dev field to the right
// I/O VMM in order (unknown devices dropped) with a two-cycle latency;
// responses offered by both VMMs at once leave whole, message by message, in
// round-robin order.
module tb_hw_manager;
  import vcdc_pkg::*;
  localparam int NV = 2;
  logic clk = 0, rst_n = 0;
  logic noc_in_valid, noc_in_ready, noc_out_valid, noc_out_ready;
  flit_t noc_in, noc_out;
  logic [NV-1:0] vmm_req_valid, vmm_req_ready, vmm_rsp_valid, vmm_rsp_ready;
  flit_t vmm_req [NV];
  flit_t vmm_rsp [NV];
  int checks = 0, failures = 0;
  flit_t exp_req [NV][$];
  flit_t got_req [NV][$];
  flit_t got_out[$];
  int cyc = 0;

  hw_manager #(.NUM_VMM(NV), .FIFO_DEPTH(4)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int v = 0; v < NV; v++)
      if (vmm_req_valid[v] && vmm_req_ready[v]) got_req[v].push_back(vmm_req[v]);
    if (noc_out_valid && noc_out_ready) got_out.push_back(noc_out);
    vmm_req_ready <= NV'($urandom);
    noc_out_ready <= ($urandom_range(0, 3) != 0);
  end

  // response sources: VMM v offers 3 messages of (v+2) flits each
  initial begin
    vmm_rsp_valid = '0;
    for (int v = 0; v < NV; v++) vmm_rsp[v] = '0;
    wait (rst_n);
    repeat (40) @(posedge clk);
    #1;
    fork
      for (int v = 0; v < NV; v++) begin
        automatic int vv = v;
        fork begin
          bit acc;
          for (int m = 0; m < 3; m++)
            for (int i = 0; i < vv + 2; i++) begin
              vmm_rsp_valid[vv] = 1;
              vmm_rsp[vv] = '{cpu: 8'(m), dev: 4'(vv), last: (i == vv + 1),
                              data: 32'(vv * 1000 + m * 10 + i)};
              do begin @(negedge clk); acc = vmm_rsp_ready[vv]; @(posedge clk); end while (!acc);
              #1;
              vmm_rsp_valid[vv] = 0;
            end
        end join_none
      end
    join_none
  end

  initial begin
    int t0;
    bit acc;
    noc_in_valid = 0; noc_in = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    // latency of one flit with the VMM ready
    force vmm_req_ready = '1;
    @(negedge clk);
    noc_in_valid = 1; noc_in = '{cpu: 8'd1, dev: 4'd1, last: 1, data: 32'h77};
    t0 = cyc;
    @(posedge clk); #1; noc_in_valid = 0;
    while (!vmm_req_valid[1]) @(posedge clk);
    check(cyc - t0 == 2, $sformatf("request latency %0d", cyc - t0));
    @(posedge clk); #1;
    release vmm_req_ready;
    got_req[1].delete();
    // stream of flits to both devices and a nonexistent one
    for (int n = 0; n < 200; n++) begin
      automatic int d = $urandom_range(0, 2);
      automatic flit_t f = '{cpu: 8'($urandom_range(0, 15)), dev: 4'(d == 2 ? 5 : d),
                   last: 1'($urandom), data: $urandom};
      noc_in_valid = 1; noc_in = f;
      do begin @(negedge clk); acc = noc_in_ready; @(posedge clk); end while (!acc);
      #1;
      if (d < NV) exp_req[d].push_back(f);
    end
    noc_in_valid = 0;
    repeat (200) @(posedge clk);
    for (int v = 0; v < NV; v++) begin
      check(got_req[v].size() == exp_req[v].size(), $sformatf("vmm %0d flit count", v));
      for (int i = 0; i < exp_req[v].size() && i < got_req[v].size(); i++)
        check(got_req[v][i] == exp_req[v][i], $sformatf("vmm %0d flit %0d", v, i));
    end
    // responses: 3 msgs x 2 flits from VMM0, 3 msgs x 3 flits from VMM1
    check(got_out.size() == 15, $sformatf("response flits %0d", got_out.size()));
    if (got_out.size() == 15) begin
      int p = 0;
      for (int k = 0; k < 6; k++) begin
        automatic int v = k % 2;       // round robin between the two VMMs
        automatic int m = k / 2;
        for (int i = 0; i < v + 2; i++) begin
          check(got_out[p].dev == 4'(v) && got_out[p].data == 32'(v * 1000 + m * 10 + i)
                && got_out[p].last == (i == v + 1), $sformatf("response %0d", p));
          p++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
