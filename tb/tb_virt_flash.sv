// tb_virt_flash: checks the flash virtualization module on its own. A range
// read must become 4-byte read instructions covering the range exactly, with
// the final bit only on the last; an end below the start reads one byte; a
// write becomes one write instruction with the same address and data; an
// unknown request is dropped; cpu and dev are kept; answers pass upward
// unchanged. The instruction side applies random back-pressure.
module tb_virt_flash;
  import vcdc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic down_in_valid, down_in_ready, down_out_valid, down_out_ready;
  logic up_in_valid, up_in_ready, up_out_valid, up_out_ready;
  flit_t down_in, down_out, up_in, up_out;
  int checks = 0, failures = 0;
  flit_t got[$];

  virt_flash dut (.*);

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
    if (rst_n && down_out_valid && down_out_ready) got.push_back(down_out);
    down_out_ready <= ($urandom_range(0, 2) != 0);
  end

  task automatic send(input int cpu, input logic [31:0] w[$]);
    bit acc;
    #1;
    for (int i = 0; i < w.size(); i++) begin
      down_in_valid = 1;
      down_in = '{cpu: 8'(cpu), dev: 4'(DEV_FLASH), last: (i == w.size()-1), data: w[i]};
      do begin @(negedge clk); acc = down_in_ready; @(posedge clk); end while (!acc);
      #1;
    end
    down_in_valid = 0;
  endtask

  task automatic settle(input int cycles = 60);
    repeat (cycles) @(posedge clk);
    #1;
  endtask

  // checks that got holds read instructions covering [s, e] for cpu
  task automatic check_read(input int cpu, input int s, input int e);
    int a = s, k = 0, total = (e >= s) ? e - s + 1 : 1;
    int nins = (total + 3) / 4;
    check(got.size() == 2 * nins, $sformatf("read %0d..%0d: %0d flits, exp %0d", s, e, got.size(), 2 * nins));
    if (got.size() != 2 * nins) return;
    for (int i = 0; i < nins; i++) begin
      automatic int n = (total - 4 * i >= 4) ? 4 : total - 4 * i;
      automatic bit fin = (i == nins - 1);
      check(got[2*i].data == {INS_FL_RD, 7'd0, fin, 14'd0, 2'(n - 1)} && !got[2*i].last,
            $sformatf("ins %0d header %h", i, got[2*i].data));
      check(got[2*i+1].data == 32'(a) && got[2*i+1].last, $sformatf("ins %0d addr %h", i, got[2*i+1].data));
      check(got[2*i].cpu == 8'(cpu) && got[2*i+1].cpu == 8'(cpu) && got[2*i].dev == 4'(DEV_FLASH), "cpu and dev kept");
      a += n;
      k++;
    end
  endtask

  initial begin
    down_in_valid = 0; down_in = '0; up_in_valid = 0; up_in = '0; up_out_ready = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    send(3, '{{OP_FL_READ, 24'd0}, 32'h100, 32'h10A});
    settle(); check_read(3, 'h100, 'h10A); got.delete();
    send(4, '{{OP_FL_READ, 24'd0}, 32'h200, 32'h200});
    settle(); check_read(4, 'h200, 'h200); got.delete();
    send(5, '{{OP_FL_READ, 24'd0}, 32'h300, 32'h2FF});
    settle(); check_read(5, 'h300, 'h300); got.delete();
    send(6, '{{OP_FL_READ, 24'd0}, 32'hFF00, 32'h100FF});
    settle(1200); check_read(6, 'hFF00, 'h100FF); got.delete();
    // unknown request dropped, then a write
    send(1, '{32'h5500_0000, 32'h1, 32'h2});
    send(2, '{{OP_FL_WRITE, 24'd0}, 32'h00_4242, 32'h0000_0011});
    settle();
    check(got.size() == 3, $sformatf("write gives 3 flits, got %0d", got.size()));
    if (got.size() == 3) begin
      check(got[0].data == {INS_FL_WR, 24'd0} && got[0].cpu == 2 && !got[0].last, "write header");
      check(got[1].data == 32'h4242 && !got[1].last, "write address");
      check(got[2].data == 32'h11 && got[2].last, "write data");
    end
    got.delete();
    // back-to-back requests from two CPUs
    send(7, '{{OP_FL_READ, 24'd0}, 32'h10, 32'h17});
    send(8, '{{OP_FL_READ, 24'd0}, 32'h20, 32'h21});
    settle();
    check(got.size() == 6 && got[0].cpu == 7 && got[3].cpu == 7 && got[4].cpu == 8 && got[5].data == 32'h20,
          "requests served in order, not interleaved");
    // up path
    #1; up_in_valid = 1; up_in = '{cpu: 8'd9, dev: 4'(DEV_FLASH), last: 1'b1, data: 32'hDEAD_BEEF};
    #1; check(up_out_valid && up_out == up_in && up_in_ready, "answer passes upward");
    up_out_ready = 0;
    #1; check(!up_in_ready, "up back-pressure passes through");
    up_in_valid = 0; up_out_ready = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
