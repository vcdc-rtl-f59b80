// tb_virt_vga: display requests from several VMs; the second coordinate of
// each must come out moved by 100 * VM, everything else unchanged, with no
// added latency; responses pass through.
module tb_virt_vga;
  import vcdc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic down_in_valid, down_in_ready, down_out_valid, down_out_ready;
  logic up_in_valid, up_in_ready, up_out_valid, up_out_ready;
  flit_t down_in, down_out, up_in, up_out;
  int checks = 0, failures = 0;

  virt_vga dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one display request: character, x, y from VM vm
  task automatic display(input int vm, input int ch, input int x, input int y);
    int vals[3] = '{ch, x, y};
    int exp[3]  = '{ch, x, y + 100 * (vm % 4)};
    for (int i = 0; i < 3; i++) begin
      down_in_valid = 1;
      down_in = '{cpu: 8'(vm), dev: 4'd1, last: (i == 2), data: 32'(vals[i])};
      #1;
      check(down_out_valid && down_out.data == 32'(exp[i]) && down_out.cpu == 8'(vm)
            && down_out.last == (i == 2), $sformatf("vm %0d flit %0d", vm, i));
      @(posedge clk); #1;
    end
    down_in_valid = 0;
  endtask

  initial begin
    down_in_valid = 0; down_in = '0; down_out_ready = 1;
    up_in_valid = 0; up_in = '0; up_out_ready = 1;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    display(0, 'h41, 2, 1);       // 'A' at (2,1) from VM 0 stays at (2,1)
    display(3, 'h48, 0, 0);       // VM 3 origin goes to (0,300)
    display(1, 'h42, 7, 9);
    display(2, 'h43, 639, 99);
    display(6, 'h44, 1, 1);       // six CPUs on four sections: section 2
    // back-pressure: stalled flit does not advance the index
    down_out_ready = 0;
    down_in_valid = 1; down_in = '{cpu: 8'd1, dev: 4'd1, last: 0, data: 32'h41};
    @(posedge clk); #1;
    down_out_ready = 1;
    display(1, 'h41, 5, 5);
    // response path
    up_in_valid = 1; up_in = '{cpu: 8'd2, dev: 4'd1, last: 1, data: 32'h1234};
    #1; check(up_out_valid && up_out == up_in && up_in_ready, "response passes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
