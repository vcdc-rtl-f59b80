// tb_sync_fifo: random push/pop traffic against a queue model; checks order,
// data, the full flag after DEPTH words, and one-cycle write-to-read latency.
module tb_sync_fifo;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [31:0] in_data, out_data;
  int checks = 0, failures = 0;
  logic [31:0] model[$];
  bit accepted = 0;

  sync_fifo #(.T(logic [31:0]), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!out_valid && in_ready, "empty after reset");
    // fill to full
    for (int i = 0; i < DEPTH; i++) begin
      in_valid = 1; in_data = 32'hA000 + i;
      @(posedge clk); #1;
      if (i == 0) check(out_valid && out_data == 32'hA000, "one-cycle latency");
    end
    in_valid = 0;
    check(!in_ready, "full after DEPTH pushes");
    // drain
    for (int i = 0; i < DEPTH; i++) begin
      out_ready = 1; #0;
      check(out_valid && out_data == 32'hA000 + i, "drain order");
      @(posedge clk); #1;
    end
    out_ready = 0;
    check(!out_valid, "empty after drain");
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (!in_valid || accepted) begin   // hold an offered word until taken
        in_valid = ($urandom_range(0, 2) != 0);
        in_data  = $urandom;
      end
      out_ready = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        check(model.size() > 0 && out_data == model[0], "random data order");
        if (model.size() > 0) void'(model.pop_front());
      end
      accepted = in_valid && in_ready;
      if (accepted) model.push_back(in_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
