// tb_sched: fixed-priority and round-robin picks, grant held over a
// multi-flit message, and policy switch at a message boundary.
module tb_sched;
  import vcdc_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  sched_policy_e policy;
  logic [N-1:0] req;
  logic xfer, xfer_last, gnt_valid;
  logic [1:0] gnt_idx;
  int checks = 0, failures = 0;

  sched #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (gnt=%0d v=%0b)", what, gnt_idx, gnt_valid); end
  endtask

  // move one flit of the granted requester
  task automatic move(input bit last);
    xfer = 1; xfer_last = last;
    @(posedge clk); #1;
    xfer = 0; xfer_last = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    policy = SCHED_FP; req = '0; xfer = 0; xfer_last = 0;
    repeat (2) @(posedge clk); rst_n = 1; #1;
    check(!gnt_valid, "no request no grant");
    // fixed priority: lowest index wins
    req = 4'b1010; #1; check(gnt_valid && gnt_idx == 1, "FP picks 1 of 1010");
    req = 4'b1100; #1; check(gnt_idx == 2, "FP picks 2 of 1100");
    req = 4'b1111; #1; check(gnt_idx == 0, "FP picks 0 of 1111");
    // grant held across a 3-flit message even when a higher priority arrives
    req = 4'b1000; #1; check(gnt_idx == 3, "FP picks 3 alone");
    move(0);
    req = 4'b1001; #1; check(gnt_idx == 3, "held on 3 while 0 requests");
    move(0);
    check(gnt_idx == 3, "still held");
    move(1);
    check(gnt_idx == 0, "released, 0 wins");
    move(1);
    // round robin: after 0 served, 1..3 in turn, then wrap
    policy = SCHED_RR;
    req = 4'b1111; #1;
    check(gnt_idx == 1, "RR after 0 -> 1"); move(1);
    check(gnt_idx == 2, "RR -> 2"); move(1);
    check(gnt_idx == 3, "RR -> 3"); move(1);
    check(gnt_idx == 0, "RR wraps -> 0"); move(1);
    req = 4'b0101; #1;
    check(gnt_idx == 2, "RR skips idle 1 -> 2"); move(0);
    req = 4'b0001; #1;
    check(!gnt_valid && gnt_idx == 2, "held grant waits for its requester");
    req = 4'b0101; #1; move(1);
    check(gnt_idx == 0, "RR -> 0 after 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
