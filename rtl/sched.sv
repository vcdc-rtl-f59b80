// sched: message-granular arbiter used as Scheduler_1 / Scheduler_2 of an I/O
// VMM and as the scheduler of the hardware manager.
//
// N requesters raise req[i] when they hold a flit to send. While no message is
// in flight the arbiter picks one: under SCHED_FP the lowest index wins (index
// 0 highest priority); under SCHED_RR the search starts just after the
// requester that finished the previous message. Once the first flit of a
// message has moved (xfer) the grant is held until the flit with last set has
// moved, so messages from different requesters never interleave. The policy is
// an input and can be switched at any message boundary. Round robin and fixed
// priority follow the document; holding the grant for a whole message is this
// design's choice. gnt_idx is combinational from req and the held state.
module sched #(
  parameter int N = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  vcdc_pkg::sched_policy_e   policy,
  input  logic [N-1:0]              req,
  input  logic                      xfer,       // a flit of the granted requester moved
  input  logic                      xfer_last,  // ...and it ended the message
  output logic                      gnt_valid,
  output logic [$clog2(N>1?N:2)-1:0] gnt_idx
);
  import vcdc_pkg::*;
  localparam int IW = $clog2(N>1?N:2);

  logic          locked;
  logic [IW-1:0] cur, prev, pick;
  logic          any;

  always_comb begin
    any  = |req;
    pick = '0;
    if (policy == SCHED_FP) begin
      for (int i = N-1; i >= 0; i--)
        if (req[i]) pick = IW'(i);
    end else begin
      // first requester after prev, circularly
      for (int k = N; k >= 1; k--)
        if (req[(int'(prev) + k) % N]) pick = IW'((int'(prev) + k) % N);
    end
  end

  assign gnt_valid = locked ? req[cur] : any;
  assign gnt_idx   = locked ? cur : pick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      cur    <= '0;
      prev   <= IW'(N-1);
    end else if (xfer) begin
      if (xfer_last) begin
        locked <= 1'b0;
        prev   <= gnt_idx;
      end else begin
        locked <= 1'b1;
        cur    <= gnt_idx;
      end
    end
  end
endmodule
