// sync_fifo: single-clock FIFO with valid/ready handshakes on both sides.
//
// Used for every FIFO of the VCDC: the input and output FIFOs of the hardware
// manager, the communication and dedicated per-CPU FIFOs of an I/O VMM, and
// the instruction and response FIFOs of a low layer driver. The document shows
// these FIFOs but gives no depth or handshake; both are this design's choice.
// Storage is a register array with read and write pointers one bit wider than
// the address, so full and empty are told apart. A word pushed in one cycle is
// visible at the output the next cycle; a push and a pop may happen in the same
// cycle. in_ready is low only when the FIFO is full.
module sync_fifo #(
  parameter type T     = logic [31:0],
  parameter int  DEPTH = 4            // power of two
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T              mem [DEPTH];
  logic [AW:0]   wptr, rptr;
  logic          push, pop;

  assign in_ready  = (wptr - rptr) != (AW+1)'(DEPTH);
  assign out_valid = wptr != rptr;
  assign out_data  = mem[rptr[AW-1:0]];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (push) wptr <= wptr + 1'b1;
      if (pop)  rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wptr[AW-1:0]] <= in_data;
  end

  // A producer keeps its word stable until it is taken.
  a_stable: assert property (@(posedge clk) disable iff (!rst_n)
                             in_valid && !in_ready |=> in_valid);
endmodule
