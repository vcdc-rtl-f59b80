// hw_manager: the VCDC's interface to the many-core system.
//
// Request side: flits from the NoC enter one input FIFO; the dev field of the
// flit at its head is the control signal of a demultiplexer that moves the flit
// into the output FIFO of that I/O VMM. Flits naming no existing VMM are
// dropped. Response side: each I/O VMM fills its own input FIFO; a scheduler
// picks among the non-empty ones in round-robin order, a whole message at a
// time, and a multiplexer moves the chosen flits into the single output FIFO
// towards the NoC. The FIFO structure, the demultiplexer steered by the head of
// the input FIFO and the round-robin response scheduler follow the document;
// FIFO depths, the valid/ready handshake and dropping of unknown devices are
// this design's choices. Each FIFO adds one cycle, so a flit needs two cycles
// from noc_in to vmm_req and two from vmm_rsp to noc_out when nothing blocks.
module hw_manager #(
  parameter int NUM_VMM    = 2,
  parameter int FIFO_DEPTH = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // from / to the NoC
  input  logic                   noc_in_valid,
  output logic                   noc_in_ready,
  input  vcdc_pkg::flit_t        noc_in,
  output logic                   noc_out_valid,
  input  logic                   noc_out_ready,
  output vcdc_pkg::flit_t        noc_out,
  // to / from the I/O VMMs
  output logic [NUM_VMM-1:0]     vmm_req_valid,
  input  logic [NUM_VMM-1:0]     vmm_req_ready,
  output vcdc_pkg::flit_t        vmm_req [NUM_VMM],
  input  logic [NUM_VMM-1:0]     vmm_rsp_valid,
  output logic [NUM_VMM-1:0]     vmm_rsp_ready,
  input  vcdc_pkg::flit_t        vmm_rsp [NUM_VMM]
);
  import vcdc_pkg::*;
  localparam int IW = $clog2(NUM_VMM>1?NUM_VMM:2);

  // ---------------- request side ----------------
  flit_t               in_head;
  logic                in_head_valid, in_head_ready;
  logic [NUM_VMM-1:0]  ofifo_in_valid, ofifo_in_ready;
  logic                dev_ok;

  sync_fifo #(.T(flit_t), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .in_valid(noc_in_valid), .in_ready(noc_in_ready), .in_data(noc_in),
    .out_valid(in_head_valid), .out_ready(in_head_ready), .out_data(in_head));

  assign dev_ok = int'(in_head.dev) < NUM_VMM;

  always_comb begin
    ofifo_in_valid = '0;
    in_head_ready  = 1'b1;              // unknown device: drop
    if (dev_ok) begin
      ofifo_in_valid[in_head.dev[IW-1:0]] = in_head_valid;
      in_head_ready = ofifo_in_ready[in_head.dev[IW-1:0]];
    end
  end

  for (genvar v = 0; v < NUM_VMM; v++) begin : g_req
    sync_fifo #(.T(flit_t), .DEPTH(FIFO_DEPTH)) u_out_fifo (
      .clk, .rst_n,
      .in_valid(ofifo_in_valid[v]), .in_ready(ofifo_in_ready[v]), .in_data(in_head),
      .out_valid(vmm_req_valid[v]), .out_ready(vmm_req_ready[v]), .out_data(vmm_req[v]));
  end

  // ---------------- response side ----------------
  logic [NUM_VMM-1:0] rfifo_valid, rfifo_ready;
  flit_t              rfifo_data [NUM_VMM];
  logic               gnt_valid, mux_ready, xfer;
  logic [IW-1:0]      gnt_idx;
  flit_t              mux_data;

  for (genvar v = 0; v < NUM_VMM; v++) begin : g_rsp
    sync_fifo #(.T(flit_t), .DEPTH(FIFO_DEPTH)) u_rin_fifo (
      .clk, .rst_n,
      .in_valid(vmm_rsp_valid[v]), .in_ready(vmm_rsp_ready[v]), .in_data(vmm_rsp[v]),
      .out_valid(rfifo_valid[v]), .out_ready(rfifo_ready[v]), .out_data(rfifo_data[v]));
  end

  sched #(.N(NUM_VMM)) u_sched (
    .clk, .rst_n, .policy(SCHED_RR), .req(rfifo_valid),
    .xfer, .xfer_last(mux_data.last), .gnt_valid, .gnt_idx);

  assign mux_data = rfifo_data[gnt_idx];
  assign xfer     = gnt_valid && mux_ready;

  always_comb begin
    rfifo_ready = '0;
    rfifo_ready[gnt_idx] = gnt_valid && mux_ready;
  end

  sync_fifo #(.T(flit_t), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .in_valid(gnt_valid), .in_ready(mux_ready), .in_data(mux_data),
    .out_valid(noc_out_valid), .out_ready(noc_out_ready), .out_data(noc_out));
endmodule
