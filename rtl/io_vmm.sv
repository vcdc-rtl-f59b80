// io_vmm: an I/O Virtual Machine Monitor of the VCDC.
//
// Every I/O VMM has the same shell and differs only in its virtualization
// module, chosen here by the KIND parameter (Ethernet, VGA or SPI flash).
//   Down path: hardware manager -> communication FIFO -> demultiplexer on the
//   flit's cpu field -> dedicated request FIFO of that CPU -> Scheduler_1 and
//   multiplexer -> virtualization module -> communication FIFO -> low layer
//   driver.
//   Up path: low layer driver -> communication FIFO -> virtualization module ->
//   demultiplexer on cpu -> dedicated response FIFO of that CPU -> Scheduler_2
//   and multiplexer -> communication FIFO -> hardware manager.
// Each CPU owns one group (a request and a response FIFO); NUM_CPUS sets how
// many groups exist, which is how the design scales with the CPU count. Both
// schedulers hand the path to one CPU for a whole message and follow the
// run-time policy input (round robin or fixed priority, CPU 0 highest).
// Flits for a CPU index with no group are dropped. This structure (two
// communication FIFO groups, four multiplexers, two schedulers, per-CPU FIFO
// groups, one virtualization module) follows the document; FIFO depths,
// message framing and the drop rule are this design's choices. A message
// arriving at the VMM must reach it with its flits contiguous, as a wormhole
// NoC delivers one packet. With no back-pressure a request flit takes three
// cycles from hm_req to lld_ins, and a response flit three cycles from
// lld_rsp to hm_rsp (plus the Ethernet buffer's store-and-forward time).
module io_vmm #(
  parameter vcdc_pkg::virt_kind_e KIND = vcdc_pkg::VIRT_ETH,
  parameter int NUM_CPUS       = 16,
  parameter int FIFO_DEPTH     = 4,
  parameter int ETH_BUF_WORDS  = 512,
  parameter int VGA_SECTION_OFFSET = 100,
  parameter int VGA_SECTIONS   = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  vcdc_pkg::sched_policy_e policy,
  // hardware manager side
  input  logic                    hm_req_valid,
  output logic                    hm_req_ready,
  input  vcdc_pkg::flit_t         hm_req,
  output logic                    hm_rsp_valid,
  input  logic                    hm_rsp_ready,
  output vcdc_pkg::flit_t         hm_rsp,
  // low layer I/O driver side
  output logic                    lld_ins_valid,
  input  logic                    lld_ins_ready,
  output vcdc_pkg::flit_t         lld_ins,
  input  logic                    lld_rsp_valid,
  output logic                    lld_rsp_ready,
  input  vcdc_pkg::flit_t         lld_rsp
);
  import vcdc_pkg::*;
  localparam int IW = $clog2(NUM_CPUS>1?NUM_CPUS:2);

  // ================= down path =================
  flit_t                d_head;
  logic                 d_head_valid, d_head_ready;
  logic [NUM_CPUS-1:0]  q_in_valid, q_in_ready, q_valid, q_ready;
  flit_t                q_data [NUM_CPUS];
  logic                 s1_valid, s1_xfer;
  logic [IW-1:0]        s1_idx;
  flit_t                v_din, v_dout;
  logic                 v_din_ready, v_dout_valid, v_dout_ready;

  sync_fifo #(.T(flit_t), .DEPTH(FIFO_DEPTH)) u_hm_in (
    .clk, .rst_n, .in_valid(hm_req_valid), .in_ready(hm_req_ready), .in_data(hm_req),
    .out_valid(d_head_valid), .out_ready(d_head_ready), .out_data(d_head));

  always_comb begin
    q_in_valid   = '0;
    d_head_ready = 1'b1;                      // unknown CPU: drop
    if (int'(d_head.cpu) < NUM_CPUS) begin
      q_in_valid[d_head.cpu[IW-1:0]] = d_head_valid;
      d_head_ready = q_in_ready[d_head.cpu[IW-1:0]];
    end
  end

  for (genvar c = 0; c < NUM_CPUS; c++) begin : g_reqq
    sync_fifo #(.T(flit_t), .DEPTH(FIFO_DEPTH)) u_q (
      .clk, .rst_n, .in_valid(q_in_valid[c]), .in_ready(q_in_ready[c]), .in_data(d_head),
      .out_valid(q_valid[c]), .out_ready(q_ready[c]), .out_data(q_data[c]));
  end

  sched #(.N(NUM_CPUS)) u_scheduler_1 (
    .clk, .rst_n, .policy, .req(q_valid), .xfer(s1_xfer), .xfer_last(v_din.last),
    .gnt_valid(s1_valid), .gnt_idx(s1_idx));

  assign v_din   = q_data[s1_idx];
  assign s1_xfer = s1_valid && v_din_ready;
  always_comb begin
    q_ready = '0;
    q_ready[s1_idx] = s1_xfer;
  end

  sync_fifo #(.T(flit_t), .DEPTH(FIFO_DEPTH)) u_lld_out (
    .clk, .rst_n, .in_valid(v_dout_valid), .in_ready(v_dout_ready), .in_data(v_dout),
    .out_valid(lld_ins_valid), .out_ready(lld_ins_ready), .out_data(lld_ins));

  // ================= up path =================
  flit_t                u_head, v_uout;
  logic                 u_head_valid, u_head_ready, v_uout_valid, v_uout_ready;
  logic [NUM_CPUS-1:0]  r_in_valid, r_in_ready, r_valid, r_ready;
  flit_t                r_data [NUM_CPUS];
  logic                 s2_valid, s2_xfer, hm_out_ready;
  logic [IW-1:0]        s2_idx;
  flit_t                s2_data;

  sync_fifo #(.T(flit_t), .DEPTH(FIFO_DEPTH)) u_lld_in (
    .clk, .rst_n, .in_valid(lld_rsp_valid), .in_ready(lld_rsp_ready), .in_data(lld_rsp),
    .out_valid(u_head_valid), .out_ready(u_head_ready), .out_data(u_head));

  always_comb begin
    r_in_valid   = '0;
    v_uout_ready = 1'b1;                      // unknown CPU: drop
    if (int'(v_uout.cpu) < NUM_CPUS) begin
      r_in_valid[v_uout.cpu[IW-1:0]] = v_uout_valid;
      v_uout_ready = r_in_ready[v_uout.cpu[IW-1:0]];
    end
  end

  for (genvar c = 0; c < NUM_CPUS; c++) begin : g_rspq
    sync_fifo #(.T(flit_t), .DEPTH(FIFO_DEPTH)) u_r (
      .clk, .rst_n, .in_valid(r_in_valid[c]), .in_ready(r_in_ready[c]), .in_data(v_uout),
      .out_valid(r_valid[c]), .out_ready(r_ready[c]), .out_data(r_data[c]));
  end

  sched #(.N(NUM_CPUS)) u_scheduler_2 (
    .clk, .rst_n, .policy, .req(r_valid), .xfer(s2_xfer), .xfer_last(s2_data.last),
    .gnt_valid(s2_valid), .gnt_idx(s2_idx));

  assign s2_data = r_data[s2_idx];
  assign s2_xfer = s2_valid && hm_out_ready;
  always_comb begin
    r_ready = '0;
    r_ready[s2_idx] = s2_xfer;
  end

  sync_fifo #(.T(flit_t), .DEPTH(FIFO_DEPTH)) u_hm_out (
    .clk, .rst_n, .in_valid(s2_valid), .in_ready(hm_out_ready), .in_data(s2_data),
    .out_valid(hm_rsp_valid), .out_ready(hm_rsp_ready), .out_data(hm_rsp));

  // ================= virtualization module =================
  if (KIND == VIRT_ETH) begin : g_eth
    virt_eth #(.BUF_WORDS(ETH_BUF_WORDS)) u_virt (
      .clk, .rst_n,
      .down_in_valid(s1_valid), .down_in_ready(v_din_ready), .down_in(v_din),
      .down_out_valid(v_dout_valid), .down_out_ready(v_dout_ready), .down_out(v_dout),
      .up_in_valid(u_head_valid), .up_in_ready(u_head_ready), .up_in(u_head),
      .up_out_valid(v_uout_valid), .up_out_ready(v_uout_ready), .up_out(v_uout));
  end else if (KIND == VIRT_FLASH) begin : g_flash
    virt_flash u_virt (
      .clk, .rst_n,
      .down_in_valid(s1_valid), .down_in_ready(v_din_ready), .down_in(v_din),
      .down_out_valid(v_dout_valid), .down_out_ready(v_dout_ready), .down_out(v_dout),
      .up_in_valid(u_head_valid), .up_in_ready(u_head_ready), .up_in(u_head),
      .up_out_valid(v_uout_valid), .up_out_ready(v_uout_ready), .up_out(v_uout));
  end else begin : g_vga
    virt_vga #(.SECTION_OFFSET(VGA_SECTION_OFFSET), .NUM_SECTIONS(VGA_SECTIONS)) u_virt (
      .clk, .rst_n,
      .down_in_valid(s1_valid), .down_in_ready(v_din_ready), .down_in(v_din),
      .down_out_valid(v_dout_valid), .down_out_ready(v_dout_ready), .down_out(v_dout),
      .up_in_valid(u_head_valid), .up_in_ready(u_head_ready), .up_in(u_head),
      .up_out_valid(v_uout_valid), .up_out_ready(v_uout_ready), .up_out(v_uout));
  end
endmodule
