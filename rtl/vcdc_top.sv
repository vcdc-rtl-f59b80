// vcdc_top: the Virtualized Complicated Device Controller.
//
// The VCDC moves the virtual machine monitor and the low level I/O drivers of
// a many-core system into hardware. Guest VMs send short high level requests
// over the NoC; the VCDC turns each into I/O instructions for a physical
// device, shares the device among all CPUs, and returns the answers to the
// CPU that asked. This top holds:
//   hw_manager           NoC side: routes requests by their dev field to an
//                        I/O VMM, merges the VMMs' responses round robin
//   io_vmm (Ethernet)    dev DEV_ETH, per-CPU FIFOs, Scheduler_1/2, Ethernet
//                        virtualization (source IP byte = CPU id, received
//                        frames returned by destination IP)
//   lld_eth              Ethernet low layer driver: AXI-Lite to the TEMAC,
//                        AXI-Stream to and from the AXI Ethernet buffer
//   io_vmm (VGA)         dev DEV_VGA, per-CPU FIFOs, VGA virtualization (each
//                        VM's picture lands in its own section of the screen)
//   io_vmm (SPI flash)   dev DEV_FLASH, per-CPU FIFOs, flash virtualization
//                        (a range read is split into 4-byte instructions)
//   lld_flash            flash low layer driver with its SPI controller
// The VGA low layer driver and controller, the Ethernet subsystem, the flash
// chip, the memory access module and the timing-accurate GPIO controller are
// outside this RTL. The first three connect to the VGA instruction stream,
// the AXI buses and the SPI pins; the last two have no ports here. The global scheduling policy of the VMMs' schedulers is the
// input policy (round robin or fixed priority, CPU 0 highest).
// Ports are valid/ready streams of vcdc_pkg::flit_t. The structure follows
// the document; message formats, FIFO depths and bus widths are this design's
// own choices (see vcdc_pkg).
module vcdc_top #(
  parameter int NUM_CPUS      = 16,
  parameter int FIFO_DEPTH    = 4,
  parameter int ETH_BUF_WORDS = 512,
  parameter int SPI_HALF      = 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  vcdc_pkg::sched_policy_e policy,
  // NoC
  input  logic                    noc_in_valid,
  output logic                    noc_in_ready,
  input  vcdc_pkg::flit_t         noc_in,
  output logic                    noc_out_valid,
  input  logic                    noc_out_ready,
  output vcdc_pkg::flit_t         noc_out,
  // AXI-Lite master to the TEMAC
  output logic                    eth_awvalid,
  input  logic                    eth_awready,
  output logic [31:0]             eth_awaddr,
  output logic                    eth_wvalid,
  input  logic                    eth_wready,
  output logic [31:0]             eth_wdata,
  output logic [3:0]              eth_wstrb,
  input  logic                    eth_bvalid,
  output logic                    eth_bready,
  input  logic [1:0]              eth_bresp,
  output logic                    eth_arvalid,
  input  logic                    eth_arready,
  output logic [31:0]             eth_araddr,
  input  logic                    eth_rvalid,
  output logic                    eth_rready,
  input  logic [31:0]             eth_rdata,
  input  logic [1:0]              eth_rresp,
  // AXI-Stream to / from the AXI Ethernet buffer
  output logic                    eth_tx_tvalid,
  input  logic                    eth_tx_tready,
  output logic [31:0]             eth_tx_tdata,
  output logic [3:0]              eth_tx_tkeep,
  output logic                    eth_tx_tlast,
  input  logic                    eth_rx_tvalid,
  output logic                    eth_rx_tready,
  input  logic [31:0]             eth_rx_tdata,
  input  logic [3:0]              eth_rx_tkeep,
  input  logic                    eth_rx_tlast,
  // VGA low layer driver
  output logic                    vga_ins_valid,
  input  logic                    vga_ins_ready,
  output vcdc_pkg::flit_t         vga_ins,
  input  logic                    vga_rsp_valid,
  output logic                    vga_rsp_ready,
  input  vcdc_pkg::flit_t         vga_rsp,
  // SPI flash
  output logic                    spi_sck,
  output logic                    spi_cs_n,
  output logic                    spi_mosi,
  input  logic                    spi_miso
);
  import vcdc_pkg::*;

  logic [NUM_DEV-1:0] req_valid, req_ready, rsp_valid, rsp_ready;
  flit_t              req [NUM_DEV];
  flit_t              rsp [NUM_DEV];

  logic  eth_ins_valid, eth_ins_ready, eth_lrsp_valid, eth_lrsp_ready;
  flit_t eth_ins, eth_lrsp;
  logic  fl_ins_valid, fl_ins_ready, fl_lrsp_valid, fl_lrsp_ready;
  flit_t fl_ins, fl_lrsp;

  hw_manager #(.NUM_VMM(NUM_DEV), .FIFO_DEPTH(FIFO_DEPTH)) u_hw_manager (
    .clk, .rst_n,
    .noc_in_valid, .noc_in_ready, .noc_in,
    .noc_out_valid, .noc_out_ready, .noc_out,
    .vmm_req_valid(req_valid), .vmm_req_ready(req_ready), .vmm_req(req),
    .vmm_rsp_valid(rsp_valid), .vmm_rsp_ready(rsp_ready), .vmm_rsp(rsp));

  io_vmm #(.KIND(VIRT_ETH), .NUM_CPUS(NUM_CPUS), .FIFO_DEPTH(FIFO_DEPTH),
           .ETH_BUF_WORDS(ETH_BUF_WORDS)) u_vmm_eth (
    .clk, .rst_n, .policy,
    .hm_req_valid(req_valid[DEV_ETH]), .hm_req_ready(req_ready[DEV_ETH]), .hm_req(req[DEV_ETH]),
    .hm_rsp_valid(rsp_valid[DEV_ETH]), .hm_rsp_ready(rsp_ready[DEV_ETH]), .hm_rsp(rsp[DEV_ETH]),
    .lld_ins_valid(eth_ins_valid), .lld_ins_ready(eth_ins_ready), .lld_ins(eth_ins),
    .lld_rsp_valid(eth_lrsp_valid), .lld_rsp_ready(eth_lrsp_ready), .lld_rsp(eth_lrsp));

  lld_eth #(.FIFO_DEPTH(FIFO_DEPTH), .DEV_ID(DEV_ETH)) u_lld_eth (
    .clk, .rst_n,
    .ins_valid(eth_ins_valid), .ins_ready(eth_ins_ready), .ins(eth_ins),
    .rsp_valid(eth_lrsp_valid), .rsp_ready(eth_lrsp_ready), .rsp(eth_lrsp),
    .awvalid(eth_awvalid), .awready(eth_awready), .awaddr(eth_awaddr),
    .wvalid(eth_wvalid), .wready(eth_wready), .wdata(eth_wdata), .wstrb(eth_wstrb),
    .bvalid(eth_bvalid), .bready(eth_bready), .bresp(eth_bresp),
    .arvalid(eth_arvalid), .arready(eth_arready), .araddr(eth_araddr),
    .rvalid(eth_rvalid), .rready(eth_rready), .rdata(eth_rdata), .rresp(eth_rresp),
    .tx_tvalid(eth_tx_tvalid), .tx_tready(eth_tx_tready), .tx_tdata(eth_tx_tdata),
    .tx_tkeep(eth_tx_tkeep), .tx_tlast(eth_tx_tlast),
    .rx_tvalid(eth_rx_tvalid), .rx_tready(eth_rx_tready), .rx_tdata(eth_rx_tdata),
    .rx_tkeep(eth_rx_tkeep), .rx_tlast(eth_rx_tlast));

  io_vmm #(.KIND(VIRT_VGA), .NUM_CPUS(NUM_CPUS), .FIFO_DEPTH(FIFO_DEPTH)) u_vmm_vga (
    .clk, .rst_n, .policy,
    .hm_req_valid(req_valid[DEV_VGA]), .hm_req_ready(req_ready[DEV_VGA]), .hm_req(req[DEV_VGA]),
    .hm_rsp_valid(rsp_valid[DEV_VGA]), .hm_rsp_ready(rsp_ready[DEV_VGA]), .hm_rsp(rsp[DEV_VGA]),
    .lld_ins_valid(vga_ins_valid), .lld_ins_ready(vga_ins_ready), .lld_ins(vga_ins),
    .lld_rsp_valid(vga_rsp_valid), .lld_rsp_ready(vga_rsp_ready), .lld_rsp(vga_rsp));

  io_vmm #(.KIND(VIRT_FLASH), .NUM_CPUS(NUM_CPUS), .FIFO_DEPTH(FIFO_DEPTH)) u_vmm_flash (
    .clk, .rst_n, .policy,
    .hm_req_valid(req_valid[DEV_FLASH]), .hm_req_ready(req_ready[DEV_FLASH]), .hm_req(req[DEV_FLASH]),
    .hm_rsp_valid(rsp_valid[DEV_FLASH]), .hm_rsp_ready(rsp_ready[DEV_FLASH]), .hm_rsp(rsp[DEV_FLASH]),
    .lld_ins_valid(fl_ins_valid), .lld_ins_ready(fl_ins_ready), .lld_ins(fl_ins),
    .lld_rsp_valid(fl_lrsp_valid), .lld_rsp_ready(fl_lrsp_ready), .lld_rsp(fl_lrsp));

  lld_flash #(.FIFO_DEPTH(FIFO_DEPTH), .SPI_HALF(SPI_HALF)) u_lld_flash (
    .clk, .rst_n,
    .ins_valid(fl_ins_valid), .ins_ready(fl_ins_ready), .ins(fl_ins),
    .rsp_valid(fl_lrsp_valid), .rsp_ready(fl_lrsp_ready), .rsp(fl_lrsp),
    .spi_sck, .spi_cs_n, .spi_mosi, .spi_miso);
endmodule
