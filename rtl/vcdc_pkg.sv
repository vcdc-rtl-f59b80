// vcdc_pkg: types and constants shared by the VCDC blocks.
//
// Every message that crosses the VCDC (request from a CPU, I/O instruction to a
// low layer driver, response back to a CPU) is a sequence of flits. A flit is
// one 32-bit word, the width of an on-chip packet of the NoC the VCDC attaches
// to, plus sideband fields that name the CPU it belongs to, the I/O VMM it is
// addressed to, and whether it ends the message. The 32-bit word width follows
// the document; the sideband fields, their widths and the opcodes below are
// this design's own choices.
//
// Ethernet frames travel as 32-bit words with the first byte of the frame in
// bits [31:24]. With a 14-byte Ethernet header and a 20-byte IPv4 header the
// last byte of the source IP address is frame byte 29 (word 7, bits [23:16])
// and the last byte of the destination IP address is frame byte 33 (word 8,
// bits [23:16]).
package vcdc_pkg;

  localparam int DATA_W   = 32;  // NoC packet width
  localparam int CPU_ID_W = 8;   // CPU id, also the last byte of a virtual IP
  localparam int DEV_ID_W = 4;   // I/O VMM index at the hardware manager

  typedef struct packed {
    logic [CPU_ID_W-1:0] cpu;   // source CPU of a request, destination of a response
    logic [DEV_ID_W-1:0] dev;   // I/O VMM the message belongs to
    logic                last;  // final flit of the message
    logic [DATA_W-1:0]   data;
  } flit_t;

  // I/O VMM index (dev field) of each device in vcdc_top.
  localparam int                  DEV_ETH = 0;
  localparam int                  DEV_VGA = 1;
  localparam int                  DEV_FLASH = 2;
  localparam int                  NUM_DEV = 3;

  // Global scheduling policy of an arbiter.
  typedef enum logic [0:0] {
    SCHED_RR = 1'b0,  // round robin
    SCHED_FP = 1'b1   // fixed priority, index 0 highest
  } sched_policy_e;

  // Which virtualization module an I/O VMM instance carries.
  typedef enum logic [1:0] {
    VIRT_ETH = 2'd0,
    VIRT_VGA = 2'd1,
    VIRT_FLASH = 2'd2
  } virt_kind_e;

  // Ethernet messages: opcode in bits [31:24] of the first flit.
  // Requests / instructions (CPU -> Ethernet I/O VMM -> low layer driver)
  localparam logic [7:0] OP_ETH_CTRL_WR  = 8'h01; // flits: hdr, addr, wdata
  localparam logic [7:0] OP_ETH_CTRL_RD  = 8'h02; // flits: hdr, addr
  localparam logic [7:0] OP_ETH_TX       = 8'h10; // flits: hdr{len[15:0]}, frame words
  // Responses (low layer driver -> Ethernet I/O VMM -> CPU)
  localparam logic [7:0] RSP_ETH_CTRL_WR = 8'h81; // flits: hdr{bresp[1:0]}
  localparam logic [7:0] RSP_ETH_CTRL_RD = 8'h82; // flits: hdr{rresp[1:0]}, rdata
  localparam logic [7:0] RSP_ETH_RX      = 8'h90; // to CPU: hdr{len}, frame words
                                                   // from driver: hdr, words, trailer{len}

  // SPI NOR-flash messages.
  // Requests (CPU -> flash I/O VMM)
  localparam logic [7:0] OP_FL_READ   = 8'h20; // flits: hdr, start addr, end addr (inclusive)
  localparam logic [7:0] OP_FL_WRITE  = 8'h21; // flits: hdr, addr, data byte
  // Instructions (flash I/O VMM -> flash low layer driver)
  localparam logic [7:0] INS_FL_RD    = 8'h30; // flits: hdr{final[16], n-1[1:0]}, addr
  localparam logic [7:0] INS_FL_WR    = 8'h31; // flits: hdr, addr, data byte
  // Responses (driver -> CPU): read data flits carry up to four bytes, first
  // byte in bits [31:24]; a write is answered by one RSP_FL_WRITE flit.
  localparam logic [7:0] RSP_FL_WRITE = 8'hA1;
  // Flash commands used by the driver (standard SPI NOR command set)
  localparam logic [7:0] FL_CMD_READ  = 8'h03;
  localparam logic [7:0] FL_CMD_PP    = 8'h02;
  localparam logic [7:0] FL_CMD_WREN  = 8'h06;
  localparam logic [7:0] FL_CMD_RDSR  = 8'h05;

  localparam int ETH_SRC_IP_WORD = 7;  // frame word holding source IP byte 3
  localparam int ETH_DST_IP_WORD = 8;  // frame word holding destination IP byte 3

  function automatic logic [7:0] flit_op(input flit_t f);
    return f.data[31:24];
  endfunction

endpackage
