// virt_eth: virtualization module of the Ethernet I/O VMM.
//
// Down part (requests from the dedicated CPU FIFOs, already one whole message
// at a time): the opcode in the first flit tells a control operation
// (OP_ETH_CTRL_WR / OP_ETH_CTRL_RD, for the TEMAC over AXI-Lite) from an
// Ethernet packet (OP_ETH_TX, for the AXI Ethernet buffer over AXI-Stream).
// Both go on to the low layer driver, which steers them by the same opcode.
// In a packet, the word that holds the last byte of the source IP address has
// that byte replaced by the CPU id, i.e. source IP = (IP & 0xFFFFFF00) | CPU_ID,
// so each CPU appears on the network with its own address. The path is
// combinational. The IPv4 header checksum is not recomputed.
//
// Up part: responses to control reads/writes carry their CPU already and are
// forwarded as they are. A received frame (RSP_ETH_RX: header, frame words,
// trailer with the byte count) is stored in the Ethernet buffer until it has
// arrived whole; then it is sent out as header{RSP_ETH_RX, length} plus the
// frame words, addressed to the CPU named by the last byte of its destination
// IP address. Frames longer than BUF_WORDS words lose their excess words.
//
// The two parts, the IP rewrite rule and the store-and-forward of whole frames
// follow the document; message formats, word positions (IPv4 without options)
// and the buffer size are this design's choices. Emission starts the cycle
// after the trailer is taken and moves one flit per cycle.
module virt_eth #(
  parameter int BUF_WORDS = 512     // 2 KB, holds a 1518-byte frame
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            down_in_valid,
  output logic            down_in_ready,
  input  vcdc_pkg::flit_t down_in,
  output logic            down_out_valid,
  input  logic            down_out_ready,
  output vcdc_pkg::flit_t down_out,
  input  logic            up_in_valid,
  output logic            up_in_ready,
  input  vcdc_pkg::flit_t up_in,
  output logic            up_out_valid,
  input  logic            up_out_ready,
  output vcdc_pkg::flit_t up_out
);
  import vcdc_pkg::*;
  localparam int BW = $clog2(BUF_WORDS);

  // ---------------- down part ----------------
  logic [9:0] didx;      // flit index in the current request (saturates)
  logic [7:0] dop;       // opcode of the current request
  logic [7:0] cur_op;

  assign cur_op = (didx == '0) ? flit_op(down_in) : dop;

  always_comb begin
    down_out = down_in;
    if (cur_op == OP_ETH_TX && didx == 10'(1 + ETH_SRC_IP_WORD))
      down_out.data = (down_in.data & 32'hFF00_FFFF) | {8'h00, down_in.cpu, 16'h0000};
    down_out_valid = down_in_valid;
    down_in_ready  = down_out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      didx <= '0;
      dop  <= '0;
    end else if (down_in_valid && down_out_ready) begin
      if (didx == '0) dop <= flit_op(down_in);
      if (down_in.last)        didx <= '0;
      else if (didx != '1)     didx <= didx + 10'd1;
    end
  end

  // ---------------- up part ----------------
  typedef enum logic [2:0] {U_IDLE, U_FWD, U_CAP, U_HDR, U_EMIT} ustate_e;
  ustate_e               us;
  logic [DATA_W-1:0]     ebuf [BUF_WORDS];
  logic [BW:0]           wcnt, rcnt;
  logic [15:0]           len;
  logic [CPU_ID_W-1:0]   dst;
  logic [DEV_ID_W-1:0]   udev;
  logic                  up_take;

  assign up_take = up_in_valid && up_in_ready;

  always_comb begin
    up_in_ready  = 1'b0;
    up_out_valid = 1'b0;
    up_out       = up_in;
    unique case (us)
      U_IDLE: begin
        // an RX header is absorbed here; anything else is forwarded
        if (flit_op(up_in) == RSP_ETH_RX) begin
          up_in_ready = 1'b1;
        end else begin
          up_out_valid = up_in_valid;
          up_in_ready  = up_out_ready;
        end
      end
      U_FWD: begin
        up_out_valid = up_in_valid;
        up_in_ready  = up_out_ready;
      end
      U_CAP: up_in_ready = 1'b1;
      U_HDR: begin
        up_out_valid = 1'b1;
        up_out.cpu   = dst;
        up_out.dev   = udev;
        up_out.last  = (wcnt == '0);
        up_out.data  = {RSP_ETH_RX, 8'h00, len};
      end
      U_EMIT: begin
        up_out_valid = 1'b1;
        up_out.cpu   = dst;
        up_out.dev   = udev;
        up_out.last  = (rcnt == wcnt - 1'b1);
        up_out.data  = ebuf[rcnt[BW-1:0]];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      us   <= U_IDLE;
      wcnt <= '0;
      rcnt <= '0;
      len  <= '0;
      dst  <= '0;
      udev <= '0;
    end else begin
      unique case (us)
        U_IDLE: if (up_in_valid) begin
          if (flit_op(up_in) == RSP_ETH_RX) begin
            us   <= U_CAP;
            wcnt <= '0;
            udev <= up_in.dev;
          end else if (up_out_ready && !up_in.last) begin
            us <= U_FWD;
          end
        end
        U_FWD: if (up_take && up_in.last) us <= U_IDLE;
        U_CAP: if (up_take) begin
          if (up_in.last) begin        // trailer: whole frame is in
            len  <= up_in.data[15:0];
            us   <= U_HDR;
          end else if (wcnt != (BW+1)'(BUF_WORDS)) begin
            if (wcnt == (BW+1)'(ETH_DST_IP_WORD)) dst <= up_in.data[23:16];
            wcnt <= wcnt + 1'b1;
          end
        end
        U_HDR: if (up_out_ready) begin
          rcnt <= '0;
          us   <= (wcnt == '0) ? U_IDLE : U_EMIT;
        end
        U_EMIT: if (up_out_ready) begin
          rcnt <= rcnt + 1'b1;
          if (rcnt == wcnt - 1'b1) us <= U_IDLE;
        end
        default: us <= U_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (us == U_CAP && up_take && !up_in.last && wcnt != (BW+1)'(BUF_WORDS))
      ebuf[wcnt[BW-1:0]] <= up_in.data;
  end
endmodule
