// lld_eth: low layer I/O driver of the Ethernet subsystem.
//
// Instructions from the Ethernet I/O VMM enter an input FIFO. The opcode of
// the message at its head is the control signal that selects one of three
// hardware driver functions:
//   OP_ETH_CTRL_WR  AXI-Lite write to the TEMAC (address flit, data flit),
//                   answered with RSP_ETH_CTRL_WR{bresp}
//   OP_ETH_CTRL_RD  AXI-Lite read from the TEMAC (address flit),
//                   answered with RSP_ETH_CTRL_RD{rresp} and the read word
//   OP_ETH_TX       the frame words go out on the AXI-Stream TX port to the
//                   AXI Ethernet buffer; tkeep of the final word follows the
//                   byte length in the header; no answer
// The function state register acts as the mutex: while one function is
// running no further instruction leaves the FIFO, so instructions reach the
// controller in the order the VMM sent them. Frames arriving on the AXI-Stream
// RX port are packed as header RSP_ETH_RX, frame words, trailer{byte count}
// and share the output FIFO with the control answers; a frame in progress
// keeps the output FIFO until its trailer. Responses carry the cpu and dev of
// the instruction that caused them; received frames carry dev = DEV_ID and
// cpu = 0 (the VMM finds the CPU from the destination IP).
// The FIFO / function-select / mutex / output-FIFO structure follows the
// document; the opcodes, AXI widths and the framing are this design's choices.
// An AXI-Lite access costs its handshakes plus one cycle to leave the FIFO;
// a TX frame streams at one word per cycle.
module lld_eth #(
  parameter int FIFO_DEPTH = 4,
  parameter int DEV_ID     = 0
) (
  input  logic            clk,
  input  logic            rst_n,
  // from / to the I/O VMM
  input  logic            ins_valid,
  output logic            ins_ready,
  input  vcdc_pkg::flit_t ins,
  output logic            rsp_valid,
  input  logic            rsp_ready,
  output vcdc_pkg::flit_t rsp,
  // AXI-Lite master to the TEMAC
  output logic            awvalid,
  input  logic            awready,
  output logic [31:0]     awaddr,
  output logic            wvalid,
  input  logic            wready,
  output logic [31:0]     wdata,
  output logic [3:0]      wstrb,
  input  logic            bvalid,
  output logic            bready,
  input  logic [1:0]      bresp,
  output logic            arvalid,
  input  logic            arready,
  output logic [31:0]     araddr,
  input  logic            rvalid,
  output logic            rready,
  input  logic [31:0]     rdata,
  input  logic [1:0]      rresp,
  // AXI-Stream to / from the AXI Ethernet buffer
  output logic            tx_tvalid,
  input  logic            tx_tready,
  output logic [31:0]     tx_tdata,
  output logic [3:0]      tx_tkeep,
  output logic            tx_tlast,
  input  logic            rx_tvalid,
  output logic            rx_tready,
  input  logic [31:0]     rx_tdata,
  input  logic [3:0]      rx_tkeep,
  input  logic            rx_tlast
);
  import vcdc_pkg::*;

  // ---------------- instruction side ----------------
  typedef enum logic [3:0] {
    F_IDLE, F_SKIP, F_WR_ADDR, F_WR_DATA, F_WR_BUS, F_WR_RESP,
    F_RD_ADDR, F_RD_BUS, F_RD_RESP_H, F_RD_RESP_D, F_TX
  } fstate_e;

  fstate_e             fs;
  flit_t               head;
  logic                head_valid, head_ready;
  logic [CPU_ID_W-1:0] icpu;
  logic [DEV_ID_W-1:0] idev;
  logic                aw_done, w_done;
  logic [1:0]          resp_code;
  logic [31:0]         rd_word;
  logic [15:0]         tx_left;     // bytes of the frame not yet sent

  // response mux into the output FIFO
  logic                o_valid, o_ready;
  flit_t               o_data;
  logic                ctl_valid;   // control answer wants the output FIFO
  flit_t               ctl_data;
  logic                rx_own;      // RX frame owns the output FIFO
  logic                rx_valid_o;
  flit_t               rx_data_o;

  sync_fifo #(.T(flit_t), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n, .in_valid(ins_valid), .in_ready(ins_ready), .in_data(ins),
    .out_valid(head_valid), .out_ready(head_ready), .out_data(head));

  always_comb begin
    head_ready = 1'b0;
    unique case (fs)
      F_IDLE, F_SKIP, F_WR_ADDR, F_WR_DATA, F_RD_ADDR: head_ready = 1'b1;
      F_TX:    head_ready = tx_tready;
      default: head_ready = 1'b0;
    endcase
  end

  assign tx_tvalid = (fs == F_TX) && head_valid;
  assign tx_tdata  = head.data;
  assign tx_tlast  = head.last;
  assign tx_tkeep  = (tx_left >= 16'd4) ? 4'b1111 :
                     (tx_left == 16'd3) ? 4'b1110 :
                     (tx_left == 16'd2) ? 4'b1100 :
                     (tx_left == 16'd1) ? 4'b1000 : 4'b1111;

  assign awvalid = (fs == F_WR_BUS) && !aw_done;
  assign wvalid  = (fs == F_WR_BUS) && !w_done;
  assign wstrb   = 4'b1111;
  assign bready  = (fs == F_WR_BUS) && aw_done && w_done;
  assign arvalid = (fs == F_RD_BUS) && !aw_done;
  assign rready  = (fs == F_RD_BUS) && aw_done;

  always_comb begin
    ctl_valid     = 1'b0;
    ctl_data      = '0;
    ctl_data.cpu  = icpu;
    ctl_data.dev  = idev;
    unique case (fs)
      F_WR_RESP:   begin ctl_valid = 1'b1; ctl_data.last = 1'b1;
                         ctl_data.data = {RSP_ETH_CTRL_WR, 22'd0, resp_code}; end
      F_RD_RESP_H: begin ctl_valid = 1'b1;
                         ctl_data.data = {RSP_ETH_CTRL_RD, 22'd0, resp_code}; end
      F_RD_RESP_D: begin ctl_valid = 1'b1; ctl_data.last = 1'b1;
                         ctl_data.data = rd_word; end
      default: ;
    endcase
  end

  logic ctl_take;
  assign ctl_take = ctl_valid && !rx_own && o_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fs        <= F_IDLE;
      icpu      <= '0;
      idev      <= '0;
      aw_done   <= 1'b0;
      w_done    <= 1'b0;
      resp_code <= '0;
      rd_word   <= '0;
      awaddr    <= '0;
      wdata     <= '0;
      araddr    <= '0;
      tx_left   <= '0;
    end else begin
      unique case (fs)
        F_IDLE: if (head_valid) begin
          icpu <= head.cpu;
          idev <= head.dev;
          if (!head.last) begin
            unique case (flit_op(head))
              OP_ETH_CTRL_WR: fs <= F_WR_ADDR;
              OP_ETH_CTRL_RD: fs <= F_RD_ADDR;
              OP_ETH_TX: begin fs <= F_TX; tx_left <= head.data[15:0]; end
              default:        fs <= F_SKIP;
            endcase
          end
        end
        F_SKIP:    if (head_valid && head.last) fs <= F_IDLE;
        F_WR_ADDR: if (head_valid) begin
          awaddr <= head.data;
          fs     <= head.last ? F_IDLE : F_WR_DATA;
        end
        F_WR_DATA: if (head_valid) begin
          wdata   <= head.data;
          aw_done <= 1'b0;
          w_done  <= 1'b0;
          fs      <= head.last ? F_WR_BUS : F_SKIP;
        end
        F_WR_BUS: begin
          if (awvalid && awready) aw_done <= 1'b1;
          if (wvalid && wready)   w_done  <= 1'b1;
          if (bvalid && bready) begin
            resp_code <= bresp;
            fs        <= F_WR_RESP;
          end
        end
        F_WR_RESP: if (ctl_take) fs <= F_IDLE;
        F_RD_ADDR: if (head_valid) begin
          araddr  <= head.data;
          aw_done <= 1'b0;
          fs      <= head.last ? F_RD_BUS : F_SKIP;
        end
        F_RD_BUS: begin
          if (arvalid && arready) aw_done <= 1'b1;
          if (rvalid && rready) begin
            resp_code <= rresp;
            rd_word   <= rdata;
            fs        <= F_RD_RESP_H;
          end
        end
        F_RD_RESP_H: if (ctl_take) fs <= F_RD_RESP_D;
        F_RD_RESP_D: if (ctl_take) fs <= F_IDLE;
        F_TX: if (head_valid && tx_tready) begin
          tx_left <= (tx_left >= 16'd4) ? tx_left - 16'd4 : 16'd0;
          if (head.last) fs <= F_IDLE;
        end
        default: fs <= F_IDLE;
      endcase
    end
  end

  // ---------------- receive side ----------------
  typedef enum logic [1:0] {R_IDLE, R_HDR, R_DATA, R_TRL} rstate_e;
  rstate_e     rs;
  logic [15:0] rx_bytes;

  function automatic logic [2:0] keep_bytes(input logic [3:0] k);
    return 3'(k[0]) + 3'(k[1]) + 3'(k[2]) + 3'(k[3]);
  endfunction

  assign rx_own = (rs != R_IDLE);

  always_comb begin
    rx_valid_o     = 1'b0;
    rx_data_o      = '0;
    rx_data_o.dev  = DEV_ID_W'(DEV_ID);
    rx_tready      = 1'b0;
    unique case (rs)
      R_HDR:  begin rx_valid_o = 1'b1; rx_data_o.data = {RSP_ETH_RX, 24'd0}; end
      R_DATA: begin rx_valid_o = rx_tvalid; rx_data_o.data = rx_tdata; rx_tready = o_ready; end
      R_TRL:  begin rx_valid_o = 1'b1; rx_data_o.last = 1'b1;
                    rx_data_o.data = {16'd0, rx_bytes}; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs       <= R_IDLE;
      rx_bytes <= '0;
    end else begin
      unique case (rs)
        // a frame may start only when no control answer is waiting
        R_IDLE: if (rx_tvalid && !ctl_valid) begin rs <= R_HDR; rx_bytes <= '0; end
        R_HDR:  if (o_ready) rs <= R_DATA;
        R_DATA: if (rx_tvalid && o_ready) begin
          rx_bytes <= rx_bytes + 16'(keep_bytes(rx_tkeep));
          if (rx_tlast) rs <= R_TRL;
        end
        R_TRL:  if (o_ready) rs <= R_IDLE;
        default: rs <= R_IDLE;
      endcase
    end
  end

  // ---------------- output FIFO ----------------
  assign o_valid = rx_own ? rx_valid_o : ctl_valid;
  assign o_data  = rx_own ? rx_data_o  : ctl_data;

  sync_fifo #(.T(flit_t), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n, .in_valid(o_valid), .in_ready(o_ready), .in_data(o_data),
    .out_valid(rsp_valid), .out_ready(rsp_ready), .out_data(rsp));
endmodule
