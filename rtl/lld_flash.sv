// lld_flash: low layer I/O driver of the SPI NOR-flash.
//
// Instructions from the flash I/O VMM enter an input FIFO; the opcode at its
// head selects one of two hardware driver functions, which drive the SPI
// controller (spi_master) inside this block:
//   INS_FL_RD{final, n-1}, addr   one READ (0x03) transaction: command, 24-bit
//                                  address, n data bytes (n = 1..4); answered
//                                  by one flit with the bytes packed from bit
//                                  31 down, last = final
//   INS_FL_WR, addr, data          WRITE ENABLE (0x06), PAGE PROGRAM (0x02)
//                                  of one byte, then READ STATUS (0x05) until
//                                  the write-in-progress bit clears; answered
//                                  by one RSP_FL_WRITE flit
// As in every low layer driver, the function state register is the mutex: no
// instruction leaves the FIFO while a function is running, so the flash sees
// the instructions in the order the VMM sent them. Answers carry the cpu and
// dev of their instruction and go through an output FIFO.
// The driver structure and its two functions (read data at an address, write
// one byte) follow the document; the instruction encoding, the SPI command
// sequence (standard SPI NOR commands) and the status polling are this
// design's choices. A 1-byte read costs one 40-bit SPI transaction.
module lld_flash #(
  parameter int FIFO_DEPTH = 4,
  parameter int SPI_HALF   = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ins_valid,
  output logic            ins_ready,
  input  vcdc_pkg::flit_t ins,
  output logic            rsp_valid,
  input  logic            rsp_ready,
  output vcdc_pkg::flit_t rsp,
  // SPI pins
  output logic            spi_sck,
  output logic            spi_cs_n,
  output logic            spi_mosi,
  input  logic            spi_miso
);
  import vcdc_pkg::*;

  typedef enum logic [3:0] {
    F_IDLE, F_SKIP, F_RD_ADDR, F_RD_SPI, F_WR_ADDR, F_WR_DATA,
    F_WREN, F_PP, F_RDSR, F_ANSWER
  } fstate_e;

  fstate_e             fs;
  flit_t               head;
  logic                head_valid, head_ready;
  logic [CPU_ID_W-1:0] icpu;
  logic [DEV_ID_W-1:0] idev;
  logic                final_q;
  logic [2:0]          nbytes;
  logic [23:0]         addr;
  logic [7:0]          wbyte;
  logic                spi_wait;     // transaction issued, waiting for done
  flit_t               ans;

  // SPI controller
  logic        spi_start, spi_busy, spi_done;
  logic [2:0]  spi_txb, spi_rxb;
  logic [39:0] spi_tx;
  logic [31:0] spi_rx;

  spi_master #(.HALF(SPI_HALF)) u_spi (
    .clk, .rst_n, .start(spi_start), .tx_bytes(spi_txb), .tx_data(spi_tx),
    .rx_bytes(spi_rxb), .busy(spi_busy), .done(spi_done), .rx_data(spi_rx),
    .sck(spi_sck), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso));

  sync_fifo #(.T(flit_t), .DEPTH(FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n, .in_valid(ins_valid), .in_ready(ins_ready), .in_data(ins),
    .out_valid(head_valid), .out_ready(head_ready), .out_data(head));

  assign head_ready = (fs == F_IDLE) || (fs == F_SKIP) || (fs == F_RD_ADDR)
                   || (fs == F_WR_ADDR) || (fs == F_WR_DATA);

  // transaction issued by the current function
  always_comb begin
    spi_start = (fs inside {F_RD_SPI, F_WREN, F_PP, F_RDSR}) && !spi_wait && !spi_busy;
    spi_txb   = 3'd1;
    spi_rxb   = 3'd0;
    spi_tx    = '0;
    unique case (fs)
      F_RD_SPI: begin spi_txb = 3'd4; spi_rxb = nbytes; spi_tx = {FL_CMD_READ, addr, 8'h00}; end
      F_WREN:   spi_tx = {FL_CMD_WREN, 32'h0};
      F_PP:     begin spi_txb = 3'd5; spi_tx = {FL_CMD_PP, addr, wbyte}; end
      F_RDSR:   begin spi_rxb = 3'd1; spi_tx = {FL_CMD_RDSR, 32'h0}; end
      default: ;
    endcase
  end

  logic ans_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fs       <= F_IDLE;
      icpu     <= '0;
      idev     <= '0;
      final_q  <= 1'b0;
      nbytes   <= 3'd1;
      addr     <= '0;
      wbyte    <= '0;
      spi_wait <= 1'b0;
      ans      <= '0;
    end else begin
      if (spi_start) spi_wait <= 1'b1;
      if (spi_done)  spi_wait <= 1'b0;
      unique case (fs)
        F_IDLE: if (head_valid) begin
          icpu <= head.cpu;
          idev <= head.dev;
          if (!head.last) begin
            unique case (flit_op(head))
              INS_FL_RD: begin
                fs      <= F_RD_ADDR;
                final_q <= head.data[16];
                nbytes  <= 3'(head.data[1:0]) + 3'd1;
              end
              INS_FL_WR: fs <= F_WR_ADDR;
              default:   fs <= F_SKIP;
            endcase
          end
        end
        F_SKIP: if (head_valid && head.last) fs <= F_IDLE;
        F_RD_ADDR: if (head_valid) begin
          addr <= head.data[23:0];
          fs   <= head.last ? F_RD_SPI : F_SKIP;
        end
        F_RD_SPI: if (spi_done) begin
          ans      <= '0;
          ans.cpu  <= icpu;
          ans.dev  <= idev;
          ans.last <= final_q;
          ans.data <= spi_rx << (8 * (4 - int'(nbytes)));
          fs       <= F_ANSWER;
        end
        F_WR_ADDR: if (head_valid) begin
          addr <= head.data[23:0];
          fs   <= head.last ? F_IDLE : F_WR_DATA;
        end
        F_WR_DATA: if (head_valid) begin
          wbyte <= head.data[7:0];
          fs    <= head.last ? F_WREN : F_SKIP;
        end
        F_WREN: if (spi_done) fs <= F_PP;
        F_PP:   if (spi_done) fs <= F_RDSR;
        F_RDSR: if (spi_done && !spi_rx[0]) begin     // write finished
          ans      <= '0;
          ans.cpu  <= icpu;
          ans.dev  <= idev;
          ans.last <= 1'b1;
          ans.data <= {RSP_FL_WRITE, 24'd0};
          fs       <= F_ANSWER;
        end
        F_ANSWER: if (ans_ready) fs <= F_IDLE;
        default: fs <= F_IDLE;
      endcase
    end
  end

  sync_fifo #(.T(flit_t), .DEPTH(FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n, .in_valid(fs == F_ANSWER), .in_ready(ans_ready), .in_data(ans),
    .out_valid(rsp_valid), .out_ready(rsp_ready), .out_data(rsp));
endmodule
