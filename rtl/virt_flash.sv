// virt_flash: virtualization module of the SPI NOR-flash I/O VMM.
//
// A guest asks for a whole range at once: OP_FL_READ, start address, end
// address (inclusive). The module turns this one request into a series of
// INS_FL_RD instructions for the low layer driver, one per group of up to four
// bytes (header{final, n-1}, address), the last one marked final so that the
// driver closes the answer message. A one-byte write, OP_FL_WRITE, address,
// data, becomes one INS_FL_WR instruction with the same address and data.
// While a read is being split no new request is accepted. An end address
// below the start reads the single byte at the start. Answers from the driver
// already name their CPU and are forwarded unchanged; unknown requests are
// dropped whole. All CPUs share the flash; no address translation is done.
// The request form ("read SPI-Flash from the start address to the end
// address") follows the document; the instruction encoding and the 4-byte
// split (one answer flit per instruction) are this design's choices. One
// instruction flit leaves per cycle.
module virt_flash (
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

  typedef enum logic [2:0] {D_HDR, D_RD_START, D_RD_END, D_GEN_HDR, D_GEN_ADDR,
                            D_WR_PASS, D_DROP} dstate_e;
  dstate_e             ds;
  logic [CPU_ID_W-1:0] rcpu;
  logic [DEV_ID_W-1:0] rdev;
  logic [23:0]         cur;
  logic [24:0]         left;       // bytes still to request
  logic [1:0]          nm1;        // n-1 of the current instruction
  logic                fin;

  assign nm1 = (left >= 25'd4) ? 2'd3 : 2'(left - 25'd1);
  assign fin = (left <= 25'd4);

  always_comb begin
    down_in_ready  = 1'b0;
    down_out_valid = 1'b0;
    down_out       = down_in;
    unique case (ds)
      D_HDR: begin
        if (flit_op(down_in) == OP_FL_WRITE) begin
          down_out.data  = {INS_FL_WR, 24'd0};
          down_out_valid = down_in_valid;
          down_in_ready  = down_out_ready;
        end else begin
          down_in_ready = 1'b1;          // read header absorbed, others dropped
        end
      end
      D_RD_START, D_RD_END, D_DROP: down_in_ready = 1'b1;
      D_WR_PASS: begin
        down_out_valid = down_in_valid;
        down_in_ready  = down_out_ready;
      end
      D_GEN_HDR: begin
        down_out_valid = 1'b1;
        down_out       = '{cpu: rcpu, dev: rdev, last: 1'b0,
                           data: {INS_FL_RD, 7'd0, fin, 14'd0, nm1}};
      end
      D_GEN_ADDR: begin
        down_out_valid = 1'b1;
        down_out       = '{cpu: rcpu, dev: rdev, last: 1'b1, data: {8'd0, cur}};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ds        <= D_HDR;
      rcpu      <= '0;
      rdev      <= '0;
      cur       <= '0;
      left      <= '0;
    end else begin
      unique case (ds)
        D_HDR: if (down_in_valid && down_in_ready && !down_in.last) begin
          rcpu <= down_in.cpu;
          rdev <= down_in.dev;
          unique case (flit_op(down_in))
            OP_FL_READ:  ds <= D_RD_START;
            OP_FL_WRITE: ds <= D_WR_PASS;
            default:     ds <= D_DROP;
          endcase
        end
        D_RD_START: if (down_in_valid) begin
          cur <= down_in.data[23:0];
          ds  <= down_in.last ? D_HDR : D_RD_END;
        end
        D_RD_END: if (down_in_valid) begin
          left      <= (down_in.data[23:0] >= cur) ? 25'(down_in.data[23:0] - cur) + 25'd1 : 25'd1;
          ds        <= down_in.last ? D_GEN_HDR : D_DROP;
        end
        D_GEN_HDR:  if (down_out_ready) ds <= D_GEN_ADDR;
        D_GEN_ADDR: if (down_out_ready) begin
          cur  <= cur + 24'(nm1) + 24'd1;
          left <= left - 25'(nm1) - 25'd1;
          ds   <= fin ? D_HDR : D_GEN_HDR;
        end
        D_WR_PASS: if (down_in_valid && down_out_ready && down_in.last) ds <= D_HDR;
        D_DROP:    if (down_in_valid && down_in.last) ds <= D_HDR;
        default:   ds <= D_HDR;
      endcase
    end
  end

  assign up_out       = up_in;
  assign up_out_valid = up_in_valid;
  assign up_in_ready  = up_out_ready;
endmodule
