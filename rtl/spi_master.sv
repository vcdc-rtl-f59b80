// spi_master: SPI controller of the flash path (mode 0, one chip select).
//
// One transaction sends tx_bytes bytes from tx_data (first byte in bits
// [39:32]) and then clocks in rx_bytes bytes (0..4), all with cs_n held low.
// MOSI changes while SCK is low and MISO is sampled on the rising SCK edge.
// SCK runs at clk / (2*HALF). rx_data holds the received bytes right aligned
// (last byte in [7:0]); done pulses for one cycle when cs_n has gone high
// again. A transaction of B bytes takes 2*HALF*8*B + 2 cycles. The document
// names an SPI controller for the S25FL128S NOR flash but not its design;
// mode 0 and the clock ratio are this design's choices (the flash's READ
// command is specified to 50 MHz, i.e. HALF = 1 at a 100 MHz clock).
module spi_master #(
  parameter int HALF = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [2:0]  tx_bytes,
  input  logic [39:0] tx_data,
  input  logic [2:0]  rx_bytes,
  output logic        busy,
  output logic        done,
  output logic [31:0] rx_data,
  output logic        sck,
  output logic        cs_n,
  output logic        mosi,
  input  logic        miso
);
  typedef enum logic [1:0] {S_IDLE, S_LOW, S_HIGH, S_END} state_e;
  state_e      st;
  logic [39:0] sreg;
  logic [5:0]  bits_left;
  logic [7:0]  cnt;

  assign busy = (st != S_IDLE);
  assign mosi = sreg[39];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      sreg      <= '0;
      bits_left <= '0;
      cnt       <= '0;
      sck       <= 1'b0;
      cs_n      <= 1'b1;
      done      <= 1'b0;
      rx_data   <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          sreg      <= tx_data;
          bits_left <= 6'(8 * (int'(tx_bytes) + int'(rx_bytes)));
          rx_data   <= '0;
          cs_n      <= 1'b0;
          cnt       <= '0;
          st        <= S_LOW;
        end
        S_LOW: if (cnt == 8'(HALF - 1)) begin
          cnt     <= '0;
          sck     <= 1'b1;
          rx_data <= {rx_data[30:0], miso};
          st      <= S_HIGH;
        end else cnt <= cnt + 8'd1;
        S_HIGH: if (cnt == 8'(HALF - 1)) begin
          cnt       <= '0;
          sck       <= 1'b0;
          sreg      <= {sreg[38:0], 1'b0};
          bits_left <= bits_left - 6'd1;
          st        <= (bits_left == 6'd1) ? S_END : S_LOW;
        end else cnt <= cnt + 8'd1;
        S_END: begin
          cs_n <= 1'b1;
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
