// eth_sub_model: behavioural model of the Ethernet subsystem seen by the
// Ethernet low layer driver (TEMAC register file over AXI-Lite, AXI Ethernet
// buffer over AXI-Stream), used only by testbenches.
// The TEMAC is 16 plain 32-bit registers at byte address 4*i; an access
// outside them answers SLVERR. Every transmitted frame is looped back: its
// source and destination IPv4 addresses are swapped and, GAP cycles later, it
// is sent on the RX stream, so it returns to the CPU whose id the VCDC put in
// the source address. tx_frames counts frames sent; last_src_byte is byte 29
// (last byte of the source IP) of the latest one.
module eth_sub_model #(
  parameter int GAP = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        awvalid, output logic awready, input  logic [31:0] awaddr,
  input  logic        wvalid,  output logic wready,  input  logic [31:0] wdata,
  input  logic [3:0]  wstrb,      // all writes are full words
  output logic        bvalid,  input  logic bready,  output logic [1:0]  bresp,
  input  logic        arvalid, output logic arready, input  logic [31:0] araddr,
  output logic        rvalid,  input  logic rready,  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  input  logic        tx_tvalid, output logic tx_tready, input logic [31:0] tx_tdata,
  input  logic [3:0]  tx_tkeep,  input  logic tx_tlast,
  output logic        rx_tvalid, input  logic rx_tready, output logic [31:0] rx_tdata,
  output logic [3:0]  rx_tkeep,  output logic rx_tlast,
  output int          tx_frames,
  output logic [7:0]  last_src_byte
);
  logic [31:0] regs [16];
  byte unsigned cur[$];
  byte unsigned frames[$][$];
  int unsigned  due[$];
  int unsigned  now;
  logic         aw_got, w_got;
  logic [31:0]  aw_q, w_q;
  int           rpos;

  assign awready   = !aw_got && !bvalid;
  assign wready    = !w_got && !bvalid;
  assign tx_tready = 1'b1;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_got <= 0; w_got <= 0; bvalid <= 0; bresp <= 0;
      arready <= 0; rvalid <= 0; rdata <= 0; rresp <= 0;
      tx_frames <= 0; last_src_byte <= 0; now <= 0; rpos <= 0;
      for (int i = 0; i < 16; i++) regs[i] <= 32'h1000_0000 + i;
    end else begin
      now <= now + 1;
      // write channel
      if (awvalid && awready) begin aw_got <= 1; aw_q <= awaddr; end
      if (wvalid && wready)   begin w_got <= 1;  w_q <= wdata; end
      if (aw_got && w_got && !bvalid) begin
        bvalid <= 1;
        if (aw_q < 64) begin regs[aw_q[5:2]] <= w_q; bresp <= 2'b00; end
        else bresp <= 2'b10;
        aw_got <= 0; w_got <= 0;
      end
      if (bvalid && bready) bvalid <= 0;
      // read channel
      arready <= arvalid && !arready && !rvalid;
      if (arvalid && arready) begin
        rvalid <= 1;
        rdata  <= (araddr < 64) ? regs[araddr[5:2]] : 32'h0;
        rresp  <= (araddr < 64) ? 2'b00 : 2'b10;
      end
      if (rvalid && rready) rvalid <= 0;
      // RX stream handshake
      if (rx_tvalid && rx_tready) begin
        if (rx_tlast) begin
          rpos <= 0;
          void'(frames.pop_front());
          void'(due.pop_front());
        end else rpos <= rpos + 4;
      end
      // transmit and loop back
      if (tx_tvalid && tx_tready) begin
        for (int b = 0; b < 4; b++)
          if (tx_tkeep[3-b]) cur.push_back(tx_tdata[31-8*b -: 8]);
        if (tx_tlast) begin
          automatic byte unsigned f[$] = cur;
          tx_frames     <= tx_frames + 1;
          last_src_byte <= f[29];
          for (int b = 26; b < 30; b++) begin
            automatic byte unsigned t = f[b]; f[b] = f[b+4]; f[b+4] = t;
          end
          frames.push_back(f);
          due.push_back(now + GAP);
          cur.delete();
        end
      end
    end
  end

  // RX stream: one word per cycle once the frame is due
  always_comb begin
    rx_tvalid = 0; rx_tdata = '0; rx_tkeep = '0; rx_tlast = 0;
    if (frames.size() > 0 && now >= due[0]) begin
      rx_tvalid = 1;
      for (int b = 0; b < 4; b++)
        if (rpos + b < frames[0].size()) begin
          rx_tdata[31-8*b -: 8] = frames[0][rpos+b];
          rx_tkeep[3-b] = 1'b1;
        end
      rx_tlast = (rpos + 4 >= frames[0].size());
    end
  end

endmodule
