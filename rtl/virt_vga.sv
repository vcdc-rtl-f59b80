// virt_vga: virtualization module of the VGA I/O VMM.
//
// The physical screen is split into sections stacked along the second
// coordinate, one per guest VM: the origin (0,0) of VM k is the physical point
// (0, k*SECTION_OFFSET). A display request is three flits, as the guest sends
// them: the character (or pixel value), the first coordinate and the second
// coordinate, for example 0x41, 0x02, 0x01 for 'A' at (2,1). The module counts
// the flits of each message and adds SECTION_OFFSET * (cpu mod NUM_SECTIONS) to
// the third one; every other flit passes unchanged, so the instruction sent to
// the VGA driver is the same three flits with the physical coordinate. The
// section height of 100 and the four sections are the document's prototype;
// the cpu-modulo mapping for more CPUs than sections is this design's choice.
// The path is combinational (no added latency). VGA output gives no responses
// in this design; the up path forwards whatever the driver returns unchanged.
module virt_vga #(
  parameter int SECTION_OFFSET = 100,
  parameter int NUM_SECTIONS   = 4
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

  logic [1:0] idx;   // flit index inside the current request

  always_comb begin
    down_out       = down_in;
    if (idx == 2'd2)
      down_out.data = down_in.data +
                      DATA_W'(SECTION_OFFSET * (int'(down_in.cpu) % NUM_SECTIONS));
    down_out_valid = down_in_valid;
    down_in_ready  = down_out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) idx <= '0;
    else if (down_in_valid && down_out_ready) begin
      if (down_in.last)      idx <= '0;
      else if (idx != 2'd3)  idx <= idx + 2'd1;
    end
  end

  assign up_out       = up_in;
  assign up_out_valid = up_in_valid;
  assign up_in_ready  = up_out_ready;
endmodule
