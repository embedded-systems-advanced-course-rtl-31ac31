// vgactrl: the generic VGA counter block (VGACTRL / VGACounter).
//
// Combines vga_count, which produces HCNT, VCNT, BLANK and the sync
// pulses, with vga_output_if, which turns the 32-bit DISP_DATA block from
// the application into one 8-bit pixel every two clocks. The pixel is
// forced to 0 while BLANK is 1. HSYNC, VSYNC and VGA leave through one
// output register together, so all three lag HCNT/VCNT by exactly one
// clock and stay aligned with each other.
//
// Timing contract with the application: DISP_DATA is sampled in the last
// clock of every block (HCNT[2:0] = 7) and shown during the next block.
// The split into counter and output interface follows the source; the
// output register is this design's choice.
module vgactrl
  import zuma_pkg::*;
(
  input  logic   clk,
  input  logic   reset_n,
  input  block_t disp_data,
  output hcnt_t  hcnt,
  output vcnt_t  vcnt,
  output logic   blank,
  output logic   hsync_o,
  output logic   vsync_o,
  output pixel_t vga_o
);

  logic   hsync, vsync;
  pixel_t pix;

  vga_count u_count (
    .clk, .reset_n, .hcnt, .vcnt, .blank, .hsync, .vsync
  );

  vga_output_if u_out (
    .clk, .reset_n, .hphase(hcnt[2:0]), .disp_data, .pix
  );

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      hsync_o <= 1'b1;
      vsync_o <= 1'b1;
      vga_o   <= '0;
    end else begin
      hsync_o <= hsync;
      vsync_o <= vsync;
      vga_o   <= blank ? '0 : pix;
    end
  end

endmodule
