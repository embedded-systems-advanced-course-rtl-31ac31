// zuma_vga: the complete VGA controller (ZUMA_VGA).
//
// vgactrl produces the 640x480 raster (HSYNC, VSYNC, 8-bit VGA pixel) from
// a 50 MHz clock and exposes HCNT/VCNT/BLANK; zuma_app turns those counts
// and the object words written by the processor into 32-bit DISP_DATA
// blocks. The processor side is a write-only port: WR_n (active low, one
// word per clock), 6-bit ADDR selecting the object cell, 32-bit DATA.
// Object words can be written at any time; a change shows from the next
// block that is generated after it. Outputs lag the internal counters by
// one clock. Structure follows the source.
module zuma_vga
  import zuma_pkg::*;
#(
  parameter int unsigned N_CELLS    = 46,
  parameter int unsigned STAND_CELL = 10
) (
  input  logic        clk,
  input  logic        reset_n,
  input  logic        wr_n,
  input  logic [5:0]  addr,
  input  logic [31:0] data,
  output logic        hsync,
  output logic        vsync,
  output pixel_t      vga
);

  hcnt_t  hcnt;
  vcnt_t  vcnt;
  block_t disp_data;

  vgactrl u_ctrl (
    .clk, .reset_n, .disp_data, .hcnt, .vcnt, .blank(),
    .hsync_o(hsync), .vsync_o(vsync), .vga_o(vga)
  );

  zuma_app #(.N_CELLS(N_CELLS), .STAND_CELL(STAND_CELL)) u_app (
    .clk, .reset_n, .hcnt, .vcnt, .wr_n, .addr, .data, .disp_data
  );

endmodule
