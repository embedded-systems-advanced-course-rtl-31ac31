// zuma_app: the application part of the VGA controller (ZUMA_APP).
//
// Every 8 clocks (blk_start, HCNT[2:0] = 0) the background generator and
// the foreground generator each produce one 4-pixel block for the block
// two ahead of the raster, and OVERLAY lays the foreground over the
// background into DISP_DATA. DISP_DATA then holds the block that the
// counter's output interface loads at the end of the next block, so the
// pixels leave in step with HSYNC/VSYNC. Object words arrive on WR_n/ADDR/
// DATA (register format in zuma_pkg).
//
// Structure follows the source. blk_start is decoded here from HCNT and
// BG_SEL is tied to 0 (grid background); both are this design's choices.
module zuma_app
  import zuma_pkg::*;
#(
  parameter int unsigned N_CELLS    = 46,
  parameter int unsigned STAND_CELL = 10
) (
  input  logic        clk,
  input  logic        reset_n,
  input  hcnt_t       hcnt,
  input  vcnt_t       vcnt,
  input  logic        wr_n,
  input  logic [5:0]  addr,
  input  logic [31:0] data,
  output block_t      disp_data
);

  logic    blk_start;
  block_t  bg_data, fg_data;
  pixmap_t fg_pixmap;

  assign blk_start = (hcnt[2:0] == 3'd0);

  bkgnd_gen u_bg (
    .clk, .reset_n, .hcnt, .vcnt, .bg_sel(1'b0), .blk_start, .bg_data
  );

  fgnd_gen #(.N_CELLS(N_CELLS), .STAND_CELL(STAND_CELL)) u_fg (
    .clk, .reset_n, .hcnt, .vcnt, .blk_start, .wr_n, .addr, .data,
    .fg_data, .fg_pixmap
  );

  overlay u_ov (
    .clk, .reset_n, .blk_start, .bg_data, .fg_data, .fg_pixmap, .disp_data
  );

endmodule
