// overlay: merges foreground over background (OVERLAY).
//
// Once per block (blk_start) it registers DISP_DATA: for each of the 4
// pixels, the foreground byte where the matching FG_PIXMAP bit is 1,
// otherwise the background byte. Pixel i (0 = leftmost) is byte [31-8i -: 8]
// and pixmap bit 3-i. The register adds the one-block delay that the
// generators' look-ahead accounts for. Behaviour follows the source.
module overlay
  import zuma_pkg::*;
(
  input  logic    clk,
  input  logic    reset_n,
  input  logic    blk_start,
  input  block_t  bg_data,
  input  block_t  fg_data,
  input  pixmap_t fg_pixmap,
  output block_t  disp_data
);

  block_t merged;

  always_comb
    for (int i = 0; i < 4; i++)
      merged[8*i +: 8] = fg_pixmap[i] ? fg_data[8*i +: 8] : bg_data[8*i +: 8];

  always_ff @(posedge clk) begin
    if (!reset_n)
      disp_data <= '0;
    else if (blk_start)
      disp_data <= merged;
  end

endmodule
