// bkgnd_gen: background generator (BKGND_GEN).
//
// Once per block (blk_start, HCNT[2:0] = 0) it computes the 4 background
// pixels of the block two blocks ahead of the current one and registers
// them as BG_DATA (leftmost pixel in [31:24]). Two blocks of look-ahead
// cover the OVERLAY register and the output shift register, so the data
// reaches the screen in step with the sync pulses. The x coordinate of a
// block is HCNT/8*4, the y coordinate VCNT; look-ahead past the end of a
// line continues on the next line.
//
// The background is a graph-paper grid with an entrance box and an exit
// box, as the source describes. Colours, grid pitch and box placement
// (zuma_pkg) are this design's choice. BG_SEL = 1 gives the field without
// grid lines; the source shows a BG_SEL input without describing it.
module bkgnd_gen
  import zuma_pkg::*;
(
  input  logic   clk,
  input  logic   reset_n,
  input  hcnt_t  hcnt,
  input  vcnt_t  vcnt,
  input  logic   bg_sel,
  input  logic   blk_start,
  output block_t bg_data
);

  xpos_t  x;
  ypos_t  y;
  block_t next;

  always_comb begin
    ahead_pos(hcnt, vcnt, 2, x, y);
    for (int i = 0; i < 4; i++)
      next[8*(3-i) +: 8] = bg_pixel(int'(x) + i, int'(y), bg_sel);
  end

  always_ff @(posedge clk) begin
    if (!reset_n)
      bg_data <= '0;
    else if (blk_start)
      bg_data <= next;
  end

endmodule
