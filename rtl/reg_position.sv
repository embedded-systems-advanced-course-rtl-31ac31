// reg_position: look-ahead address generator (regPosition).
//
// At every blk_start it registers two coordinates: xPos/yPos, the pixel
// position of the block two blocks ahead of the current HCNT/VCNT (used by
// ObjectDraw during this block), and xPos_Next/yPos_Next, three blocks
// ahead (searched by the CAM during this block, so its result is ready for
// ObjectDraw one block later). Both wrap to the next line and frame.
// The 2- and 3-block look-ahead follows the source.
module reg_position
  import zuma_pkg::*;
(
  input  logic  clk,
  input  logic  reset_n,
  input  hcnt_t hcnt,
  input  vcnt_t vcnt,
  input  logic  blk_start,
  output xpos_t xpos,
  output ypos_t ypos,
  output xpos_t xpos_next,
  output ypos_t ypos_next
);

  xpos_t x2, x3;
  ypos_t y2, y3;

  always_comb begin
    ahead_pos(hcnt, vcnt, 2, x2, y2);
    ahead_pos(hcnt, vcnt, 3, x3, y3);
  end

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      xpos <= '0; ypos <= '0; xpos_next <= '0; ypos_next <= '0;
    end else if (blk_start) begin
      xpos <= x2; ypos <= y2; xpos_next <= x3; ypos_next <= y3;
    end
  end

endmodule
