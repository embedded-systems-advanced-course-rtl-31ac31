// object_draw: the three draw objects and their merge (ObjectDraw).
//
// One draw object paints the shooter stand (stand mask), two paint balls
// (ball mask), all for the same block (xPos, yPos). Their outputs are
// merged per pixel: FGND_PIXMAP is the OR of the three pixmaps and each
// byte of FGND_DATA comes from the stand if it paints that pixel, else
// from ball 1, else from ball 2 (0x00 if none). Two ball objects let a
// block that straddles two neighbouring balls be filled completely.
// Latency: 3 clocks (2 in the draw objects, 1 merge register).
//
// Three draw objects and the merge follow the source; the merge priority
// is this design's choice.
module object_draw
  import zuma_pkg::*;
(
  input  logic    clk,
  input  logic    reset_n,
  input  logic    shoot_active,
  input  obj_t    shoot_coord,
  input  logic    ball1_active,
  input  obj_t    ball1_data,
  input  logic    ball2_active,
  input  obj_t    ball2_data,
  input  xpos_t   xpos,
  input  ypos_t   ypos,
  output block_t  fgnd_data,
  output pixmap_t fgnd_pixmap
);

  pixmap_t pm [3];
  block_t  dd [3];

  draw_object #(.SHAPE(SHAPE_STAND)) u_stand (
    .clk, .reset_n, .active(shoot_active), .obj(shoot_coord), .xpos, .ypos,
    .pixmap(pm[0]), .disp_data(dd[0])
  );
  draw_object #(.SHAPE(SHAPE_BALL)) u_ball1 (
    .clk, .reset_n, .active(ball1_active), .obj(ball1_data), .xpos, .ypos,
    .pixmap(pm[1]), .disp_data(dd[1])
  );
  draw_object #(.SHAPE(SHAPE_BALL)) u_ball2 (
    .clk, .reset_n, .active(ball2_active), .obj(ball2_data), .xpos, .ypos,
    .pixmap(pm[2]), .disp_data(dd[2])
  );

  block_t merged;

  always_comb
    for (int i = 0; i < 4; i++)
      merged[8*i +: 8] = pm[0][i] ? dd[0][8*i +: 8] :
                         pm[1][i] ? dd[1][8*i +: 8] : dd[2][8*i +: 8];

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      fgnd_data <= '0; fgnd_pixmap <= '0;
    end else begin
      fgnd_data   <= merged;
      fgnd_pixmap <= pm[0] | pm[1] | pm[2];
    end
  end

endmodule
