// fgnd_gen: foreground generator (FGND_GEN).
//
// regPosition gives, at every blk_start (HCNT[2:0] = 0), the block three
// blocks ahead to the CAM and the block two blocks ahead to ObjectDraw.
// The CAM search of block i+1 runs while ObjectDraw paints block i: the
// CAM's three results are held in a pipeline register loaded at blk_start,
// so ObjectDraw always sees the CAM answer for the block it paints. Within
// one 8-clock block the CAM needs 5 clocks and ObjectDraw 3, which is why
// they are pipelined over two blocks. FG_DATA/FG_PIXMAP for the block two
// ahead are valid from 3 clocks after blk_start until the next one.
//
// Writes (WR_n low, ADDR, DATA) go straight into the CAM. The pipelining
// follows the source; cycle counts come from this implementation.
module fgnd_gen
  import zuma_pkg::*;
#(
  parameter int unsigned N_CELLS    = 46,
  parameter int unsigned STAND_CELL = 10
) (
  input  logic        clk,
  input  logic        reset_n,
  input  hcnt_t       hcnt,
  input  vcnt_t       vcnt,
  input  logic        blk_start,
  input  logic        wr_n,
  input  logic [5:0]  addr,
  input  logic [31:0] data,
  output block_t      fg_data,
  output pixmap_t     fg_pixmap
);

  xpos_t xpos, xpos_next;
  ypos_t ypos, ypos_next;
  logic [2:0]       cam_active, act_q;
  logic [2:0][31:0] cam_data,   data_q;

  reg_position u_pos (
    .clk, .reset_n, .hcnt, .vcnt, .blk_start,
    .xpos, .ypos, .xpos_next, .ypos_next
  );

  cam #(.N_CELLS(N_CELLS), .STAND_CELL(STAND_CELL)) u_cam (
    .clk, .reset_n, .wr_n, .addr, .data,
    .xpos(xpos_next), .ypos(ypos_next),
    .active(cam_active), .obj_data(cam_data)
  );

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      act_q <= '0; data_q <= '0;
    end else if (blk_start) begin
      act_q <= cam_active; data_q <= cam_data;
    end
  end

  object_draw u_draw (
    .clk, .reset_n,
    .shoot_active(act_q[0]), .shoot_coord(obj_t'(data_q[0])),
    .ball1_active(act_q[1]), .ball1_data (obj_t'(data_q[1])),
    .ball2_active(act_q[2]), .ball2_data (obj_t'(data_q[2])),
    .xpos, .ypos,
    .fgnd_data(fg_data), .fgnd_pixmap(fg_pixmap)
  );

endmodule
