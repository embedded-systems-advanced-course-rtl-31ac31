// draw_object: paints one object into a 4-pixel block (one draw object).
//
// Stage 1: the mask row is ypos - (yObj - 16) and the column offset of the
// block's leftmost pixel is xpos - (xObj - 16); the row addresses a 32x32
// mask ROM (32 rows of 32 bits, row-indexed). Stage 2: for pixel i of the
// block, column offset+i is painted when it lies in 0..31 and its mask bit
// is 1; painted pixels carry the object's colour, others 0x00, and the
// 4-bit PIXMAP marks the painted ones. Outputs are registered: latency 2
// clocks, one block per clock. ACTIVE = 0 paints nothing.
//
// The method (row address, offset, mask ROM, colour fill) follows the
// source; the mask shapes are this design's (zuma_pkg::mask_row).
module draw_object
  import zuma_pkg::*;
#(
  parameter shape_e SHAPE = SHAPE_BALL
) (
  input  logic    clk,
  input  logic    reset_n,
  input  logic    active,
  input  obj_t    obj,
  input  xpos_t   xpos,
  input  ypos_t   ypos,
  output pixmap_t pixmap,
  output block_t  disp_data
);

  logic signed [11:0] dx, dy;
  logic [31:0]        rom_q;
  logic signed [11:0] offset_q;
  pixel_t             color_q;
  logic               en_q;
  pixmap_t            pm;
  block_t             dd;

  always_comb begin
    dx = $signed({2'b00, xpos}) - $signed({2'b00, obj.x}) + 12'sd16;
    dy = $signed({3'b000, ypos}) - $signed({3'b000, obj.y}) + 12'sd16;
  end

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      rom_q <= '0; offset_q <= '0; color_q <= '0; en_q <= 1'b0;
    end else begin
      rom_q    <= mask_row(SHAPE, dy[4:0]);
      offset_q <= dx;
      color_q  <= obj.color;
      en_q     <= active && (dy >= 0) && (dy <= 31);
    end
  end

  always_comb begin
    logic signed [11:0] col;
    for (int i = 0; i < 4; i++) begin
      col = offset_q + 12'(i);
      pm[3-i] = en_q && (col >= 0) && (col <= 31) && rom_q[col[4:0]];
      dd[8*(3-i) +: 8] = pm[3-i] ? color_q : 8'h00;
    end
  end

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      pixmap <= '0; disp_data <= '0;
    end else begin
      pixmap <= pm; disp_data <= dd;
    end
  end

endmodule
