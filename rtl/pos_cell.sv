// pos_cell: one CAM entry (pos_cell).
//
// Holds one 32-bit object word, written like an SRAM word when WR_n is low.
// Every clock it compares the searched block (xPos, yPos: the leftmost of
// 4 pixels in one row) with the object's 32x32 square centred on (x, y),
// which spans x-16 .. x+15 and y-16 .. y+15. FOUND is registered 1 when
// the word is valid, the row lies in the square and any of the 4 pixels
// does; DATA then carries the word (0 otherwise). Latency: one clock.
//
// The search-by-coordinate behaviour follows the source; the exact
// overlap rule and the reset value (invalid, all zero) are this design's.
module pos_cell
  import zuma_pkg::*;
(
  input  logic   clk,
  input  logic   reset_n,
  input  logic   wr_n,
  input  obj_t   data_load,
  input  xpos_t  xpos,
  input  ypos_t  ypos,
  output logic   found,
  output obj_t   data
);

  obj_t              obj;
  logic signed [11:0] dx, dy;
  logic              hit;

  always_comb begin
    dx  = $signed({2'b00, xpos}) - $signed({2'b00, obj.x}) + 12'sd16;
    dy  = $signed({3'b000, ypos}) - $signed({3'b000, obj.y}) + 12'sd16;
    hit = obj.valid && (dy >= 0) && (dy <= 31) && (dx >= -3) && (dx <= 31);
  end

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      obj   <= '0;
      found <= 1'b0;
      data  <= '0;
    end else begin
      if (!wr_n) obj <= data_load;
      found <= hit;
      data  <= hit ? obj : '0;
    end
  end

endmodule
