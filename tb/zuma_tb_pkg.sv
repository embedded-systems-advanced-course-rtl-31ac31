// zuma_tb_pkg: reference models used by the testbenches.
//
// Written independently of the RTL: the expected picture is computed
// pixel by pixel from the object list (disc and T-shaped 32x32 masks
// centred on the object, grid every 16 pixels, entrance and exit boxes),
// the raster look-ahead from plain block arithmetic, and the CAM answer by
// scanning the object list.
package zuma_tb_pkg;

  function automatic bit ref_ball(int x, int y, int cx, int cy);
    int c = x - cx + 16, r = y - cy + 16;
    if (c < 0 || c > 31 || r < 0 || r > 31) return 0;
    return (2*c-31)*(2*c-31) + (2*r-31)*(2*r-31) <= 1024;
  endfunction

  function automatic bit ref_stand(int x, int y, int cx, int cy);
    int c = x - cx + 16, r = y - cy + 16;
    if (c < 0 || c > 31 || r < 0 || r > 31) return 0;
    return (r < 8) ? (c >= 6 && c <= 25) : (c >= 11 && c <= 20);
  endfunction

  function automatic logic [7:0] ref_bg(int x, int y, bit plain);
    if (x < 96 && y >= 32 && y < 64) return 8'b011_101_00;
    if (x >= 576 && x < 640 && y >= 160 && y < 192) return 8'b010_010_11;
    if (!plain && (x % 16 == 0 || y % 16 == 0)) return 8'b010_011_11;
    return 8'b000_001_10;
  endfunction

  // does the 4-pixel block starting at (x, y) touch the 32x32 square of (cx, cy)?
  function automatic bit ref_square_hit(int x, int y, int cx, int cy);
    return (y >= cy - 16) && (y <= cy + 15) && (x + 3 >= cx - 16) && (x <= cx + 15);
  endfunction

  // pixel position of the block `ahead` blocks after counter (h, v), 9-bit y
  function automatic void ref_ahead(int h, int v, int ahead, output int x, output int y);
    int b = h / 8 + ahead;
    y = v;
    if (b >= 200) begin b -= 200; y = (v + 1) % 525; end
    x = b * 4;
    y = y % 512;
  endfunction

  function automatic logic [31:0] obj_word(bit valid, logic [7:0] color, int x, int y);
    return {valid, 4'b0, color, 9'(y), 10'(x)};
  endfunction

endpackage
