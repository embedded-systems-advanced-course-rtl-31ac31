// zuma_pkg: types, constants and pure functions shared by the ZUMA VGA
// controller and its testbenches.
//
// Display geometry: a 640x480 picture driven from a 50 MHz clock, so one
// pixel lasts two clocks and HCNT/2 is the pixel x coordinate. Pixels are
// processed in blocks of 4 (32 bits, 8 clocks). Inside a 32-bit block the
// leftmost pixel is the most significant byte and the most significant
// pixmap bit; that ordering is this design's choice.
//
// Object register format (one 32-bit word per foreground object), as the
// processor writes it: bit 31 valid, 30:27 reserved, 26:19 colour,
// 18:10 centre y, 9:0 centre x.
//
// The two 32x32 shape masks (ball and shooter stand) are computed by
// functions here: bit c of row r is 1 when column c of row r is painted.
// The ball is a disc of diameter 32; the stand is a T shape. Both shapes are
// this design's choice: the source describes the mask ROM but not its
// contents.
package zuma_pkg;

  // ---------------------------------------------------------------- timing
  localparam int unsigned H_DISPLAY  = 1280;  // clocks of active video per line
  localparam int unsigned H_FRONT    = 32;
  localparam int unsigned H_SYNC     = 192;
  localparam int unsigned H_BACK     = 96;
  localparam int unsigned H_TOTAL    = H_DISPLAY + H_FRONT + H_SYNC + H_BACK;  // 1600
  localparam int unsigned V_DISPLAY  = 480;
  localparam int unsigned V_FRONT    = 10;
  localparam int unsigned V_SYNC     = 2;
  localparam int unsigned V_BACK     = 33;
  localparam int unsigned V_TOTAL    = V_DISPLAY + V_FRONT + V_SYNC + V_BACK;  // 525

  localparam int unsigned HCNT_W     = 11;
  localparam int unsigned VCNT_W     = 10;
  localparam int unsigned XPOS_W     = 10;
  localparam int unsigned YPOS_W     = 9;

  localparam int unsigned BLK_CLKS   = 8;                  // clocks per 4-pixel block
  localparam int unsigned BLKS_PER_LINE = H_TOTAL / BLK_CLKS;  // 200


  typedef logic [HCNT_W-1:0] hcnt_t;
  typedef logic [VCNT_W-1:0] vcnt_t;
  typedef logic [XPOS_W-1:0] xpos_t;
  typedef logic [YPOS_W-1:0] ypos_t;
  typedef logic [7:0]        pixel_t;
  typedef logic [31:0]       block_t;   // 4 pixels, leftmost in [31:24]
  typedef logic [3:0]        pixmap_t;  // leftmost pixel in bit 3

  // ------------------------------------------------------- object register
  typedef struct packed {
    logic        valid;
    logic [3:0]  reserved;
    logic [7:0]  color;
    logic [8:0]  y;
    logic [9:0]  x;
  } obj_t;

  // ------------------------------------------------------ background colours
  localparam pixel_t BG_COLOR       = 8'b000_001_10;  // dark blue field
  localparam pixel_t GRID_COLOR     = 8'b010_011_11;  // light blue grid lines
  localparam pixel_t ENTRANCE_COLOR = 8'b011_101_00;  // green entrance box
  localparam pixel_t EXIT_COLOR     = 8'b010_010_11;  // blue exit box
  localparam int unsigned GRID_STEP_LOG2 = 4;         // a grid line every 16 pixels

  // Entrance box: left of path position 44 (centre 112,48).
  localparam int unsigned ENT_X1 = 95,  ENT_Y0 = 32,  ENT_Y1 = 63;
  // Exit box: right of path position 0 (centre 560,176).
  localparam int unsigned EXIT_X0 = 576, EXIT_X1 = 639, EXIT_Y0 = 160, EXIT_Y1 = 191;

  // Background colour of one pixel. sel = 1 drops the grid lines.
  function automatic pixel_t bg_pixel(input int unsigned x, input int unsigned y, input logic sel);
    if (x <= ENT_X1 && y >= ENT_Y0 && y <= ENT_Y1) return ENTRANCE_COLOR;
    if (x >= EXIT_X0 && x <= EXIT_X1 && y >= EXIT_Y0 && y <= EXIT_Y1) return EXIT_COLOR;
    if (!sel && ((x % (1 << GRID_STEP_LOG2)) == 0 || (y % (1 << GRID_STEP_LOG2)) == 0))
      return GRID_COLOR;
    return BG_COLOR;
  endfunction

  // -------------------------------------------------------- block look-ahead
  // Pixel coordinates of the block that is AHEAD blocks after the one that
  // contains counter position (hcnt, vcnt), wrapping to the next line and
  // the next frame. y is truncated to YPOS_W bits (rows >= 480 are blanked).
  function automatic void ahead_pos(input hcnt_t hcnt, input vcnt_t vcnt, input int unsigned ahead,
                                    output xpos_t x, output ypos_t y);
    int unsigned blk, line;
    blk  = int'(hcnt) / BLK_CLKS + ahead;
    line = int'(vcnt);
    if (blk >= BLKS_PER_LINE) begin
      blk  = blk - BLKS_PER_LINE;
      line = (line + 1 == V_TOTAL) ? 0 : line + 1;
    end
    x = xpos_t'(blk * 4);
    y = ypos_t'(line);
  endfunction

  // ---------------------------------------------------------- shape masks
  typedef enum logic {SHAPE_BALL = 1'b0, SHAPE_STAND = 1'b1} shape_e;

  function automatic logic [31:0] mask_row(input shape_e shape, input logic [4:0] row);
    logic [31:0] m;
    int dr, dc;
    m  = '0;
    dr = 2 * int'(row) - 31;
    for (int c = 0; c < 32; c++) begin
      dc = 2 * c - 31;
      if (shape == SHAPE_BALL)
        m[c] = (dr * dr + dc * dc) <= 1024;
      else
        m[c] = (row < 5'd8) ? (c >= 6 && c <= 25) : (c >= 11 && c <= 20);
    end
    return m;
  endfunction

endpackage
