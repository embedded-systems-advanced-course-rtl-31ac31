// tb_zuma_top: end-to-end test of the ZUMA custom hardware at full size.
//
// Writes a game scene (44 path balls, a shooter ball and the shooter stand)
// into the VGA controller and a score into the seven-segment controller,
// then watches two complete 640x480 frames at the pins. The testbench
// keeps its own raster position, locked to the first VSYNC pulse, and
// checks every displayed pixel against a reference picture computed here
// from the object list (disc and T masks, grid, entrance and exit boxes).
// Between the frames it moves the shooter ball onto the stand (the stand
// mask must win where both paint), removes one ball and
// writes an address with no cell; the second frame must show exactly that.
// It also checks line and frame lengths, sync widths, blanking, and the
// segment pattern for every digit the display scans. Each mechanism
// (two-ball block, stand, stand over a ball, overlay, grid, boxes, blanking, object update,
// removed object, ignored address, each digit) is counted and must occur.
module tb_zuma_top;
  logic        clk = 0, reset_n = 0;
  logic        vga_wr_n = 1, seg_wr_n = 1;
  logic [5:0]  vga_addr = 0;
  logic [31:0] vga_data = 0, seg_data = 0;
  logic        hsync, vsync;
  logic [7:0]  vga, seg_n;
  logic [3:0]  an_n;

  zuma_top dut (.*);

  always #10 clk = ~clk;   // 50 MHz

  int checks = 0, failures = 0;
  int cycles = 0;

  // ---------------------------------------------------------- scene model
  localparam int NC = 46, STAND = 10;
  int  ox[NC], oy[NC];
  logic [7:0] oc[NC];
  bit  ov[NC];
  int  path_x[45], path_y[45];

  function automatic bit in_ball(int x, int y, int cx, int cy);
    int c = x - cx + 16, r = y - cy + 16;
    if (c < 0 || c > 31 || r < 0 || r > 31) return 0;
    return (2*c-31)*(2*c-31) + (2*r-31)*(2*r-31) <= 1024;
  endfunction
  function automatic bit in_stand(int x, int y, int cx, int cy);
    int c = x - cx + 16, r = y - cy + 16;
    if (c < 0 || c > 31 || r < 0 || r > 31) return 0;
    return (r < 8) ? (c >= 6 && c <= 25) : (c >= 11 && c <= 20);
  endfunction
  function automatic logic [7:0] bg_ref(int x, int y);
    if (x < 96 && y >= 32 && y < 64) return 8'b011_101_00;
    if (x >= 576 && y >= 160 && y < 192) return 8'b010_010_11;
    if (x % 16 == 0 || y % 16 == 0) return 8'b010_011_11;
    return 8'b000_001_10;
  endfunction
  // which ball cell paints (x,y), -1 if none
  function automatic int ball_at(int x, int y);
    for (int i = 0; i < NC; i++)
      if (i != STAND && ov[i] && in_ball(x, y, ox[i], oy[i])) return i;
    return -1;
  endfunction

  // mechanism counters
  int n_handover = 0, n_stand = 0, n_overlay = 0, n_grid = 0, n_entr = 0, n_exit = 0;
  int n_blank = 0, n_over = 0, n_moved = 0, n_removed = 0, n_ignored = 0;
  int n_digit[4] = '{0, 0, 0, 0};

  // ------------------------------------------------------------- bus writes
  task automatic vga_write(int addr, bit valid, logic [7:0] color, int x, int y);
    @(negedge clk);
    vga_wr_n = 0; vga_addr = 6'(addr);
    vga_data = {valid, 4'b0, color, 9'(y), 10'(x)};
    @(negedge clk);
    vga_wr_n = 1;
  endtask
  task automatic put(int ci, int x, int y, logic [7:0] color);
    ox[ci] = x; oy[ci] = y; oc[ci] = color; ov[ci] = 1;
    vga_write(ci, 1, color, x, y);
  endtask

  // ------------------------------------------------------------ pixel check
  int h = -1, v = -1;          // raster position of the current output sample
  bit locked = 0, checking = 0;
  int frame = 0;
  int line_len = 0, hs_len = 0, vs_lines = 0;
  bit hs_prev = 1, vs_prev = 1;

  logic [7:0] seg_code[10] = '{8'hC0, 8'hF9, 8'hA4, 8'hB0, 8'h99, 8'h92, 8'h82, 8'hF8, 8'h80, 8'h90};
  int score_digit[4] = '{6, 2, 8, 1};   // D0..D3 of 1826

  always @(negedge clk) begin
    if (reset_n) begin
      // seven-segment: whichever digit is lit must show its value
      for (int k = 0; k < 4; k++)
        if (an_n == ~(4'b1 << k) && cycles > 2000) begin
          checks++; n_digit[k]++;
          if (seg_n !== seg_code[score_digit[k]]) begin
            failures++;
            if (failures < 10) $display("seg digit %0d: got %h", k, seg_n);
          end
        end
      if (!locked && vs_prev && !vsync) begin
        locked = 1; h = 0; v = 490;
      end else if (locked) begin
        h++;
        if (h == 1600) begin h = 0; v = (v == 524) ? 0 : v + 1; end
      end
      vs_prev = vsync;
      if (locked) begin
        // sync timing
        if (hsync !== !(h >= 1312 && h < 1504)) begin
          failures++; if (failures < 10) $display("hsync wrong at h=%0d v=%0d", h, v);
        end
        if (vsync !== !(v >= 490 && v < 492)) begin
          failures++; if (failures < 10) $display("vsync wrong at h=%0d v=%0d", h, v);
        end
        checks += 2;
        if (checking) begin
          if (h >= 1280 || v >= 480) begin
            if (vga !== 8'h00) begin
              failures++; if (failures < 10) $display("blank not black at h=%0d v=%0d", h, v);
            end
            checks++; n_blank++;
          end else begin
            int x, y, b;
            logic [7:0] exp;
            x = h / 2; y = v;
            b = ball_at(x, y);
            if (ov[STAND] && in_stand(x, y, ox[STAND], oy[STAND])) begin
              exp = oc[STAND]; if (h[0]) n_stand++;
              if (h[0] && b >= 0) n_over++;   // stand drawn over a ball in the same block
            end else if (b >= 0) begin
              exp = oc[b]; if (h[0]) n_overlay++;
            end else begin
              exp = bg_ref(x, y);
              if (h[0]) begin
                if (exp == 8'b010_011_11) n_grid++;
                if (exp == 8'b011_101_00) n_entr++;
                if (exp == 8'b010_010_11) n_exit++;
              end
            end
            // a block whose pixels come from two different balls
            if (h % 8 == 7) begin
              int b0, b3;
              b0 = ball_at(x - 3, y); b3 = ball_at(x, y);
              if (b0 >= 0 && b3 >= 0 && b0 != b3) n_handover++;
            end
            checks++;
            if (vga !== exp) begin
              failures++;
              if (failures < 20) $display("pixel (%0d,%0d) frame %0d: got %h want %h", x, y, frame, vga, exp);
            end
          end
        end
      end
    end
  end

  // line length and sync widths measured from the pins
  int hs_count = 0, vs_count = 0;
  always @(negedge clk) if (reset_n) begin
    line_len++;
    if (!hsync) hs_len++;
    if (hs_prev && !hsync) begin
      if (hs_count > 0) begin
        checks++;
        if (line_len != 1600) begin failures++; $display("line length %0d", line_len); end
      end
      hs_count++; line_len = 0;
    end
    if (!hs_prev && hsync) begin
      checks++;
      if (hs_len != 192) begin failures++; $display("hsync width %0d", hs_len); end
      hs_len = 0;
    end
    hs_prev = hsync;
  end

  // ---------------------------------------------------------- stimulus
  initial begin
    int k;
    // path positions 0..44
    for (int i = 0; i <= 14; i++) begin path_x[i] = 560 - 32*i; path_y[i] = 176; end
    path_x[15] = 80; path_y[15] = 144;
    for (int i = 16; i <= 29; i++) begin path_x[i] = 112 + 32*(i-16); path_y[i] = 112; end
    path_x[30] = 560; path_y[30] = 80;
    for (int i = 31; i <= 44; i++) begin path_x[i] = 528 - 32*(i-31) + 2; path_y[i] = 48; end
    foreach (ov[i]) ov[i] = 0;

    repeat (5) @(posedge clk);
    reset_n = 1;
    // cell 0: shooter ball, cell 10: stand, others: path positions 1..44
    put(0, 320, 400, 8'hE0);
    put(STAND, 320, 464, 8'hB6);
    k = 1;
    for (int c = 1; c < NC; c++) begin
      if (c == STAND) continue;
      put(c, path_x[k], path_y[k], 8'(8'h1F + 8'h24 * (k % 5)));
      k++;
    end
    seg_wr_n = 0; seg_data = {8'd1, 8'd8, 8'd2, 8'd6};
    @(negedge clk); seg_wr_n = 1;

    // frame A starts at the first line 0 after the VSYNC lock
    wait (locked && v == 0 && h == 0);
    checking = 1; frame = 1;
    wait (v == 481);
    // changes in vertical blanking, seen from frame B on
    put(0, 320, 440, 8'hE0);      n_moved++;        // shooter ball moved onto the stand
    ov[5] = 0; vga_write(5, 0, 8'h00, 0, 0); n_removed++;   // ball destroyed
    vga_write(47, 1, 8'hFF, 300, 300); n_ignored++;       // address without a cell
    wait (v == 0 && h == 0);
    frame = 2;
    wait (v == 480);
    checking = 0;

    checks++;
    if (hs_count < 1000) begin failures++; $display("too few lines: %0d", hs_count); end
    foreach (n_digit[i]) begin checks++; if (n_digit[i] == 0) begin failures++; $display("digit %0d never lit", i); end end
    checks += 11;
    if (n_handover == 0) begin failures++; $display("no two-ball block"); end
    if (n_stand == 0)    begin failures++; $display("no stand pixel"); end
    if (n_overlay == 0)  begin failures++; $display("no ball pixel"); end
    if (n_grid == 0)     begin failures++; $display("no grid pixel"); end
    if (n_entr == 0)     begin failures++; $display("no entrance pixel"); end
    if (n_exit == 0)     begin failures++; $display("no exit pixel"); end
    if (n_blank == 0)    begin failures++; $display("no blank sample"); end
    if (n_over == 0)     begin failures++; $display("stand never over a ball"); end
    if (n_moved == 0)    begin failures++; $display("no object move"); end
    if (n_removed == 0)  begin failures++; $display("no object removal"); end
    if (n_ignored == 0)  begin failures++; $display("no ignored write"); end
    $display("mechanisms: handover=%0d stand=%0d over=%0d ball=%0d grid=%0d entrance=%0d exit=%0d blank=%0d moved=%0d removed=%0d ignored=%0d digits=%0d/%0d/%0d/%0d",
             n_handover, n_stand, n_over, n_overlay, n_grid, n_entr, n_exit, n_blank, n_moved, n_removed,
             n_ignored, n_digit[0], n_digit[1], n_digit[2], n_digit[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: three frames and a margin
  always @(posedge clk) begin
    cycles++;
    if (cycles > 3_000_000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
