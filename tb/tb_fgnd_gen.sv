// tb_fgnd_gen: writes a scene (a row of touching balls offset by 2 pixels so
// blocks straddle two balls, scattered balls and the stand in cell 10) and
// runs a raster counter for a frame. In the last clock of every block it
// checks FG_DATA/FG_PIXMAP against the reference for the block two ahead:
// the stand mask wins, then the first and second ball cells (address order)
// whose square the block touches. The scene is moved once mid-frame in
// vertical blanking and checked again.
module tb_fgnd_gen;
  import zuma_pkg::*;
  import zuma_tb_pkg::*;
  logic clk = 0, reset_n = 0;
  hcnt_t hcnt = 0; vcnt_t vcnt = 0;
  logic blk_start, wr_n = 1;
  logic [5:0] addr = 0;
  logic [31:0] data = 0;
  block_t fg_data; pixmap_t fg_pixmap;
  fgnd_gen dut (.*);
  always #10 clk = ~clk;
  assign blk_start = (hcnt[2:0] == 0);

  int checks = 0, failures = 0, cycles = 0;
  logic [31:0] cells [46];
  int n_two = 0, n_stand = 0, n_ball = 0;

  function automatic void ref_block(int x, int y, output logic [3:0] p, output logic [31:0] d);
    int b[2]; int k = 0;
    b[0] = -1; b[1] = -1;
    for (int i = 0; i < 46; i++)
      if (i != 10 && k < 2 && cells[i][31] && ref_square_hit(x, y, int'(cells[i][9:0]), int'(cells[i][18:10]))) begin
        b[k] = i; k++;
      end
    p = 0; d = 0;
    for (int i = 0; i < 4; i++) begin
      bit s, b1, b2;
      s  = cells[10][31] && ref_square_hit(x, y, int'(cells[10][9:0]), int'(cells[10][18:10])) &&
           ref_stand(x + i, y, int'(cells[10][9:0]), int'(cells[10][18:10]));
      b1 = b[0] >= 0 && ref_ball(x + i, y, int'(cells[b[0]][9:0]), int'(cells[b[0]][18:10]));
      b2 = b[1] >= 0 && ref_ball(x + i, y, int'(cells[b[1]][9:0]), int'(cells[b[1]][18:10]));
      p[3-i] = s | b1 | b2;
      d[8*(3-i) +: 8] = s ? cells[10][26:19] : b1 ? cells[b[0]][26:19] : b2 ? cells[b[1]][26:19] : 8'h00;
      if (s) n_stand++;
      if (b1 || b2) n_ball++;
    end
    if (b[1] >= 0 && p != 0) n_two++;
  endfunction

  task automatic write_scene(int dx);
    for (int i = 0; i < 46; i++) begin
      logic [31:0] w;
      if (i == 10)      w = obj_word(1, 8'hB6, 320 + dx, 464);
      else if (i < 20)  w = obj_word(1, 8'(8'h10 + i), 114 + 32 * i + dx, 48);
      else if (i < 40)  w = obj_word(1, 8'(8'h40 + i), 40 + 13 * i + dx, 200 + (i % 7) * 30);
      else              w = obj_word(0, 8'hFF, 300, 300);
      cells[i] = w;
      @(negedge clk);
      wr_n = 0; addr = 6'(i); data = w;
    end
    @(negedge clk); wr_n = 1;
  endtask

  always @(negedge clk) if (reset_n) begin
    hcnt <= (hcnt == 1599) ? 0 : hcnt + 1;
    if (hcnt == 1599) vcnt <= (vcnt == 524) ? 0 : vcnt + 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    reset_n = 1;
    write_scene(0);
    wait (vcnt == 2);
    for (int n = 0; n < 2 * 840000; n++) begin
      @(negedge clk);
      if (hcnt % 8 == 7 && !(vcnt >= 485 && vcnt <= 500)) begin
        int x, y;
        logic [3:0] p; logic [31:0] d;
        ref_ahead(int'(hcnt), int'(vcnt), 2, x, y);
        ref_block(x, y, p, d);
        checks++;
        if (fg_pixmap !== p || fg_data !== d) begin
          failures++;
          if (failures < 10) $display("h=%0d v=%0d block (%0d,%0d): got %b %h want %b %h", hcnt, vcnt, x, y, fg_pixmap, fg_data, p, d);
        end
      end
      if (vcnt == 490 && hcnt == 0) fork write_scene(6); join_none
    end
    checks++;
    if (n_two == 0 || n_stand == 0 || n_ball == 0) begin failures++; $display("coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles++;
    if (cycles > 2_000_000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
