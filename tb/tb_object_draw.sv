// tb_object_draw: random stand and ball objects around a random block,
// overlapping often; checks 3 clocks later that FGND_PIXMAP is the union of
// the three reference masks and that each byte comes from the stand if it
// paints the pixel, else ball 1, else ball 2, else is 0x00.
module tb_object_draw;
  import zuma_pkg::*;
  import zuma_tb_pkg::*;
  logic clk = 0, reset_n = 0;
  logic shoot_active = 0, ball1_active = 0, ball2_active = 0;
  obj_t shoot_coord = '0, ball1_data = '0, ball2_data = '0;
  xpos_t xpos = 0; ypos_t ypos = 0;
  block_t fgnd_data; pixmap_t fgnd_pixmap;
  object_draw dut (.*);
  always #10 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0, n_two = 0, n_stand = 0;
  logic [3:0] ep [$];
  logic [31:0] ed [$];

  function automatic obj_t near(int cx, int cy);
    return obj_t'(obj_word(1, 8'(1 + $urandom % 255), cx - 20 + int'($urandom % 40), cy - 20 + int'($urandom % 40)));
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    reset_n = 1;
    for (int n = 0; n < 20000; n++) begin
      logic [3:0] p;
      logic [31:0] d;
      int x, y;
      @(negedge clk);
      if (ep.size() == 3) begin
        p = ep.pop_front(); d = ed.pop_front();
        checks++;
        if (fgnd_pixmap !== p || fgnd_data !== d) begin
          failures++; if (failures < 10) $display("got %b %h want %b %h", fgnd_pixmap, fgnd_data, p, d);
        end
      end
      x = 100 + $urandom % 400; y = 100 + $urandom % 300;
      xpos = xpos_t'(x & ~3); ypos = ypos_t'(y);
      shoot_active = $urandom % 3 == 0; ball1_active = $urandom % 4 != 0; ball2_active = $urandom % 2 == 0;
      shoot_coord = near(x, y); ball1_data = near(x, y); ball2_data = near(x, y);
      p = 0; d = 0;
      for (int i = 0; i < 4; i++) begin
        int px;
        bit s, b1, b2;
        px = int'(xpos) + i;
        s  = shoot_active && ref_stand(px, y, int'(shoot_coord.x), int'(shoot_coord.y));
        b1 = ball1_active && ref_ball(px, y, int'(ball1_data.x), int'(ball1_data.y));
        b2 = ball2_active && ref_ball(px, y, int'(ball2_data.x), int'(ball2_data.y));
        p[3-i] = s | b1 | b2;
        d[8*(3-i) +: 8] = s ? shoot_coord.color : b1 ? ball1_data.color : b2 ? ball2_data.color : 8'h00;
        if (b1 && b2) n_two++;
        if (s) n_stand++;
      end
      ep.push_back(p); ed.push_back(d);
    end
    checks++;
    if (n_two == 0 || n_stand == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles++;
    if (cycles > 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
