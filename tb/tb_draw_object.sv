// tb_draw_object: a ball-shaped and a stand-shaped draw object get the same
// random object and a random block near it every clock; checks 2 clocks
// later each one's PIXMAP against the reference masks (disc of diameter 32,
// T shape) and that painted pixels carry the object's colour and the
// others 0x00. Inactive requests must paint nothing.
module tb_draw_object;
  import zuma_pkg::*;
  import zuma_tb_pkg::*;
  logic clk = 0, reset_n = 0, active = 0;
  obj_t obj = '0;
  xpos_t xpos = 0; ypos_t ypos = 0;
  pixmap_t pm_b, pm_s;
  block_t dd_b, dd_s;
  draw_object #(.SHAPE(SHAPE_BALL)) dut_b (.clk, .reset_n, .active, .obj, .xpos, .ypos, .pixmap(pm_b), .disp_data(dd_b));
  draw_object #(.SHAPE(SHAPE_STAND)) dut_s (.clk, .reset_n, .active, .obj, .xpos, .ypos, .pixmap(pm_s), .disp_data(dd_s));
  always #10 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0, painted = 0, partial = 0;
  logic [3:0] epb [$], eps [$];
  logic [31:0] edb [$], eds [$];

  initial begin
    repeat (3) @(posedge clk);
    reset_n = 1;
    for (int n = 0; n < 20000; n++) begin
      logic [3:0] pb, ps;
      logic [31:0] db, ds;
      @(negedge clk);
      if (epb.size() == 2) begin
        pb = epb.pop_front(); ps = eps.pop_front(); db = edb.pop_front(); ds = eds.pop_front();
        checks += 2;
        if (pm_b !== pb || dd_b !== db) begin
          failures++; if (failures < 10) $display("ball: got %b %h want %b %h", pm_b, dd_b, pb, db);
        end
        if (pm_s !== ps || dd_s !== ds) begin
          failures++; if (failures < 10) $display("stand: got %b %h want %b %h", pm_s, dd_s, ps, ds);
        end
      end
      active = ($urandom % 8) != 0;
      obj = obj_t'(obj_word(1, 8'(1 + $urandom % 255), 40 + $urandom % 560, 40 + $urandom % 400));
      xpos = xpos_t'((int'(obj.x) - 22 + int'($urandom % 44)) & ~3);
      ypos = ypos_t'(int'(obj.y) - 18 + int'($urandom % 36));
      pb = 0; ps = 0; db = 0; ds = 0;
      for (int i = 0; i < 4; i++) begin
        if (active && ref_ball(int'(xpos) + i, int'(ypos), int'(obj.x), int'(obj.y))) begin
          pb[3-i] = 1; db[8*(3-i) +: 8] = obj.color;
        end
        if (active && ref_stand(int'(xpos) + i, int'(ypos), int'(obj.x), int'(obj.y))) begin
          ps[3-i] = 1; ds[8*(3-i) +: 8] = obj.color;
        end
      end
      if (pb != 0) painted++;
      if (pb != 0 && pb != 4'hF) partial++;
      epb.push_back(pb); eps.push_back(ps); edb.push_back(db); eds.push_back(ds);
    end
    checks++;
    if (painted == 0 || partial == 0) failures++;
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
