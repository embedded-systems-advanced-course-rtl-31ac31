// tb_bkgnd_gen: runs a raster counter over a frame with the grid background
// and a frame without it (BG_SEL = 1), and checks after every blk_start that
// BG_DATA holds the four reference background pixels of the block two
// blocks ahead, including the wrap onto the next line and frame.
module tb_bkgnd_gen;
  import zuma_pkg::*;
  import zuma_tb_pkg::*;
  logic clk = 0, reset_n = 0;
  hcnt_t hcnt = 0; vcnt_t vcnt = 0;
  logic bg_sel = 0, blk_start;
  block_t bg_data;
  bkgnd_gen dut (.*);
  always #10 clk = ~clk;
  assign blk_start = (hcnt[2:0] == 0);

  int checks = 0, failures = 0, cycles = 0;
  int n_grid = 0, n_ent = 0, n_exit = 0, n_wrap = 0;

  initial begin
    repeat (3) @(posedge clk);
    reset_n = 1;
    for (int f = 0; f < 2; f++) begin
      bg_sel = f[0];
      for (int n = 0; n < 840000; n++) begin
        int h, v;
        h = hcnt; v = vcnt;
        @(negedge clk);
        if (h % 8 == 0) begin
          int x, y;
          logic [31:0] exp;
          ref_ahead(h, v, 2, x, y);
          if (h >= 1584) n_wrap++;
          for (int i = 0; i < 4; i++) begin
            exp[8*(3-i) +: 8] = ref_bg(x + i, y, bg_sel);
            if (exp[8*(3-i) +: 8] == 8'b010_011_11) n_grid++;
            if (exp[8*(3-i) +: 8] == 8'b011_101_00) n_ent++;
            if (exp[8*(3-i) +: 8] == 8'b010_010_11) n_exit++;
          end
          checks++;
          if (bg_data !== exp) begin
            failures++;
            if (failures < 10) $display("h=%0d v=%0d sel=%0b: got %h want %h", h, v, bg_sel, bg_data, exp);
          end
        end
        hcnt = (hcnt == 1599) ? 0 : hcnt + 1;
        if (hcnt == 0) vcnt = (vcnt == 524) ? 0 : vcnt + 1;
      end
    end
    checks++;
    if (n_grid == 0 || n_ent == 0 || n_exit == 0 || n_wrap == 0) begin failures++; $display("coverage"); end
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
