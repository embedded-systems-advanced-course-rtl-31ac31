// tb_vga_count: checks the raster counter over two full frames: HCNT runs
// 0..1599 and VCNT 0..524, BLANK/HSYNC/VSYNC match the 640x480 timing
// (display 1280 clocks and 480 lines, HSYNC low 192 clocks after a 32-clock
// front porch, VSYNC low lines 490-491), and a frame lasts 840000 clocks.
module tb_vga_count;
  import zuma_pkg::*;
  logic clk = 0, reset_n = 0;
  hcnt_t hcnt; vcnt_t vcnt;
  logic blank, hsync, vsync;
  vga_count dut (.*);
  always #10 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  int eh = 0, ev = 0;
  int vs_starts[$];

  initial begin
    repeat (3) @(posedge clk);
    reset_n <= 1;
    @(negedge clk);   // still in reset state: 0,0
    for (int n = 0; n < 2 * 840000 + 10; n++) begin
      checks++;
      if (hcnt != 11'(eh) || vcnt != 10'(ev) ||
          blank != (eh >= 1280 || ev >= 480) ||
          hsync != !(eh >= 1312 && eh < 1504) ||
          vsync != !(ev >= 490 && ev < 492)) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d,%0d: %0d %0d b%0b h%0b v%0b", eh, ev, hcnt, vcnt, blank, hsync, vsync);
      end
      if (eh == 0 && ev == 490) vs_starts.push_back(n);
      @(negedge clk);
      eh++;
      if (eh == 1600) begin eh = 0; ev = (ev + 1) % 525; end
    end
    checks++;
    if (vs_starts.size() < 2 || vs_starts[1] - vs_starts[0] != 840000) begin
      failures++; $display("frame period wrong");
    end
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
