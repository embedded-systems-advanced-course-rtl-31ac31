// tb_overlay: random background, foreground and pixmap each clock; checks
// that DISP_DATA changes only at blk_start and then holds, per pixel, the
// foreground byte where the pixmap bit is 1 and the background byte
// elsewhere (pixel 0 = [31:24] = pixmap bit 3).
module tb_overlay;
  import zuma_pkg::*;
  logic clk = 0, reset_n = 0, blk_start = 0;
  block_t bg_data = 0, fg_data = 0, disp_data;
  pixmap_t fg_pixmap = 0;
  overlay dut (.*);
  always #10 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  block_t exp = 0;

  initial begin
    repeat (3) @(posedge clk);
    reset_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      checks++;
      if (disp_data !== exp) begin
        failures++;
        if (failures < 10) $display("n=%0d got %h want %h", n, disp_data, exp);
      end
      bg_data = $urandom; fg_data = $urandom; fg_pixmap = 4'($urandom);
      blk_start = (n % 8 == 0);
      if (blk_start)
        for (int i = 0; i < 4; i++)
          exp[8*(3-i) +: 8] = fg_pixmap[3-i] ? fg_data[8*(3-i) +: 8] : bg_data[8*(3-i) +: 8];
    end
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
