// tb_reg_position: runs a raster counter over a frame and checks after every
// blk_start that xPos/yPos address the block two ahead and
// xPos_Next/yPos_Next the block three ahead, and that nothing changes
// between blk_starts.
module tb_reg_position;
  import zuma_pkg::*;
  import zuma_tb_pkg::*;
  logic clk = 0, reset_n = 0;
  hcnt_t hcnt = 0; vcnt_t vcnt = 0;
  logic blk_start;
  xpos_t xpos, xpos_next; ypos_t ypos, ypos_next;
  reg_position dut (.*);
  always #10 clk = ~clk;
  assign blk_start = (hcnt[2:0] == 0);

  int checks = 0, failures = 0, cycles = 0;
  int ex2 = 0, ey2 = 0, ex3 = 0, ey3 = 0;

  initial begin
    repeat (3) @(posedge clk);
    reset_n = 1;
    for (int n = 0; n < 840000 + 3200; n++) begin
      int h, v;
      h = hcnt; v = vcnt;
      @(negedge clk);
      if (h % 8 == 0) begin
        ref_ahead(h, v, 2, ex2, ey2);
        ref_ahead(h, v, 3, ex3, ey3);
      end
      checks++;
      if (int'(xpos) != ex2 || int'(ypos) != ey2 || int'(xpos_next) != ex3 || int'(ypos_next) != ey3) begin
        failures++;
        if (failures < 10) $display("h=%0d v=%0d: %0d,%0d %0d,%0d want %0d,%0d %0d,%0d", h, v,
                                    xpos, ypos, xpos_next, ypos_next, ex2, ey2, ex3, ey3);
      end
      hcnt = (hcnt == 1599) ? 0 : hcnt + 1;
      if (hcnt == 0) vcnt = (vcnt == 524) ? 0 : vcnt + 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles++;
    if (cycles > 1_000_000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
