// tb_pos_cell: writes random objects (valid and invalid) and searches blocks
// near them; checks one clock later that FOUND is set exactly when the
// 4-pixel block touches the object's 32x32 square and the word is valid,
// that DATA is the word on a hit and 0 otherwise, and that a write is seen
// by searches from the next clock on.
module tb_pos_cell;
  import zuma_pkg::*;
  import zuma_tb_pkg::*;
  logic clk = 0, reset_n = 0, wr_n = 1;
  obj_t data_load = '0;
  xpos_t xpos = 0; ypos_t ypos = 0;
  logic found; obj_t data;
  pos_cell dut (.*);
  always #10 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0, hits = 0;
  logic [31:0] cur = 0, exp_d = 0;
  bit exp_f = 0;

  initial begin
    repeat (3) @(posedge clk);
    reset_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      checks++;
      if (found !== exp_f || data !== obj_t'(exp_d)) begin
        failures++;
        if (failures < 10) $display("n=%0d obj %h pos: found %0b want %0b data %h want %h", n, cur, found, exp_f, data, exp_d);
      end
      wr_n = ($urandom % 8) != 0;
      data_load = obj_word(($urandom % 4) != 0, 8'($urandom), 16 + $urandom % 620, 16 + $urandom % 460);
      xpos = xpos_t'((int'(cur[9:0]) + int'($urandom % 64) - 32) & ~3);
      ypos = ypos_t'(int'(cur[18:10]) + int'($urandom % 48) - 24);
      exp_f = cur[31] && ref_square_hit(int'(xpos), int'(ypos), int'(cur[9:0]), int'(cur[18:10]));
      exp_d = exp_f ? cur : 0;
      if (exp_f) hits++;
      if (!wr_n) cur = data_load;
    end
    checks++;
    if (hits < 100) failures++;
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
