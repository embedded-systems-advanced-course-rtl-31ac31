// tb_cam: fills all 46 cells through the write port with objects crowded
// into a small area (some invalid, cell 10 the stand), searches a random
// block every clock, and checks 5 clocks later: Active1/Data1 report cell
// 10, Active2/Data2 and Active3/Data3 the first two other cells, in address
// order, whose square the block touches. The cells are then rewritten and
// the check repeated; writes to addresses 46..63 must change nothing.
module tb_cam;
  import zuma_pkg::*;
  import zuma_tb_pkg::*;
  logic clk = 0, reset_n = 0, wr_n = 1;
  logic [5:0] addr = 0;
  logic [31:0] data = 0;
  xpos_t xpos = 0; ypos_t ypos = 0;
  logic [2:0] active;
  logic [2:0][31:0] obj_data;
  cam dut (.*);
  always #10 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  logic [31:0] cells [46];
  logic [2:0] ev [$];
  logic [2:0][31:0] ed [$];
  int n_two = 0, n_stand = 0, n_none = 0;

  task automatic fill();
    for (int i = 0; i < 64; i++) begin
      logic [31:0] w;
      @(negedge clk);
      w = obj_word(($urandom % 5) != 0, 8'($urandom), 100 + $urandom % 120, 100 + $urandom % 60);
      wr_n = 0; addr = 6'(i); data = w;
      if (i < 46) cells[i] = w;
    end
    @(negedge clk); wr_n = 1;
    repeat (3) @(negedge clk);
  endtask

  task automatic search(int count);
    ev.delete(); ed.delete();
    for (int n = 0; n < count + 5; n++) begin
      logic [2:0] v;
      logic [2:0][31:0] d;
      int k;
      if (ev.size() == 5) begin
        v = ev.pop_front(); d = ed.pop_front();
        checks++;
        if (active !== v || obj_data !== d) begin
          failures++;
          if (failures < 10) $display("got %b %h want %b %h", active, obj_data, v, d);
        end
      end
      xpos = xpos_t'((70 + $urandom % 180) & ~3);
      ypos = ypos_t'(70 + $urandom % 120);
      v = 0; d = 0; k = 0;
      if (cells[10][31] && ref_square_hit(int'(xpos), int'(ypos), int'(cells[10][9:0]), int'(cells[10][18:10]))) begin
        v[0] = 1; d[0] = cells[10]; n_stand++;
      end
      for (int i = 0; i < 46; i++)
        if (i != 10 && k < 2 && cells[i][31] &&
            ref_square_hit(int'(xpos), int'(ypos), int'(cells[i][9:0]), int'(cells[i][18:10]))) begin
          v[k+1] = 1; d[k+1] = cells[i]; k++;
        end
      if (k == 2) n_two++;
      if (v == 0) n_none++;
      ev.push_back(v); ed.push_back(d);
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    reset_n = 1;
    repeat (2) @(negedge clk);
    fill();
    search(3000);
    fill();
    search(3000);
    checks++;
    if (n_two == 0 || n_stand == 0 || n_none == 0) begin failures++; $display("coverage %0d %0d %0d", n_two, n_stand, n_none); end
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
