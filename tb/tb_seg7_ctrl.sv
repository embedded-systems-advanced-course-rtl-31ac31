// tb_seg7_ctrl: with a short refresh period (8 clocks per digit) writes
// scores and checks that exactly one anode is low at a time, that the
// anodes step D0, D1, D2, D3 with each digit lit for exactly 8 clocks, and
// that the lit digit shows the segment pattern of its byte (digits 0..9,
// a value above 9 dark, decimal point off).
module tb_seg7_ctrl;
  logic clk = 0, reset_n = 0, wr_n = 1;
  logic [31:0] data = 0;
  logic [7:0] seg_n;
  logic [3:0] an_n;
  seg7_ctrl #(.REFRESH_CYCLES(8)) dut (.*);
  always #10 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  // {dp,g,f,e,d,c,b,a} active low
  logic [7:0] code[10] = '{8'hC0, 8'hF9, 8'hA4, 8'hB0, 8'h99, 8'h92, 8'h82, 8'hF8, 8'h80, 8'h90};
  logic [31:0] word = 0;
  int run = 0, cur = -1, n_dark = 0;
  int seen[4] = '{0, 0, 0, 0};

  task automatic write_word(logic [31:0] w);
    @(negedge clk); wr_n = 0; data = w;
    @(negedge clk); wr_n = 1;
  endtask

  // the register the controller should hold, updated on the same edge
  always @(posedge clk) if (reset_n && !wr_n) word <= data;

  always @(negedge clk) if (reset_n && cycles > 4) begin
    int k;
    k = -1;
    for (int i = 0; i < 4; i++) if (an_n == ~(4'b1 << i)) k = i;
    checks++;
    if (k < 0) begin failures++; $display("anodes %b", an_n); end
    else begin
      logic [7:0] v, exp;
      v = word[8*k +: 8];
      exp = (v <= 9) ? code[v] : 8'hFF;
      if (v > 9) n_dark++;
      seen[k]++;
      checks++;
      if (seg_n !== exp) begin failures++; if (failures < 10) $display("digit %0d value %0d: %h want %h", k, v, seg_n, exp); end
      if (k == cur) run++;
      else begin
        if (cur >= 0) begin
          checks += 2;
          if (run != 8 && cycles > 20) begin failures++; $display("digit %0d lit %0d clocks", cur, run); end
          if (k != (cur + 1) % 4) begin failures++; $display("order %0d -> %0d", cur, k); end
        end
        cur = k; run = 1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    reset_n = 1;
    write_word({8'd1, 8'd8, 8'd2, 8'd6});
    repeat (200) @(negedge clk);
    for (int n = 0; n < 40; n++) begin
      write_word({8'($urandom % 12), 8'($urandom % 10), 8'($urandom % 10), 8'($urandom % 11)});
      repeat (64) @(negedge clk);
    end
    foreach (seen[i]) begin checks++; if (seen[i] == 0) failures++; end
    checks++; if (n_dark == 0) failures++;
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
