// tb_combiner: a new random set of 64 (valid, data) pairs every clock, with
// hits spread over all eight first-stage groups, plus a random stand pair;
// checks 4 clocks later that the outputs are the stand pair and the first
// two valid pairs in input order, so that the pipeline takes one search
// per clock with a latency of exactly 4.
module tb_combiner;
  logic clk = 0, reset_n = 0;
  logic [63:0] poscell_valid = 0;
  logic [63:0][31:0] poscell_data = 0;
  logic stand_valid = 0;
  logic [31:0] stand_data = 0;
  logic [2:0] combiner_valid;
  logic [2:0][31:0] combiner_data;
  combiner dut (.*);
  always #10 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  logic [2:0] ev [$];
  logic [2:0][31:0] ed [$];
  int n_two = 0, n_late = 0;

  initial begin
    repeat (3) @(posedge clk);
    reset_n = 1;
    for (int n = 0; n < 6000; n++) begin
      logic [2:0] v;
      logic [2:0][31:0] d;
      int k;
      @(negedge clk);
      if (ev.size() == 4) begin
        v = ev.pop_front(); d = ed.pop_front();
        checks++;
        if (combiner_valid !== v || combiner_data !== d) begin
          failures++;
          if (failures < 10) $display("n=%0d got %b want %b", n, combiner_valid, v);
        end
      end
      poscell_valid = 0;
      for (int i = 0; i < 64; i++) begin
        poscell_data[i] = $urandom;
        poscell_valid[i] = ($urandom % 40) == 0;
      end
      stand_valid = $urandom % 2; stand_data = $urandom;
      v = {2'b00, stand_valid}; d = '0; d[0] = stand_data; k = 0;
      for (int i = 0; i < 64; i++)
        if (poscell_valid[i] && k < 2) begin
          v[k+1] = 1; d[k+1] = poscell_data[i]; k++;
          if (i >= 32) n_late++;
        end
      if (k == 2) n_two++;
      ev.push_back(v); ed.push_back(d);
    end
    checks++;
    if (n_two == 0 || n_late == 0) failures++;
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
