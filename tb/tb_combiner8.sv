// tb_combiner8: random valid patterns (sparse and dense) and data; checks
// that the outputs are the lowest and second-lowest valid inputs, and zero
// where there are fewer than two.
module tb_combiner8;
  logic [7:0]       in_valid;
  logic [7:0][31:0] in_data;
  logic [1:0]       out_valid;
  logic [1:0][31:0] out_data;
  combiner8 dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [1:0] ev;
      logic [1:0][31:0] ed;
      int k;
      in_valid = (n % 2) ? 8'($urandom) : 8'($urandom) & 8'($urandom) & 8'($urandom);
      for (int i = 0; i < 8; i++) in_data[i] = $urandom;
      #1;
      ev = 0; ed = 0; k = 0;
      for (int i = 0; i < 8; i++)
        if (in_valid[i] && k < 2) begin ev[k] = 1; ed[k] = in_data[i]; k++; end
      checks++;
      if (out_valid !== ev || out_data !== ed) begin
        failures++;
        if (failures < 10) $display("valid %b: got %b %h want %b %h", in_valid, out_valid, out_data, ev, ed);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
