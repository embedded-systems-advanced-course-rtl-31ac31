// tb_addr_decode: random writes, idle cycles and out-of-range addresses;
// checks one clock later that exactly the addressed cell's strobe is low
// (none for an address of 46 or more, or no write), and DATA_OUT carries
// the written word.
module tb_addr_decode;
  logic clk = 0, reset_n = 0, wr_n_in = 1;
  logic [5:0] addr = 0;
  logic [31:0] data_in = 0, data_out;
  logic [45:0] cell_wr_n;
  addr_decode dut (.*);
  always #10 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  logic [45:0] exp_s = '1;
  logic [31:0] exp_d = 0;

  initial begin
    repeat (3) @(posedge clk);
    reset_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      checks++;
      if (cell_wr_n !== exp_s || data_out !== exp_d) begin
        failures++;
        if (failures < 10) $display("n=%0d strobes %h want %h data %h want %h", n, cell_wr_n, exp_s, data_out, exp_d);
      end
      wr_n_in = $urandom % 3 == 0;
      addr = 6'($urandom);
      data_in = $urandom;
      exp_s = '1;
      if (!wr_n_in) begin
        if (addr < 46) exp_s[addr] = 1'b0;
        exp_d = data_in;
      end
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
