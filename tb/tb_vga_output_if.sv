// tb_vga_output_if: drives the block phase like HCNT[2:0] and a new random
// block each block time; checks that the block loaded at phase 7 comes out
// during the next 8 clocks (HCNT phases 0..7) as bytes [31:24],[23:16],[15:8],[7:0], each
// held for two clocks.
module tb_vga_output_if;
  import zuma_pkg::*;
  logic clk = 0, reset_n = 0;
  logic [2:0] hphase = 0;
  block_t disp_data = 0;
  pixel_t pix;
  vga_output_if dut (.*);
  always #10 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  block_t loaded;

  initial begin
    repeat (3) @(posedge clk);
    reset_n = 1;
    loaded = 'x;
    for (int n = 0; n < 8 * 500; n++) begin
      @(negedge clk);
      // hphase still holds the phase the last clock edge saw
      if (hphase == 3'd7) loaded = disp_data;
      if (n >= 8) begin
        int idx;
        idx = 3 - ((int'(hphase) + 1) % 8) / 2;
        checks++;
        if (pix !== loaded[8*idx +: 8]) begin
          failures++;
          if (failures < 10) $display("phase %0d: got %h want %h", hphase, pix, loaded[8*idx +: 8]);
        end
      end
      hphase = hphase + 1;
      if (hphase == 3'd1) disp_data = $urandom;
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
