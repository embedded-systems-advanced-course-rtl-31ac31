// tb_vgactrl: feeds DISP_DATA as a known picture (pixel value a function of
// x and y) always describing the block after the current one, as the
// application must, and checks over a full frame that every pin sample
// (one clock after the counter) shows that picture's pixel at HCNT/2, VCNT,
// black during blanking, and the sync pulses at the right counts.
module tb_vgactrl;
  import zuma_pkg::*;
  logic clk = 0, reset_n = 0;
  block_t disp_data;
  hcnt_t hcnt; vcnt_t vcnt;
  logic blank, hsync_o, vsync_o;
  pixel_t vga_o;
  vgactrl dut (.*);
  always #10 clk = ~clk;

  function automatic pixel_t pat(int x, int y);
    return 8'(x * 3 + y * 5 + 1);
  endfunction

  always_comb begin
    int nb, y;
    nb = int'(hcnt) / 8 + 1; y = int'(vcnt);
    if (nb == 200) begin nb = 0; y = (y + 1) % 525; end
    for (int i = 0; i < 4; i++) disp_data[8*(3-i) +: 8] = pat(nb*4 + i, y);
  end

  int checks = 0, failures = 0, cycles = 0;
  int ph, pv;
  int n_pix = 0, n_blank = 0;

  initial begin
    repeat (3) @(posedge clk);
    reset_n = 1;
    @(negedge clk);
    ph = hcnt; pv = vcnt;
    for (int n = 0; n < 840000 + 2000; n++) begin
      @(negedge clk);
      if (n >= 16) begin
        logic [7:0] exp;
        exp = (ph >= 1280 || pv >= 480) ? 8'h00 : pat(ph / 2, pv);
        if (exp == 0) n_blank++; else n_pix++;
        checks++;
        if (vga_o !== exp || hsync_o !== !(ph >= 1312 && ph < 1504) || vsync_o !== !(pv >= 490 && pv < 492)) begin
          failures++;
          if (failures < 10) $display("at h=%0d v=%0d: vga %h want %h hs %0b vs %0b", ph, pv, vga_o, exp, hsync_o, vsync_o);
        end
      end
      ph = hcnt; pv = vcnt;
    end
    checks++;
    if (n_pix == 0 || n_blank == 0) failures++;
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
