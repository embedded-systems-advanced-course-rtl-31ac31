// vga_count: 640x480 raster counter for a 50 MHz pixel-doubled clock.
//
// HCNT counts clocks along a line (0 .. H_TOTAL-1) and VCNT counts lines
// (0 .. V_TOTAL-1). Active video is HCNT < H_DISPLAY and VCNT < V_DISPLAY,
// so HCNT/2 is the pixel x and VCNT the pixel y of the pixel being shown.
// BLANK is 1 outside active video. HSYNC and VSYNC are active-low pulses
// placed after the front porches. All outputs are decoded from the two
// counter registers and so change together, one clock per count.
//
// The 1280 display clocks per line and the HCNT/2 = x, VCNT = y mapping
// follow the source; porch and sync lengths (the usual 640x480@60 Hz
// numbers, doubled horizontally) and the sync polarity are this design's
// choice. Reset (active low, synchronous) starts at the top-left pixel.
module vga_count
  import zuma_pkg::*;
#(
  parameter int unsigned H_DISP  = H_DISPLAY,
  parameter int unsigned H_FP    = H_FRONT,
  parameter int unsigned H_SW    = H_SYNC,
  parameter int unsigned H_TOT   = H_TOTAL,
  parameter int unsigned V_DISP  = V_DISPLAY,
  parameter int unsigned V_FP    = V_FRONT,
  parameter int unsigned V_SW    = V_SYNC,
  parameter int unsigned V_TOT   = V_TOTAL
) (
  input  logic  clk,
  input  logic  reset_n,
  output hcnt_t hcnt,
  output vcnt_t vcnt,
  output logic  blank,
  output logic  hsync,
  output logic  vsync
);

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      hcnt <= '0;
      vcnt <= '0;
    end else if (hcnt == hcnt_t'(H_TOT - 1)) begin
      hcnt <= '0;
      vcnt <= (vcnt == vcnt_t'(V_TOT - 1)) ? '0 : vcnt + 1'b1;
    end else begin
      hcnt <= hcnt + 1'b1;
    end
  end

  always_comb begin
    blank = (hcnt >= hcnt_t'(H_DISP)) || (vcnt >= vcnt_t'(V_DISP));
    hsync = !((hcnt >= hcnt_t'(H_DISP + H_FP)) && (hcnt < hcnt_t'(H_DISP + H_FP + H_SW)));
    vsync = !((vcnt >= vcnt_t'(V_DISP + V_FP)) && (vcnt < vcnt_t'(V_DISP + V_FP + V_SW)));
  end

endmodule
