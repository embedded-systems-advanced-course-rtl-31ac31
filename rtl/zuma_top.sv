// zuma_top: the custom hardware of the ZUMA game system.
//
// The game runs as software on a processor that writes two memory-mapped
// peripherals: the VGA controller (zuma_vga), which draws up to 46 single-
// colour foreground objects over a fixed background on a 640x480 monitor,
// and the seven-segment controller (seg7_ctrl), which shows the 4-digit
// decimal score. The processor, its bus and the other vendor peripherals
// (keyboard, timers, UART, interrupt controller) are outside this RTL; their
// place is taken by the two write ports below.
//   VGA port:   vga_wr_n (active low), vga_addr (object cell 0..45),
//               vga_data (valid, colour, centre y, centre x)
//   score port: seg_wr_n (active low), seg_data (one digit per byte)
// Clock: 50 MHz. Reset: active low, synchronous.
module zuma_top
  import zuma_pkg::*;
(
  input  logic        clk,
  input  logic        reset_n,
  input  logic        vga_wr_n,
  input  logic [5:0]  vga_addr,
  input  logic [31:0] vga_data,
  input  logic        seg_wr_n,
  input  logic [31:0] seg_data,
  output logic        hsync,
  output logic        vsync,
  output logic [7:0]  vga,
  output logic [7:0]  seg_n,
  output logic [3:0]  an_n
);

  zuma_vga u_vga (
    .clk, .reset_n, .wr_n(vga_wr_n), .addr(vga_addr), .data(vga_data),
    .hsync, .vsync, .vga
  );

  seg7_ctrl u_seg (
    .clk, .reset_n, .wr_n(seg_wr_n), .data(seg_data), .seg_n, .an_n
  );

endmodule
