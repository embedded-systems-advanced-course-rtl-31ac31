// vga_output_if: block-to-pixel serialiser.
//
// A 32-bit block (4 pixels of 8 bits, leftmost pixel in [31:24]) is loaded
// into a shift register in the last clock of every 8-clock block
// (HCNT[2:0] = 7), so it is shown during the following block. Within a
// block the register shifts left by one byte after every odd clock
// (HCNT[0] = 1), giving each pixel two clocks. PIX is the top byte.
//
// The load-every-8 / shift-every-2 behaviour and the resulting one-block
// delay follow the source; the load phase and byte order are this
// design's choice.
module vga_output_if
  import zuma_pkg::*;
(
  input  logic       clk,
  input  logic       reset_n,
  input  logic [2:0] hphase,     // HCNT[2:0]
  input  block_t     disp_data,
  output pixel_t     pix
);

  block_t shreg;

  always_ff @(posedge clk) begin
    if (!reset_n)
      shreg <= '0;
    else if (hphase == 3'd7)
      shreg <= disp_data;
    else if (hphase[0])
      shreg <= {shreg[23:0], 8'h00};
  end

  assign pix = shreg[31:24];

endmodule
