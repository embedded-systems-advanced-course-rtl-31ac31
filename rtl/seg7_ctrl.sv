// seg7_ctrl: four-digit seven-segment display controller.
//
// The processor writes one 32-bit word (WR_n low): bits 31:24 are the
// thousands digit D3, 23:16 hundreds D2, 15:8 tens D1, 7:0 ones D0, each a
// value 0..9. The four digits share their segment lines and each has its
// own anode, so the controller lights one digit at a time: a refresh
// counter moves to the next digit every REFRESH_CYCLES clocks, cycling
// D0, D1, D2, D3. AN_n[k] (active low) enables digit Dk; SEG_n is
// {dp, g, f, e, d, c, b, a}, active low, with the decimal point off. A
// digit value above 9 leaves the digit dark.
//
// The word format, the shared-cathode scanning and 0..9 digits follow the
// source. The refresh period (65536 clocks per digit, about 190 Hz per
// full scan at 50 MHz), the scan order and the active-low polarities are
// this design's choices.
module seg7_ctrl #(
  parameter int unsigned REFRESH_CYCLES = 65536
) (
  input  logic        clk,
  input  logic        reset_n,
  input  logic        wr_n,
  input  logic [31:0] data,
  output logic [7:0]  seg_n,
  output logic [3:0]  an_n
);

  logic [31:0] digits;
  logic [$clog2(REFRESH_CYCLES+1)-1:0] refresh;
  logic [1:0]  sel;
  logic [7:0]  cur;
  logic [6:0]  seg;   // g..a, active high

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      digits  <= '0;
      refresh <= '0;
      sel     <= '0;
    end else begin
      if (!wr_n) digits <= data;
      if (refresh == ($bits(refresh))'(REFRESH_CYCLES - 1)) begin
        refresh <= '0;
        sel     <= sel + 2'd1;
      end else begin
        refresh <= refresh + 1'b1;
      end
    end
  end

  always_comb begin
    cur = digits[8*sel +: 8];
    unique case (cur)
      8'd0: seg = 7'b0111111;
      8'd1: seg = 7'b0000110;
      8'd2: seg = 7'b1011011;
      8'd3: seg = 7'b1001111;
      8'd4: seg = 7'b1100110;
      8'd5: seg = 7'b1101101;
      8'd6: seg = 7'b1111101;
      8'd7: seg = 7'b0000111;
      8'd8: seg = 7'b1111111;
      8'd9: seg = 7'b1101111;
      default: seg = 7'b0000000;
    endcase
    seg_n = {1'b1, ~seg};
    an_n  = ~(4'b0001 << sel);
  end

endmodule
