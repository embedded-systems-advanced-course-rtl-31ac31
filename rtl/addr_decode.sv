// addr_decode: CAM write address decoder (AddrDecode).
//
// Registers a processor write: when WR_n is low, the strobe of the cell
// numbered ADDR goes low for one clock (CELL_WR_n, active low, one bit per
// cell) and DATA_OUT holds the word. Addresses at or above N_CELLS write
// nothing. Latency: one clock. The source gives the function; the
// registered implementation is this design's choice.
module addr_decode #(
  parameter int unsigned N_CELLS = 46,
  parameter int unsigned ADDR_W  = 6
) (
  input  logic               clk,
  input  logic               reset_n,
  input  logic               wr_n_in,
  input  logic [ADDR_W-1:0]  addr,
  input  logic [31:0]        data_in,
  output logic [N_CELLS-1:0] cell_wr_n,
  output logic [31:0]        data_out
);

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      cell_wr_n <= '1;
      data_out  <= '0;
    end else begin
      for (int i = 0; i < N_CELLS; i++)
        cell_wr_n[i] <= !(!wr_n_in && (int'(addr) == i));
      if (!wr_n_in) data_out <= data_in;
    end
  end

  // at most one cell is written per clock
  a_one_strobe: assert property (@(posedge clk) disable iff (!reset_n) $onehot0(~cell_wr_n));

endmodule
