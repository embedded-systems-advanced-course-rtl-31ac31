// cam: content-addressable store of the foreground objects (CAM).
//
// The processor writes object words through WR_n/ADDR/DATA; addr_decode
// steers each write to one of N_CELLS pos_cells. Every clock all cells
// compare the searched block (xPos, yPos) with their object in parallel,
// and the combiner reduces their hits to three outputs:
//   Active1/Data1  the cell STAND_CELL (shooter stand), always routed to
//                  the stand draw object whatever the other cells hold;
//   Active2/Data2, Active3/Data3  the first two other cells, in address
//                  order, that hit the block (the two ball draw objects).
// A third ball hitting the same block is not drawn. Search latency: 5
// clocks (pos_cell register plus 4 combiner stages); write latency: 2
// clocks until a cell takes part in the search.
//
// Structure follows the source. N_CELLS = 46 is the source's object count;
// the source names the stand cell "pos_cell10", taken here as cell 10.
module cam
  import zuma_pkg::*;
#(
  parameter int unsigned N_CELLS    = 46,
  parameter int unsigned STAND_CELL = 10
) (
  input  logic        clk,
  input  logic        reset_n,
  input  logic        wr_n,
  input  logic [5:0]  addr,
  input  logic [31:0] data,
  input  xpos_t       xpos,
  input  ypos_t       ypos,
  output logic [2:0]        active,   // [0] stand, [1] ball 1, [2] ball 2
  output logic [2:0][31:0]  obj_data
);

  logic [N_CELLS-1:0]       cell_wr_n;
  logic [31:0]              c_data;
  logic [N_CELLS-1:0]       found;
  obj_t                     cell_data [N_CELLS];
  logic [63:0]              comb_valid;
  logic [63:0][31:0]        comb_data;

  addr_decode #(.N_CELLS(N_CELLS), .ADDR_W(6)) u_dec (
    .clk, .reset_n, .wr_n_in(wr_n), .addr, .data_in(data),
    .cell_wr_n, .data_out(c_data)
  );

  for (genvar i = 0; i < N_CELLS; i++) begin : g_cell
    pos_cell u_cell (
      .clk, .reset_n, .wr_n(cell_wr_n[i]), .data_load(obj_t'(c_data)),
      .xpos, .ypos, .found(found[i]), .data(cell_data[i])
    );
  end

  always_comb begin
    comb_valid = '0;
    comb_data  = '0;
    for (int i = 0; i < N_CELLS; i++) begin
      if (i != STAND_CELL) begin
        comb_valid[i] = found[i];
        comb_data[i]  = cell_data[i];
      end
    end
  end

  combiner u_comb (
    .clk, .reset_n,
    .poscell_valid (comb_valid),
    .poscell_data  (comb_data),
    .stand_valid   (found[STAND_CELL]),
    .stand_data    (cell_data[STAND_CELL]),
    .combiner_valid(active),
    .combiner_data (obj_data)
  );

endmodule
