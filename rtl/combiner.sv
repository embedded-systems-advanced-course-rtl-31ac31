// combiner: pipelined reduction of the CAM hits (combiner).
//
// Takes 64 (valid, data) pairs, one per pos_cell, and passes out the first
// two valid pairs in input order, through four register stages:
//   stage 1: 8 combiner8 units, 8 inputs each      -> 16 pairs
//   stage 2: 4 units, each fed by 2 stage-1 units  ->  8 pairs
//   stage 3: 2 units, each fed by 2 stage-2 units  ->  4 pairs
//   stage 4: 1 unit fed by both stage-3 units      ->  2 pairs
// In stages 2 to 4 the four unused inputs of each unit are tied to 0. The
// stand pair (combiner_out(1)) bypasses the tree and is delayed by the
// same four registers, so all three outputs describe the same search.
// Latency: 4 clocks, one new search per clock. Inputs beyond the number of
// cells in use are tied to 0 by the caller and their units fold away.
//
// Structure and stage counts follow the source; feeding each later-stage
// unit with four inputs is this design's reading of the structure.
module combiner (
  input  logic              clk,
  input  logic              reset_n,
  input  logic [63:0]       poscell_valid,
  input  logic [63:0][31:0] poscell_data,
  input  logic              stand_valid,
  input  logic [31:0]       stand_data,
  output logic [2:0]        combiner_valid,   // [0] stand, [1] first ball, [2] second ball
  output logic [2:0][31:0]  combiner_data
);

  logic [15:0]       s1_v, s1_vq;
  logic [15:0][31:0] s1_d, s1_dq;
  logic [7:0]        s2_v, s2_vq;
  logic [7:0][31:0]  s2_d, s2_dq;
  logic [3:0]        s3_v, s3_vq;
  logic [3:0][31:0]  s3_d, s3_dq;
  logic [1:0]        s4_v, s4_vq;
  logic [1:0][31:0]  s4_d, s4_dq;
  logic [3:0]        st_v;
  logic [3:0][31:0]  st_d;

  for (genvar u = 0; u < 8; u++) begin : g_stage1
    combiner8 u_c8 (
      .in_valid (poscell_valid[8*u +: 8]),
      .in_data  (poscell_data[8*u +: 8]),
      .out_valid(s1_v[2*u +: 2]),
      .out_data (s1_d[2*u +: 2])
    );
  end

  for (genvar u = 0; u < 4; u++) begin : g_stage2
    combiner8 u_c8 (
      .in_valid ({4'b0, s1_vq[4*u +: 4]}),
      .in_data  ({128'b0, s1_dq[4*u +: 4]}),
      .out_valid(s2_v[2*u +: 2]),
      .out_data (s2_d[2*u +: 2])
    );
  end

  for (genvar u = 0; u < 2; u++) begin : g_stage3
    combiner8 u_c8 (
      .in_valid ({4'b0, s2_vq[4*u +: 4]}),
      .in_data  ({128'b0, s2_dq[4*u +: 4]}),
      .out_valid(s3_v[2*u +: 2]),
      .out_data (s3_d[2*u +: 2])
    );
  end

  combiner8 u_stage4 (
    .in_valid ({4'b0, s3_vq}),
    .in_data  ({128'b0, s3_dq}),
    .out_valid(s4_v),
    .out_data (s4_d)
  );

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      s1_vq <= '0; s1_dq <= '0;
      s2_vq <= '0; s2_dq <= '0;
      s3_vq <= '0; s3_dq <= '0;
      s4_vq <= '0; s4_dq <= '0;
      st_v  <= '0; st_d  <= '0;
    end else begin
      s1_vq <= s1_v; s1_dq <= s1_d;
      s2_vq <= s2_v; s2_dq <= s2_d;
      s3_vq <= s3_v; s3_dq <= s3_d;
      s4_vq <= s4_v; s4_dq <= s4_d;
      st_v  <= {st_v[2:0], stand_valid};
      st_d  <= {st_d[2:0], stand_data};
    end
  end

  assign combiner_valid = {s4_vq, st_v[3]};
  assign combiner_data  = {s4_dq, st_d[3]};

endmodule
