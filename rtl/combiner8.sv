// combiner8: picks the first two valid entries out of eight (combiner8).
//
// Purely combinational. out_valid[0]/out_data[0] is the lowest-numbered
// valid input, out_valid[1]/out_data[1] the next one; an output with no
// valid input behind it is 0. Input order is kept, so a tree of these
// units picks the first two valid entries of a larger set. The function is
// the source's; the priority-encoder implementation is this design's.
module combiner8 (
  input  logic [7:0]       in_valid,
  input  logic [7:0][31:0] in_data,
  output logic [1:0]       out_valid,
  output logic [1:0][31:0] out_data
);

  always_comb begin
    out_valid = '0;
    out_data  = '0;
    for (int i = 0; i < 8; i++) begin
      if (in_valid[i]) begin
        if (!out_valid[0]) begin
          out_valid[0] = 1'b1;
          out_data[0]  = in_data[i];
        end else if (!out_valid[1]) begin
          out_valid[1] = 1'b1;
          out_data[1]  = in_data[i];
        end
      end
    end
  end

endmodule
