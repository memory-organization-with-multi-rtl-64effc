// Shuffle unit: routes N lane-ordered items to N module positions.
//
// Lane p carries item in_data[p] destined for module sel[p]. Each lane drives
// a demultiplexer, and each module output is the OR of what all lanes
// deliver to it, as the text describes (demultiplexers and output OR gates).
// out_valid[m] tells whether any valid lane targets module m. The module
// assignment functions guarantee at most one valid lane per module; if two
// valid lanes carry the same item to one module (overlapping patterns) the OR
// leaves it unchanged. Used for row addresses and for write data.
// Combinational.
module pm_shuffle #(
  parameter int unsigned N = 8,   // lanes = modules
  parameter int unsigned W = 8    // item width
) (
  input  logic [N-1:0][W-1:0]          in_data,
  input  logic [N-1:0][$clog2(N)-1:0]  sel,
  input  logic [N-1:0]                 in_valid,
  output logic [N-1:0][W-1:0]          out_data,
  output logic [N-1:0]                 out_valid
);

  always_comb begin
    out_data  = '0;
    out_valid = '0;
    for (int p = 0; p < N; p++)
      for (int m = 0; m < N; m++)
        if (in_valid[p] && sel[p] == ($clog2(N))'(m)) begin
          out_data[m]  = out_data[m] | in_data[p];
          out_valid[m] = 1'b1;
        end
  end

endmodule
