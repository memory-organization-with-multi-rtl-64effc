// De-shuffle unit: returns module-ordered data to lane order.
//
// Lane p takes the item of module sel[p]: one N-to-1 multiplexer per lane,
// as the text describes. Used on the read data path with the module indices
// of the access that produced the data. Combinational.
module pm_deshuffle #(
  parameter int unsigned N = 8,   // lanes = modules
  parameter int unsigned W = 8    // item width
) (
  input  logic [N-1:0][W-1:0]          in_data,
  input  logic [N-1:0][$clog2(N)-1:0]  sel,
  output logic [N-1:0][W-1:0]          out_data
);

  always_comb
    for (int p = 0; p < N; p++)
      out_data[p] = in_data[sel[p]];

endmodule
