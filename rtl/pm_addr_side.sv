// One side (vertical or horizontal) of the address part.
//
// The 2D address of a pattern element is separable: its vertical and
// horizontal constituents are generated independently by two identical
// sides. A side chains the mode select unit, the address generator, the row
// address generators, the module assignment unit and the address shuffle:
//   pattern (S, GL, BL) -> case -> D lane addresses a_p per access
//   -> module index m(a_p) and row part floor(a_p / D)
//   -> row part routed to module m(a_p).
// The row address generator needs no logic: the row part is a_p with its
// low log2(D) bits dropped (eq. 22); pm_top concatenates the vertical part
// (upper bits) and the horizontal part (lower bits).
//
// Outputs per lane (lane order, for the client and the data path) and per
// module (module order, for the memory matrix). Timing as pm_addr_gen: the
// lane and module outputs describe the current access, `last` the final one;
// everything after the counters is combinational.
module pm_addr_side
  import pm_pkg::*;
#(
  parameter int unsigned D  = 8,   // modules along this side
  parameter int unsigned RW = 5    // row address bits contributed by this side
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic                          step,
  input  logic [$clog2(D)+RW-1:0]       base,
  input  pm_dim_t                       dim,
  // lane order
  output logic [D-1:0][$clog2(D)+RW-1:0] lane_addr,
  output logic [D-1:0]                  lane_valid,
  output logic [D-1:0][$clog2(D)-1:0]   lane_mod,
  // module order
  output logic [D-1:0][RW-1:0]          mod_row,
  output logic [D-1:0]                  mod_en,
  // status
  output logic                          last,
  output pm_mode_e                      mode,
  output logic                          conflict
);

  localparam int unsigned LD = $clog2(D);
  localparam int unsigned AW = LD + RW;

  logic [$clog2(PW)-1:0] s_exp, gl_log2;
  logic [D-1:0][RW-1:0]  lane_row;

  pm_mode_select #(.D(D)) u_mode (
    .dim     (dim),
    .mode    (mode),
    .s_exp   (s_exp),
    .gl_log2 (gl_log2)
  );

  pm_addr_gen #(.D(D), .AW(AW)) u_gen (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .step       (step),
    .base       (base),
    .dim        (dim),
    .mode       (mode),
    .gl_log2    (gl_log2),
    .addr       (lane_addr),
    .lane_valid (lane_valid),
    .last       (last)
  );

  pm_module_assign #(.D(D), .AW(AW)) u_assign (
    .addr       (lane_addr),
    .lane_valid (lane_valid),
    .mode       (mode),
    .s_exp      (s_exp),
    .glen       (dim.glen),
    .mod_idx    (lane_mod),
    .conflict   (conflict)
  );

  // Row address generators: drop the module-select bits.
  always_comb
    for (int p = 0; p < D; p++)
      lane_row[p] = RW'(lane_addr[p] >> LD);

  pm_shuffle #(.N(D), .W(RW)) u_shuffle (
    .in_data   (lane_row),
    .sel       (lane_mod),
    .in_valid  (lane_valid),
    .out_data  (mod_row),
    .out_valid (mod_en)
  );

endmodule
