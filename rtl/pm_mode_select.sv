// Mode select unit of one address side.
//
// Classifies the side's pattern (stride S, group length GL, block length BL)
// into one of the six cases of the problem partitioning, for D = 2^d memory
// modules along this side. With S = sigma * 2^s (sigma odd):
//   s == 0,  ceil(BL/D)*GL <  ceil(GL/D)*BL            -> case I
//   s == 0,  ceil(BL/D)*GL >= ceil(GL/D)*BL            -> case II
//   s != 0,  GL not a power of two, inequality ">="    -> case II
//   s != 0,  GL not a power of two, "<", s >= d        -> case III
//   s != 0,  GL not a power of two, "<", s <  d        -> case IV
//   s != 0,  GL a power of two,          s >= d        -> case V
//   s != 0,  GL a power of two,          s <  d        -> case VI
// The inequality picks the element order that needs fewer accesses. The unit
// also outputs s (trailing zeros of S) and log2(GL), which the address
// generator and the module assignment unit need. Purely combinational, as the
// text describes a unit of constant complexity. GL = 1 counts as a power of
// two (2^0); this design's choice, the text leaves it open. S is expected to
// be nonzero (the register file never holds a zero stride).
module pm_mode_select
  import pm_pkg::*;
#(
  parameter int unsigned D = 8   // modules along this side, a power of two
) (
  input  pm_dim_t              dim,
  output pm_mode_e             mode,
  output logic [$clog2(PW)-1:0] s_exp,   // s: trailing zeros of S
  output logic [$clog2(PW)-1:0] gl_log2  // log2(GL), valid when GL is a power of two
);

  localparam int unsigned LD = $clog2(D);

  logic [PW-1:0]   bl_blocks, gl_blocks;   // ceil(BL/D), ceil(GL/D)
  logic [2*PW-1:0] cost_block, cost_group; // accesses for orders (8) and (11)
  logic            gl_pow2, block_major;

  always_comb begin
    bl_blocks  = PW'((({1'b0, dim.blen} + (PW+1)'(D - 1)) >> LD));
    gl_blocks  = PW'((({1'b0, dim.glen} + (PW+1)'(D - 1)) >> LD));
    cost_block = bl_blocks * dim.glen;
    cost_group = gl_blocks * dim.blen;
    block_major = cost_block < cost_group;
    gl_pow2    = (dim.glen & (dim.glen - PW'(1))) == '0;

    s_exp = '0;
    for (int b = PW - 1; b >= 0; b--)
      if (dim.stride[b]) s_exp = ($clog2(PW))'(b);
    gl_log2 = '0;
    for (int b = 0; b < PW; b++)
      if (dim.glen[b]) gl_log2 = ($clog2(PW))'(b);

    if (!dim.stride[0] && gl_pow2)
      mode = (32'(s_exp) >= LD) ? MODE_V : MODE_VI;
    else if (!block_major)
      mode = MODE_II;
    else if (dim.stride[0])
      mode = MODE_I;
    else
      mode = (32'(s_exp) >= LD) ? MODE_III : MODE_IV;
  end

endmodule
