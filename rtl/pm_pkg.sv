// Shared types and constants of the multi-pattern parallel memory.
//
// The memory serves 2D access patterns described per side (vertical,
// horizontal) by a stride S, a group length GL (words per group) and a block
// length BL (groups per block). Each side is classified into one of six
// cases, each with its own module assignment function and element order.
// PW is the width of the stride and length registers; it is this design's
// choice (the text gives no register widths).
package pm_pkg;

  // Width of the stride / group length / block length fields.
  localparam int unsigned PW = 16;

  // The six cases of the problem partitioning. MODE_NONE is never produced
  // by the mode select unit and only exists so that 0 is not a valid case.
  typedef enum logic [2:0] {
    MODE_NONE = 3'd0,
    MODE_I    = 3'd1,  // odd stride, groups accessed element-index-major, m = a mod D
    MODE_II   = 3'd2,  // group-wise access, m = a mod D
    MODE_III  = 3'd3,  // even stride, GL not 2^x, s >= d: skew by a >> s
    MODE_IV   = 3'd4,  // even stride, GL not 2^x, s <  d: skew by (a/D) mod 2^s
    MODE_V    = 3'd5,  // even stride, GL = 2^x,  s >= d: skew by GL*(a >> s)
    MODE_VI   = 3'd6   // even stride, GL = 2^x,  s <  d: skew by (GL*(a/D)) mod 2^s
  } pm_mode_e;

  // Pattern parameters of one side.
  typedef struct packed {
    logic [PW-1:0] stride;  // S  (words)
    logic [PW-1:0] glen;    // GL (words per group)
    logic [PW-1:0] blen;    // BL (groups per block)
  } pm_dim_t;

  // Complete pattern as held in the special purpose registers.
  typedef struct packed {
    logic [31:0] base;  // linear base address b' = vb*N + hb
    pm_dim_t     v;
    pm_dim_t     h;
  } pm_pattern_t;

  // Special purpose register map.
  typedef enum logic [2:0] {
    SPR_BASE = 3'd0,
    SPR_VS   = 3'd1,
    SPR_HS   = 3'd2,
    SPR_VGL  = 3'd3,
    SPR_HGL  = 3'd4,
    SPR_VBL  = 3'd5,
    SPR_HBL  = 3'd6
  } pm_spr_e;

  // Element order of the address generator for a case.
  //   ORD_BLOCK_MAJOR : sequence (8), group index i runs fastest
  //   ORD_GROUP_MAJOR : sequence (11), element index k runs fastest
  //   ORD_ELEMENT     : cases V-VI, one linear element counter
  typedef enum logic [1:0] {
    ORD_BLOCK_MAJOR = 2'd0,
    ORD_GROUP_MAJOR = 2'd1,
    ORD_ELEMENT     = 2'd2
  } pm_order_e;

  function automatic pm_order_e order_of(pm_mode_e m);
    case (m)
      MODE_II:         return ORD_GROUP_MAJOR;
      MODE_V, MODE_VI: return ORD_ELEMENT;
      default:         return ORD_BLOCK_MAJOR;
    endcase
  endfunction

endpackage
