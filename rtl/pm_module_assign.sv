// Module assignment unit of one address side.
//
// Maps each of the D lane addresses a of one side to the index m(a) of the
// memory module along that side, D = 2^d, with the function of the case
// chosen by the mode select unit (S = sigma*2^s):
//   cases I, II : m(a) = a mod D                                  (eq. 7)
//   case III    : m(a) = (a + floor(floor(a/D)/2^(s-d))) mod D    (eq. 14)
//               = (a + (a >> s)) mod D
//   case IV     : m(a) = (a + (floor(a/D) mod 2^s)) mod D         (eq. 16)
//   case V      : m(a) = (a + GL*floor(a/2^s)) mod D              (eq. 18)
//   case VI     : m(a) = (a + (GL*floor(a/D)) mod 2^s) mod D      (eq. 21)
// All five functions are computed in parallel and a multiplexer picks one
// (as in the text). Each function is a rotation of the low address bits by
// an amount that depends only on the module row floor(a/D), so every word
// keeps a unique (module, row) place whatever case stored it.
//
// `conflict` is high when two valid lanes holding different addresses map to
// the same module. This does not happen for the cases as specified with one
// exception: in case VI with a stride that is an odd multiple (>1) of 2^s,
// an access that straddles two groups can hit one module twice. The flag
// is this design's addition; it exposes that situation instead of hiding it.
// Combinational.
module pm_module_assign
  import pm_pkg::*;
#(
  parameter int unsigned D  = 8,
  parameter int unsigned AW = 8
) (
  input  logic [D-1:0][AW-1:0]         addr,
  input  logic [D-1:0]                 lane_valid,
  input  pm_mode_e                     mode,
  input  logic [$clog2(PW)-1:0]        s_exp,
  input  logic [PW-1:0]                glen,
  output logic [D-1:0][$clog2(D)-1:0]  mod_idx,
  output logic                         conflict
);

  localparam int unsigned LD = $clog2(D);
  localparam int unsigned MW = (LD > 0) ? LD : 1;

  always_comb begin
    logic [AW-1:0] a, row, skew;
    logic [AW-1:0] smask;
    smask = AW'((AW+1)'(1) << s_exp) - AW'(1);  // 2^s - 1
    for (int p = 0; p < D; p++) begin
      a   = addr[p];
      row = a >> LD;
      case (mode)
        MODE_III: skew = a >> s_exp;
        MODE_IV:  skew = row & smask;
        MODE_V:   skew = AW'(glen * (PW+AW)'(a >> s_exp));
        MODE_VI:  skew = AW'(glen * (PW+AW)'(row)) & smask;
        default:  skew = '0;
      endcase
      mod_idx[p] = MW'(a + skew);
    end
  end

  always_comb begin
    conflict = 1'b0;
    for (int p = 0; p < D; p++)
      for (int q = p + 1; q < D; q++)
        if (lane_valid[p] && lane_valid[q] && mod_idx[p] == mod_idx[q] && addr[p] != addr[q])
          conflict = 1'b1;
  end

endmodule
