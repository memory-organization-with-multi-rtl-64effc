// Address generator of one address side.
//
// Produces, each access cycle, the D addresses a = base + i*S + k (eq. 2) of
// one side's pattern, where i in [0,BL) is the group index and k in [0,GL)
// the element index inside a group. The order in which (i,k) pairs are
// visited depends on the case chosen by the mode select unit:
//   cases I, III, IV : sequence (8), a double counter with k outer and a
//                      block of D consecutive group indices i inner;
//                      ceil(BL/D)*GL accesses.
//   case II          : sequence (11), a double counter with i outer and a
//                      block of D consecutive element indices k inner;
//                      ceil(GL/D)*BL accesses.
//   cases V, VI      : one linear element counter e (k fastest), split as
//                      i = e >> log2 GL, k = e & (GL-1); ceil(GL*BL/D)
//                      accesses.
// Lanes past the end of a row of the sequence are marked invalid. Addresses
// wrap modulo 2^AW (the side's size); patterns are expected to fit.
//
// Timing: `start` (one cycle, with the pattern and mode already stable)
// clears the counters; from the next cycle `addr`/`lane_valid` show the
// current access and `last` flags the final one. `step` advances to the next
// access at the clock edge. The counters and the sequences follow the text;
// the start/step/last handshake is this design's choice.
module pm_addr_gen
  import pm_pkg::*;
#(
  parameter int unsigned D  = 8,   // lanes (modules along this side)
  parameter int unsigned AW = 8    // address width of this side
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic                       step,
  input  logic [AW-1:0]              base,
  input  pm_dim_t                    dim,
  input  pm_mode_e                   mode,
  input  logic [$clog2(PW)-1:0]      gl_log2,
  output logic [D-1:0][AW-1:0]       addr,
  output logic [D-1:0]               lane_valid,
  output logic                       last
);

  localparam int unsigned CW = 2 * PW;  // counter width (GL*BL for V-VI)

  pm_order_e       order;
  logic [CW-1:0]   inner, outer;          // counter state
  logic [CW-1:0]   inner_lim, outer_lim;
  logic            inner_wrap, outer_wrap;

  assign order = order_of(mode);

  always_comb begin
    case (order)
      ORD_GROUP_MAJOR: begin inner_lim = CW'(dim.glen); outer_lim = CW'(dim.blen); end
      ORD_ELEMENT:     begin inner_lim = CW'(dim.glen) * CW'(dim.blen); outer_lim = CW'(1); end
      default:         begin inner_lim = CW'(dim.blen); outer_lim = CW'(dim.glen); end
    endcase
    inner_wrap = (inner + CW'(D)) >= inner_lim;
    outer_wrap = (outer + CW'(1)) >= outer_lim;
    last       = inner_wrap && outer_wrap;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inner <= '0;
      outer <= '0;
    end else if (start) begin
      inner <= '0;
      outer <= '0;
    end else if (step) begin
      if (inner_wrap) begin
        inner <= '0;
        outer <= outer_wrap ? '0 : outer + CW'(1);
      end else begin
        inner <= inner + CW'(D);
      end
    end
  end

  // Per-lane (i,k) and address.
  always_comb begin
    logic [CW-1:0] e, gi, gk;
    for (int p = 0; p < D; p++) begin
      e = inner + CW'(p);
      case (order)
        ORD_GROUP_MAJOR: begin gi = outer; gk = e; end
        ORD_ELEMENT:     begin gi = e >> gl_log2; gk = e & (CW'(dim.glen) - CW'(1)); end
        default:         begin gi = e; gk = outer; end
      endcase
      lane_valid[p] = e < inner_lim;
      addr[p]       = base + AW'(gi * CW'(dim.stride) + gk);
    end
  end

endmodule
