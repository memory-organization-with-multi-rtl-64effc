// Special purpose registers (SPRs) holding the programmable access pattern.
//
// Seven registers: the linear base address b' and, per side, the stride,
// group length and block length (see pm_pkg::pm_spr_e for the map). A write
// with spr_we takes effect at the next rising clock edge unless `lock` is
// high (the controller locks the registers while an access is running, so a
// pattern cannot change under a running access). Read-back is combinational.
// Strides and lengths of zero are not meaningful patterns; a zero written to
// one of them is stored as 1. Reset values describe a single word at
// address 0. Register widths, the map, the lock and the zero rule are this
// design's choices; the text only says that the pattern parameters live in
// programmable SPRs.
module pm_spr_file
  import pm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        spr_we,
  input  logic [2:0]  spr_addr,
  input  logic [31:0] spr_wdata,
  input  logic        lock,
  output logic [31:0] spr_rdata,
  output pm_pattern_t pattern
);

  pm_pattern_t   regs;
  logic [PW-1:0] wval;

  // Zero is stored as one for strides and lengths.
  assign wval = (spr_wdata[PW-1:0] == '0) ? PW'(1) : spr_wdata[PW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs.base     <= '0;
      regs.v.stride <= PW'(1);
      regs.h.stride <= PW'(1);
      regs.v.glen   <= PW'(1);
      regs.h.glen   <= PW'(1);
      regs.v.blen   <= PW'(1);
      regs.h.blen   <= PW'(1);
    end else if (spr_we && !lock) begin
      case (pm_spr_e'(spr_addr))
        SPR_BASE: regs.base     <= spr_wdata;
        SPR_VS:   regs.v.stride <= wval;
        SPR_HS:   regs.h.stride <= wval;
        SPR_VGL:  regs.v.glen   <= wval;
        SPR_HGL:  regs.h.glen   <= wval;
        SPR_VBL:  regs.v.blen   <= wval;
        SPR_HBL:  regs.h.blen   <= wval;
        default:  ;
      endcase
    end
  end

  always_comb begin
    case (pm_spr_e'(spr_addr))
      SPR_BASE: spr_rdata = regs.base;
      SPR_VS:   spr_rdata = 32'(regs.v.stride);
      SPR_HS:   spr_rdata = 32'(regs.h.stride);
      SPR_VGL:  spr_rdata = 32'(regs.v.glen);
      SPR_HGL:  spr_rdata = 32'(regs.h.glen);
      SPR_VBL:  spr_rdata = 32'(regs.v.blen);
      SPR_HBL:  spr_rdata = 32'(regs.h.blen);
      default:  spr_rdata = '0;
    endcase
  end

  assign pattern = regs;

endmodule
