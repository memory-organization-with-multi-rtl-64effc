// One memory module of the VD x HD module matrix.
//
// A single-port synchronous memory of 2^WA words of DW bits, written as an
// array so that synthesis maps it to a memory macro. With en high, a write
// (we = 1) stores wdata at addr at the clock edge, and a read (we = 0)
// returns the word at addr on rdata after that edge (one cycle latency).
// rdata holds its value while en is low. The text names the modules and
// their row address width; the single-port, one-cycle-latency behaviour is
// this design's choice.
module pm_mem_module #(
  parameter int unsigned WA = 10,   // row address width
  parameter int unsigned DW = 64    // word width in bits
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [WA-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**WA];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
