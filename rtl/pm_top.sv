// Interleaved parallel memory with programmable 2D multi-pattern access.
//
// A VD x HD matrix of memory modules stores an M x N word array
// (M = VD*2^(WA/2), N = HD*2^(WA-WA/2)). A pattern is a block of BL groups of
// GL words per side, groups spaced S words apart, starting at linear base
// address b' = vb*N + hb; all of it lives in the SPRs. One command reads or
// writes the whole pattern, up to VD x HD words per clock cycle, without
// module conflicts: each side picks one of six skewing schemes (cases I-VI)
// from its stride, group length and block length, so the same pattern
// parameters must be used to write and to read a region (cases I and II share
// the plain a mod D layout and can be mixed).
//
// Structure (as in the text): SPRs -> vertical and horizontal address sides
// (mode select, address generator, row address generators, module
// assignment, address shuffle) -> module matrix; write data goes through a
// two-stage shuffle, read data through a two-stage de-shuffle. Module (r,c)
// is enabled when the vertical side targets row r and the horizontal side
// column c; its row address is {vertical row part, horizontal row part}
// (eq. 22). The horizontal side steps every access cycle, the vertical side
// when the horizontal side wraps, so an access takes t_v * t_h cycles.
//
// Interface and timing (this design's choices):
//   * SPRs: spr_we/spr_addr/spr_wdata, combinational read-back on spr_rdata;
//     writes are ignored while an access runs.
//   * cmd_valid && cmd_ready starts an access (cmd_write: 1 write, 0 read).
//     Accesses run in the following cycles, one per cycle (acc_valid), with
//     the lane addresses on acc_va/acc_ha and the lane masks on
//     acc_lane_v/acc_lane_h. `done` marks the last access.
//   * Write: wr_data[p][q] is stored at (acc_va[p], acc_ha[q]) in every cycle
//     wr_ready is high (for valid lanes).
//   * Read: one cycle after each read access rd_valid is high and
//     rd_data[p][q] holds the word at (rd_va[p], rd_ha[q]); invalid lanes
//     read 0. rd_last marks the data of the last access.
//   * Concurrent assertions at the end of the module state the handshake
//     rules (one done per command, read data one cycle after each read
//     access, SPRs stable during an access).
//   * conflict flags an access in which one side mapped two different
//     addresses to one module (see pm_module_assign); it does not occur for
//     patterns the schemes cover.
// Addresses wrap modulo M and N.
module pm_top
  import pm_pkg::*;
#(
  parameter int unsigned VD = 8,    // module rows
  parameter int unsigned HD = 8,    // module columns
  parameter int unsigned WB = 8,    // word width in bytes
  parameter int unsigned WA = 10,   // row address width of a module
  localparam int unsigned RWV = WA / 2,
  localparam int unsigned RWH = WA - RWV,
  localparam int unsigned VAW = $clog2(VD) + RWV,   // vertical address bits
  localparam int unsigned HAW = $clog2(HD) + RWH,   // horizontal address bits
  localparam int unsigned DW  = 8 * WB
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // special purpose registers
  input  logic                              spr_we,
  input  logic [2:0]                        spr_addr,
  input  logic [31:0]                       spr_wdata,
  output logic [31:0]                       spr_rdata,
  // command
  input  logic                              cmd_valid,
  input  logic                              cmd_write,
  output logic                              cmd_ready,
  // current access
  output logic                              acc_valid,
  output logic [VD-1:0][VAW-1:0]            acc_va,
  output logic [HD-1:0][HAW-1:0]            acc_ha,
  output logic [VD-1:0]                     acc_lane_v,
  output logic [HD-1:0]                     acc_lane_h,
  output logic                              done,
  // write data
  output logic                              wr_ready,
  input  logic [VD-1:0][HD-1:0][DW-1:0]     wr_data,
  // read data
  output logic                              rd_valid,
  output logic                              rd_last,
  output logic [VD-1:0][HD-1:0][DW-1:0]     rd_data,
  output logic [VD-1:0][VAW-1:0]            rd_va,
  output logic [HD-1:0][HAW-1:0]            rd_ha,
  output logic [VD-1:0]                     rd_lane_v,
  output logic [HD-1:0]                     rd_lane_h,
  // status
  output pm_mode_e                          mode_v,
  output pm_mode_e                          mode_h,
  output logic                              conflict
);

  localparam int unsigned LV = $clog2(VD);
  localparam int unsigned LH = $clog2(HD);

  // ------------------------------------------------------------ control
  logic busy, is_write, start;
  logic last_v, last_h, conflict_v, conflict_h;

  assign cmd_ready = !busy;
  assign start     = cmd_valid && !busy;
  assign acc_valid = busy;
  assign done      = busy && last_v && last_h;
  assign wr_ready  = busy && is_write;
  assign conflict  = busy && (conflict_v || conflict_h);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      is_write <= 1'b0;
    end else if (start) begin
      busy     <= 1'b1;
      is_write <= cmd_write;
    end else if (done) begin
      busy     <= 1'b0;
    end
  end

  // ------------------------------------------------------------ SPRs
  pm_pattern_t pattern;

  pm_spr_file u_spr (
    .clk       (clk),
    .rst_n     (rst_n),
    .spr_we    (spr_we),
    .spr_addr  (spr_addr),
    .spr_wdata (spr_wdata),
    .lock      (busy),
    .spr_rdata (spr_rdata),
    .pattern   (pattern)
  );

  // b' = vb*N + hb (eq. 1), N a power of two.
  logic [VAW-1:0] vb;
  logic [HAW-1:0] hb;
  assign hb = pattern.base[HAW-1:0];
  assign vb = pattern.base[HAW +: VAW];

  // ------------------------------------------------------------ address sides
  logic [VD-1:0][LV-1:0]  lane_mod_v;
  logic [HD-1:0][LH-1:0]  lane_mod_h;
  logic [VD-1:0][RWV-1:0] mod_row_v;
  logic [HD-1:0][RWH-1:0] mod_row_h;
  logic [VD-1:0]          mod_en_v;
  logic [HD-1:0]          mod_en_h;

  pm_addr_side #(.D(VD), .RW(RWV)) u_side_v (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .step       (busy && last_h),
    .base       (vb),
    .dim        (pattern.v),
    .lane_addr  (acc_va),
    .lane_valid (acc_lane_v),
    .lane_mod   (lane_mod_v),
    .mod_row    (mod_row_v),
    .mod_en     (mod_en_v),
    .last       (last_v),
    .mode       (mode_v),
    .conflict   (conflict_v)
  );

  pm_addr_side #(.D(HD), .RW(RWH)) u_side_h (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .step       (busy),
    .base       (hb),
    .dim        (pattern.h),
    .lane_addr  (acc_ha),
    .lane_valid (acc_lane_h),
    .lane_mod   (lane_mod_h),
    .mod_row    (mod_row_h),
    .mod_en     (mod_en_h),
    .last       (last_h),
    .mode       (mode_h),
    .conflict   (conflict_h)
  );

  // ------------------------------------------------------------ write shuffle
  logic [VD-1:0][HD-1:0][DW-1:0] wr_rows;   // rows in module order, columns in lane order
  logic [VD-1:0][HD-1:0][DW-1:0] wr_mat;    // module order
  logic [VD-1:0]                 wr_rows_v;
  logic [VD-1:0][HD-1:0]         wr_mat_v;

  pm_shuffle #(.N(VD), .W(HD*DW)) u_wshuf_v (
    .in_data   (wr_data),
    .sel       (lane_mod_v),
    .in_valid  (acc_lane_v),
    .out_data  (wr_rows),
    .out_valid (wr_rows_v)
  );

  // ------------------------------------------------------------ module matrix
  logic [VD-1:0][HD-1:0][DW-1:0] mem_rdata;

  for (genvar r = 0; r < VD; r++) begin : g_row
    pm_shuffle #(.N(HD), .W(DW)) u_wshuf_h (
      .in_data   (wr_rows[r]),
      .sel       (lane_mod_h),
      .in_valid  (acc_lane_h),
      .out_data  (wr_mat[r]),
      .out_valid (wr_mat_v[r])
    );
    for (genvar c = 0; c < HD; c++) begin : g_col
      pm_mem_module #(.WA(WA), .DW(DW)) u_mem (
        .clk   (clk),
        .en    (busy && mod_en_v[r] && mod_en_h[c]),
        .we    (is_write),
        .addr  ({mod_row_v[r], mod_row_h[c]}),
        .wdata (wr_mat[r][c]),
        .rdata (mem_rdata[r][c])
      );
    end
  end

  // ------------------------------------------------------------ read de-shuffle
  logic [VD-1:0][LV-1:0]         rd_mod_v;
  logic [HD-1:0][LH-1:0]         rd_mod_h;
  logic [VD-1:0][HD-1:0][DW-1:0] rd_cols, rd_lane;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid  <= 1'b0;
      rd_last   <= 1'b0;
      rd_mod_v  <= '0;
      rd_mod_h  <= '0;
      rd_va     <= '0;
      rd_ha     <= '0;
      rd_lane_v <= '0;
      rd_lane_h <= '0;
    end else begin
      rd_valid <= busy && !is_write;
      rd_last  <= done && !is_write;
      if (busy && !is_write) begin
        rd_mod_v  <= lane_mod_v;
        rd_mod_h  <= lane_mod_h;
        rd_va     <= acc_va;
        rd_ha     <= acc_ha;
        rd_lane_v <= acc_lane_v;
        rd_lane_h <= acc_lane_h;
      end
    end
  end

  for (genvar r = 0; r < VD; r++) begin : g_rdesh
    pm_deshuffle #(.N(HD), .W(DW)) u_desh_h (
      .in_data  (mem_rdata[r]),
      .sel      (rd_mod_h),
      .out_data (rd_cols[r])
    );
  end

  pm_deshuffle #(.N(VD), .W(HD*DW)) u_desh_v (
    .in_data  (rd_cols),
    .sel      (rd_mod_v),
    .out_data (rd_lane)
  );

  always_comb
    for (int p = 0; p < VD; p++)
      for (int q = 0; q < HD; q++)
        rd_data[p][q] = (rd_lane_v[p] && rd_lane_h[q]) ? rd_lane[p][q] : '0;

  // ------------------------------------------------------------ handshake rules
  // A command ends with exactly one `done`, after which the unit is idle.
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |=> !busy);
  // Every read access returns its data in the next cycle, marked rd_last
  // exactly when it was the last access.
  a_rd_follows: assert property (@(posedge clk) disable iff (!rst_n)
    (busy && !is_write) |=> (rd_valid && (rd_last == $past(done))));
  // No read data without a read access in the cycle before.
  a_rd_cause: assert property (@(posedge clk) disable iff (!rst_n)
    rd_valid |-> $past(busy && !is_write));
  // The SPRs cannot change while an access runs.
  a_spr_stable: assert property (@(posedge clk) disable iff (!rst_n)
    busy |=> $stable(pattern));

  // Module enables already carry the valid information of the shuffles.
  logic unused_ok;
  assign unused_ok = ^{wr_rows_v, wr_mat_v, pattern.base[31:HAW+VAW]};

endmodule
