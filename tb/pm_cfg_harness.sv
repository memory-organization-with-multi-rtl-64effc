// Self-checking harness that runs random write/read patterns against one
// build of pm_top (any VD, HD, WB, WA). Used by tb_pm_top_configs to run the
// matrix sizes and word widths of the reference configurations side by side.
//
// Like tb_pm_top it models the physical placement of every written word with
// the reference module assignment and row address functions, predicts every
// read from that model, checks lane addresses, masks, cases, `done`, the
// conflict flag and the t_v x t_h cycle count of every command. Patterns are
// drawn at random to fit the array; each is read first (only the placement of
// already written words is checked), then written and read back. Reports its
// counts on output ports and raises `finished` when done.
module pm_cfg_harness #(
  parameter int unsigned VD = 2,
  parameter int unsigned HD = 2,
  parameter int unsigned WB = 4,
  parameter int unsigned WA = 10,
  parameter int unsigned NPAT = 30,
  parameter int unsigned SEED = 1
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   cases_seen,   // bit m set: case m used on some side
  output logic finished
);
  import pm_pkg::*;
  import pm_ref_pkg::*;

  localparam int RWV = WA / 2, RWH = WA - RWV;
  localparam int VAW = $clog2(VD) + RWV, HAW = $clog2(HD) + RWH;
  localparam int M = 1 << VAW, N = 1 << HAW, DW = 8 * WB;

  logic spr_we = 0;
  logic [2:0] spr_addr = '0;
  logic [31:0] spr_wdata = '0, spr_rdata;
  logic cmd_valid = 0, cmd_write = 0, cmd_ready;
  logic acc_valid, done, wr_ready, rd_valid, rd_last, conflict;
  logic [VD-1:0][VAW-1:0] acc_va, rd_va;
  logic [HD-1:0][HAW-1:0] acc_ha, rd_ha;
  logic [VD-1:0] acc_lane_v, rd_lane_v;
  logic [HD-1:0] acc_lane_h, rd_lane_h;
  logic [VD-1:0][HD-1:0][DW-1:0] wr_data, rd_data;
  pm_mode_e mode_v, mode_h;

  pm_top #(.VD(VD), .HD(HD), .WB(WB), .WA(WA)) dut (.*);

  logic [DW-1:0] phys [int];
  typedef struct { int b, vs, hs, vgl, hgl, vbl, hbl; } pat_t;

  function automatic logic [DW-1:0] word(int va, int ha, int seed);
    return DW'({32'((va * 7919 + ha * 104729) ^ (seed * 31)), 32'(va * 65536 + ha)});
  endfunction

  function automatic int key(int va, int ha, int mv, int mh, pat_t p);
    int r = ref_m(va, mv, p.vs, p.vgl, VD);
    int c = ref_m(ha, mh, p.hs, p.hgl, HD);
    return ((r * HD + c) << WA) | ((va / VD) * (N / HD) + ha / HD);
  endfunction

  function automatic bit has_conflict(int q[$], int n, int mode, int S, int GL, int D);
    for (int x = 0; x < D; x++)
      for (int y = x + 1; y < D; y++)
        if (q[n*D+x] >= 0 && q[n*D+y] >= 0 && q[n*D+x] != q[n*D+y] &&
            ref_m(q[n*D+x], mode, S, GL, D) == ref_m(q[n*D+y], mode, S, GL, D))
          return 1;
    return 0;
  endfunction

  task automatic fail(string msg);
    failures++;
    $display("FAIL [%0dx%0d W=%0d] %s", VD, HD, WB, msg);
  endtask

  task automatic load_pattern(pat_t p);
    int v[7];
    v = '{p.b, p.vs, p.hs, p.vgl, p.hgl, p.vbl, p.hbl};
    for (int a = 0; a < 7; a++) begin
      @(negedge clk);
      spr_we = 1; spr_addr = 3'(a); spr_wdata = 32'(v[a]);
    end
    @(negedge clk);
    spr_we = 0;
  endtask

  task automatic access(pat_t p, bit wr, int seed, output bit any_conflict);
    int qv[$], qh[$];
    int mv, mh, tv, th, t, cycles;
    bit cv[], ch[];
    int piv, pih;
    mv = ref_mode(p.vs, p.vgl, p.vbl, VD);
    mh = ref_mode(p.hs, p.hgl, p.hbl, HD);
    cases_seen |= (1 << mv) | (1 << mh);
    ref_seq(p.b / N, p.vs, p.vgl, p.vbl, VD, mv, qv);
    ref_seq(p.b % N, p.hs, p.hgl, p.hbl, HD, mh, qh);
    tv = ref_t(mv, p.vgl, p.vbl, VD);
    th = ref_t(mh, p.hgl, p.hbl, HD);
    t = tv * th;
    cv = new[tv]; ch = new[th];
    for (int i = 0; i < tv; i++) cv[i] = has_conflict(qv, i, mv, p.vs, p.vgl, VD);
    for (int j = 0; j < th; j++) ch[j] = has_conflict(qh, j, mh, p.hs, p.hgl, HD);
    any_conflict = 0;
    @(negedge clk);
    cmd_valid = 1; cmd_write = wr;
    @(negedge clk);
    cmd_valid = 0;
    cycles = 0;
    for (int n = 0; n <= t; n++) begin
      automatic int iv = n / th, ih = n % th;
      if (n > 0 && !wr) begin
        checks++;
        if (!rd_valid || rd_last != (n == t)) fail("read strobe");
        if (!(cv[piv] || ch[pih]))
          for (int x = 0; x < VD; x++)
            for (int y = 0; y < HD; y++) begin
              automatic int va = qv[piv*VD+x], ha = qh[pih*HD+y];
              if (va >= 0 && ha >= 0) begin
                automatic int k = key(va, ha, mv, mh, p);
                checks++;
                if (phys.exists(k) && rd_data[x][y] !== phys[k]) fail($sformatf("read (%0d,%0d)", va, ha));
              end
            end
      end
      if (n == t) break;
      cycles += acc_valid;
      checks++;
      if (int'(mode_v) != mv || int'(mode_h) != mh || done != (n == t - 1) ||
          conflict != (cv[iv] || ch[ih])) fail("mode/done/conflict");
      if (cv[iv] || ch[ih]) any_conflict = 1;
      for (int x = 0; x < VD; x++)
        if (acc_lane_v[x] != (qv[iv*VD+x] >= 0) || (qv[iv*VD+x] >= 0 && int'(acc_va[x]) != qv[iv*VD+x]))
          fail("vertical lane");
      for (int y = 0; y < HD; y++)
        if (acc_lane_h[y] != (qh[ih*HD+y] >= 0) || (qh[ih*HD+y] >= 0 && int'(acc_ha[y]) != qh[ih*HD+y]))
          fail("horizontal lane");
      if (wr)
        for (int x = 0; x < VD; x++)
          for (int y = 0; y < HD; y++) begin
            automatic int va = qv[iv*VD+x], ha = qh[ih*HD+y];
            wr_data[x][y] = word(va, ha, seed);
            if (va >= 0 && ha >= 0 && !(cv[iv] || ch[ih])) phys[key(va, ha, mv, mh, p)] = wr_data[x][y];
          end
      piv = iv; pih = ih;
      @(negedge clk);
    end
    checks++;
    if (cycles != t || !cmd_ready) fail($sformatf("%0d access cycles, expected %0d", cycles, t));
  endtask

  // One side of a random pattern that fits in `size` words.
  task automatic rand_side(int size, int D, output int b, output int s, output int gl, output int bl);
    do begin
      s  = 1 + $urandom_range(0, 11);
      if ($urandom_range(0, 2) == 0) s = 2 << $urandom_range(0, 3);
      gl = 1 + $urandom_range(0, 9);
      if ($urandom_range(0, 2) == 0) gl = 1 << $urandom_range(0, 3);
      bl = 1 + $urandom_range(0, 2 * D + 2);
      b  = $urandom_range(0, size / 4);
    end while (b + (bl - 1) * s + gl > size);
  endtask

  initial begin
    pat_t p;
    bit c;
    int vb, hb;
    void'($urandom(SEED));
    checks = 0; failures = 0; cases_seen = 0; finished = 0;
    wr_data = '0;
    @(posedge rst_n);
    for (int n = 0; n < NPAT; n++) begin
      rand_side(M, VD, vb, p.vs, p.vgl, p.vbl);
      rand_side(N, HD, hb, p.hs, p.hgl, p.hbl);
      p.b = vb * N + hb;
      load_pattern(p);
      access(p, 0, 3 * n, c);
      if (!c) begin
        access(p, 1, 3 * n + 1, c);
        access(p, 0, 3 * n + 2, c);
      end
    end
    finished = 1;
  end
endmodule
