// End-to-end testbench of pm_top at its default size (8 x 8 modules of
// 1024 x 64-bit words, a 256 x 256 word array).
//
// Every command is checked against a reference model of the physical
// placement: the testbench keeps its own copy of every module's contents,
// places each written word with the module assignment functions and the
// row address function evaluated by integer arithmetic, and predicts every
// read from it. So a read checks not only that data comes back but that it
// was stored in the module and row the scheme prescribes, and reads with a
// different pattern than the write are checked as well. Per access it
// checks the lane addresses and masks, the selected cases, `done`, the
// conflict flag and, for reads, the de-shuffled data one cycle later; per
// command the number of access cycles against the access counts of the
// scheme (one access per cycle, t_v * t_h cycles).
//
// Mechanisms counted (each must occur): all six cases on each side, writes,
// reads, accesses needing several cycles, accesses with idle modules, a read
// of data written with another pattern of the same layout, an SPR write
// ignored while busy, and a module conflict flagged (case VI with a stride
// of 10, which the scheme does not cover).
module tb_pm_top;
  import pm_pkg::*;
  import pm_ref_pkg::*;

  localparam int VD = 8, HD = 8, DW = 64, M = 256, N = 256;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic spr_we = 0;
  logic [2:0] spr_addr = '0;
  logic [31:0] spr_wdata = '0, spr_rdata;
  logic cmd_valid = 0, cmd_write = 0, cmd_ready;
  logic acc_valid, done, wr_ready, rd_valid, rd_last, conflict;
  logic [VD-1:0][7:0] acc_va, rd_va;
  logic [HD-1:0][7:0] acc_ha, rd_ha;
  logic [VD-1:0] acc_lane_v, rd_lane_v;
  logic [HD-1:0] acc_lane_h, rd_lane_h;
  logic [VD-1:0][HD-1:0][DW-1:0] wr_data, rd_data;
  pm_mode_e mode_v, mode_h;

  pm_top dut (.*);

  // physical contents model: key = module (r*HD+c), row
  logic [DW-1:0] phys [int];

  // mechanism counters
  int seen_v [1:6], seen_h [1:6];
  int n_write = 0, n_read = 0, n_multi = 0, n_partial = 0, n_cross = 0, n_lock = 0, n_conflict = 0;

  // Direct inspection of the module contents at the end of the test: every
  // word the model holds must sit in exactly the module and row the scheme
  // prescribes.
  event peek_ev;
  int n_peeked = 0;
  for (genvar r = 0; r < VD; r++) begin : g_peek_r
    for (genvar c = 0; c < HD; c++) begin : g_peek_c
      always @(peek_ev) begin
        foreach (phys[k])
          if ((k >> 10) == r * HD + c) begin
            checks++; n_peeked++;
            if (dut.g_row[r].g_col[c].u_mem.mem[k & 1023] !== phys[k]) begin
              failures++;
              $display("FAIL module (%0d,%0d) row %0d holds the wrong word", r, c, k & 1023);
            end
          end
      end
    end
  end

  typedef struct { int b, vs, hs, vgl, hgl, vbl, hbl; } pat_t;

  function automatic logic [DW-1:0] word(int va, int ha, int seed);
    return {8'(va), 8'(ha), 16'(seed), 32'((va * 7919 + ha * 104729) ^ (seed * 31))};
  endfunction

  function automatic int key(int va, int ha, int mv, int mh, pat_t p);
    int r = ref_m(va, mv, p.vs, p.vgl, VD);
    int c = ref_m(ha, mh, p.hs, p.hgl, HD);
    int row = (va / VD) * (N / HD) + ha / HD;   // eq. (22)
    return ((r * HD + c) << 10) | row;
  endfunction

  function automatic bit has_conflict(int q[$], int n, int mode, int S, int GL, int D);
    for (int x = 0; x < D; x++)
      for (int y = x + 1; y < D; y++)
        if (q[n*D+x] >= 0 && q[n*D+y] >= 0 && q[n*D+x] != q[n*D+y] &&
            ref_m(q[n*D+x], mode, S, GL, D) == ref_m(q[n*D+y], mode, S, GL, D))
          return 1;
    return 0;
  endfunction

  task automatic spr(int a, int d);
    @(negedge clk);
    spr_we = 1; spr_addr = 3'(a); spr_wdata = 32'(d);
    @(negedge clk);
    spr_we = 0;
  endtask

  task automatic load_pattern(pat_t p);
    int v[7];
    v = '{p.b, p.vs, p.hs, p.vgl, p.hgl, p.vbl, p.hbl};
    for (int a = 0; a < 7; a++) spr(a, v[a]);
    for (int a = 0; a < 7; a++) begin
      spr_addr = 3'(a);
      #1;
      checks++;
      if (int'(spr_rdata) != v[a]) begin failures++; $display("FAIL SPR %0d readback %0d exp %0d", a, spr_rdata, v[a]); end
    end
  endtask

  // Run one command with pattern p; returns whether any access conflicted.
  task automatic access(pat_t p, bit wr, int seed, output bit any_conflict);
    int qv[$], qh[$];
    int mv, mh, tv, th, t, vb, hb, cycles;
    bit cv[], ch[];
    bit prev_read;
    int prev_iv, prev_ih;
    vb = p.b / N; hb = p.b % N;
    mv = ref_mode(p.vs, p.vgl, p.vbl, VD);
    mh = ref_mode(p.hs, p.hgl, p.hbl, HD);
    seen_v[mv]++; seen_h[mh]++;
    ref_seq(vb, p.vs, p.vgl, p.vbl, VD, mv, qv);
    ref_seq(hb, p.hs, p.hgl, p.hbl, HD, mh, qh);
    tv = ref_t(mv, p.vgl, p.vbl, VD);
    th = ref_t(mh, p.hgl, p.hbl, HD);
    t = tv * th;
    if (t > 1) n_multi++;
    cv = new[tv]; ch = new[th];
    for (int i = 0; i < tv; i++) cv[i] = has_conflict(qv, i, mv, p.vs, p.vgl, VD);
    for (int j = 0; j < th; j++) ch[j] = has_conflict(qh, j, mh, p.hs, p.hgl, HD);
    any_conflict = 0;
    if (wr) n_write++; else n_read++;

    @(negedge clk);
    checks++;
    if (!cmd_ready) begin failures++; $display("FAIL not ready"); end
    cmd_valid = 1; cmd_write = wr;
    @(negedge clk);
    cmd_valid = 0;
    prev_read = 0; prev_iv = 0; prev_ih = 0;
    cycles = 0;
    for (int n = 0; n <= t; n++) begin
      int iv = n / th, ih = n % th;
      // ---- read data of the previous access
      if (prev_read) begin
        bit bad = 0;
        checks++;
        if (!rd_valid || rd_last != (n == t)) bad = 1;
        if (!(cv[prev_iv] || ch[prev_ih])) begin
          for (int x = 0; x < VD; x++)
            for (int y = 0; y < HD; y++) begin
              int va = qv[prev_iv*VD+x], ha = qh[prev_ih*HD+y];
              if (va < 0 || ha < 0) begin
                if (rd_data[x][y] != '0) bad = 1;
              end else begin
                int k = key(va, ha, mv, mh, p);
                if (int'(rd_va[x]) != va || int'(rd_ha[y]) != ha) bad = 1;
                if (phys.exists(k) && rd_data[x][y] !== phys[k]) bad = 1;
              end
            end
        end
        if (bad) begin failures++; $display("FAIL read data, access %0d/%0d", prev_iv, prev_ih); end
      end
      if (n == t) break;
      // ---- current access
      begin
        bit bad = 0, part = 0;
        cycles += acc_valid;
        checks++;
        if (!acc_valid || wr_ready != wr) bad = 1;
        if (int'(mode_v) != mv || int'(mode_h) != mh) bad = 1;
        if (done != (n == t - 1)) bad = 1;
        if (conflict != (cv[iv] || ch[ih])) bad = 1;
        if (cv[iv] || ch[ih]) any_conflict = 1;
        for (int x = 0; x < VD; x++) begin
          int va = qv[iv*VD+x];
          if (acc_lane_v[x] != (va >= 0)) bad = 1;
          if (va >= 0 && int'(acc_va[x]) != va) bad = 1;
          if (va < 0) part = 1;
        end
        for (int y = 0; y < HD; y++) begin
          int ha = qh[ih*HD+y];
          if (acc_lane_h[y] != (ha >= 0)) bad = 1;
          if (ha >= 0 && int'(acc_ha[y]) != ha) bad = 1;
          if (ha < 0) part = 1;
        end
        if (part) n_partial++;
        if (bad) begin
          failures++;
          $display("FAIL access %0d of %0d (cases %0d/%0d): addresses, masks, mode or flags", n, t, mv, mh);
        end
        if (wr) begin
          for (int x = 0; x < VD; x++)
            for (int y = 0; y < HD; y++) begin
              int va = qv[iv*VD+x], ha = qh[ih*HD+y];
              if (va >= 0 && ha >= 0) begin
                wr_data[x][y] = word(va, ha, seed);
                if (!(cv[iv] || ch[ih])) phys[key(va, ha, mv, mh, p)] = wr_data[x][y];
              end else
                wr_data[x][y] = {$urandom, $urandom};
            end
        end
        // an SPR write during the access must be ignored
        if (n == 0 && seed % 4 == 1) begin
          spr_we = 1; spr_addr = 3'(SPR_VS); spr_wdata = 32'd99;
        end
        prev_read = !wr; prev_iv = iv; prev_ih = ih;
      end
      @(negedge clk);
      spr_we = 0;
    end
    checks++;
    if (cmd_ready != 1 || acc_valid) begin failures++; $display("FAIL not idle after %0d accesses", t); end
    checks++;
    if (cycles != t) begin failures++; $display("FAIL %0d access cycles, expected %0d", cycles, t); end
    if (seed % 4 == 1) begin
      spr_addr = 3'(SPR_VS);
      #1;
      checks++;
      if (int'(spr_rdata) != p.vs) begin failures++; $display("FAIL SPR changed while busy"); end
      else n_lock++;
    end
  endtask

  function automatic int rnd(int lo, int hi);
    return lo + $urandom_range(0, hi - lo);
  endfunction

  // random pattern that fits in the array; kind 0: any, 1..6: vertical case
  function automatic pat_t rand_pat();
    pat_t p;
    int vb, hb;
    p.vs = rnd(1, 12); p.hs = rnd(1, 12);
    if ($urandom_range(0, 2) == 0) p.vs = 2 << $urandom_range(0, 3);
    if ($urandom_range(0, 2) == 0) p.hs = 2 << $urandom_range(0, 3);
    p.vgl = rnd(1, 10); p.hgl = rnd(1, 10);
    if ($urandom_range(0, 2) == 0) p.vgl = 1 << $urandom_range(0, 3);
    if ($urandom_range(0, 2) == 0) p.hgl = 1 << $urandom_range(0, 3);
    p.vbl = rnd(1, 12); p.hbl = rnd(1, 12);
    vb = rnd(0, 40); hb = rnd(0, 40);
    p.b = vb * N + hb;
    return p;
  endfunction

  initial begin
    pat_t p, p2;
    bit c;
    wr_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Pattern of the scheme's introductory example: 2 x 3 groups of
    // 2 x 4 words, strides (4, 5).
    p = '{b: 10 * N + 20, vs: 4, hs: 5, vgl: 2, hgl: 4, vbl: 2, hbl: 3};
    load_pattern(p); access(p, 1, 1, c); access(p, 0, 2, c);

    // every case on each side
    begin
      pat_t cases [6];
      cases[0] = '{b: 0,  vs: 3,  hs: 3,  vgl: 2, hgl: 2,  vbl: 10, hbl: 10};  // I
      cases[1] = '{b: 0,  vs: 3,  hs: 3,  vgl: 10, hgl: 10, vbl: 2, hbl: 2};  // II
      cases[2] = '{b: 0,  vs: 8,  hs: 8,  vgl: 3, hgl: 3,  vbl: 10, hbl: 10};  // III
      cases[3] = '{b: 0,  vs: 6,  hs: 6,  vgl: 3, hgl: 3,  vbl: 12, hbl: 12};  // IV
      cases[4] = '{b: 0,  vs: 16, hs: 16, vgl: 4, hgl: 4,  vbl: 5,  hbl: 5};   // V
      cases[5] = '{b: 0,  vs: 4,  hs: 4,  vgl: 2, hgl: 2,  vbl: 6,  hbl: 6};   // VI
      for (int i = 0; i < 6; i++) begin
        automatic int j = (i + 2) % 6;
        p = '{b: (30 + 3 * i) * N + 50 + i, vs: cases[i].vs, vgl: cases[i].vgl, vbl: cases[i].vbl,
              hs: cases[j].hs, hgl: cases[j].hgl, hbl: cases[j].hbl};
        load_pattern(p); access(p, 1, 10 + i, c); access(p, 0, 20 + i, c);
      end
    end

    // odd-stride write, read back with a dense group-wise pattern over the
    // same area (both use m = a mod D)
    p  = '{b: 150 * N + 150, vs: 3, hs: 5, vgl: 1, hgl: 2, vbl: 12, hbl: 9};
    p2 = '{b: 150 * N + 150, vs: 1, hs: 1, vgl: 36, hgl: 45, vbl: 1, hbl: 1};
    load_pattern(p); access(p, 1, 33, c);
    load_pattern(p2);
    if (ref_mode(1, 36, 1, VD) == 2 && ref_mode(3, 1, 12, VD) == 1) n_cross++;
    access(p2, 0, 34, c);

    // random patterns: write, then read with the same pattern and with a
    // second random pattern over the data written so far
    for (int n = 0; n < 40; n++) begin
      bit cf;
      p = rand_pat();
      load_pattern(p);
      access(p, 0, 100 + 4 * n, cf);          // read: conflicts only flagged
      if (cf) n_conflict++;
      if (!cf) begin
        access(p, 1, 101 + 4 * n, c);
        access(p, 0, 102 + 4 * n, c);
      end
    end

    // case VI with stride 10: not covered by the scheme, must be flagged
    p = '{b: 71 * N + 3, vs: 10, hs: 1, vgl: 4, hgl: 8, vbl: 14, hbl: 1};
    load_pattern(p); access(p, 0, 200, c);
    if (c) n_conflict++;

    // placement in the modules
    -> peek_ev;
    #1;
    checks++;
    if (n_peeked != phys.num()) begin failures++; $display("FAIL placement inspected %0d of %0d words", n_peeked, phys.num()); end

    // mechanism report
    for (int m = 1; m <= 6; m++) begin
      checks += 2;
      if (seen_v[m] == 0) begin failures++; $display("FAIL vertical case %0d never used", m); end
      if (seen_h[m] == 0) begin failures++; $display("FAIL horizontal case %0d never used", m); end
    end
    $display("mechanisms: writes=%0d reads=%0d multi-cycle=%0d partial=%0d cross-pattern=%0d spr-lock=%0d conflict=%0d",
             n_write, n_read, n_multi, n_partial, n_cross, n_lock, n_conflict);
    checks += 7;
    if (n_write == 0 || n_read == 0 || n_multi == 0 || n_partial == 0 || n_cross == 0 || n_lock == 0 || n_conflict == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
