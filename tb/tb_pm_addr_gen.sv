// Testbench of pm_addr_gen: random patterns in every case, lane addresses
// and lane masks compared access by access with the reference sequences
// (8), (11) and the element order of cases V-VI; `last` and the number of
// accesses are checked against the access counts (9), (12), (19). Also
// checks that the generator holds while step is low.
module tb_pm_addr_gen;
  import pm_pkg::*;
  import pm_ref_pkg::*;

  localparam int D = 8, AW = 8;
  int checks = 0, failures = 0;
  int seen [1:6];
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, step = 0;
  logic [AW-1:0] base;
  pm_dim_t dim;
  pm_mode_e mode;
  logic [$clog2(PW)-1:0] gl_log2;
  logic [D-1:0][AW-1:0] addr;
  logic [D-1:0] lane_valid;
  logic last;

  pm_addr_gen #(.D(D), .AW(AW)) dut (.*);

  task automatic run(int b, int S, int GL, int BL, bit stall);
    int q[$];
    int m, t, n, bad;
    m = ref_mode(S, GL, BL, D);
    seen[m]++;
    ref_seq(b, S, GL, BL, D, m, q);
    t = ref_t(m, GL, BL, D);
    @(negedge clk);
    base = AW'(b); dim = '{stride: PW'(S), glen: PW'(GL), blen: PW'(BL)};
    mode = pm_mode_e'(m); gl_log2 = ($clog2(PW))'(log2i(GL));
    start = 1;
    @(negedge clk);
    start = 0;
    n = 0;
    forever begin
      bad = 0;
      for (int p = 0; p < D; p++) begin
        int e = q[n * D + p];
        if (lane_valid[p] != (e >= 0)) bad = 1;
        if (e >= 0 && int'(addr[p]) != e) bad = 1;
      end
      checks++;
      if (bad) begin
        failures++;
        $display("FAIL case %0d S=%0d GL=%0d BL=%0d b=%0d access %0d", m, S, GL, BL, b, n);
      end
      if (stall && n == 0) begin
        // hold one cycle: outputs must not move
        step = 0;
        @(negedge clk);
        checks++;
        for (int p = 0; p < D; p++)
          if (q[p] >= 0 && int'(addr[p]) != q[p]) begin failures++; $display("FAIL stall"); break; end
      end
      n++;
      checks++;
      if (last != (n == t)) begin
        failures++;
        $display("FAIL last=%0d at access %0d of %0d (case %0d)", last, n, t, m);
      end
      if (last || n >= t) break;
      step = 1;
      @(negedge clk);
      step = 0;
    end
    checks++;
    if (n != t) begin failures++; $display("FAIL %0d accesses, expected %0d", n, t); end
  endtask

  initial begin
    base = '0; dim = '0; mode = MODE_I; gl_log2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 3, 2, 10, 1);    // I
    run(5, 3, 10, 2, 0);    // II
    run(1, 8, 3, 10, 0);    // III
    run(7, 6, 3, 12, 1);    // IV
    run(2, 16, 4, 5, 0);    // V
    run(9, 4, 2, 6, 0);     // VI
    run(0, 1, 1, 1, 0);     // single word
    for (int n = 0; n < 400; n++)
      run($urandom_range(0, 100), 1 + $urandom_range(0, 11), 1 + $urandom_range(0, 11),
          1 + $urandom_range(0, 11), n % 7 == 0);
    for (int m = 1; m <= 6; m++) begin
      checks++;
      if (seen[m] == 0) begin failures++; $display("FAIL case %0d never run", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
