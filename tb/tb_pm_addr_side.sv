// Testbench of pm_addr_side (D = 8, 5 row bits): for random patterns in every
// case, each access is compared with the reference: lane addresses and
// masks, the selected case, lane module indices, and, per module, the enable
// and the row part floor(a/D) routed to it by the address shuffle.
module tb_pm_addr_side;
  import pm_pkg::*;
  import pm_ref_pkg::*;

  localparam int D = 8, RW = 5, AW = 8;
  int checks = 0, failures = 0;
  int seen [1:6];
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, step = 0;
  logic [AW-1:0] base;
  pm_dim_t dim;
  logic [D-1:0][AW-1:0] lane_addr;
  logic [D-1:0] lane_valid, mod_en;
  logic [D-1:0][2:0] lane_mod;
  logic [D-1:0][RW-1:0] mod_row;
  logic last, conflict;
  pm_mode_e mode;

  pm_addr_side #(.D(D), .RW(RW)) dut (.*);

  task automatic run(int b, int S, int GL, int BL);
    int q[$]; int m, t;
    m = ref_mode(S, GL, BL, D);
    seen[m]++;
    ref_seq(b, S, GL, BL, D, m, q);
    t = ref_t(m, GL, BL, D);
    @(negedge clk);
    base = AW'(b); dim = '{stride: PW'(S), glen: PW'(GL), blen: PW'(BL)};
    start = 1;
    @(negedge clk);
    start = 0; step = 1;
    for (int n = 0; n < t; n++) begin
      int erow[D]; bit een[D]; bit bad = 0;
      for (int k = 0; k < D; k++) een[k] = 0;
      checks++;
      if (int'(mode) != m) bad = 1;
      for (int p = 0; p < D; p++) begin
        int a = q[n*D+p];
        if (lane_valid[p] != (a >= 0)) bad = 1;
        if (a >= 0) begin
          int mm = ref_m(a, m, S, GL, D);
          if (int'(lane_addr[p]) != a || int'(lane_mod[p]) != mm) bad = 1;
          een[mm] = 1; erow[mm] = a / D;
        end
      end
      for (int k = 0; k < D; k++) begin
        if (mod_en[k] != een[k]) bad = 1;
        if (een[k] && int'(mod_row[k]) != erow[k]) bad = 1;
      end
      if (last != (n == t - 1)) bad = 1;
      if (conflict) bad = 1;
      if (bad) begin failures++; $display("FAIL case %0d S=%0d GL=%0d BL=%0d b=%0d access %0d", m, S, GL, BL, b, n); end
      @(negedge clk);
    end
    step = 0;
  endtask

  initial begin
    base = '0; dim = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 3, 2, 10); run(5, 3, 10, 2); run(1, 8, 3, 10);
    run(7, 6, 3, 12); run(2, 16, 4, 5); run(9, 4, 2, 6);
    for (int n = 0; n < 300; n++) begin
      automatic int b, bl;
      automatic int S = 1 + $urandom_range(0, 11), GL = 1 + $urandom_range(0, 11);
      if (n % 3 == 0) S = 2 << $urandom_range(0, 3);
      if (n % 4 == 0) GL = 1 << $urandom_range(0, 3);
      if (S < GL) S = S + GL;
      // skip the case VI patterns the scheme does not cover
      if (ref_mode(S, GL, 8, D) == 6 && ref_s(S) != 0 && (S >> ref_s(S)) != 1) continue;
      b = $urandom_range(0, 60); bl = 1 + $urandom_range(0, 10);
      if (b + (bl - 1) * S + GL > 256) continue;   // keep the pattern inside the array
      run(b, S, GL, bl);
    end
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
