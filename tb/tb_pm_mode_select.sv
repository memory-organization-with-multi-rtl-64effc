// Testbench of pm_mode_select: directed corner cases and random patterns,
// compared with the integer reference classification, for D = 8 and D = 4.
module tb_pm_mode_select;
  import pm_pkg::*;
  import pm_ref_pkg::*;

  int checks = 0, failures = 0;
  int seen [1:6];
  logic clk = 0;
  always #5 clk = ~clk;

  pm_dim_t               dim8, dim4;
  pm_mode_e              mode8, mode4;
  logic [$clog2(PW)-1:0] s8, g8, s4, g4;

  pm_mode_select #(.D(8)) dut8 (.dim(dim8), .mode(mode8), .s_exp(s8), .gl_log2(g8));
  pm_mode_select #(.D(4)) dut4 (.dim(dim4), .mode(mode4), .s_exp(s4), .gl_log2(g4));

  task automatic check(int S, int GL, int BL);
    int em8, em4;
    dim8 = '{stride: PW'(S), glen: PW'(GL), blen: PW'(BL)};
    dim4 = dim8;
    #1;
    em8 = ref_mode(S, GL, BL, 8);
    em4 = ref_mode(S, GL, BL, 4);
    seen[em8]++;
    checks += 3;
    if (int'(mode8) != em8 || int'(mode4) != em4) begin
      failures++;
      $display("FAIL S=%0d GL=%0d BL=%0d mode8=%0d exp %0d mode4=%0d exp %0d",
               S, GL, BL, mode8, em8, mode4, em4);
    end
    if (int'(s8) != ref_s(S) || int'(s4) != ref_s(S)) begin
      failures++;
      $display("FAIL S=%0d s=%0d exp %0d", S, s8, ref_s(S));
    end
    if (is_pow2(GL) && int'(g8) != log2i(GL)) begin
      failures++;
      $display("FAIL GL=%0d gl_log2=%0d", GL, g8);
    end
  endtask

  initial begin
    // one directed example of every case for D = 8
    check(3, 2, 10);   // I
    check(3, 10, 2);   // II (odd stride, group-wise cheaper)
    check(6, 9, 3);    // II (even stride, GL not 2^x, group-wise cheaper)
    check(8, 3, 10);   // III
    check(6, 3, 12);   // IV
    check(16, 4, 5);   // V
    check(4, 2, 6);    // VI
    check(48, 1, 3);   // GL = 1 counts as 2^0 -> V
    for (int n = 0; n < 4000; n++)
      check(1 + $urandom_range(0, 200), 1 + $urandom_range(0, 40), 1 + $urandom_range(0, 40));
    for (int m = 1; m <= 6; m++) begin
      checks++;
      if (seen[m] == 0) begin failures++; $display("FAIL case %0d never selected", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
