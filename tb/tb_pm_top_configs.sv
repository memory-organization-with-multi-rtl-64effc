// Runs pm_top in the matrix sizes and word widths of the reference
// configurations other than the default 8 x 8 x 64-bit build (which
// tb_pm_top covers): 2x2, 2x4, 2x8, 4x4, 4x8 and 8x8 modules, each with
// 32-bit and 64-bit words, all with a 10-bit module row address. Each build
// runs random patterns in pm_cfg_harness. All builds together must use
// every one of the six cases.
module tb_pm_top_configs;
  localparam int NC = 11;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int   chk [NC], fl [NC], cs [NC];
  logic fin [NC];

  pm_cfg_harness #(.VD(2), .HD(2), .WB(4), .SEED(11)) h0  (.clk, .rst_n, .checks(chk[0]),  .failures(fl[0]),  .cases_seen(cs[0]),  .finished(fin[0]));
  pm_cfg_harness #(.VD(2), .HD(2), .WB(8), .SEED(12)) h1  (.clk, .rst_n, .checks(chk[1]),  .failures(fl[1]),  .cases_seen(cs[1]),  .finished(fin[1]));
  pm_cfg_harness #(.VD(2), .HD(4), .WB(4), .SEED(13)) h2  (.clk, .rst_n, .checks(chk[2]),  .failures(fl[2]),  .cases_seen(cs[2]),  .finished(fin[2]));
  pm_cfg_harness #(.VD(2), .HD(4), .WB(8), .SEED(14)) h3  (.clk, .rst_n, .checks(chk[3]),  .failures(fl[3]),  .cases_seen(cs[3]),  .finished(fin[3]));
  pm_cfg_harness #(.VD(2), .HD(8), .WB(4), .SEED(15)) h4  (.clk, .rst_n, .checks(chk[4]),  .failures(fl[4]),  .cases_seen(cs[4]),  .finished(fin[4]));
  pm_cfg_harness #(.VD(2), .HD(8), .WB(8), .SEED(16)) h5  (.clk, .rst_n, .checks(chk[5]),  .failures(fl[5]),  .cases_seen(cs[5]),  .finished(fin[5]));
  pm_cfg_harness #(.VD(4), .HD(4), .WB(4), .SEED(17)) h6  (.clk, .rst_n, .checks(chk[6]),  .failures(fl[6]),  .cases_seen(cs[6]),  .finished(fin[6]));
  pm_cfg_harness #(.VD(4), .HD(4), .WB(8), .SEED(18)) h7  (.clk, .rst_n, .checks(chk[7]),  .failures(fl[7]),  .cases_seen(cs[7]),  .finished(fin[7]));
  pm_cfg_harness #(.VD(4), .HD(8), .WB(4), .SEED(19)) h8  (.clk, .rst_n, .checks(chk[8]),  .failures(fl[8]),  .cases_seen(cs[8]),  .finished(fin[8]));
  pm_cfg_harness #(.VD(4), .HD(8), .WB(8), .SEED(20)) h9  (.clk, .rst_n, .checks(chk[9]),  .failures(fl[9]),  .cases_seen(cs[9]),  .finished(fin[9]));
  pm_cfg_harness #(.VD(8), .HD(8), .WB(4), .SEED(21)) h10 (.clk, .rst_n, .checks(chk[10]), .failures(fl[10]), .cases_seen(cs[10]), .finished(fin[10]));

  function automatic bit all_done();
    for (int i = 0; i < NC; i++) if (!fin[i]) return 0;
    return 1;
  endfunction

  initial begin
    int checks, failures, cases;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!all_done()) @(posedge clk);
    checks = 0; failures = 0; cases = 0;
    for (int i = 0; i < NC; i++) begin
      checks += chk[i]; failures += fl[i]; cases |= cs[i];
      $display("build %0d: checks=%0d failures=%0d cases=%b", i, chk[i], fl[i], cs[i][6:1]);
    end
    for (int m = 1; m <= 6; m++) begin
      checks++;
      if (!cases[m]) begin failures++; $display("FAIL case %0d never used", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end
endmodule
