// Testbench of pm_shuffle: random permutations with random lane masks
// (every valid item must land on its target module, unused modules read 0
// and are not enabled), plus two lanes carrying the same item to one module.
module tb_pm_shuffle;
  localparam int N = 8, W = 8;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [N-1:0][W-1:0] in_data, out_data;
  logic [N-1:0][2:0]   sel;
  logic [N-1:0]        in_valid, out_valid;

  pm_shuffle #(.N(N), .W(W)) dut (.*);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int perm[N]; int exp_d[N]; bit exp_v[N];
      for (int i = 0; i < N; i++) perm[i] = i;
      perm.shuffle();
      for (int m = 0; m < N; m++) begin exp_d[m] = 0; exp_v[m] = 0; end
      for (int p = 0; p < N; p++) begin
        in_data[p]  = W'($urandom);
        sel[p]      = 3'(perm[p]);
        in_valid[p] = $urandom_range(0, 3) != 0;
        if (in_valid[p]) begin exp_d[perm[p]] = in_data[p]; exp_v[perm[p]] = 1; end
      end
      #1;
      for (int m = 0; m < N; m++) begin
        checks++;
        if (out_valid[m] != exp_v[m] || int'(out_data[m]) != exp_d[m]) begin
          failures++;
          $display("FAIL module %0d got %0h/%0d exp %0h/%0d", m, out_data[m], out_valid[m], exp_d[m], exp_v[m]);
        end
      end
    end
    // duplicate item to one module
    in_data = '0; in_valid = '0; sel = '0;
    in_data[1] = 8'h5a; sel[1] = 3'd6; in_valid[1] = 1;
    in_data[4] = 8'h5a; sel[4] = 3'd6; in_valid[4] = 1;
    #1;
    checks++;
    if (out_data[6] != 8'h5a || out_valid != 8'b0100_0000) begin failures++; $display("FAIL duplicate"); end
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
