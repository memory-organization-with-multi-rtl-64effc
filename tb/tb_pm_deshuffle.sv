// Testbench of pm_deshuffle: random selections (permutations and arbitrary
// choices); every lane must carry the item of the module it selects.
module tb_pm_deshuffle;
  localparam int N = 8, W = 16;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [N-1:0][W-1:0] in_data, out_data;
  logic [N-1:0][2:0]   sel;

  pm_deshuffle #(.N(N), .W(W)) dut (.*);

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int perm[N];
      for (int i = 0; i < N; i++) perm[i] = i;
      perm.shuffle();
      for (int m = 0; m < N; m++) in_data[m] = W'($urandom);
      for (int p = 0; p < N; p++) sel[p] = (n % 2) ? 3'(perm[p]) : 3'($urandom);
      #1;
      for (int p = 0; p < N; p++) begin
        checks++;
        if (out_data[p] !== in_data[sel[p]]) begin
          failures++;
          $display("FAIL lane %0d sel %0d got %0h", p, sel[p], out_data[p]);
        end
      end
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
