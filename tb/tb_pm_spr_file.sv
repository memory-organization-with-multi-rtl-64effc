// Testbench of pm_spr_file: reset values, write and read back of every
// register, the zero-to-one rule for strides and lengths, the pattern
// output and the lock.
module tb_pm_spr_file;
  import pm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic spr_we = 0, lock = 0;
  logic [2:0] spr_addr = '0;
  logic [31:0] spr_wdata = '0, spr_rdata;
  pm_pattern_t pattern;
  logic [31:0] model [7];

  pm_spr_file dut (.*);

  task automatic wr(int a, logic [31:0] d);
    @(negedge clk);
    spr_we = 1; spr_addr = 3'(a); spr_wdata = d;
    @(negedge clk);
    spr_we = 0;
  endtask

  task automatic check_all(string what);
    logic [31:0] got [7];
    for (int a = 0; a < 7; a++) begin
      spr_addr = 3'(a);
      #1;
      checks++;
      if (spr_rdata !== model[a]) begin failures++; $display("FAIL %s reg %0d got %0h exp %0h", what, a, spr_rdata, model[a]); end
    end
    got[0] = pattern.base;
    got[1] = 32'(pattern.v.stride); got[2] = 32'(pattern.h.stride);
    got[3] = 32'(pattern.v.glen);   got[4] = 32'(pattern.h.glen);
    got[5] = 32'(pattern.v.blen);   got[6] = 32'(pattern.h.blen);
    for (int a = 0; a < 7; a++) begin
      checks++;
      if (got[a] !== model[a]) begin failures++; $display("FAIL %s pattern field %0d", what, a); end
    end
  endtask

  initial begin
    model[0] = 0;
    for (int a = 1; a < 7; a++) model[a] = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_all("reset");
    for (int n = 0; n < 200; n++) begin
      automatic int a = $urandom_range(0, 6);
      automatic logic [31:0] d = (n % 9 == 0) ? 32'd0 : $urandom;
      wr(a, d);
      if (a == 0) model[0] = d;
      else model[a] = (d[PW-1:0] == '0) ? 32'd1 : 32'(d[PW-1:0]);
      check_all("write");
    end
    lock = 1;
    wr(0, 32'hdead_beef);
    wr(3, 32'd77);
    check_all("locked");
    lock = 0;
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
