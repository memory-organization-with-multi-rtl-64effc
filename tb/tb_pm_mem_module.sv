// Testbench of pm_mem_module at its default size (1024 x 64 bits): fills
// every word, reads all back in random order, checks the one-cycle read
// latency, that rdata holds while en is low and that disabled writes store
// nothing.
module tb_pm_mem_module;
  localparam int WA = 10, DW = 64;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic en = 0, we = 0;
  logic [WA-1:0] addr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] model [2**WA];

  pm_mem_module #(.WA(WA), .DW(DW)) dut (.*);

  function automatic logic [DW-1:0] pat(int a, int k);
    return {32'(a * 32'h9e3779b1 + k), 32'(a ^ (k << 12))};
  endfunction

  initial begin
    @(negedge clk);
    for (int a = 0; a < 2**WA; a++) begin
      en = 1; we = 1; addr = WA'(a); wdata = pat(a, 1); model[a] = wdata;
      @(negedge clk);
    end
    // disabled write must not store
    en = 0; we = 1; addr = 10'd5; wdata = '1;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      automatic int a = $urandom_range(0, 2**WA - 1);
      if (n % 5 == 0) begin
        en = 1; we = 1; addr = WA'(a); wdata = pat(a, n); model[a] = wdata;
        @(negedge clk);
      end else begin
        en = 1; we = 0; addr = WA'(a);
        @(negedge clk);            // one edge later the word is on rdata
        en = 0;
        checks++;
        if (rdata !== model[a]) begin failures++; $display("FAIL read %0d got %0h exp %0h", a, rdata, model[a]); end
        addr = WA'(a + 1);
        @(negedge clk);            // held while disabled
        checks++;
        if (rdata !== model[a]) begin failures++; $display("FAIL hold %0d", a); end
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
