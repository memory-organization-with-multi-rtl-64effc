// Testbench of pm_module_assign: for random patterns in every case, each
// access of the reference sequence is applied and every lane's module index
// is compared with the module assignment functions (7), (14), (16), (18),
// (21) evaluated by integer arithmetic. The conflict flag is compared with
// a pairwise search of the reference indices; conflicts must only ever show
// up in case VI. Runs D = 8 and D = 4.
module tb_pm_module_assign;
  import pm_pkg::*;
  import pm_ref_pkg::*;

  int checks = 0, failures = 0, conflicts_seen = 0;
  int seen [1:6];
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0][7:0] addr8;  logic [7:0] v8;  pm_mode_e mode8; logic [7:0][2:0] m8; logic c8;
  logic [3:0][6:0] addr4;  logic [3:0] v4;  pm_mode_e mode4; logic [3:0][1:0] m4; logic c4;
  logic [$clog2(PW)-1:0] s8, s4;
  logic [PW-1:0] gl8, gl4;

  pm_module_assign #(.D(8), .AW(8)) dut8 (.addr(addr8), .lane_valid(v8), .mode(mode8),
    .s_exp(s8), .glen(gl8), .mod_idx(m8), .conflict(c8));
  pm_module_assign #(.D(4), .AW(7)) dut4 (.addr(addr4), .lane_valid(v4), .mode(mode4),
    .s_exp(s4), .glen(gl4), .mod_idx(m4), .conflict(c4));

  task automatic run8(int b, int S, int GL, int BL);
    int q[$]; int m, mi[8]; bit ec;
    m = ref_mode(S, GL, BL, 8);
    seen[m]++;
    ref_seq(b, S, GL, BL, 8, m, q);
    mode8 = pm_mode_e'(m); s8 = ($clog2(PW))'(ref_s(S)); gl8 = PW'(GL);
    for (int n = 0; n < q.size() / 8; n++) begin
      for (int p = 0; p < 8; p++) begin
        v8[p] = q[n*8+p] >= 0;
        addr8[p] = v8[p] ? 8'(q[n*8+p]) : 8'($urandom);
      end
      #1;
      ec = 0;
      for (int p = 0; p < 8; p++) begin
        if (!v8[p]) continue;
        mi[p] = ref_m(q[n*8+p], m, S, GL, 8);
        checks++;
        if (int'(m8[p]) != mi[p]) begin
          failures++;
          $display("FAIL D=8 case %0d S=%0d GL=%0d a=%0d m=%0d exp %0d", m, S, GL, q[n*8+p], m8[p], mi[p]);
        end
        for (int r = 0; r < p; r++)
          if (v8[r] && mi[r] == mi[p] && q[n*8+r] != q[n*8+p]) ec = 1;
      end
      checks++;
      if (c8 != ec) begin failures++; $display("FAIL conflict flag %0d exp %0d", c8, ec); end
      if (ec) begin
        conflicts_seen++;
        checks++;
        if (m != 6) begin failures++; $display("FAIL conflict in case %0d S=%0d GL=%0d BL=%0d b=%0d", m, S, GL, BL, b); end
      end
    end
  endtask

  task automatic run4(int b, int S, int GL, int BL);
    int q[$]; int m, e;
    m = ref_mode(S, GL, BL, 4);
    ref_seq(b, S, GL, BL, 4, m, q);
    mode4 = pm_mode_e'(m); s4 = ($clog2(PW))'(ref_s(S)); gl4 = PW'(GL);
    for (int n = 0; n < q.size() / 4; n++) begin
      for (int p = 0; p < 4; p++) begin
        v4[p] = q[n*4+p] >= 0;
        addr4[p] = v4[p] ? 7'(q[n*4+p]) : '0;
      end
      #1;
      for (int p = 0; p < 4; p++) if (v4[p]) begin
        e = ref_m(q[n*4+p], m, S, GL, 4);
        checks++;
        if (int'(m4[p]) != e) begin failures++; $display("FAIL D=4 case %0d a=%0d m=%0d exp %0d", m, q[n*4+p], m4[p], e); end
      end
    end
  endtask

  initial begin
    run8(0, 3, 2, 10); run8(5, 3, 10, 2); run8(1, 8, 3, 10);
    run8(7, 6, 3, 12); run8(2, 16, 4, 5); run8(9, 4, 2, 6);
    run8(71, 10, 4, 14);   // case VI, stride 5*2: accesses straddling groups collide
    for (int n = 0; n < 600; n++) begin
      automatic int b, bl;
      automatic int S = 1 + $urandom_range(0, 11), GL = 1 + $urandom_range(0, 11);
      if (n % 3 == 0) S = 2 << $urandom_range(0, 3);
      if (n % 4 == 0) GL = 1 << $urandom_range(0, 3);
      if (S < GL) S = S + GL;   // no overlapping groups
      b = $urandom_range(0, 60); bl = 1 + $urandom_range(0, 10);
      if (b + (bl - 1) * S + GL <= 256) run8(b, S, GL, bl);   // inside the array
      if (S * 8 + GL + 40 < 128) run4($urandom_range(0, 40), S, GL, 1 + $urandom_range(0, 7));
    end
    for (int m = 1; m <= 6; m++) begin
      checks++;
      if (seen[m] == 0) begin failures++; $display("FAIL case %0d never run", m); end
    end
    checks++;
    if (conflicts_seen == 0) begin failures++; $display("FAIL conflict never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
