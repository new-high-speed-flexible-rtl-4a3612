// tb_turbo_encoder: checks the modified turbo encoder against the reference
// encoder of turbo_ref_pkg for many block lengths (including N = 440, blocks that
// need zero bits and blocks that need none) and three puncturing patterns.
// Every output symbol and its stream kind is compared, both passes must end in
// state 0 (term_ok), and with the output always ready the block must take
// 1 + (N + 3) + kept Y1 symbols + N0 + (N + 3) cycles from start to done.
// Half of the blocks run with random output back-pressure and input gaps.
module tb_turbo_encoder;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0;
  logic [AW-1:0] blk_len = '0;
  punct_cfg_t punct = PUNCT_RATE_HALF;
  logic busy, done, term_ok;
  logic in_valid = 1'b0, in_ready, in_bit = 1'b0;
  logic out_valid, out_ready = 1'b0, out_bit;
  sym_kind_t out_kind;
  logic pi_we = 1'b0;
  logic [AW-1:0] pi_waddr = '0, pi_wdata = '0;

  turbo_encoder dut (.*);

  int checks = 0, failures = 0, n_zero = 0, n_nozero = 0, n_stall = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n, input punct_cfg_t pc, input bit rough);
    bit d[], x[], y1[], y2[], ok1, ok2;
    int pi[], n0, idx, cyc, kept1, exp_cyc;
    bit fin;
    sym_t s[$];
    d = new[n];
    foreach (d[i]) d[i] = 1'($urandom);
    make_pattern(n + 3, pi);
    ref_encode(d, pi, pc, s, x, y1, y2, n0, ok1, ok2);
    if (n0 > 0) n_zero++; else n_nozero++;
    for (int p = 0; p < n + 3; p++) begin
      pi_we <= 1'b1; pi_waddr <= AW'(p); pi_wdata <= AW'(pi[p]);
      @(posedge clk);
    end
    pi_we <= 1'b0;
    blk_len <= AW'(n); punct <= pc; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    idx = 0; cyc = 0; fin = 0;
    fork
      begin
        for (int i = 0; i < n; i++) begin
          if (rough) while ($urandom_range(3, 0) == 0) begin
            in_valid <= 1'b0; @(posedge clk);
          end
          in_valid <= 1'b1; in_bit <= d[i];
          do @(posedge clk); while (!in_ready);
        end
        in_valid <= 1'b0;
      end
      begin
        while (!fin) begin
          out_ready <= rough ? ($urandom_range(2, 0) != 0) : 1'b1;
          @(posedge clk);
          cyc++;
          if (out_valid && !out_ready) n_stall++;
          if (out_valid && out_ready) begin
            check(idx < s.size(), "no extra symbols");
            if (idx < s.size())
              check(out_bit == s[idx].b && out_kind == s[idx].k,
                    $sformatf("N=%0d symbol %0d", n, idx));
            idx++;
          end
          if (done) fin = 1;
        end
        out_ready <= 1'b0;
      end
    join
    check(idx == s.size(), $sformatf("N=%0d symbol count %0d of %0d", n, idx, s.size()));
    check(term_ok && ok1 && ok2, $sformatf("N=%0d both passes terminated", n));
    kept1 = 0;
    for (int t = 0; t < n + 3; t++) if (keep(pc, 0, t)) kept1++;
    exp_cyc = 1 + (n + 3) + kept1 + n0 + (n + 3);
    if (!rough) check(cyc == exp_cyc, $sformatf("N=%0d cycles %0d expected %0d", n, cyc, exp_cyc));
    @(posedge clk);
    check(!busy, "idle after done");
  endtask

  initial begin
    punct_cfg_t pats[3];
    int lens[8] = '{440, 116, 1, 4, 25, 200, 439, 11};
    pats[0] = PUNCT_RATE_HALF;
    pats[1] = '{period_m1: 3'd4, y1_mask: 8'h01, y2_mask: 8'h04};
    pats[2] = '{period_m1: 3'd0, y1_mask: 8'h01, y2_mask: 8'h01};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(!busy, "idle after reset");
    for (int i = 0; i < 16; i++) run(lens[i % 8], pats[i % 3], i[0]);
    check(n_zero > 0 && n_nozero > 0, "blocks with and without zero bits");
    check(n_stall > 0, "output stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
