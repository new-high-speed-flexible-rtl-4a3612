// tb_turbo_decoder: checks the turbo decoder with symbol streams from the
// reference encoder of turbo_ref_pkg (no RTL encoder involved).
//
// Blocks of several lengths and puncturing patterns are decoded with 1 to 3
// iterations. Noise-free blocks must decode without error; noisy blocks must
// end with far fewer errors than the channel hard decisions. The time from the
// last input symbol to the first output bit must be
// 1 + (punctured Y2 positions after the last sent one) + 2*iterations*(L+min(L,28)+3)
// cycles, and output bits follow one per cycle while out_ready is high; the
// output is also read under random back-pressure. Weighting factor 0 (a-priori
// information switched off) must still decode noise-free blocks.
module tb_turbo_decoder;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0;
  logic [AW-1:0] blk_len = '0;
  logic [2:0] iterations = 3'd2;
  logic [3:0] ext_weight = 4'd8;
  punct_cfg_t punct = PUNCT_RATE_HALF;
  logic busy, done;
  logic [15:0] sat_count;
  logic in_valid = 1'b0, in_ready;
  logic signed [5:0] in_sym = '0;
  logic out_valid, out_ready = 1'b0, out_bit;
  logic pi_we = 1'b0;
  logic [AW-1:0] pi_waddr = '0, pi_wdata = '0;

  turbo_decoder dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n, input punct_cfg_t pc, input int iters, input int weight,
                     input real amp, input real sigma, input bit bp);
    bit d[], x[], y1[], y2[], ok1, ok2;
    int pi[], n0, raw, err, cyc, exp_cyc, lr, l, got[$], gap;
    sym_t s[$];
    l = n + 3;
    d = new[n];
    foreach (d[i]) d[i] = 1'($urandom);
    make_pattern(l, pi);
    ref_encode(d, pi, pc, s, x, y1, y2, n0, ok1, ok2);
    for (int p = 0; p < l; p++) begin
      pi_we <= 1'b1; pi_waddr <= AW'(p); pi_wdata <= AW'(pi[p]);
      @(posedge clk);
    end
    pi_we <= 1'b0;
    blk_len <= AW'(n); punct <= pc; iterations <= 3'(iters); ext_weight <= 4'(weight);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    raw = 0;
    foreach (s[i]) begin
      int v;
      v = soft_value(s[i].b, amp, sigma, 6);
      if (s[i].k == SYM_X && (v > 0) != s[i].b) raw++;
      in_valid <= 1'b1; in_sym <= 6'(v);
      do @(posedge clk); while (!in_ready);
    end
    in_valid <= 1'b0;
    cyc = 0;
    while (!out_valid) begin @(posedge clk); cyc++; end
    lr = 0;
    for (int p = l - 1; p >= 0 && !keep(pc, 1, p); p--) lr++;
    exp_cyc = 1 + lr + 2 * iters * (l + ((l < 28) ? l : 28) + 3);
    check(cyc == exp_cyc, $sformatf("N=%0d it=%0d decode cycles %0d expected %0d", n, iters, cyc, exp_cyc));
    gap = 0;
    while (got.size() < n) begin
      out_ready <= bp ? 1'($urandom) : 1'b1;
      @(posedge clk);
      if (out_valid && out_ready) got.push_back(int'(out_bit));
      else if (!bp) gap++;
    end
    out_ready <= 1'b0;
    check(gap == 0, "one output bit per cycle");
    @(posedge clk);
    check(!busy, "idle after the block");
    err = 0;
    foreach (got[i]) if (got[i] != int'(d[i])) err++;
    if (sigma == 0.0) check(err == 0, $sformatf("N=%0d noise-free: %0d errors", n, err));
    else check(raw > 0 && 4 * err <= raw, $sformatf("N=%0d noisy: %0d channel, %0d decoded", n, raw, err));
    $display("N=%0d it=%0d w=%0d sigma=%0.1f: channel errors %0d decoded errors %0d saturated %0d",
             n, iters, weight, sigma, raw, err, sat_count);
  endtask

  initial begin
    punct_cfg_t r57, r13;
    r57 = '{period_m1: 3'd4, y1_mask: 8'h01, y2_mask: 8'h04};
    r13 = '{period_m1: 3'd0, y1_mask: 8'h01, y2_mask: 8'h01};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(440, PUNCT_RATE_HALF, 2, 8, 8.0, 0.0, 1'b0);
    run(440, PUNCT_RATE_HALF, 3, 7, 8.0, 4.8, 1'b1);
    run(20, r13, 1, 8, 8.0, 0.0, 1'b1);
    run(5, PUNCT_RATE_HALF, 2, 8, 8.0, 0.0, 1'b0);
    run(200, r57, 2, 0, 8.0, 0.0, 1'b0);
    run(300, r13, 2, 6, 6.0, 6.0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
