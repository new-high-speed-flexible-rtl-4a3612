// tb_sova_decoder: checks the SOVA component decoder at its default sizes
// (truncation path length 28).
//
// Short blocks (6 data bits + 3 tail bits, noisy inputs) are checked against a
// brute-force search over all 64 codewords: the decoded sequence must be a
// codeword with the largest correlation metric (maximum likelihood), and every
// soft output must carry the sign of its bit and a magnitude no smaller than the
// max-log value (best metric minus best metric with that bit inverted, halved),
// as the SOVA reliability is an upper bound of it.
// Long blocks (443 steps) check the streaming path: outputs in index order, each
// once, output j exactly U cycles after input step j while j < L - U, the flush of
// the last U outputs, `done` after L + U + 1 cycles, error-free decoding without
// noise and error correction with noise.
module tb_sova_decoder;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  localparam int U = 28;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0;
  logic [AW-1:0] blk_len = '0;
  logic busy, in_valid = 1'b0, in_ready;
  logic signed [7:0] in_a = '0;
  logic signed [5:0] in_y = '0;
  logic out_valid, out_bit, done;
  logic [AW-1:0] out_idx;
  logic signed [9:0] out_llr;

  sova_decoder dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // encode n data bits plus tail: x (systematic), c (parity)
  function automatic void enc(input bit d[], output bit x[], output bit c[]);
    bit r[3];
    int l;
    l = d.size() + 3;
    x = new[l]; c = new[l];
    r = '{0, 0, 0};
    for (int t = 0; t < l; t++) begin
      x[t] = (t < d.size()) ? d[t] : (r[1] ^ r[2]);
      c[t] = ref_rsc_step(r, x[t]);
    end
  endfunction

  function automatic int metric(input bit x[], input bit c[], input int a[], input int y[]);
    int m;
    m = 0;
    foreach (x[t]) m += (x[t] ? a[t] : -a[t]) + (c[t] ? y[t] : -y[t]);
    return m;
  endfunction

  // run one block; returns outputs by index and the cycle of each output
  task automatic run(input int a[], input int y[], output int bits[], output int llr[],
                     output int when[], output int done_at);
    int l, cyc, seen;
    l = a.size();
    bits = new[l]; llr = new[l]; when = new[l];
    foreach (when[i]) when[i] = -1;
    blk_len <= AW'(l); start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);   // the unit accepts input from the cycle after start
    cyc = 0; seen = 0; done_at = -1;
    while (done_at < 0) begin
      if (cyc < l) begin
        in_valid <= 1'b1; in_a <= 8'(a[cyc]); in_y <= 6'(y[cyc]);
      end else in_valid <= 1'b0;
      @(posedge clk);
      if (cyc < l) check(in_ready, "input accepted every cycle");
      if (out_valid) begin
        check(int'(out_idx) == seen, $sformatf("output order: got %0d expected %0d", out_idx, seen));
        if (int'(out_idx) < l) begin
          bits[out_idx] = out_bit; llr[out_idx] = out_llr; when[out_idx] = cyc;
        end
        seen++;
      end
      if (done) done_at = cyc;
      cyc++;
    end
    check(seen == l, $sformatf("%0d outputs for %0d steps", seen, l));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // ---- short blocks against exhaustive search
    for (int blk = 0; blk < 30; blk++) begin
      bit d[], x[], c[], bx[], bc[];
      int a[], y[], bits[], llr[], when[], done_at, best, ml_alt[2][], mm;
      d = new[6];
      foreach (d[i]) d[i] = 1'($urandom);
      enc(d, x, c);
      a = new[9]; y = new[9];
      foreach (a[t]) begin
        a[t] = soft_value(x[t], 10.0, 9.0, 8);
        y[t] = soft_value(c[t], 10.0, 9.0, 6);
      end
      run(a, y, bits, llr, when, done_at);
      check(done_at == 9 + 9 + 1, $sformatf("short block done after %0d cycles", done_at));
      best = -100000;
      for (int b = 0; b < 2; b++) begin
        ml_alt[b] = new[9];
        foreach (ml_alt[b][t]) ml_alt[b][t] = -100000;
      end
      for (int w = 0; w < 64; w++) begin
        bit dd[];
        dd = new[6];
        foreach (dd[i]) dd[i] = w[i];
        enc(dd, bx, bc);
        mm = metric(bx, bc, a, y);
        if (mm > best) best = mm;
        foreach (bx[t]) if (mm > ml_alt[bx[t]][t]) ml_alt[bx[t]][t] = mm;
      end
      begin
        bit dd[];
        dd = new[6];
        foreach (dd[i]) dd[i] = bits[i];
        enc(dd, bx, bc);
        check(metric(bx, bc, a, y) == best, $sformatf("blk %0d decoded path has the ML metric", blk));
        for (int t = 6; t < 9; t++) check(bits[t] == int'(bx[t]), "decoded tail bits form a codeword");
      end
      for (int t = 0; t < 9; t++) begin
        int maxlog;
        maxlog = (best - ml_alt[!bits[t]][t]) / 2;
        check((llr[t] > 0) == (bits[t] == 1), "soft output sign");
        check(((llr[t] < 0) ? -llr[t] : llr[t]) >= ((maxlog > 255) ? 255 : maxlog),
              $sformatf("blk %0d bit %0d |llr|=%0d below max-log %0d", blk, t, llr[t], maxlog));
      end
    end

    // ---- long blocks: latency, flush, noise-free and noisy decoding
    for (int blk = 0; blk < 4; blk++) begin
      bit d[], x[], c[];
      int a[], y[], bits[], llr[], when[], done_at, l, raw, err;
      real sigma;
      sigma = (blk < 2) ? 0.0 : 7.0;
      d = new[440];
      foreach (d[i]) d[i] = 1'($urandom);
      enc(d, x, c);
      l = 443;
      a = new[l]; y = new[l];
      raw = 0;
      foreach (a[t]) begin
        a[t] = soft_value(x[t], 12.0, sigma, 8);
        y[t] = soft_value(c[t], 12.0, sigma, 6);
        if ((a[t] > 0) != x[t]) raw++;
      end
      run(a, y, bits, llr, when, done_at);
      err = 0;
      foreach (bits[t]) if (bits[t] != int'(x[t])) err++;
      for (int j = 0; j < l - U; j++)
        check(when[j] == j + U, $sformatf("output %0d at cycle %0d, expected %0d", j, when[j], j + U));
      for (int j = l - U; j < l; j++)
        check(when[j] == l + 1 + (j - (l - U)), $sformatf("flush output %0d at cycle %0d", j, when[j]));
      check(done_at == l + U + 1, $sformatf("done after %0d cycles", done_at));
      if (sigma == 0.0) check(err == 0, $sformatf("noise-free block: %0d errors", err));
      else check(raw > 0 && 2 * err < raw, $sformatf("noisy block: %0d channel errors, %0d decoded", raw, err));
      $display("long block %0d: channel errors %0d, decoded errors %0d", blk, raw, err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
