// tb_median_workloads: runs the two evaluated configurations of the codec on the
// same noisy channel data, at the default sizes:
//   - rate 1/2 (886 symbols per 440-bit block), 1, 2 and 3 iterations, truncation
//     path length 28, as in the hardware measurements;
//   - rate 440/619 (about 5/7), 1, 2 and 3 iterations.
// Twelve 440-bit blocks per rate are encoded by the RTL encoder (checked against
// the reference encoder), sent through an antipodal channel with Gaussian noise
// (about 11 % hard-decision errors at rate 1/2, 4 % at rate 5/7) and decoded three
// times, once per iteration count.
// Checked: symbol counts; every block terminates in both passes; three iterations
// remove most channel errors; three iterations never end with more errors in
// total than one, and the step from 1 to 2 gains at least as much as the step
// from 2 to 3; decoding time per block matches
// 1 + punctured tail + 2*it*(443+28+3) cycles. Bit error counts are printed.
module tb_median_workloads;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  localparam int unsigned AWID = turbo_pkg::AW;
  localparam int NBLK = 12;
  localparam int N = 440;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                   pi_we = 1'b0;
  logic [AWID-1:0]        pi_waddr = '0, pi_wdata = '0;
  logic                   enc_start = 1'b0;
  logic [AWID-1:0]        enc_blk_len = '0;
  punct_cfg_t             enc_punct = PUNCT_RATE_HALF;
  logic                   enc_busy, enc_done, enc_term_ok;
  logic                   enc_in_valid = 1'b0, enc_in_ready, enc_in_bit = 1'b0;
  logic                   enc_out_valid, enc_out_ready = 1'b0, enc_out_bit;
  sym_kind_t              enc_out_kind;
  logic                   dec_start = 1'b0;
  logic [AWID-1:0]        dec_blk_len = '0;
  logic [2:0]             dec_iterations = 3'd2;
  logic [3:0]             dec_ext_weight = 4'd8;
  punct_cfg_t             dec_punct = PUNCT_RATE_HALF;
  logic                   dec_busy, dec_done;
  logic [15:0]            dec_sat_count;
  logic                   dec_in_valid = 1'b0, dec_in_ready;
  logic signed [5:0]      dec_in_sym = '0;
  logic                   dec_out_valid, dec_out_ready = 1'b0, dec_out_bit;

  turbo_codec dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // encode one block with the RTL encoder; returns the noisy soft symbols
  task automatic encode(input bit d[], input int pi[], input punct_cfg_t pc, input real sigma,
                        output int q[$], output int raw);
    bit x[], y1[], y2[], ok1, ok2;
    int n0, idx;
    sym_t s[$];
    ref_encode(d, pi, pc, s, x, y1, y2, n0, ok1, ok2);
    for (int p = 0; p < N + 3; p++) begin
      pi_we <= 1'b1; pi_waddr <= AWID'(p); pi_wdata <= AWID'(pi[p]);
      @(posedge clk);
    end
    pi_we <= 1'b0;
    enc_blk_len <= AWID'(N); enc_punct <= pc; enc_start <= 1'b1;
    @(posedge clk);
    enc_start <= 1'b0;
    q.delete(); raw = 0; idx = 0;
    enc_out_ready <= 1'b1;
    fork
      begin
        for (int i = 0; i < N; i++) begin
          enc_in_valid <= 1'b1; enc_in_bit <= d[i];
          do @(posedge clk); while (!enc_in_ready);
        end
        enc_in_valid <= 1'b0;
      end
      begin
        while (!enc_done) begin
          @(posedge clk);
          if (enc_out_valid) begin
            int v;
            if (idx < s.size()) check(enc_out_bit == s[idx].b && enc_out_kind == s[idx].k, "encoder symbol");
            v = soft_value(enc_out_bit, 8.0, sigma, 6);
            if (enc_out_kind == SYM_X && idx < 2 * N && ((v > 0) != enc_out_bit)) raw++;
            q.push_back(v);
            idx++;
          end
        end
      end
    join
    enc_out_ready <= 1'b0;
    check(q.size() == s.size(), "symbol count");
    check(enc_term_ok, "both encoder passes end in state 0");
  endtask

  task automatic decode(input bit d[], input punct_cfg_t pc, input int iters, input int q[$],
                        output int err);
    int got[$], cyc, lr;
    dec_blk_len <= AWID'(N); dec_punct <= pc; dec_iterations <= 3'(iters); dec_start <= 1'b1;
    @(posedge clk);
    dec_start <= 1'b0;
    foreach (q[i]) begin
      dec_in_valid <= 1'b1; dec_in_sym <= 6'(q[i]);
      do @(posedge clk); while (!dec_in_ready);
    end
    dec_in_valid <= 1'b0;
    cyc = 0;
    while (!dec_out_valid) begin @(posedge clk); cyc++; end
    lr = 0;
    for (int p = N + 2; p >= 0 && !keep(pc, 1, p); p--) lr++;
    check(cyc == 1 + lr + 2 * iters * (N + 3 + 28 + 3), $sformatf("decode cycles %0d", cyc));
    dec_out_ready <= 1'b1;
    while (got.size() < N) begin
      @(posedge clk);
      if (dec_out_valid) got.push_back(int'(dec_out_bit));
    end
    dec_out_ready <= 1'b0;
    @(posedge clk);
    err = 0;
    foreach (got[i]) if (got[i] != int'(d[i])) err++;
  endtask

  initial begin
    punct_cfg_t pcs[2];
    int raw_tot[2], err_tot[2][4];
    string nm[2];
    real sig[2];
    void'($urandom(11));
    pcs[0] = PUNCT_RATE_HALF;
    pcs[1] = '{period_m1: 3'd4, y1_mask: 8'h08, y2_mask: 8'h10};
    nm[0] = "rate 1/2 [440;886]";
    nm[1] = "rate 5/7 [440;619]";
    sig[0] = 6.5;   // about 11 % hard-decision errors
    sig[1] = 4.5;   // about 4 %
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int r = 0; r < 2; r++) begin
      raw_tot[r] = 0;
      for (int it = 1; it <= 3; it++) err_tot[r][it] = 0;
      for (int b = 0; b < NBLK; b++) begin
        bit d[];
        int pi[], q[$], raw, err;
        d = new[N];
        foreach (d[i]) d[i] = 1'($urandom);
        make_pattern(N + 3, pi);
        encode(d, pi, pcs[r], sig[r], q, raw);
        raw_tot[r] += raw;
        for (int it = 1; it <= 3; it++) begin
          decode(d, pcs[r], it, q, err);
          err_tot[r][it] += err;
        end
      end
      $display("%s: %0d bits, channel errors %0d, decoded errors after 1/2/3 iterations: %0d / %0d / %0d",
               nm[r], NBLK * N, raw_tot[r], err_tot[r][1], err_tot[r][2], err_tot[r][3]);
      check(err_tot[r][3] <= err_tot[r][1], {nm[r], ": three iterations no worse than one"});
      check(err_tot[r][1] - err_tot[r][2] >= err_tot[r][2] - err_tot[r][3],
            {nm[r], ": gain from iteration 1 to 2 at least that from 2 to 3"});
    end
    check(4 * err_tot[0][3] < raw_tot[0], "rate 1/2 removes most channel errors");
    check(4 * err_tot[1][3] < raw_tot[1], "rate 5/7 removes most channel errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
