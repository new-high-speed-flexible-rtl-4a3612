// tb_turbo_codec: end-to-end test of the turbo-block codec at its default sizes
// (N up to 440, 443-entry interleaver, truncation path length 28).
//
// Each block: random data and a random modulo-7-preserving interleaver are drawn,
// the pattern is loaded, the encoder output is compared symbol by symbol with the
// reference encoder of turbo_ref_pkg, the symbols go through a BPSK/AWGN channel
// model (one = positive) quantised to 6 bits, and the decoder output is compared
// with the data. Noise-free blocks must decode without error; noisy blocks must
// decode with far fewer errors than the hard decisions on the channel. The decoding
// time of each block is checked against the cycle formula of the decoder.
// Mechanisms counted, each must occur: zero-bit insertion (N0 > 0) and blocks that
// need none, punctured parity, encoder output stalls, decoder input gaps, extrinsic
// saturation, 1, 2 and 3 iterations, different block lengths, error correction.
module tb_turbo_codec;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  localparam int unsigned AWID = turbo_pkg::AW;

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
  int n_zero_ins = 0, n_no_zero = 0, n_punct = 0, n_stall = 0, n_gap = 0, n_sat = 0;
  int n_it[4] = '{0, 0, 0, 0};
  int n_corrected = 0, n_len_diff = 0, last_len = -1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(input int n, input punct_cfg_t pc, input int iters, input int weight,
                           input real amp, input real sigma, input bit stall, input bit gaps);
    bit   d[], x[], y1[], y2[], ok1, ok2;
    int   pi[], n0, soft_q[$], got[$], raw_err, dec_err, l, idx, cyc, exp_cyc, lr;
    sym_t s[$];
    l = n + 3;
    d = new[n];
    foreach (d[i]) d[i] = 1'($urandom);
    make_pattern(l, pi);
    ref_encode(d, pi, pc, s, x, y1, y2, n0, ok1, ok2);
    if (n0 > 0) n_zero_ins++; else n_no_zero++;
    if (n == 440 && pc.period_m1 == 3'd4) check(s.size() == 619, "N=440 at rate 5/7 gives 619 symbols");
    if (n == 440 && pc == PUNCT_RATE_HALF) check(s.size() == 886, "N=440 at rate 1/2 gives 886 symbols");
    n_punct += 3 * l - s.size();
    if (last_len >= 0 && last_len != n) n_len_diff++;
    last_len = n;
    n_it[iters]++;

    // pattern into both ends
    for (int p = 0; p < l; p++) begin
      pi_we <= 1'b1; pi_waddr <= AWID'(p); pi_wdata <= AWID'(pi[p]);
      @(posedge clk);
    end
    pi_we <= 1'b0;

    // encoder
    enc_blk_len <= AWID'(n); enc_punct <= pc; enc_start <= 1'b1;
    @(posedge clk);
    enc_start <= 1'b0;
    idx = 0;
    raw_err = 0;
    fork
      begin : feed
        for (int i = 0; i < n; i++) begin
          enc_in_valid <= 1'b1; enc_in_bit <= d[i];
          do @(posedge clk); while (!enc_in_ready);
        end
        enc_in_valid <= 1'b0;
      end
      begin : take
        while (idx < s.size()) begin
          enc_out_ready <= stall ? ($urandom_range(3, 0) != 0) : 1'b1;
          @(posedge clk);
          if (enc_out_valid && !enc_out_ready) n_stall++;
          if (enc_out_valid && enc_out_ready) begin
            int v;
            check(enc_out_bit == s[idx].b && enc_out_kind == s[idx].k,
                  $sformatf("N=%0d symbol %0d", n, idx));
            v = soft_value(enc_out_bit, amp, sigma, 6);
            if (s[idx].k == SYM_X && idx < 2 * n + 2 && ((v > 0) != enc_out_bit)) raw_err++;
            soft_q.push_back(v);
            idx++;
          end
        end
        enc_out_ready <= 1'b0;
      end
    join
    // dropped Y2 positions after the last sent symbol still take a cycle each
    for (int i = 0; i < 8 && enc_busy; i++) @(posedge clk);
    @(posedge clk);
    check(!enc_busy, "encoder idle after block");
    check(enc_term_ok == (ok1 && ok2) && enc_term_ok, $sformatf("N=%0d both passes end in state 0", n));

    // decoder
    dec_blk_len <= AWID'(n); dec_punct <= pc; dec_iterations <= 3'(iters);
    dec_ext_weight <= 4'(weight); dec_start <= 1'b1;
    @(posedge clk);
    dec_start <= 1'b0;
    while (soft_q.size() > 0) begin
      if (gaps && $urandom_range(4, 0) == 0) begin
        dec_in_valid <= 1'b0;
        @(posedge clk);
        if (dec_in_ready) n_gap++;
      end else begin
        dec_in_valid <= 1'b1; dec_in_sym <= 6'(soft_q[0]);
        do @(posedge clk); while (!dec_in_ready);
        void'(soft_q.pop_front());
      end
    end
    dec_in_valid <= 1'b0;
    // the decoder now finishes the punctured tail of the Y2 stream and decodes
    cyc = 0;
    while (!dec_out_valid) begin
      @(posedge clk);
      cyc++;
    end
    // remaining Y2 positions that carried no symbol, then 2*iters half-iterations
    lr = 0;
    for (int p = l - 1; p >= 0 && !keep(pc, 1, p); p--) lr++;
    exp_cyc = lr + 1 + 2 * iters * (l + ((l < 28) ? l : 28) + 3);
    check(cyc == exp_cyc, $sformatf("N=%0d decoding cycles %0d expected %0d", n, cyc, exp_cyc));
    dec_out_ready <= 1'b1;
    while (got.size() < n) begin
      @(posedge clk);
      if (dec_out_valid && dec_out_ready) got.push_back(int'(dec_out_bit));
    end
    dec_out_ready <= 1'b0;
    @(posedge clk);
    check(!dec_busy, "decoder idle after block");
    dec_err = 0;
    for (int i = 0; i < n; i++) if (got[i] != int'(d[i])) dec_err++;
    if (dec_sat_count != 0) n_sat++;
    if (sigma == 0.0) begin
      check(dec_err == 0, $sformatf("N=%0d noise-free block decoded with %0d errors", n, dec_err));
    end else begin
      check(raw_err > 0 && 4 * dec_err <= raw_err,
            $sformatf("N=%0d noisy block: %0d channel errors, %0d after decoding", n, raw_err, dec_err));
      if (dec_err < raw_err) n_corrected++;
    end
    $display("block N=%0d N0=%0d symbols=%0d iters=%0d sigma=%0.1f: channel errors %0d, decoded errors %0d, sat %0d, decode cycles %0d",
             n, n0, s.size(), iters, sigma, raw_err, dec_err, dec_sat_count, cyc);
  endtask

  initial begin
    punct_cfg_t r57, r13;
    void'($urandom(7));
    // rate 440/619 (about 5/7): X plus 88 Y1 and 88 Y2 symbols for N = 440
    r57 = '{period_m1: 3'd4, y1_mask: 8'h08, y2_mask: 8'h10};
    r13 = '{period_m1: 3'd0, y1_mask: 8'h01, y2_mask: 8'h01};   // no puncturing
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run_block(440, PUNCT_RATE_HALF, 2, 15, 24.0, 0.0, 1'b1, 1'b1);
    run_block(440, PUNCT_RATE_HALF, 3, 8, 8.0, 4.6, 1'b0, 1'b0);
    run_block(100, PUNCT_RATE_HALF, 1, 8, 8.0, 0.0, 1'b1, 1'b0);
    run_block(116, r57, 2, 6, 8.0, 0.0, 1'b0, 1'b1);
    run_block(60, r13, 2, 6, 8.0, 5.5, 1'b0, 1'b0);
    run_block(440, r57, 3, 6, 10.0, 4.5, 1'b0, 1'b0);

    check(n_zero_ins > 0, "zero-bit insertion happened");
    check(n_no_zero > 0, "block without zero bits happened");
    check(n_punct > 0, "puncturing happened");
    check(n_stall > 0, "encoder output stall happened");
    check(n_gap > 0, "decoder input gap happened");
    check(n_sat > 0, "extrinsic saturation happened");
    check(n_it[1] > 0 && n_it[2] > 0 && n_it[3] > 0, "1, 2 and 3 iterations used");
    check(n_len_diff > 0, "block length changed between blocks");
    check(n_corrected > 0, "channel errors corrected");
    $display("mechanisms: zero-ins=%0d no-zero=%0d punctured=%0d stalls=%0d gaps=%0d sat=%0d it1=%0d it2=%0d it3=%0d len-changes=%0d corrected=%0d",
             n_zero_ins, n_no_zero, n_punct, n_stall, n_gap, n_sat, n_it[1], n_it[2], n_it[3], n_len_diff, n_corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
