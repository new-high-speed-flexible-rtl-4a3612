// tb_rsc_encoder: checks the {13,15} RSC encoder and its tail-bit logic.
//
// Random bit sequences are coded and every parity bit and state is compared with
// the shift-register model written from the polynomials. After each sequence three
// tail steps must leave the encoder in state 0, for every possible start state.
// Also checked: G1 divides 1 + D^7, so the input 1 0 0 0 0 0 0 1 returns the encoder
// to state 0 (reset-polynomial grade 7), and no shorter pattern 1 0..0 1 does.
module tb_rsc_encoder;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clr = 1'b0, en = 1'b0, term = 1'b0, u = 1'b0;
  logic sys, parity;
  logic [2:0] state;

  rsc_encoder dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2:0] pack(input bit r[3]);
    return {r[2], r[1], r[0]};
  endfunction

  initial begin
    bit r[3];
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(state == 3'd0, "reset state");
    for (int blk = 0; blk < 40; blk++) begin
      int len;
      len = $urandom_range(40, 1);
      clr = 1'b1; @(negedge clk); clr = 1'b0;
      r = '{0, 0, 0};
      for (int i = 0; i < len; i++) begin
        bit exp_par;
        u = 1'($urandom); en = 1'b1; term = 1'b0;
        #1;
        exp_par = ref_rsc_step(r, u);
        check(sys == u, "systematic bit passes through");
        check(parity == exp_par, $sformatf("parity blk %0d step %0d", blk, i));
        @(negedge clk);
        check(state == pack(r), "state follows the model");
      end
      for (int i = 0; i < 3; i++) begin
        term = 1'b1; u = 1'($urandom); #1;
        check(sys == (r[1] ^ r[2]), "tail bit from the state");
        check(parity == ref_rsc_step(r, sys), "tail parity");
        @(negedge clk);
      end
      check(state == 3'd0, $sformatf("terminated after 3 tail bits, blk %0d", blk));
      term = 1'b0; en = 1'b0;
    end
    // reset polynomial grade
    for (int gap = 1; gap <= 7; gap++) begin
      clr = 1'b1; @(negedge clk); clr = 1'b0;
      en = 1'b1;
      for (int i = 0; i <= gap; i++) begin
        u = (i == 0 || i == gap);
        @(negedge clk);
      end
      en = 1'b0;
      check((state == 3'd0) == (gap == 7), $sformatf("1 0^%0d 1 returns to zero only for 7", gap - 1));
    end
    // enable low holds the state
    clr = 1'b1; @(negedge clk); clr = 1'b0;
    en = 1'b1; u = 1'b1; @(negedge clk);
    en = 1'b0; repeat (3) @(negedge clk);
    check(state == 3'b001, "state held while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
