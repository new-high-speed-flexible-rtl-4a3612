// tb_interleaver_table: loads a random modulo-7-preserving permutation of 443
// entries and reads it back through both read ports in one pass, in random order,
// checking every entry and that the pattern keeps each position modulo 7.
module tb_interleaver_table;
  import turbo_pkg::*;
  import turbo_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we = 1'b0;
  logic [AW-1:0] waddr = '0, wdata = '0, raddr_a = '0, raddr_b = '0, rdata_a, rdata_b;

  interleaver_table dut (.*);

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

  initial begin
    int pi[];
    make_pattern(LMAX, pi);
    for (int p = 0; p < int'(LMAX); p++) begin
      we <= 1'b1; waddr <= AW'(p); wdata <= AW'(pi[p]);
      @(posedge clk);
    end
    we <= 1'b0;
    // an out-of-range write must not disturb entry 0
    we <= 1'b1; waddr <= AW'(LMAX); wdata <= '1;
    @(posedge clk);
    we <= 1'b0;
    for (int i = 0; i < 2 * int'(LMAX); i++) begin
      int a, b;
      a = $urandom_range(LMAX - 1, 0);
      b = $urandom_range(LMAX - 1, 0);
      raddr_a <= AW'(a); raddr_b <= AW'(b);
      @(posedge clk);
      #1;
      check(int'(rdata_a) == pi[a], $sformatf("port a entry %0d", a));
      check(int'(rdata_b) == pi[b], $sformatf("port b entry %0d", b));
      check(int'(rdata_a) % 7 == a % 7, "pattern keeps position modulo 7");
    end
    raddr_a <= '0; @(posedge clk); #1;
    check(int'(rdata_a) == pi[0], "entry 0 after out-of-range write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
