// interleaver_table: host-loadable interleaver permutation memory.
//
// Entry p holds the write address pi(p) of the bit that is read out at position p
// of the interleaved block. The table is written by the host one entry per cycle
// (the pattern is a free choice of the user, which is what makes the codec
// flexible); it has two combinational read ports so that a decoder can look up the
// address of the bit it feeds and of the bit it outputs in the same cycle.
// For the interleaved pass to end in the zero state the loaded pattern must keep
// every bit at the same position modulo 7 (pi(p) mod 7 == p mod 7); the memory
// itself does not check this.
//
// Timing: one write per clock edge; reads are asynchronous (distributed RAM).
//
// The selectable pattern and the modulo-7 rule follow the paper; the loadable
// table with two read ports is this design's own organisation.
module interleaver_table #(
  parameter int unsigned DEPTH = turbo_pkg::LMAX,
  parameter int unsigned AW    = turbo_pkg::AW
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [AW-1:0] wdata,
  input  logic [AW-1:0] raddr_a,
  output logic [AW-1:0] rdata_a,
  input  logic [AW-1:0] raddr_b,
  output logic [AW-1:0] rdata_b
);

  logic [AW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < DEPTH) mem[waddr] <= wdata;
  end

  assign rdata_a = (32'(raddr_a) < DEPTH) ? mem[raddr_a] : '0;
  assign rdata_b = (32'(raddr_b) < DEPTH) ? mem[raddr_b] : '0;

endmodule
