// soft_ram: small memory for soft values with one write port and two asynchronous
// read ports, used for the decoder's channel and extrinsic buffers.
//
// Timing: the write happens on the clock edge; reads are combinational, so a read
// in the same cycle as a write to the same address returns the old value.
// A helper of this design; the paper does not describe the decoder's memories.
module soft_ram #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = turbo_pkg::LMAX,
  parameter int unsigned AW    = turbo_pkg::AW
) (
  input  logic                clk,
  input  logic                we,
  input  logic [AW-1:0]       waddr,
  input  logic signed [W-1:0] wdata,
  input  logic [AW-1:0]       raddr_a,
  output logic signed [W-1:0] rdata_a,
  input  logic [AW-1:0]       raddr_b,
  output logic signed [W-1:0] rdata_b
);

  logic signed [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < DEPTH) mem[waddr] <= wdata;
  end

  assign rdata_a = (32'(raddr_a) < DEPTH) ? mem[raddr_a] : '0;
  assign rdata_b = (32'(raddr_b) < DEPTH) ? mem[raddr_b] : '0;

endmodule
