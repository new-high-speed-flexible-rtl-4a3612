// rsc_encoder: recursive systematic convolutional encoder {13,15} with tail-bit logic.
//
// Each enabled cycle the encoder takes one systematic bit and produces one parity
// bit. The recursion is G1(D) = 1 + D^2 + D^3 and the parity polynomial is
// G2(D) = 1 + D + D^3, as in the paper's example. With `term` high the input is
// replaced by the tail bit that the termination logic derives from the present state
// (the register input becomes zero), which is the switch S1 of the encoder; three
// such steps bring any state to zero. `clr` returns the state to zero at the start
// of a block. The systematic bit actually coded (data or tail) is given on `sys`.
//
// Timing: `sys` and `parity` are combinational from the present state and `u`; the
// state advances on the clock edge when `en` is high. `clr` has priority.
module rsc_encoder
  import turbo_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,
  input  logic       en,
  input  logic       term,
  input  logic       u,
  output logic       sys,
  output logic       parity,
  output logic [2:0] state
);

  logic [2:0] s_q;

  always_comb begin
    sys    = term ? rsc_tail_bit(s_q) : u;
    parity = rsc_parity(s_q, sys);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   s_q <= '0;
    else if (clr) s_q <= '0;
    else if (en)  s_q <= rsc_next(s_q, sys);
  end

  assign state = s_q;

endmodule
