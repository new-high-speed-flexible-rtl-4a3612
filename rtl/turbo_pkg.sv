// turbo_pkg: constants and types shared by the block turbo encoder and decoder.
//
// The code is the rate-1/3 mother turbo code built from one recursive systematic
// convolutional (RSC) code with octal generators {13,15}: feedback
// G1(D) = 1 + D^2 + D^3, feed-forward G2(D) = 1 + D + D^3, memory 3 (8 states).
// G1 divides 1 + D^7, so the grade of the reset polynomial is 7 and 3 tail bits
// terminate the trellis. The maximum block is 440 information bits (one extended
// ATM cell), so an interleaver holds 443 entries. All of these numbers follow the
// document's example; the puncturing configuration type and the word lengths of
// the decoder are this design's own choices.
package turbo_pkg;

  localparam int unsigned NMAX        = 440;  // largest information block (bits)
  localparam int unsigned NT          = 3;    // tail bits = encoder memory
  localparam int unsigned LMAX        = NMAX + NT;
  localparam int unsigned AW          = $clog2(LMAX);
  localparam int unsigned RESET_GRADE = 7;    // G1 divides 1 + D^7
  localparam int unsigned NSTATES     = 8;
  localparam int unsigned PMAX        = 8;    // longest puncturing period

  // Puncturing of the two parity streams. Position i of a parity stream is sent
  // when bit (i mod period) of its mask is set. The systematic stream is never
  // punctured.
  typedef struct packed {
    logic [2:0]      period_m1;  // period - 1
    logic [PMAX-1:0] y1_mask;
    logic [PMAX-1:0] y2_mask;
  } punct_cfg_t;

  // Rate 1/2: Y1 at even positions, Y2 at odd positions.
  localparam punct_cfg_t PUNCT_RATE_HALF = '{period_m1: 3'd1, y1_mask: 8'h01, y2_mask: 8'h02};

  // Kind of a symbol in the transmitted stream.
  typedef enum logic [1:0] {SYM_X = 2'd0, SYM_Y1 = 2'd1, SYM_Y2 = 2'd2} sym_kind_t;

  // Encoder state s = {a(k-3), a(k-2), a(k-1)} where a is the register input.
  // Register input for systematic bit u.
  function automatic logic rsc_feedback(input logic [2:0] s, input logic u);
    return u ^ s[1] ^ s[2];
  endfunction

  // Parity bit G2 = 1 + D + D^3 taken from the register chain.
  function automatic logic rsc_parity(input logic [2:0] s, input logic u);
    return rsc_feedback(s, u) ^ s[0] ^ s[2];
  endfunction

  function automatic logic [2:0] rsc_next(input logic [2:0] s, input logic u);
    return {s[1], s[0], rsc_feedback(s, u)};
  endfunction

  // The input bit that makes the register input zero: three of them clear the state.
  function automatic logic rsc_tail_bit(input logic [2:0] s);
    return s[1] ^ s[2];
  endfunction

endpackage
