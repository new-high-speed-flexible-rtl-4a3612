// turbo_codec: turbo-block codec for block-wise transmission, encoder and decoder
// side by side.
//
// The transmit side is the modified turbo encoder (turbo_encoder): each block of
// N <= 440 information bits is coded with tail bits and zero-bit padding so that
// both the natural and the interleaved encoder pass end in the zero state, and
// the parity streams are punctured. The receive side is the iterative SOVA turbo
// decoder (turbo_decoder), which relies on that termination in both of its
// component decodings. The channel (modulation, distortion, quantisation to soft
// values) lies between enc_out_* and dec_in_* and is outside this module, as is
// the host that supplies data, configuration and the interleaver pattern.
//
// One interleaver-pattern load port writes the same pattern into the encoder's and
// the decoder's table, as both ends must use the same pattern. Encoder and decoder
// have their own start, configuration and stream ports, so they can work on
// different blocks at the same time. All ports follow the two sub-blocks; see
// their headers for the timing.
//
// Encoder and decoder follow the paper; placing them side by side with the
// channel outside and sharing one pattern-load port is this design's choice.
module turbo_codec
  import turbo_pkg::*;
#(
  parameter int unsigned N_MAX = NMAX,
  parameter int unsigned L_MAX = N_MAX + NT,
  parameter int unsigned AWID  = $clog2(L_MAX),
  parameter int unsigned U     = 28,
  parameter int unsigned W_CH  = 6,
  parameter int unsigned W_EXT = 7,
  parameter int unsigned W_REL = 9
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // interleaver pattern, written into both ends
  input  logic                   pi_we,
  input  logic [AWID-1:0]        pi_waddr,
  input  logic [AWID-1:0]        pi_wdata,
  // encoder
  input  logic                   enc_start,
  input  logic [AWID-1:0]        enc_blk_len,
  input  punct_cfg_t             enc_punct,
  output logic                   enc_busy,
  output logic                   enc_done,
  output logic                   enc_term_ok,
  input  logic                   enc_in_valid,
  output logic                   enc_in_ready,
  input  logic                   enc_in_bit,
  output logic                   enc_out_valid,
  input  logic                   enc_out_ready,
  output logic                   enc_out_bit,
  output sym_kind_t              enc_out_kind,
  // decoder
  input  logic                   dec_start,
  input  logic [AWID-1:0]        dec_blk_len,
  input  logic [2:0]             dec_iterations,
  input  logic [3:0]             dec_ext_weight,
  input  punct_cfg_t             dec_punct,
  output logic                   dec_busy,
  output logic                   dec_done,
  output logic [15:0]            dec_sat_count,
  input  logic                   dec_in_valid,
  output logic                   dec_in_ready,
  input  logic signed [W_CH-1:0] dec_in_sym,
  output logic                   dec_out_valid,
  input  logic                   dec_out_ready,
  output logic                   dec_out_bit
);

  turbo_encoder #(.N_MAX(N_MAX), .L_MAX(L_MAX), .AWID(AWID)) u_enc (
    .clk, .rst_n,
    .start(enc_start), .blk_len(enc_blk_len), .punct(enc_punct),
    .busy(enc_busy), .done(enc_done), .term_ok(enc_term_ok),
    .in_valid(enc_in_valid), .in_ready(enc_in_ready), .in_bit(enc_in_bit),
    .out_valid(enc_out_valid), .out_ready(enc_out_ready), .out_bit(enc_out_bit),
    .out_kind(enc_out_kind),
    .pi_we, .pi_waddr, .pi_wdata);

  turbo_decoder #(.N_MAX(N_MAX), .L_MAX(L_MAX), .AWID(AWID), .U(U),
                  .W_CH(W_CH), .W_EXT(W_EXT), .W_REL(W_REL)) u_dec (
    .clk, .rst_n,
    .start(dec_start), .blk_len(dec_blk_len), .iterations(dec_iterations),
    .ext_weight(dec_ext_weight), .punct(dec_punct),
    .busy(dec_busy), .done(dec_done), .sat_count(dec_sat_count),
    .in_valid(dec_in_valid), .in_ready(dec_in_ready), .in_sym(dec_in_sym),
    .out_valid(dec_out_valid), .out_ready(dec_out_ready), .out_bit(dec_out_bit),
    .pi_we, .pi_waddr, .pi_wdata);

endmodule
