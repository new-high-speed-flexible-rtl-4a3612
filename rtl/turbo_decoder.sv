// turbo_decoder: flexible iterative turbo-block decoder built around one SOVA unit.
//
// A received block is first stored: the depuncturing input stage takes the
// soft symbols in the transmitted order X(0) [Y1(0)] X(1) ... [Y2(0)] ... and writes
// them into the X, Y1 and Y2 buffers, filling every punctured parity position with
// zero (no information). Then the single SOVA unit is used for 2 x `iterations`
// half-iterations:
//   half 1  steps t = 0..L-1 over X(t), Y1(t) with a-priori value E(t);
//   half 2  steps p = 0..L-1 over X(pi(p)), Y2(p) with a-priori value E(pi(p)).
// Both trellises are terminated (both encoder passes end in state 0), so both
// halves decode a block that starts and ends in state 0. E is one extrinsic
// memory in natural order: half 2 reads and writes it through the interleaver
// addresses, which interleaves on reading and de-interleaves on writing. For each
// SOVA output the extrinsic value is Le = LLR - X - La, multiplied by the weighting
// factor ext_weight/8 and saturated to W_EXT bits. In the first half of the first
// iteration the a-priori value is zero. The hard decisions of the last half are
// written, de-interleaved, into the output buffer, and the N information bits are
// streamed out in order; tail bits are dropped.
//
// Interfaces: `start` (while idle) takes N, the iteration count, the weighting
// factor and the puncturing configuration; soft symbols arrive on in_valid/in_ready
// (two's complement, positive = bit one); decoded bits leave on
// out_valid/out_ready; `done` pulses after the last bit. The interleaver pattern is
// loaded through pi_* and must match the encoder's. `sat_count` counts extrinsic
// values that were clipped in the last block.
//
// Timing: the input stage takes one symbol per cycle plus one cycle per punctured
// parity position; a half-iteration takes L + min(L,U) + 3 cycles; the output stage
// one cycle per bit. Input, decoding and output of a block do not overlap.
//
// Following the paper: SOVA component decoding, termination of both decoders,
// variable block length up to NMAX, a selectable number of iterations, weighting
// of the extrinsic values and a loadable interleaver pattern. The single
// time-shared SOVA unit, the buffer organisation and the word lengths are this
// design's choices.
module turbo_decoder
  import turbo_pkg::*;
#(
  parameter int unsigned N_MAX = NMAX,
  parameter int unsigned L_MAX = N_MAX + NT,
  parameter int unsigned AWID  = $clog2(L_MAX),
  parameter int unsigned U     = 28,   // truncation path length
  parameter int unsigned W_CH  = 6,    // channel soft values
  parameter int unsigned W_EXT = 7,    // extrinsic values
  parameter int unsigned W_REL = 9     // SOVA reliabilities
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // block control
  input  logic                   start,
  input  logic [AWID-1:0]        blk_len,      // N
  input  logic [2:0]             iterations,   // 1..7
  input  logic [3:0]             ext_weight,   // weighting factor in eighths
  input  punct_cfg_t             punct,
  output logic                   busy,
  output logic                   done,
  output logic [15:0]            sat_count,
  // received soft symbols
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [W_CH-1:0] in_sym,
  // decoded bits
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic                   out_bit,
  // interleaver pattern load
  input  logic                   pi_we,
  input  logic [AWID-1:0]        pi_waddr,
  input  logic [AWID-1:0]        pi_wdata
);

  localparam int unsigned W_A = (W_CH > W_EXT ? W_CH : W_EXT) + 1;
  localparam logic signed [W_EXT-1:0] EXT_MAX = (W_EXT)'((1 << (W_EXT - 1)) - 1);
  localparam logic signed [W_EXT-1:0] EXT_MIN = -EXT_MAX;

  typedef enum logic [2:0] {T_IDLE, T_LOAD1, T_LOAD2, T_HSTART, T_HRUN, T_OUT} tstate_t;

  tstate_t          st_q;
  logic [AWID-1:0]  n_q, l_q;
  logic [2:0]       iter_q;
  logic [3:0]       w_q;
  punct_cfg_t       pc_q;
  logic [AWID-1:0]  idx_q;      // load index / feed index / output index
  logic             ysub_q;     // X(t) stored, waiting for Y1(t)
  logic [2:0]       pph_q;
  logic             half_q;     // 0: natural order, 1: interleaved
  logic [2:0]       it_q;       // iteration 0..iter-1
  logic             first_q;    // first half of first iteration
  logic             last_q;     // last half

  logic             dec_q [L_MAX];

  // ------------------------------------------------------------ memories
  logic                   x_we, y1_we, y2_we, e_we;
  logic [AWID-1:0]        x_wa, y1_wa, y2_wa, e_wa;
  logic signed [W_CH-1:0] x_wd, y1_wd, y2_wd;
  logic signed [W_EXT-1:0] e_wd;
  logic [AWID-1:0]        f_addr, o_addr;          // feed / output addresses
  logic signed [W_CH-1:0] x_f, x_o, y1_f, y2_f, y_unused1, y_unused2;
  logic signed [W_EXT-1:0] e_f, e_o;
  logic [AWID-1:0]        pi_f, pi_o;

  soft_ram #(.W(W_CH),  .DEPTH(L_MAX), .AW(AWID)) u_x  (.clk, .we(x_we),  .waddr(x_wa),  .wdata(x_wd),
    .raddr_a(f_addr), .rdata_a(x_f), .raddr_b(o_addr), .rdata_b(x_o));
  soft_ram #(.W(W_CH),  .DEPTH(L_MAX), .AW(AWID)) u_y1 (.clk, .we(y1_we), .waddr(y1_wa), .wdata(y1_wd),
    .raddr_a(idx_q), .rdata_a(y1_f), .raddr_b('0), .rdata_b(y_unused1));
  soft_ram #(.W(W_CH),  .DEPTH(L_MAX), .AW(AWID)) u_y2 (.clk, .we(y2_we), .waddr(y2_wa), .wdata(y2_wd),
    .raddr_a(idx_q), .rdata_a(y2_f), .raddr_b('0), .rdata_b(y_unused2));
  soft_ram #(.W(W_EXT), .DEPTH(L_MAX), .AW(AWID)) u_e  (.clk, .we(e_we),  .waddr(e_wa),  .wdata(e_wd),
    .raddr_a(f_addr), .rdata_a(e_f), .raddr_b(o_addr), .rdata_b(e_o));

  logic [AWID-1:0] s_idx;   // SOVA output index
  interleaver_table #(.DEPTH(L_MAX), .AW(AWID)) u_pi (
    .clk, .we(pi_we), .waddr(pi_waddr), .wdata(pi_wdata),
    .raddr_a(idx_q), .rdata_a(pi_f), .raddr_b(s_idx), .rdata_b(pi_o));

  // ---------------------------------------------------------------- SOVA
  logic                   s_start, s_busy, s_in_valid, s_in_ready;
  logic signed [W_A-1:0]  s_a;
  logic signed [W_CH-1:0] s_y;
  logic                   s_out_valid, s_out_bit, s_done;
  logic signed [W_REL:0]  s_llr;

  sova_decoder #(.U(U), .W_A(W_A), .W_Y(W_CH), .W_REL(W_REL), .MW(W_A + 6), .AWID(AWID)) u_sova (
    .clk, .rst_n, .start(s_start), .blk_len(l_q), .busy(s_busy),
    .in_valid(s_in_valid), .in_ready(s_in_ready), .in_a(s_a), .in_y(s_y),
    .out_valid(s_out_valid), .out_idx(s_idx), .out_bit(s_out_bit), .out_llr(s_llr),
    .done(s_done));

  // ------------------------------------------------------ datapath, control
  logic keep_y1, keep_y2, in_acc;
  logic signed [W_EXT-1:0] la_f, la_o;
  logic signed [W_A+4:0]   le, le_w;
  logic                    le_sat;

  always_comb begin
    keep_y1 = pc_q.y1_mask[pph_q];
    keep_y2 = pc_q.y2_mask[pph_q];

    // depuncturing input stage
    in_ready = (st_q == T_LOAD1) || (st_q == T_LOAD2 && keep_y2);
    in_acc   = in_valid && in_ready;
    x_we  = (st_q == T_LOAD1) && !ysub_q && in_acc;
    x_wa  = idx_q;
    x_wd  = in_sym;
    y1_we = (st_q == T_LOAD1) && ((ysub_q && in_acc) || (!ysub_q && in_acc && !keep_y1));
    y1_wa = idx_q;
    y1_wd = ysub_q ? in_sym : '0;
    y2_we = (st_q == T_LOAD2) && (in_acc || !keep_y2);
    y2_wa = idx_q;
    y2_wd = keep_y2 ? in_sym : '0;

    // feeding the SOVA unit
    f_addr     = half_q ? pi_f : idx_q;
    la_f       = first_q ? '0 : e_f;
    s_a        = W_A'(x_f) + W_A'(la_f);
    s_y        = half_q ? y2_f : y1_f;
    s_in_valid = (st_q == T_HRUN) && s_in_ready;
    s_start    = (st_q == T_HSTART);

    // extrinsic value of each SOVA output
    o_addr = half_q ? pi_o : s_idx;
    la_o   = first_q ? '0 : e_o;
    le     = (W_A+5)'(s_llr) - (W_A+5)'(x_o) - (W_A+5)'(la_o);
    le_w   = (le * $signed({1'b0, w_q})) >>> 3;
    le_sat = 1'b0;
    if (le_w > (W_A+5)'(EXT_MAX))      begin e_wd = EXT_MAX; le_sat = 1'b1; end
    else if (le_w < (W_A+5)'(EXT_MIN)) begin e_wd = EXT_MIN; le_sat = 1'b1; end
    else                                     e_wd = W_EXT'(le_w);
    e_we = (st_q == T_HRUN) && s_out_valid;
    e_wa = o_addr;

    // output stage
    out_valid = (st_q == T_OUT);
    out_bit   = dec_q[idx_q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= T_IDLE;
      n_q       <= '0;
      l_q       <= '0;
      iter_q    <= 3'd1;
      w_q       <= 4'd8;
      pc_q      <= PUNCT_RATE_HALF;
      idx_q     <= '0;
      ysub_q    <= 1'b0;
      pph_q     <= '0;
      half_q    <= 1'b0;
      it_q      <= '0;
      first_q   <= 1'b1;
      last_q    <= 1'b0;
      done      <= 1'b0;
      sat_count <= '0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        T_IDLE: if (start) begin
          st_q      <= T_LOAD1;
          n_q       <= blk_len;
          l_q       <= blk_len + AWID'(NT);
          iter_q    <= (iterations == 3'd0) ? 3'd1 : iterations;
          w_q       <= ext_weight;
          pc_q      <= punct;
          idx_q     <= '0;
          ysub_q    <= 1'b0;
          pph_q     <= '0;
          sat_count <= '0;
        end
        T_LOAD1: if (in_acc) begin
          if (!ysub_q && keep_y1) ysub_q <= 1'b1;
          else begin
            ysub_q <= 1'b0;
            pph_q  <= (pph_q == pc_q.period_m1) ? 3'd0 : pph_q + 3'd1;
            idx_q  <= idx_q + 1'b1;
            if (idx_q == l_q - 1'b1) begin
              st_q  <= T_LOAD2;
              idx_q <= '0;
              pph_q <= '0;
            end
          end
        end
        T_LOAD2: if (in_acc || !keep_y2) begin
          pph_q <= (pph_q == pc_q.period_m1) ? 3'd0 : pph_q + 3'd1;
          idx_q <= idx_q + 1'b1;
          if (idx_q == l_q - 1'b1) begin
            st_q    <= T_HSTART;
            idx_q   <= '0;
            half_q  <= 1'b0;
            it_q    <= '0;
            first_q <= 1'b1;
            last_q  <= 1'b0;
          end
        end
        T_HSTART: begin
          st_q  <= T_HRUN;
          idx_q <= '0;
        end
        T_HRUN: begin
          if (s_in_valid) idx_q <= idx_q + 1'b1;
          if (s_out_valid && last_q) dec_q[o_addr] <= s_out_bit;
          if (s_out_valid && le_sat && sat_count != '1) sat_count <= sat_count + 1'b1;
          if (s_done) begin
            first_q <= 1'b0;
            if (last_q) begin
              st_q  <= T_OUT;
              idx_q <= '0;
            end else begin
              st_q   <= T_HSTART;
              half_q <= !half_q;
              if (half_q) it_q <= it_q + 1'b1;
              last_q <= half_q == 1'b0 && (it_q == iter_q - 3'd1);
            end
          end
        end
        T_OUT: if (out_ready) begin
          idx_q <= idx_q + 1'b1;
          if (idx_q == n_q - 1'b1) begin
            st_q <= T_IDLE;
            done <= 1'b1;
          end
        end
        default: st_q <= T_IDLE;
      endcase
    end
  end

  assign busy = (st_q != T_IDLE);

  // The SOVA unit is only fed while it is decoding a half-iteration, and its
  // outputs only come while the controller waits for them.
  a_feed_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    s_in_valid |-> s_busy);
  a_out_in_run: assert property (@(posedge clk) disable iff (!rst_n)
    s_out_valid |-> st_q == T_HRUN);

endmodule
