// turbo_encoder: modified turbo encoder for block transmission.
//
// One RSC encoder codes a block in three passes, selected by the encoder's
// switches:
//   DATA/TAIL  the N information bits, then (switch S1) NT = 3 tail bits produced by
//              the termination logic, so the encoder ends the pass in the zero state.
//              Data and tail bits are written into the interleaver buffer and sent
//              as systematic symbols X together with the parity Y1.
//   ZERO       (switch S3) N0 zero bits, N0 = i*7 - (N + NT) >= 0 with the smallest
//              such i, so that the first pass is a multiple of the reset-polynomial
//              grade 7. The interleaver is not clocked and the encoder output is
//              discarded. N0 is found with a modulo-7 counter, no division.
//   INTL       (switch S2) the N + NT buffered bits are read in interleaved order
//              pi(0), pi(1), ... and coded again; only their parity Y2 is sent.
// If the loaded pattern keeps every bit at the same position modulo 7, the
// interleaved pass also ends in the zero state (G1 divides 1 + D^7); `term_ok`
// reports the final state of the last block.
// The block length N (1..NMAX) is taken at `start`, so blocks of different
// lengths can follow each other. Both parity streams are punctured by `punct`.
//
// Interfaces: `start` begins a block when `busy` is low. Information bits arrive
// on a valid/ready stream (in_*). Coded symbols leave on a valid/ready stream
// (out_*) in the order X(0) [Y1(0)] X(1) [Y1(1)] ... then [Y2(0)] [Y2(1)] ...,
// brackets marking parity that the puncturing may drop; `out_kind` tells which
// stream a symbol belongs to. The interleaver pattern is loaded through pi_*.
//
// In the data phase X(t) and Y1(t) depend on the present information bit, so
// out_valid follows in_valid there: a source that withdraws its bit also
// withdraws the pending symbol.
//
// Timing: one symbol per cycle while the output is ready; a data step with a
// kept Y1 takes two cycles (X, then Y1), a step with dropped parity one cycle,
// each zero bit one cycle, and each interleaved step one cycle. `done` pulses for
// one cycle when the block is finished.
//
// The pass structure, the tail and zero-bit rules and the example code follow the
// paper. The stream interfaces, the symbol order and the mask form of the
// puncturing are this design's choices.
module turbo_encoder
  import turbo_pkg::*;
#(
  parameter int unsigned N_MAX = NMAX,
  parameter int unsigned L_MAX = N_MAX + NT,
  parameter int unsigned AWID  = $clog2(L_MAX)
) (
  input  logic            clk,
  input  logic            rst_n,
  // block control
  input  logic            start,
  input  logic [AWID-1:0] blk_len,      // N, information bits of the block
  input  punct_cfg_t      punct,
  output logic            busy,
  output logic            done,
  output logic            term_ok,      // last block ended both passes in state 0
  // information bits
  input  logic            in_valid,
  output logic            in_ready,
  input  logic            in_bit,
  // coded symbols
  output logic            out_valid,
  input  logic            out_ready,
  output logic            out_bit,
  output sym_kind_t       out_kind,
  // interleaver pattern load
  input  logic            pi_we,
  input  logic [AWID-1:0] pi_waddr,
  input  logic [AWID-1:0] pi_wdata
);

  typedef enum logic [2:0] {S_IDLE, S_DATA, S_TAIL, S_ZERO, S_INTL} state_t;

  state_t          st_q;
  logic [AWID-1:0] n_q;          // N of the current block
  logic [AWID-1:0] l_q;          // N + NT
  punct_cfg_t      pc_q;
  logic [AWID-1:0] idx_q;        // position within the pass
  logic [2:0]      mod7_q;       // encoder steps of the first pass, modulo 7
  logic [2:0]      pph_q;        // puncturing phase, idx mod period
  logic            ysub_q;       // X sent, Y1 pending
  logic            pass1_ok_q;   // state was zero after the tail bits

  logic            buf_q [L_MAX];

  // encoder core
  logic       enc_clr, enc_en, enc_term, enc_u, enc_sys, enc_par;
  logic [2:0] enc_state;

  rsc_encoder u_rsc (
    .clk    (clk),
    .rst_n  (rst_n),
    .clr    (enc_clr),
    .en     (enc_en),
    .term   (enc_term),
    .u      (enc_u),
    .sys    (enc_sys),
    .parity (enc_par),
    .state  (enc_state)
  );

  logic [AWID-1:0] pi_rd;
  logic [AWID-1:0] pi_unused;

  interleaver_table #(.DEPTH(L_MAX), .AW(AWID)) u_pi (
    .clk     (clk),
    .we      (pi_we),
    .waddr   (pi_waddr),
    .wdata   (pi_wdata),
    .raddr_a (idx_q),
    .rdata_a (pi_rd),
    .raddr_b ('0),
    .rdata_b (pi_unused)
  );

  logic keep_y1, keep_y2, step, last_idx;
  logic [2:0] mod7_nx;

  always_comb begin
    keep_y1  = pc_q.y1_mask[pph_q];
    keep_y2  = pc_q.y2_mask[pph_q];
    last_idx = (idx_q == l_q - 1'b1);
    mod7_nx  = (mod7_q == 3'd6) ? 3'd0 : mod7_q + 3'd1;

    enc_clr  = (st_q == S_IDLE) && start;   // every block starts in state 0
    enc_term = (st_q == S_TAIL);
    enc_u    = 1'b0;
    unique case (st_q)
      S_DATA:  enc_u = in_bit;
      S_INTL:  enc_u = buf_q[pi_rd];
      default: enc_u = 1'b0;
    endcase

    in_ready  = 1'b0;
    out_valid = 1'b0;
    out_bit   = 1'b0;
    out_kind  = SYM_X;
    step      = 1'b0;
    unique case (st_q)
      S_DATA, S_TAIL: begin
        out_valid = (st_q == S_TAIL) || in_valid;
        if (!ysub_q) begin
          out_bit  = enc_sys;
          out_kind = SYM_X;
          step     = out_valid && out_ready && !keep_y1;
        end else begin
          out_bit  = enc_par;
          out_kind = SYM_Y1;
          step     = out_valid && out_ready;
        end
        in_ready = (st_q == S_DATA) && step;
      end
      S_ZERO: step = 1'b1;
      S_INTL: begin
        out_valid = keep_y2;
        out_bit   = enc_par;
        out_kind  = SYM_Y2;
        step      = !keep_y2 || out_ready;
      end
      default: ;
    endcase
    enc_en = step;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q       <= S_IDLE;
      n_q        <= '0;
      l_q        <= '0;
      pc_q       <= PUNCT_RATE_HALF;
      idx_q      <= '0;
      mod7_q     <= '0;
      pph_q      <= '0;
      ysub_q     <= 1'b0;
      pass1_ok_q <= 1'b0;
      term_ok    <= 1'b0;
      done       <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        S_IDLE: if (start) begin
          st_q   <= S_DATA;
          n_q    <= blk_len;
          l_q    <= blk_len + AWID'(NT);
          pc_q   <= punct;
          idx_q  <= '0;
          mod7_q <= '0;
          pph_q  <= '0;
          ysub_q <= 1'b0;
        end
        S_DATA, S_TAIL: begin
          if (!ysub_q && out_valid && out_ready && keep_y1) ysub_q <= 1'b1;
          if (step) begin
            ysub_q       <= 1'b0;
            buf_q[idx_q] <= enc_sys;
            mod7_q       <= mod7_nx;
            pph_q        <= (pph_q == pc_q.period_m1) ? 3'd0 : pph_q + 3'd1;
            idx_q        <= idx_q + 1'b1;
            if (st_q == S_DATA && idx_q == n_q - 1'b1) st_q <= S_TAIL;
            if (last_idx) begin
              idx_q <= '0;
              pph_q <= '0;
              st_q  <= (mod7_nx == 3'd0) ? S_INTL : S_ZERO;
              pass1_ok_q <= (rsc_next(enc_state, enc_sys) == 3'd0);
            end
          end
        end
        S_ZERO: begin
          mod7_q <= mod7_nx;
          if (mod7_nx == 3'd0) st_q <= S_INTL;
        end
        S_INTL: if (step) begin
          pph_q <= (pph_q == pc_q.period_m1) ? 3'd0 : pph_q + 3'd1;
          idx_q <= idx_q + 1'b1;
          if (last_idx) begin
            st_q    <= S_IDLE;
            done    <= 1'b1;
            term_ok <= pass1_ok_q && (rsc_next(enc_state, enc_u) == 3'd0);
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (st_q != S_IDLE);

  // A held symbol stays the same while the sink is not ready, as long as the
  // source keeps its data bit valid (the X and Y1 symbols depend on it).
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready && st_q != S_DATA |=> out_valid && $stable(out_bit) && $stable(out_kind));
  // Information bits are taken only in the data phase.
  a_in_data: assert property (@(posedge clk) disable iff (!rst_n)
    in_ready |-> st_q == S_DATA);

endmodule
