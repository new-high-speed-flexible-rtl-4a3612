// sova_decoder: soft-output Viterbi (SOVA) component decoder for the 8-state
// {13,15} RSC code, one trellis step per cycle, for blocks that start and end in
// the zero state.
//
// How it works. For every trellis step the unit adds the branch metrics to the
// eight path metrics (add-compare-select) and keeps, per state, the survivor and
// the metric difference Delta to the discarded path. Branch metrics are
// correlations: a branch with systematic bit u and parity c adds
// u'*a + c'*y with u',c' = +1 for a one and -1 for a zero, where a is the
// systematic channel value plus the a-priori value and y the parity channel value.
// Survivors are kept by register exchange: every state holds the last U decided
// bits of its survivor and a reliability per bit. When a state takes its survivor,
// the new bit gets reliability Delta, and every older bit in which the survivor and
// the discarded path differ gets min(its reliability, Delta) (Hagenauer's update
// rule). U is the truncation path length. A decided bit leaves the window U steps
// after it entered, read from the state with the best metric. At the end of the
// block the remaining bits are read from state 0, the known final state.
// The soft output is +-(reliability/2): the factor 2 undoes the doubled scale
// of the correlation metric, so the output is on the scale of the channel values.
//
// Path metrics are normalised each step by subtracting the new metric of state 0.
// Differences between states stay below 3 steps of branch metric, which MW holds.
// Delta and the reliabilities saturate at 2^W_REL - 1.
//
// Interface: `start` (while idle) clears the metrics and takes the block length L
// (data plus tail bits). Then L input steps are given on in_valid/in_ready; in_a
// and in_y are signed. Outputs appear as out_valid pulses with the bit index
// out_idx, in index order 0..L-1, each index once. `done` pulses after the last.
//
// Timing: one step per cycle. Output for index j appears the cycle after input
// step j+U-1 (latency U cycles) while j <= L-U-1; the last min(L,U) outputs follow,
// one per cycle, after the last input. A block therefore takes L + min(L,U) + 1
// cycles from the first input step when inputs arrive every cycle.
//
// The algorithm is the paper's (SOVA with a truncation path length of 28). The
// register-exchange organisation, the metric normalisation and the word lengths
// are this design's choices.
module sova_decoder #(
  parameter int unsigned U     = 28,   // truncation path length
  parameter int unsigned W_A   = 8,    // systematic + a-priori input
  parameter int unsigned W_Y   = 6,    // parity input
  parameter int unsigned W_REL = 9,    // reliability (unsigned)
  parameter int unsigned MW    = 14,   // path metric
  parameter int unsigned AWID  = 9
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [AWID-1:0]       blk_len,
  output logic                  busy,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [W_A-1:0] in_a,
  input  logic signed [W_Y-1:0] in_y,
  output logic                  out_valid,
  output logic [AWID-1:0]       out_idx,
  output logic                  out_bit,
  output logic signed [W_REL:0] out_llr,
  output logic                  done
);

  localparam int unsigned NS = 8;
  localparam logic [W_REL-1:0] REL_MAX = '1;
  localparam logic signed [MW-1:0] M_LOW = -(MW'(1) <<< (MW - 3));

  typedef enum logic [1:0] {D_IDLE, D_RUN, D_FLUSH} dstate_t;

  dstate_t                st_q;
  logic [AWID-1:0]        len_q;
  logic [AWID-1:0]        t_q;        // input steps taken
  logic [AWID-1:0]        fl_q;       // next index to flush
  logic                   stepped_q;  // a step was taken last cycle
  logic [AWID-1:0]        tlast_q;    // index of that step

  logic signed [MW-1:0]   pm_q [NS];
  logic [U-1:0]           path_q [NS];
  logic [W_REL-1:0]       rel_q [NS][U];

  // ---------------------------------------------------------------- ACS
  logic                   step;
  logic signed [MW-1:0]   cand   [NS][2];
  logic signed [MW-1:0]   pm_new [NS];
  logic                   dec    [NS];
  logic [W_REL-1:0]       delta  [NS];
  logic [U-1:0]           path_new [NS];
  logic [W_REL-1:0]       rel_new  [NS][U];

  // predecessor of state ns through branch b: {b, ns[2], ns[1]}
  function automatic logic [2:0] pred(input logic [2:0] ns, input logic b);
    return {b, ns[2], ns[1]};
  endfunction

  always_comb begin
    step = (st_q == D_RUN) && in_valid && (t_q < len_q);
    for (int ns = 0; ns < NS; ns++) begin
      logic [2:0] nss;
      logic signed [MW-1:0] diff;
      nss = 3'(ns);
      for (int b = 0; b < 2; b++) begin
        logic ub, cb;
        logic signed [MW-1:0] bm;
        ub = nss[0] ^ nss[2] ^ b[0];
        cb = nss[0] ^ nss[1] ^ b[0];
        bm = (ub ? MW'(in_a) : -MW'(in_a)) + (cb ? MW'(in_y) : -MW'(in_y));
        cand[ns][b] = pm_q[pred(nss, b[0])] + bm;
      end
      dec[ns] = (cand[ns][1] > cand[ns][0]);
      diff    = dec[ns] ? cand[ns][1] - cand[ns][0] : cand[ns][0] - cand[ns][1];
      delta[ns] = (diff > MW'(REL_MAX)) ? REL_MAX : W_REL'(diff);
    end
    for (int ns = 0; ns < NS; ns++) begin
      logic [2:0] nss, ps, pc;
      nss = 3'(ns);
      ps  = pred(nss, dec[ns]);
      pc  = pred(nss, !dec[ns]);
      pm_new[ns] = (dec[ns] ? cand[ns][1] : cand[ns][0]) - (dec[0] ? cand[0][1] : cand[0][0]);
      path_new[ns][0] = nss[0] ^ nss[2] ^ dec[ns];
      rel_new[ns][0]  = delta[ns];
      for (int k = 1; k < int'(U); k++) begin
        path_new[ns][k] = path_q[ps][k-1];
        if (path_q[ps][k-1] != path_q[pc][k-1] && delta[ns] < rel_q[ps][k-1])
          rel_new[ns][k] = delta[ns];
        else
          rel_new[ns][k] = rel_q[ps][k-1];
      end
    end
  end

  // ---------------------------------------------------------- best state
  logic [2:0] best;
  always_comb begin
    best = 3'd0;
    for (int s = 1; s < NS; s++)
      if (pm_q[s] > pm_q[best]) best = 3'(s);
  end

  // ------------------------------------------------------------- output
  logic [AWID-1:0] flush_first;   // first index read at the end of the block
  localparam int unsigned UW = $clog2(U);
  logic [UW-1:0]   fpos;
  logic            o_bit;
  logic [W_REL-1:0] o_rel;

  always_comb begin
    flush_first = (len_q > AWID'(U)) ? len_q - AWID'(U) : '0;
    fpos        = UW'(len_q - 1'b1 - fl_q);   // below U in the flush phase
    out_valid   = 1'b0;
    out_idx     = '0;
    o_bit       = 1'b0;
    o_rel       = '0;
    if (st_q == D_FLUSH) begin
      out_valid = 1'b1;
      out_idx   = fl_q;
      o_bit     = path_q[0][fpos];
      o_rel     = rel_q[0][fpos];
    end else if (stepped_q && tlast_q >= AWID'(U - 1) && tlast_q < flush_first + AWID'(U - 1)) begin
      out_valid = 1'b1;
      out_idx   = tlast_q - AWID'(U - 1);
      o_bit     = path_q[best][U-1];
      o_rel     = rel_q[best][U-1];
    end
    out_bit = o_bit;
    out_llr = o_bit ? $signed({2'b00, o_rel[W_REL-1:1]}) : -$signed({2'b00, o_rel[W_REL-1:1]});
  end

  assign in_ready = (st_q == D_RUN) && (t_q < len_q);

  // outputs leave in index order, one index per pulse, never beyond the block
  logic [AWID-1:0] next_out_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           next_out_q <= '0;
    else if (st_q == D_IDLE && start)     next_out_q <= '0;
    else if (out_valid)                   next_out_q <= out_idx + 1'b1;
  end
  a_out_order: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> (out_idx == next_out_q) && (out_idx < len_q));
  assign busy     = (st_q != D_IDLE);

  // -------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= D_IDLE;
      len_q     <= '0;
      t_q       <= '0;
      fl_q      <= '0;
      stepped_q <= 1'b0;
      tlast_q   <= '0;
      done      <= 1'b0;
      for (int s = 0; s < NS; s++) begin
        pm_q[s]   <= '0;
        path_q[s] <= '0;
        for (int k = 0; k < int'(U); k++) rel_q[s][k] <= REL_MAX;
      end
    end else begin
      done      <= 1'b0;
      stepped_q <= step;
      if (step) tlast_q <= t_q;
      unique case (st_q)
        D_IDLE: if (start) begin
          st_q  <= D_RUN;
          len_q <= blk_len;
          t_q   <= '0;
          for (int s = 0; s < NS; s++) begin
            pm_q[s]   <= (s == 0) ? '0 : M_LOW;
            path_q[s] <= '0;
            for (int k = 0; k < int'(U); k++) rel_q[s][k] <= REL_MAX;
          end
        end
        D_RUN: begin
          if (step) begin
            t_q <= t_q + 1'b1;
            for (int s = 0; s < NS; s++) begin
              pm_q[s]   <= pm_new[s];
              path_q[s] <= path_new[s];
              for (int k = 0; k < int'(U); k++) rel_q[s][k] <= rel_new[s][k];
            end
          end
          if (t_q == len_q) begin
            // the step before was the last one; its output (if any) goes now
            st_q <= D_FLUSH;
            fl_q <= flush_first;
          end
        end
        D_FLUSH: begin
          fl_q <= fl_q + 1'b1;
          if (fl_q == len_q - 1'b1) begin
            st_q <= D_IDLE;
            done <= 1'b1;
          end
        end
        default: st_q <= D_IDLE;
      endcase
    end
  end

endmodule
