// ca_engine: per-bank FSM of CaPRoMi (counter-assisted weighting).
//
// Activations are counted during a refresh interval and the extra
// activations are decided together when the interval ends.
//  act: the history table is searched sequentially for the row (N_HIST
//       cycles); then the row is recorded in the counter table together with
//       the history hit and its index (counter +1, or a new entry with 1).
//  ref: if the ending interval closes the refresh window, the history table
//       is cleared in the cycle the ref is taken. Then every counter-table entry e is visited in four
//       steps: (1) w_r of Eq. (1), taken against the history interval if the
//       entry's history link still holds the same row, else against f_r;
//       (2) w_log_r of Eq. (2); (3) the decision u < cnt_r * w_log_r * Pbase;
//       (4) on a trigger the history table is updated with the ending
//       interval (in place if linked, else FIFO insertion) and the entry is
//       marked pending. Finally the counter table is cleared.
//  issue: pending history entries are sent as extra-activation requests, one
//       at a time, during the following interval, reading their rows from
//       the history table.
// Cycle counts, including the cycle that carries the command: act
// N_HIST + 3 = 35, ref 4 * N_CNT + 2 = 258. The document reports 50 and 258;
// its act path is slower than needed here because the counter table is
// matched in parallel in one cycle, while the history search (N_HIST
// cycles) dominates.
// The document gives the FSM only as a figure title; the state sequence and
// the pending bits are this design's reconstruction of its text.
//
// Interface as tvp_engine; rec_drop_o pulses when an act could not be
// recorded because all counter entries are locked.
module ca_engine
  import tvp_pkg::*;
#(
  parameter int unsigned ROW_W      = ROW_W_D,
  parameter int unsigned IV_W       = IV_W_D,
  parameter int unsigned HIST_N     = HIST_N_D,
  parameter int unsigned CNT_N      = CNT_N_D,
  parameter int unsigned CNT_W      = CNT_W_D,
  parameter int unsigned LOCK_TH    = LOCK_TH_D,
  parameter int unsigned PBASE_LOG2 = PBASE_LOG2_D,
  parameter logic [31:0] SEED       = 32'h2545_F491
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             act_i,
  input  logic [ROW_W-1:0] row_i,
  input  logic             ref_i,
  input  logic [IV_W-1:0]  iv_i,
  output logic             req_valid_o,
  output logic [ROW_W-1:0] req_row_o,
  input  logic             req_ready_i,
  output logic             busy_o,
  output logic             trig_o,
  output logic             hit_o,
  output logic             act_drop_o,
  output logic             rec_drop_o
);
  localparam int unsigned HW = (HIST_N > 1) ? $clog2(HIST_N) : 1;
  localparam int unsigned CW = (CNT_N > 1) ? $clog2(CNT_N) : 1;

  typedef enum logic [2:0] {S_IDLE, S_SEARCH, S_RECORD, S_R_W, S_R_LOG,
                            S_R_P, S_R_UPD, S_R_CLR} state_e;
  state_e state;

  logic [ROW_W-1:0] row_q;
  logic [IV_W-1:0]  iv_q;
  logic             ref_pend;
  logic [CW-1:0]    e_q;
  logic             ev_q, link_q, trig_q;
  logic [HW-1:0]    hidx_q;
  logic [CNT_W-1:0] cnt_q;
  logic [IV_W-1:0]  w_q;
  logic [IV_W:0]    wlog_q;
  logic [HIST_N-1:0] pend;

  logic in_ref;
  assign in_ref = (state == S_R_W) || (state == S_R_LOG) ||
                  (state == S_R_P) || (state == S_R_UPD) || (state == S_R_CLR);

  // random numbers
  logic [31:0] rnd;
  prng #(.SEED(SEED)) u_rng (.clk, .rst_n, .rnd_o(rnd));

  // counter table
  logic             ct_rec, ct_clear, ct_repl, ct_v, ct_lock, ct_hhit;
  logic [ROW_W-1:0] ct_row;
  logic [CNT_W-1:0] ct_cnt;
  logic [HW-1:0]    ct_hidx;
  logic             ht_hit;
  logic [HW-1:0]    ht_hidx;
  counter_table #(.N(CNT_N), .ROW_W(ROW_W), .CNT_W(CNT_W), .HIST_N(HIST_N), .LOCK_TH(LOCK_TH)) u_ct (
    .clk, .rst_n, .clear_i(ct_clear), .rec_i(ct_rec), .rec_row_i(row_q), .rec_hhit_i(ht_hit),
    .rec_hidx_i(ht_hidx), .rnd_i(rnd[31 -: CW]), .rec_drop_o(rec_drop_o), .rec_repl_o(ct_repl),
    .rd_idx_i(e_q), .rd_valid_o(ct_v), .rd_row_o(ct_row), .rd_cnt_o(ct_cnt), .rd_lock_o(ct_lock),
    .rd_hhit_o(ct_hhit), .rd_hidx_o(ct_hidx));

  // history table
  logic             ht_clear, ht_search, ht_busy, ht_done, ht_ins, ht_upd, ht_rdv;
  logic [HW-1:0]    ht_insidx, ht_rdidx;
  logic [IV_W-1:0]  ht_hiv, ht_rdiv;
  logic [ROW_W-1:0] ht_rdrow;
  logic [HW:0]      ht_count;
  history_table #(.N(HIST_N), .ROW_W(ROW_W), .IV_W(IV_W)) u_hist (
    .clk, .rst_n, .clear_i(ht_clear),
    .search_i(ht_search), .search_row_i(row_i), .search_busy_o(ht_busy),
    .search_done_o(ht_done), .hit_o(ht_hit), .hit_idx_o(ht_hidx), .hit_iv_o(ht_hiv),
    .ins_i(ht_ins), .ins_row_i(ct_row), .ins_iv_i(iv_q), .upd_i(ht_upd), .upd_idx_i(hidx_q),
    .ins_idx_o(ht_insidx), .rd_idx_i(ht_rdidx), .rd_row_o(ht_rdrow), .rd_iv_o(ht_rdiv),
    .rd_valid_o(ht_rdv), .count_o(ht_count));

  // weight of entry e_q (against the linked history interval when still valid)
  logic            link_ok;
  logic [IV_W-1:0] w_lin, f_r;
  logic [IV_W:0]   w_log;
  logic            p_trig;
  assign link_ok = ct_hhit && ht_rdv && (ht_rdrow == ct_row);
  weight_calc #(.ROW_W(ROW_W), .IV_W(IV_W)) u_w (
    .row_i(ct_row), .iv_i(iv_q), .use_hist_i(link_ok), .hist_iv_i(ht_rdiv), .f_o(f_r), .w_o(w_lin));
  log_weight #(.IV_W(IV_W)) u_log (.w_i(w_q), .wlog_o(w_log));
  prob_decision #(.W_W(IV_W+1), .M_W(CNT_W), .RAND_W(32), .PBASE_LOG2(PBASE_LOG2)) u_pd (
    .w_i(wlog_q), .mult_i(cnt_q), .rnd_i(rnd), .trig_o(p_trig));

  // issue of pending extra activations, lowest history index first
  logic          pend_any;
  logic [HW-1:0] pend_idx;
  always_comb begin
    pend_any = 1'b0;
    pend_idx = '0;
    for (int k = HIST_N-1; k >= 0; k--)
      if (pend[k]) begin pend_any = 1'b1; pend_idx = HW'(k); end
  end
  logic issue;
  assign issue    = !in_ref && pend_any && !req_valid_o;
  assign ht_rdidx = in_ref ? ct_hidx : pend_idx;

  assign ht_search  = (state == S_IDLE) && act_i;
  assign ct_rec     = (state == S_RECORD);
  // a ref starts now; it closes the window if it ends interval RefInt-1
  logic ref_start, win_end;
  assign ref_start  = (state == S_IDLE) && !act_i && (ref_i || ref_pend);
  assign win_end    = ref_i ? (iv_i == {IV_W{1'b1}}) : (iv_i == '0);
  assign ht_clear   = ref_start && win_end;
  assign ct_clear   = (state == S_R_CLR);
  assign ht_upd     = (state == S_R_UPD) && trig_q &&  link_q;
  assign ht_ins     = (state == S_R_UPD) && trig_q && !link_q;
  assign busy_o     = (state != S_IDLE);
  assign act_drop_o = act_i && (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      row_q <= '0; iv_q <= '0; ref_pend <= 1'b0;
      e_q <= '0; ev_q <= 1'b0; link_q <= 1'b0; trig_q <= 1'b0; hidx_q <= '0;
      cnt_q <= '0; w_q <= '0; wlog_q <= '0; pend <= '0;
      req_valid_o <= 1'b0; req_row_o <= '0; trig_o <= 1'b0; hit_o <= 1'b0;
    end else begin
      trig_o <= 1'b0;
      hit_o  <= 1'b0;
      if (req_valid_o && req_ready_i) req_valid_o <= 1'b0;
      if (issue) begin
        req_valid_o    <= 1'b1;
        req_row_o      <= ht_rdrow;
        pend[pend_idx] <= 1'b0;
      end
      if (ref_i && (state != S_IDLE || act_i)) ref_pend <= 1'b1;
      unique case (state)
        S_IDLE: begin
          if (act_i) begin
            row_q <= row_i;
            state <= S_SEARCH;
          end else if (ref_i || ref_pend) begin
            // the interval that this ref ends is iv_i (it has not moved yet),
            // or iv_i - 1 for a ref that was held while busy
            iv_q     <= ref_i ? iv_i : iv_i - 1'b1;
            ref_pend <= 1'b0;
            e_q      <= '0;
            if (win_end) pend <= '0;
            state    <= S_R_W;
          end
        end
        S_SEARCH: if (ht_done) state <= S_RECORD;
        S_RECORD: begin
          hit_o <= ht_hit;
          state <= S_IDLE;
        end
        S_R_W: begin
          ev_q   <= ct_v;
          link_q <= link_ok;
          hidx_q <= ct_hidx;
          cnt_q  <= ct_cnt;
          w_q    <= w_lin;
          state  <= S_R_LOG;
        end
        S_R_LOG: begin
          wlog_q <= w_log;
          state  <= S_R_P;
        end
        S_R_P: begin
          trig_q <= p_trig && ev_q;
          state  <= S_R_UPD;
        end
        S_R_UPD: begin
          if (trig_q) begin
            pend[link_q ? hidx_q : ht_insidx] <= 1'b1;
            trig_o <= 1'b1;
          end
          e_q   <= e_q + 1'b1;
          state <= (e_q == CW'(CNT_N-1)) ? S_R_CLR : S_R_W;
        end
        S_R_CLR: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_no_act_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    !(act_i && state != S_IDLE))
    else $warning("ca_engine: act while busy was not processed");
endmodule
