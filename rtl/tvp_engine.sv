// tvp_engine: per-bank FSM of LiPRoMi, LoPRoMi and LoLiPRoMi.
//
// On an act to this bank the activated row r is latched and the bank's
// history table is searched sequentially for r. The weight w_r of Eq. (1) is
// then formed against the refresh interval of r (f_r = r / RowsPI) or, on a
// history hit, against the interval stored with r's last extra activation.
// VARIANT selects the weighting:
//   VAR_LI   linear,       p_r = w_r * Pbase
//   VAR_LO   logarithmic,  p_r = 2^ceil(log2(w_r+1)) * Pbase      (Eq. 2)
//   VAR_LOLI linear on a history hit, logarithmic otherwise.
// p_r is compared with a pseudo-random number; on a trigger the row and the
// current interval are written to the history table (updating r's entry if
// it was found, else FIFO insertion) and an extra-activation request for r is
// raised. On a ref the current interval ends; if it was the last one of the
// refresh window the history table is cleared.
//
// States: IDLE -> SEARCH (N cycles) -> WEIGHT -> DECIDE -> UPDATE -> IDLE for
// act and IDLE -> REF -> REF_DONE -> IDLE for ref. Counting the cycle that
// carries the command, an act occupies the engine for N + 5 cycles (37 for
// N = 32) and a ref for 3, the figures the document reports for LiPRoMi and
// LoPRoMi (it reports 36 for LoLiPRoMi; here all three take 37). The document
// gives the FSM only as a figure title; the state sequence is this design's
// reconstruction from the text.
//
// Interface: act_i/row_i (act to this bank), ref_i (ref command), iv_i
// (current refresh interval, value before the ref increments it), req_*
// (extra-activation request held until req_ready_i), busy_o, trig_o (pulse
// per triggered extra activation), act_drop_o (pulse: act arrived while busy,
// which the memory timing rules out). A ref that arrives while busy is held
// and served next. If the previous request has not been taken yet when a new
// one triggers, the FSM waits in UPDATE.
module tvp_engine
  import tvp_pkg::*;
#(
  parameter variant_e    VARIANT    = VAR_LOLI,
  parameter int unsigned ROW_W      = ROW_W_D,
  parameter int unsigned IV_W       = IV_W_D,
  parameter int unsigned HIST_N     = HIST_N_D,
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
  output logic             act_drop_o
);
  localparam int unsigned IW = (HIST_N > 1) ? $clog2(HIST_N) : 1;

  typedef enum logic [2:0] {S_IDLE, S_SEARCH, S_WEIGHT, S_DECIDE, S_UPDATE, S_REF, S_REF_DONE} state_e;
  state_e state;

  logic [ROW_W-1:0] row_q;
  logic [IV_W-1:0]  iv_q;
  logic             ref_pend, win_end_q;
  logic             hit_q, trig_q;
  logic [IW-1:0]    hidx_q;
  logic [IV_W:0]    weff_q;

  // history table
  logic             ht_clear, ht_search, ht_busy, ht_done, ht_hit, ht_ins, ht_upd, ht_rdv;
  logic [IW-1:0]    ht_hidx, ht_insidx;
  logic [IV_W-1:0]  ht_hiv, ht_rdiv;
  logic [ROW_W-1:0] ht_rdrow;
  logic [IW:0]      ht_count;

  history_table #(.N(HIST_N), .ROW_W(ROW_W), .IV_W(IV_W)) u_hist (
    .clk, .rst_n, .clear_i(ht_clear),
    .search_i(ht_search), .search_row_i(row_i), .search_busy_o(ht_busy),
    .search_done_o(ht_done), .hit_o(ht_hit), .hit_idx_o(ht_hidx), .hit_iv_o(ht_hiv),
    .ins_i(ht_ins), .ins_row_i(row_q), .ins_iv_i(iv_q), .upd_i(ht_upd), .upd_idx_i(hidx_q),
    .ins_idx_o(ht_insidx), .rd_idx_i('0), .rd_row_o(ht_rdrow), .rd_iv_o(ht_rdiv),
    .rd_valid_o(ht_rdv), .count_o(ht_count));

  // weight
  logic [IV_W-1:0] w_lin, f_r;
  logic [IV_W:0]   w_log, w_sel;
  weight_calc #(.ROW_W(ROW_W), .IV_W(IV_W)) u_w (
    .row_i(row_q), .iv_i(iv_q), .use_hist_i(ht_hit), .hist_iv_i(ht_hiv), .f_o(f_r), .w_o(w_lin));
  log_weight #(.IV_W(IV_W)) u_log (.w_i(w_lin), .wlog_o(w_log));

  always_comb begin
    unique case (VARIANT)
      VAR_LI:  w_sel = {1'b0, w_lin};
      VAR_LO:  w_sel = w_log;
      default: w_sel = ht_hit ? {1'b0, w_lin} : w_log;   // VAR_LOLI
    endcase
  end

  // probabilistic decision
  logic [31:0] rnd;
  logic        p_trig;
  prng #(.SEED(SEED)) u_rng (.clk, .rst_n, .rnd_o(rnd));
  prob_decision #(.W_W(IV_W+1), .M_W(1), .RAND_W(32), .PBASE_LOG2(PBASE_LOG2)) u_pd (
    .w_i(weff_q), .mult_i(1'b1), .rnd_i(rnd), .trig_o(p_trig));

  assign ht_search = (state == S_IDLE) && act_i;
  assign ht_clear  = (state == S_REF) && win_end_q;
  assign ht_ins    = (state == S_UPDATE) && trig_q && !hit_q && !req_valid_o;
  assign ht_upd    = (state == S_UPDATE) && trig_q &&  hit_q && !req_valid_o;
  assign busy_o    = (state != S_IDLE);
  assign act_drop_o = act_i && (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      row_q       <= '0;
      iv_q        <= '0;
      ref_pend    <= 1'b0;
      win_end_q   <= 1'b0;
      hit_q       <= 1'b0;
      hidx_q      <= '0;
      weff_q      <= '0;
      trig_q      <= 1'b0;
      req_valid_o <= 1'b0;
      req_row_o   <= '0;
      trig_o      <= 1'b0;
      hit_o       <= 1'b0;
    end else begin
      trig_o <= 1'b0;
      hit_o  <= 1'b0;
      if (req_valid_o && req_ready_i) req_valid_o <= 1'b0;
      if (ref_i && (state != S_IDLE || act_i)) begin
        ref_pend  <= 1'b1;
        win_end_q <= (iv_i == {IV_W{1'b1}});
      end
      unique case (state)
        S_IDLE: begin
          if (act_i) begin
            row_q <= row_i;
            iv_q  <= iv_i;
            state <= S_SEARCH;
          end else if (ref_i || ref_pend) begin
            if (ref_i) win_end_q <= (iv_i == {IV_W{1'b1}});
            ref_pend <= 1'b0;
            state    <= S_REF;
          end
        end
        S_SEARCH: if (ht_done) state <= S_WEIGHT;
        S_WEIGHT: begin
          hit_q  <= ht_hit;
          hidx_q <= ht_hidx;
          weff_q <= w_sel;
          hit_o  <= ht_hit;
          state  <= S_DECIDE;
        end
        S_DECIDE: begin
          trig_q <= p_trig;
          state  <= S_UPDATE;
        end
        S_UPDATE: begin
          if (!trig_q) begin
            state <= S_IDLE;
          end else if (!req_valid_o) begin
            req_valid_o <= 1'b1;
            req_row_o   <= row_q;
            trig_o      <= 1'b1;
            state       <= S_IDLE;
          end
        end
        S_REF:      state <= S_REF_DONE;
        S_REF_DONE: state <= S_IDLE;
        default:    state <= S_IDLE;
      endcase
    end
  end

  // The memory timing guarantees at least tRC between two acts to one bank.
  a_no_act_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    !(act_i && state != S_IDLE))
    else $warning("tvp_engine: act while busy was not processed");
endmodule
