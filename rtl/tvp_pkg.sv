// tvp_pkg: constants and types shared by the time-varying probabilistic
// row-hammer mitigation (TiVaPRoMi) blocks.
//
// The sizes are those of a DDR4 system with 1 GB banks: a refresh window of
// 64 ms split into RefInt = 8192 refresh intervals of 7.8 us, a base
// probability Pbase = 2^-23 (so RefInt * Pbase = 9.8e-4, the PARA-like
// ceiling), a 32-entry history table and a 64-entry counter table (CaPRoMi).
// A history entry holds a row address and a refresh-interval number in
// 30 bits (120 B for 32 entries), which gives 13 interval bits and 17 row bits
// (131072 rows per bank, 16 rows refreshed per interval). The bank count (16)
// is the DDR4 figure and is this design's choice.
package tvp_pkg;

  // Which time-varying weighting the per-bank engine uses.
  typedef enum logic [1:0] {
    VAR_LI   = 2'd0,  // LiPRoMi:   linear weight w_r
    VAR_LO   = 2'd1,  // LoPRoMi:   logarithmic weight 2^ceil(log2(w_r+1))
    VAR_LOLI = 2'd2,  // LoLiPRoMi: linear on a history hit, logarithmic otherwise
    VAR_CA   = 2'd3   // CaPRoMi:   counter-assisted, decided at each ref
  } variant_e;

  localparam int unsigned ROW_W_D       = 17;  // row address bits (RowsPB = 2^17)
  localparam int unsigned IV_W_D        = 13;  // refresh-interval bits (RefInt = 2^13)
  localparam int unsigned BANK_W_D      = 4;   // 16 banks (f_r = top IV_W row bits)
  localparam int unsigned HIST_N_D      = 32;  // history-table entries per bank
  localparam int unsigned CNT_N_D       = 64;  // counter-table entries per bank
  localparam int unsigned CNT_W_D       = 8;   // activation counter (max 165 per interval)
  localparam int unsigned PBASE_LOG2_D  = 23;  // Pbase = 2^-23
  localparam int unsigned RAND_W_D      = 32;  // random number width
  localparam int unsigned LOCK_TH_D     = 32;  // CaPRoMi lock threshold (activations)

endpackage
