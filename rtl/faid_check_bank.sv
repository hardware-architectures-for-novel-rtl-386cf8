// faid_check_bank: the check node units of all MB x L checks.
//
// The check node update is the min-sum one: the sign of an outgoing message
// is the product of the other incoming signs and its magnitude the smallest
// of the other incoming magnitudes. Each check therefore keeps a compressed
// state (min1, min2, column block of min1, sign XOR). Two states are kept:
// PREV, complete from the previous pass, from which this pass's
// check-to-variable messages are read, and CUR, into which the new
// variable-to-check messages of the pass are folded as each column block is
// processed. At the last column block of a pass CUR (with that block
// folded in) becomes PREV and CUR is emptied. Each check also accumulates the XOR of the
// hard decisions of its variables, so at the end of a pass the syndrome of
// that pass's decisions is known; syn_zero_next reports it combinationally.
//
// Per cycle with fold=1, the bank takes NPC column blocks at once (NPC=1 is
// one column block per cycle, NPC=2 two). Slot s = p*DV+e, the e-th
// circulant of the p-th block of the group, names a row block rb[s] and
// its column block col[s], and brings L messages and decisions in check
// order. Within one column block each row block appears at most once;
// when several blocks of a group touch the same check their messages are
// folded in slot order, as if the blocks came one per cycle. clear (start
// of a frame) loads PREV with the zero state, so the first pass sees all-zero
// check messages. p_out[s] is the PREV state of row block rb[s], in check
// order.
//
// The two-state organisation is this design's choice: the document names
// vertical layered decoding but not how the check state is held.
module faid_check_bank
  import faid_pkg::*;
#(
  parameter int L   = 140,
  parameter int MB  = 4,
  parameter int DV  = 4,
  parameter int NPC = 1,
  parameter int NS  = DV * NPC,
  parameter int RBW = (MB > 1) ? $clog2(MB) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  fold,
  input  logic                  last,
  input  logic [IDX_W-1:0]      col   [NS],
  input  logic [RBW-1:0]        rb    [NS],
  input  msg_t                  msg   [NS][L],
  input  logic [L-1:0]          dec   [NS],
  output cstate_t               p_out [NS][L],
  output logic                  syn_zero_next
);

  cstate_t      p_st [MB][L];
  cstate_t      c_st [MB][L];
  logic [L-1:0] par  [MB];

  cstate_t      c_nx [MB][L];
  logic [L-1:0] par_nx [MB];

  always_comb begin
    for (int r = 0; r < MB; r++) begin
      par_nx[r] = par[r];
      for (int i = 0; i < L; i++) c_nx[r][i] = c_st[r][i];
      for (int e = 0; e < NS; e++) begin
        if (fold && int'(rb[e]) == r) begin
          par_nx[r] = par_nx[r] ^ dec[e];
          for (int i = 0; i < L; i++) c_nx[r][i] = cn_fold(c_nx[r][i], msg[e][i], col[e]);
        end
      end
    end
  end

  always_comb begin
    syn_zero_next = 1'b1;
    for (int r = 0; r < MB; r++) if (par_nx[r] != '0) syn_zero_next = 1'b0;
  end

  always_comb begin
    for (int e = 0; e < NS; e++)
      for (int i = 0; i < L; i++)
        p_out[e][i] = (int'(rb[e]) < MB) ? p_st[rb[e]][i] : CS_ZERO;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < MB; r++) begin
        par[r] <= '0;
        for (int i = 0; i < L; i++) begin
          p_st[r][i] <= CS_ZERO;
          c_st[r][i] <= CS_EMPTY;
        end
      end
    end else if (clear) begin
      for (int r = 0; r < MB; r++) begin
        par[r] <= '0;
        for (int i = 0; i < L; i++) begin
          p_st[r][i] <= CS_ZERO;
          c_st[r][i] <= CS_EMPTY;
        end
      end
    end else if (fold && last) begin
      for (int r = 0; r < MB; r++) begin
        par[r] <= '0;
        for (int i = 0; i < L; i++) begin
          p_st[r][i] <= c_nx[r][i];
          c_st[r][i] <= CS_EMPTY;
        end
      end
    end else if (fold) begin
      for (int r = 0; r < MB; r++) begin
        par[r] <= par_nx[r];
        for (int i = 0; i < L; i++) c_st[r][i] <= c_nx[r][i];
      end
    end
  end

  // A row block may hold at most one circulant of a column block.
  always_comb begin
    if (rst_n && fold)
      for (int g = 0; g < NPC; g++)
        for (int a = 0; a < DV; a++)
          for (int b = a + 1; b < DV; b++)
            a_distinct_rb: assert (rb[g*DV+a] != rb[g*DV+b]);
  end

endmodule
