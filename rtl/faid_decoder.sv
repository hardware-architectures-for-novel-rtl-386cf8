// faid_decoder: 3-bit finite-alphabet iterative decoder (FAID) for a
// quasi-cyclic LDPC code of column weight DV, processing P whole column
// blocks (P*DV circulants, P*L variable nodes) per clock cycle; P=1 by
// default, P=2 doubles the throughput.
//
// Decoding is column serial. In each cycle the decoder reads, for column
// block j, the L channel values, the DV*L signs of the messages this block
// last sent, and the previous-pass check states of the DV row blocks it
// touches. The check states are rotated into variable order, turned into
// DV*L check-to-variable messages, and L VNUs map them with the channel
// values into new variable-to-check messages and hard decisions. These are
// rotated back into check order and folded into the current-pass check
// states; signs and decisions are written back. With P>1 the P blocks of a
// group do this side by side and are folded in column order, so the result
// does not depend on P. A pass over the NB column blocks takes NB/P cycles
// with no bubble; the decoder stops at the first pass whose decisions
// satisfy every check, or after MAX_ITER iterations. NB must be a multiple
// of P; the memories are split into P banks by column block modulo P.
//
// Interface (all synchronous to clk, rst_n asynchronous active low):
//   lut_*   writes one entry of the VNU map tables (see faid_vnu_lut).
//   code_*  writes one circulant (row block, shift) of the base matrix at
//           address column*DV+slot (see faid_code_table).
//   ch_*    writes the L channel values of column block ch_col.
//   start   begins decoding the loaded frame; busy until done pulses.
//   success, iterations  hold the result of the last frame.
//   dec_col/dec_data     read the L decided bits of a column block
//           (combinational), valid after done.
// Configuration and channel writes are only allowed while not busy.
//
// Code structure, circulant size, column weight, 3-bit messages, the VNU as
// a look-up map and one column block per cycle come from the document. The
// check-state organisation, the decision rule, the interface and the
// placeholder contents loaded at reset are this design's choices.
module faid_decoder
  import faid_pkg::*;
#(
  parameter int L        = 140,
  parameter int NB       = 64,
  parameter int MB       = 4,
  parameter int DV       = 4,
  parameter int P        = 1,
  parameter int MAX_ITER = 20,
  parameter int CH_W1    = 1,
  parameter int CH_W2    = 2,
  parameter int DEPTH    = ALPHA ** (DV - 1),
  parameter int LAW      = $clog2(DEPTH),
  parameter int CW       = (NB > 1) ? $clog2(NB) : 1,
  parameter int TAW      = $clog2(NB * DV),
  parameter int RBW      = (MB > 1) ? $clog2(MB) : 1,
  parameter int SW       = $clog2(L),
  parameter int IW       = $clog2(MAX_ITER + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // VNU map tables
  input  logic           lut_we,
  input  logic           lut_sel,
  input  logic [LAW-1:0] lut_addr,
  input  msg_t           lut_wdata,
  // base matrix
  input  logic           code_we,
  input  logic [TAW-1:0] code_addr,
  input  logic [RBW-1:0] code_rb,
  input  logic [SW-1:0]  code_sh,
  // channel values
  input  logic           ch_we,
  input  logic [CW-1:0]  ch_col,
  input  chan_t [L-1:0]  ch_wdata,
  // control and status
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic           success,
  output logic [IW-1:0]  iterations,
  // decisions
  input  logic [CW-1:0]  dec_col,
  output logic [L-1:0]   dec_data
);

  localparam int NG  = NB / P;                       // column groups per pass
  localparam int GW  = (NG > 1) ? $clog2(NG) : 1;
  localparam int NS  = DV * P;                       // circulants per cycle
  localparam int STW = $bits(cstate_t);

  logic          clear, fold, last, syn_zero_next;
  logic [CW-1:0] col;                                // first block of the group
  logic [GW-1:0] grp;

  assign grp = GW'(int'(col) / P);

  faid_ctrl #(.NB(NB), .NPC(P), .MAX_ITER(MAX_ITER)) u_ctrl (
    .clk, .rst_n, .start, .syn_zero_next,
    .clear, .fold, .last, .col, .busy, .done, .success, .iterations
  );

  msg_t tbl [2][DEPTH];

  faid_vnu_lut #(.DV(DV)) u_lut (
    .clk, .rst_n, .we(lut_we && !busy), .sel(lut_sel), .addr(lut_addr),
    .wdata(lut_wdata), .tbl
  );

  logic [RBW-1:0]   rb    [NS];
  logic [SW-1:0]    sh    [NS];
  logic [IDX_W-1:0] col_s [NS];

  faid_code_table #(.L(L), .NB(NB), .MB(MB), .DV(DV), .NPC(P)) u_code (
    .clk, .rst_n, .we(code_we && !busy), .waddr(code_addr), .wrb(code_rb),
    .wsh(code_sh), .col, .rb, .sh
  );

  // Check bank; slot s = p*DV+e is circulant e of column block col+p.
  cstate_t      p_chk [NS][L];
  msg_t         m_chk [NS][L];
  logic [L-1:0] d_chk [NS];

  faid_check_bank #(.L(L), .MB(MB), .DV(DV), .NPC(P)) u_cn (
    .clk, .rst_n, .clear, .fold, .last, .col(col_s), .rb,
    .msg(m_chk), .dec(d_chk), .p_out(p_chk), .syn_zero_next
  );

  logic [L-1:0] dec_rd [P];

  assign dec_data = dec_rd[int'(dec_col) % P];

  for (genvar p = 0; p < P; p++) begin : g_blk
    // Memories are interleaved: bank p holds column blocks j with j mod P == p
    // at address j / P.
    chan_t [L-1:0]        ch_rd;
    logic [DV-1:0][L-1:0] sgn_rd, sgn_wr;
    logic [L-1:0]         dec_var;
    msg_t                 c2v [L][DV];
    msg_t                 v2c [L][DV];
    logic [IDX_W-1:0]     cidx;

    assign cidx = IDX_W'(int'(col) + p);

    faid_col_ram #(.DEPTH(NG), .W(2 * L)) u_ch_mem (
      .clk, .we(ch_we && !busy && (int'(ch_col) % P == p)), .waddr(GW'(int'(ch_col) / P)),
      .wdata(ch_wdata), .raddr(grp), .rdata(ch_rd)
    );

    // Signs of the last variable-to-check messages, variable order.
    faid_col_ram #(.DEPTH(NG), .W(DV * L)) u_sgn_mem (
      .clk, .we(fold), .waddr(grp), .wdata(sgn_wr), .raddr(grp), .rdata(sgn_rd)
    );

    // Hard decisions of the last pass.
    faid_col_ram #(.DEPTH(NG), .W(L)) u_dec_mem (
      .clk, .we(fold), .waddr(grp), .wdata(dec_var),
      .raddr(GW'(int'(dec_col) / P)), .rdata(dec_rd[p])
    );

    for (genvar e = 0; e < DV; e++) begin : g_slot
      localparam int S = p * DV + e;

      logic [L-1:0][STW-1:0] st_c, st_v;
      logic [L-1:0][MSG_W:0] mv_v, mv_c;
      logic [SW-1:0]         sh_back;

      assign col_s[S] = cidx;
      assign sh_back  = (sh[S] == '0) ? '0 : SW'(L - int'(sh[S]));

      for (genvar i = 0; i < L; i++) begin : g_lane
        assign st_c[i]     = p_chk[S][i];
        assign mv_v[i]     = {dec_var[i], v2c[i][e]};
        assign m_chk[S][i] = mv_c[i][MSG_W-1:0];
        assign d_chk[S][i] = mv_c[i][MSG_W];
        assign c2v[i][e]   = cn_c2v(cstate_t'(st_v[i]), sgn_rd[e][i], cidx);
        assign sgn_wr[e][i] = msg_sgn(v2c[i][e]);
      end

      // check order -> variable order
      qc_rotator #(.L(L), .W(STW)) u_to_var (.shift(sh_back), .din(st_c), .dout(st_v));
      // variable order -> check order
      qc_rotator #(.L(L), .W(MSG_W + 1)) u_to_chk (.shift(sh[S]), .din(mv_v), .dout(mv_c));
    end

    for (genvar i = 0; i < L; i++) begin : g_vnu
      faid_vnu #(.DV(DV), .DEPTH(DEPTH), .CH_W1(CH_W1), .CH_W2(CH_W2)) u_vnu (
        .ch(ch_rd[i]), .c2v(c2v[i]), .tbl, .v2c(v2c[i]), .dec(dec_var[i])
      );
    end
  end

  a_no_write_when_busy: assert property (
    @(posedge clk) disable iff (!rst_n) busy |-> !(lut_we || code_we || ch_we));

endmodule
