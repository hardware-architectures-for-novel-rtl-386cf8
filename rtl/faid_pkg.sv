// faid_pkg: types, constants and small functions shared by the FAID LDPC decoder.
//
// Messages are 3-bit signed integers in the finite alphabet {-3..+3}; the
// value -4 is never produced. A channel value is a 2-bit struct: its sign
// (1 = the bit read was 1, a negative LLR) and its reliability (1 = strong,
// +-C2; 0 = weak, +-C1, or the single level +-C of a hard-decision read).
// A check node keeps its extrinsic information in compressed form: the two
// smallest magnitudes it has seen, the column block that gave the smallest,
// and the XOR of all message signs.
//
// The 7x7 map for column weight three is the one printed for channel value
// -C; the map for +C follows by symmetry, Phi(+C,m) = -Phi(-C,-m). The
// compressed check state, its widths and the channel weights used for the
// hard decision are choices of this design.
package faid_pkg;

  localparam int MSG_W   = 3;
  localparam int MSG_MAX = 3;
  localparam int ALPHA   = 2 * MSG_MAX + 1;   // alphabet size, 7
  localparam int IDX_W   = 8;                 // column-block index, up to 256 blocks

  typedef logic signed [MSG_W-1:0] msg_t;

  typedef struct packed {
    logic sgn;     // 1: negative channel value (bit read as 1)
    logic rel;     // 1: magnitude C2, 0: magnitude C1 (or C for a hard read)
  } chan_t;

  typedef struct packed {
    logic [1:0]       min1;  // smallest magnitude
    logic [1:0]       min2;  // second smallest magnitude
    logic [IDX_W-1:0] idx;   // column block that produced min1
    logic             sgn;   // XOR of all message signs
  } cstate_t;

  // State of a check before any message of a pass has been folded in.
  localparam cstate_t CS_EMPTY = '{min1: 2'd3, min2: 2'd3, idx: '0, sgn: 1'b0};
  // State that yields all-zero check-to-variable messages (first pass).
  localparam cstate_t CS_ZERO  = '{min1: 2'd0, min2: 2'd0, idx: '0, sgn: 1'b0};

  // Map for column weight three and channel value -C, row m1, column m2,
  // both indexed by value+3.
  localparam msg_t FAID_DV3_MAP [ALPHA][ALPHA] = '{
    '{-3, -3, -3, -3, -3, -3, -1},
    '{-3, -3, -3, -3, -2, -1,  1},
    '{-3, -3, -2, -2, -1, -1,  1},
    '{-3, -3, -2, -1,  0,  0,  1},
    '{-3, -2, -1,  0,  0,  1,  2},
    '{-3, -1, -1,  0,  1,  1,  3},
    '{-1,  1,  1,  1,  2,  3,  3}
  };

  function automatic logic [1:0] msg_mag(msg_t m);
    return m[MSG_W-1] ? 2'(-m) : 2'(m);
  endfunction

  function automatic logic msg_sgn(msg_t m);
    return m[MSG_W-1];
  endfunction

  // Fold one variable-to-check message from column block col into a state.
  function automatic cstate_t cn_fold(cstate_t s, msg_t m, logic [IDX_W-1:0] col);
    cstate_t    r;
    logic [1:0] mag;
    mag   = msg_mag(m);
    r     = s;
    r.sgn = s.sgn ^ msg_sgn(m);
    if (mag < s.min1) begin
      r.min2 = s.min1;
      r.min1 = mag;
      r.idx  = col;
    end else if (mag < s.min2) begin
      r.min2 = mag;
    end
    return r;
  endfunction

  // Check-to-variable message for the edge from column block col whose last
  // variable-to-check sign was old_sgn: sign product without its own sign,
  // magnitude the smallest of the other edges.
  function automatic msg_t cn_c2v(cstate_t s, logic old_sgn, logic [IDX_W-1:0] col);
    logic [1:0] mag;
    msg_t       pos;
    mag = (s.idx == col) ? s.min2 : s.min1;
    pos = msg_t'({1'b0, mag});
    return (s.sgn ^ old_sgn) ? -pos : pos;
  endfunction

endpackage
