// faid_vnu: one FAID variable node unit.
//
// For each of its DV edges the unit forms the outgoing 3-bit message as
// Phi(y, other DV-1 incoming messages), read from the map table of the
// channel magnitude (table 0 for C1 or the hard-decision C, table 1 for C2).
// The tables hold the map for a negative channel value; for a positive one
// the unit negates the inputs, looks up, and negates the result, using the
// symmetry Phi(+C, m) = -Phi(-C, -m). The other inputs enter the address in
// ascending edge order, first input most significant (see faid_vnu_lut).
//
// It also makes the hard decision: the sign of the sum of all DV incoming
// messages plus the channel value weighted CH_W1 (weak or hard) or CH_W2
// (strong); a zero sum keeps the channel sign. The decision rule and the
// weights are this design's choice; the message map follows the document.
//
// Purely combinational.
module faid_vnu
  import faid_pkg::*;
#(
  parameter int DV    = 4,
  parameter int DEPTH = ALPHA ** (DV - 1),
  parameter int CH_W1 = 1,
  parameter int CH_W2 = 2
) (
  input  chan_t ch,
  input  msg_t  c2v [DV],
  input  msg_t  tbl [2][DEPTH],
  output msg_t  v2c [DV],
  output logic  dec
);

  always_comb begin
    for (int e = 0; e < DV; e++) begin
      int   addr;
      msg_t m;
      msg_t r;
      addr = 0;
      for (int k = 0; k < DV; k++) begin
        if (k != e) begin
          m    = ch.sgn ? c2v[k] : -c2v[k];
          addr = addr * ALPHA + (int'(m) + MSG_MAX);
        end
      end
      r      = tbl[ch.rel][addr];
      v2c[e] = ch.sgn ? r : -r;
    end
  end

  always_comb begin
    int sum;
    int w;
    w   = ch.rel ? CH_W2 : CH_W1;
    sum = ch.sgn ? -w : w;
    for (int k = 0; k < DV; k++) sum += int'(c2v[k]);
    dec = (sum < 0) ? 1'b1 : (sum > 0) ? 1'b0 : ch.sgn;
  end

endmodule
