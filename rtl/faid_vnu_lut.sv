// faid_vnu_lut: the variable-node map tables shared by every VNU.
//
// A FAID variable node update is a (dv-1)-dimensional look-up table indexed
// by the dv-1 incoming extrinsic messages, one table per channel magnitude.
// This block holds two tables of ALPHA^(DV-1) 3-bit entries: table 0 for
// the channel value -C1 (or -C of a hard-decision read) and table 1 for
// -C2. The entries for a positive channel value are derived by the VNU from
// symmetry. Address a = sum over inputs i of (m_i+3)*7^(DV-2-i), so the
// first input is the most significant digit.
//
// Interface: one synchronous write port (we, sel, addr, wdata); all entries
// are visible combinationally on tbl. The decoder must not write while it
// is decoding.
//
// The document prints only the map for column weight three; the contents
// for column weight four are designed per code and must be loaded. After
// reset both tables hold the printed map when DV==3; otherwise they hold the
// saturated sum of the inputs minus one (a linear-threshold map of this
// design's own choosing) so the decoder does something sensible unloaded.
module faid_vnu_lut
  import faid_pkg::*;
#(
  parameter int DV    = 4,
  parameter int DEPTH = ALPHA ** (DV - 1),
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic          sel,
  input  logic [AW-1:0] addr,
  input  msg_t          wdata,
  output msg_t          tbl [2][DEPTH]
);

  function automatic msg_t reset_entry(int a);
    int   rem, sum, d;
    int   dig [DV-1];
    rem = a;
    for (int i = DV - 2; i >= 0; i--) begin
      dig[i] = rem % ALPHA;
      rem    = rem / ALPHA;
    end
    if (DV == 3) return FAID_DV3_MAP[dig[0]][dig[1]];
    sum = -1;
    for (int i = 0; i < DV - 1; i++) sum += dig[i] - MSG_MAX;
    d = (sum > MSG_MAX) ? MSG_MAX : (sum < -MSG_MAX) ? -MSG_MAX : sum;
    return msg_t'(d);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < 2; t++)
        for (int a = 0; a < DEPTH; a++)
          tbl[t][a] <= reset_entry(a);
    end else if (we && int'(addr) < DEPTH) begin
      tbl[sel][addr] <= wdata;
    end
  end

  property p_wdata_in_alphabet;
    @(posedge clk) disable iff (!rst_n) we |-> (wdata != msg_t'(-4));
  endproperty
  a_wdata_in_alphabet: assert property (p_wdata_in_alphabet);

endmodule
