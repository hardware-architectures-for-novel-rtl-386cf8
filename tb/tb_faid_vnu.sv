// tb_faid_vnu: checks the variable node unit.
//
// A column-weight-three unit is driven with the printed 7x7 map in table 0
// and a different map in table 1: every input pair and both channel signs
// are compared against a direct two-dimensional lookup, plus a few entries
// worked out by hand. A column-weight-four unit with a random table is
// compared against an independent address computation. Hard decisions are
// checked against the weighted sum rule.
module tb_faid_vnu;
  import faid_pkg::*;

  localparam int D3 = 49;
  localparam int D4 = 343;

  chan_t ch3, ch4;
  msg_t  c3 [3], v3 [3];
  msg_t  c4 [4], v4 [4];
  msg_t  t3 [2][D3];
  msg_t  t4 [2][D4];
  logic  dec3, dec4;

  faid_vnu #(.DV(3)) u3 (.ch(ch3), .c2v(c3), .tbl(t3), .v2c(v3), .dec(dec3));
  faid_vnu #(.DV(4)) u4 (.ch(ch4), .c2v(c4), .tbl(t4), .v2c(v4), .dec(dec4));

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int lut2(int t, int sgn, int a, int b);
    int r;
    if (sgn) r = (t == 0) ? FAID_DV3_MAP[a + 3][b + 3] : ((a + b > 3) ? 3 : (a + b < -3) ? -3 : a + b);
    else     r = -((t == 0) ? FAID_DV3_MAP[-a + 3][-b + 3] : ((-a - b > 3) ? 3 : (-a - b < -3) ? -3 : -a - b));
    return r;
  endfunction

  function automatic int dec_ref(int sgn, int rel, int s);
    int w;
    w = rel ? 2 : 1;
    s += sgn ? -w : w;
    return (s < 0) ? 1 : (s > 0) ? 0 : sgn;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 7; a++)
      for (int b = 0; b < 7; b++) begin
        t3[0][a * 7 + b] = FAID_DV3_MAP[a][b];
        t3[1][a * 7 + b] = msg_t'((a + b - 6 > 3) ? 3 : (a + b - 6 < -3) ? -3 : a + b - 6);
      end
    for (int t = 0; t < 2; t++)
      for (int a = 0; a < D4; a++) t4[t][a] = msg_t'($urandom_range(6, 0) - 3);

    // hand-worked entries of the printed map, channel -C
    ch3 = '{sgn: 1'b1, rel: 1'b0};
    c3[0] = 0; c3[1] = 0; c3[2] = 0; #1;
    check(v3[0] == -1 && v3[1] == -1 && v3[2] == -1, "Phi(-C,0,0) = -1");
    check(dec3 == 1'b1, "decision on -C with zero messages");
    c3[0] = 5; c3[1] = 3; c3[2] = 3; #1;   // 5 is -3 in three bits
    check(v3[0] == 3, "Phi(-C,3,3) = 3");
    check(v3[1] == -1 && v3[2] == -1, "Phi(-C,-3,3) = -1");
    ch3 = '{sgn: 1'b0, rel: 1'b0};
    c3[0] = 0; c3[1] = 0; c3[2] = 0; #1;
    check(v3[0] == 1, "Phi(+C,0,0) = +1 by symmetry");

    // exhaustive column weight three, both tables and signs
    for (int s = 0; s < 2; s++)
      for (int t = 0; t < 2; t++)
        for (int a = -3; a <= 3; a++)
          for (int b = -3; b <= 3; b++)
            for (int c = -3; c <= 3; c++) begin
              ch3 = '{sgn: 1'(s), rel: 1'(t)};
              c3[0] = msg_t'(a); c3[1] = msg_t'(b); c3[2] = msg_t'(c);
              #1;
              check(int'(v3[0]) == lut2(t, s, b, c) && int'(v3[1]) == lut2(t, s, a, c)
                    && int'(v3[2]) == lut2(t, s, a, b),
                    $sformatf("dv3 s=%0d t=%0d in=%0d,%0d,%0d", s, t, a, b, c));
              check(int'(dec3) == dec_ref(s, t, a + b + c), "dv3 decision");
            end

    // random column weight four
    repeat (3000) begin
      int m [4];
      int s, t;
      s = $urandom_range(1, 0); t = $urandom_range(1, 0);
      foreach (m[i]) m[i] = $urandom_range(6, 0) - 3;
      ch4 = '{sgn: 1'(s), rel: 1'(t)};
      foreach (c4[i]) c4[i] = msg_t'(m[i]);
      #1;
      for (int e = 0; e < 4; e++) begin
        int a, r;
        a = 0;
        for (int k = 0; k < 4; k++) if (k != e) a = a * 7 + ((s ? m[k] : -m[k]) + 3);
        r = int'(t4[t][a]);
        if (!s) r = -r;
        check(int'(v4[e]) == r, $sformatf("dv4 edge %0d", e));
      end
      check(int'(dec4) == dec_ref(s, t, m[0] + m[1] + m[2] + m[3]), "dv4 decision");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
