// tb_faid_check_bank: checks the check node bank at L=5, MB=6, DV=4.
//
// Passes of NB=5 column blocks are folded with random row-block choices,
// messages and decisions. A shadow model keeps, per check, the full list of
// messages of the pass; after each pass the P states read back through
// p_out are compared with the sign product, the two smallest magnitudes and
// the index of the smallest (where the two smallest differ), and
// syn_zero_next at the last block with the parity of the decisions, also
// for passes whose decisions are non-zero but cancel in every check. Also
// checked: clear gives all-zero states and untouched checks keep the empty
// state.
module tb_faid_check_bank;
  import faid_pkg::*;

  localparam int L = 5, MB = 6, DV = 4, NB = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             clear = 0, fold = 0, last = 0;
  logic [IDX_W-1:0] col [DV];
  logic [2:0]       rb [DV];
  msg_t             msg [DV][L];
  logic [L-1:0]     dec [DV];
  cstate_t          p_out [DV][L];
  logic             syn_zero_next;

  faid_check_bank #(.L(L), .MB(MB), .DV(DV)) dut (.*);

  int checks = 0, failures = 0, n_syn_zero = 0, n_syn_one = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mags [MB][L][$];
  int cols [MB][L][$];
  bit sgns [MB][L];
  bit par  [MB][L];

  task automatic read_state(int r, int i, output cstate_t s);
    @(negedge clk);
    fold = 0;
    rb[0] = 3'(r);
    #1;
    s = p_out[0][i];
  endtask

  initial begin
    foreach (rb[e]) rb[e] = 3'(e);
    foreach (col[e]) col[e] = '0;
    foreach (msg[e, i]) msg[e][i] = '0;
    foreach (dec[e]) dec[e] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int r = 0; r < DV; r++) begin
      cstate_t s;
      read_state(r, 0, s);
      check(s == CS_ZERO, "state after clear is zero");
    end
    for (int pass = 0; pass < 30; pass++) begin
      foreach (mags[r, i]) begin mags[r][i].delete(); cols[r][i].delete(); sgns[r][i] = 0; par[r][i] = 0; end
      for (int j = 0; j < NB; j++) begin
        int perm [MB];
        bit exp_syn;
        @(negedge clk);
        for (int r = 0; r < MB; r++) perm[r] = r;
        for (int r = MB - 1; r > 0; r--) begin
          int q, t;
          q = $urandom_range(r, 0); t = perm[r]; perm[r] = perm[q]; perm[q] = t;
        end
        // every third pass: fixed row blocks and an even number of ones per
        // check, so the syndrome is zero although decisions are not
        if (pass % 3 == 1) for (int r = 0; r < MB; r++) perm[r] = r;
        fold = 1; last = (j == NB - 1);
        foreach (col[e]) col[e] = IDX_W'(j);
        for (int e = 0; e < DV; e++) begin
          rb[e] = 3'(perm[e]);
          // sparse decisions so that some passes have a zero syndrome
          dec[e] = (pass % 3 == 0) ? '0 : (pass % 3 == 1) ? ((j < NB - 1) ? '1 : '0) : L'($urandom);
          for (int i = 0; i < L; i++) begin
            int v;
            v = $urandom_range(6, 0) - 3;
            msg[e][i] = msg_t'(v);
            mags[perm[e]][i].push_back(v < 0 ? -v : v);
            cols[perm[e]][i].push_back(j);
            sgns[perm[e]][i] ^= (v < 0);
            par[perm[e]][i] ^= dec[e][i];
          end
        end
        if (j == NB - 1) begin
          #1;
          exp_syn = 1;
          foreach (par[r, i]) if (par[r][i]) exp_syn = 0;
          check(syn_zero_next == exp_syn, "syndrome at end of pass");
          if (exp_syn) n_syn_zero++; else n_syn_one++;
        end
      end
      @(negedge clk); fold = 0; last = 0;
      for (int r = 0; r < MB; r++)
        for (int i = 0; i < L; i++) begin
          cstate_t s;
          int m1, m2, ix;
          read_state(r, i, s);
          if (mags[r][i].size() == 0) begin
            check(s == CS_EMPTY, "untouched check stays empty");
            continue;
          end
          m1 = 3; m2 = 3; ix = -1;
          foreach (mags[r][i][q]) begin
            if (mags[r][i][q] < m1) begin m2 = m1; m1 = mags[r][i][q]; ix = cols[r][i][q]; end
            else if (mags[r][i][q] < m2) m2 = mags[r][i][q];
          end
          check(int'(s.min1) == m1 && int'(s.min2) == m2 && s.sgn == sgns[r][i],
                $sformatf("pass %0d check %0d,%0d min1 %0d/%0d min2 %0d/%0d", pass, r, i, s.min1, m1, s.min2, m2));
          if (m1 < m2) check(int'(s.idx) == ix, "index of min1");
        end
    end
    check(n_syn_zero > 0 && n_syn_one > 0, "both syndrome outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
