// tb_faid_decoder: end-to-end test of the FAID decoder at a reduced size.
//
// Builds a random quasi-cyclic code (random shifts, DV circulants per column
// block in distinct row blocks), loads it and a soft map table through the
// configuration ports, draws random codewords from the null space of H by
// Gaussian elimination over GF(2), flips bits, and decodes frames with hard
// and with 2-bit soft channel values. Every frame is also decoded by the
// edge-list reference model; decisions, success flag and iteration count
// must match, and the decoding time must be NB*(iterations+1) cycles from
// the clock edge that samples start.
// It counts how often each mechanism happened: stop on a clean channel word,
// stop after iterations, failure at the iteration limit, soft-decision
// frames, code and map loading; each must occur at least once.
module tb_faid_decoder;
  import faid_pkg::*;
  import faid_ref_pkg::*;

  localparam int L        = 13;
  localparam int NB       = 12;
  localparam int MB       = 4;
  localparam int DV       = 4;
  localparam int MAX_ITER = 20;
  localparam int N        = NB * L;
  localparam int M        = MB * L;
  localparam int DEPTH    = 7 ** (DV - 1);
  localparam int NFRAMES  = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                          lut_we = 0, lut_sel = 0;
  logic [$clog2(DEPTH)-1:0]      lut_addr = '0;
  msg_t                          lut_wdata = '0;
  logic                          code_we = 0;
  logic [$clog2(NB*DV)-1:0]      code_addr = '0;
  logic [$clog2(MB)-1:0]         code_rb = '0;
  logic [$clog2(L)-1:0]          code_sh = '0;
  logic                          ch_we = 0;
  logic [$clog2(NB)-1:0]         ch_col = '0;
  chan_t [L-1:0]                 ch_wdata = '0;
  logic                          start = 0;
  logic                          busy, done, success;
  logic [$clog2(MAX_ITER+1)-1:0] iterations;
  logic [$clog2(NB)-1:0]         dec_col = '0;
  logic [L-1:0]                  dec_data;

  faid_decoder #(.L(L), .NB(NB), .MB(MB), .DV(DV), .MAX_ITER(MAX_ITER)) dut (.*);

  int checks = 0, failures = 0;
  int n_clean = 0, n_iter_stop = 0, n_fail = 0, n_soft = 0, n_code_load = 0, n_lut_load = 0;
  int n_to_codeword = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  faid_ref ref_m;
  bit [N-1:0] hrow [M];
  bit [N-1:0] cw;

  function automatic int sat3(int v);
    return (v > 3) ? 3 : (v < -3) ? -3 : v;
  endfunction

  // map table value for a negative channel value: saturated sum - bias
  function automatic int map_entry(int a, int bias);
    int s, r;
    s = -bias; r = a;
    for (int i = 0; i < DV - 1; i++) begin s += (r % 7) - 3; r /= 7; end
    return sat3(s);
  endfunction

  task automatic make_code();
    for (int j = 0; j < NB; j++) begin
      int perm [MB];
      for (int r = 0; r < MB; r++) perm[r] = r;
      for (int r = MB - 1; r > 0; r--) begin
        int q, t;
        q = $urandom_range(r, 0);
        t = perm[r]; perm[r] = perm[q]; perm[q] = t;
      end
      for (int e = 0; e < DV; e++) begin
        ref_m.rb[j][e] = perm[e];
        ref_m.sh[j][e] = $urandom_range(L - 1, 0);
      end
    end
    foreach (hrow[i]) hrow[i] = '0;
    for (int j = 0; j < NB; j++)
      for (int e = 0; e < DV; e++)
        for (int k = 0; k < L; k++)
          hrow[ref_m.chk_of(j, e, k)][j * L + k] = 1'b1;
  endtask

  // random codeword from the null space of H
  task automatic make_codeword();
    bit [N-1:0] a [M];
    int piv [M];
    bit is_piv [N];
    int rank;
    a = hrow;
    rank = 0;
    foreach (is_piv[c]) is_piv[c] = 0;
    for (int c = 0; c < N && rank < M; c++) begin
      int p;
      p = -1;
      for (int r = rank; r < M; r++) if (a[r][c]) begin p = r; break; end
      if (p < 0) continue;
      begin bit [N-1:0] t; t = a[p]; a[p] = a[rank]; a[rank] = t; end
      for (int r = 0; r < M; r++) if (r != rank && a[r][c]) a[r] ^= a[rank];
      piv[rank] = c; is_piv[c] = 1; rank++;
    end
    cw = '0;
    for (int c = 0; c < N; c++) if (!is_piv[c]) cw[c] = 1'($urandom_range(1, 0));
    for (int r = 0; r < rank; r++) begin
      bit s;
      s = 0;
      for (int c = 0; c < N; c++) if (!is_piv[c] && a[r][c]) s ^= cw[c];
      cw[piv[r]] = s;
    end
    for (int r = 0; r < M; r++) check(^(hrow[r] & cw) == 1'b0, "generated word is a codeword");
  endtask

  task automatic load_code();
    for (int j = 0; j < NB; j++)
      for (int e = 0; e < DV; e++) begin
        @(negedge clk);
        code_we = 1; code_addr = ($clog2(NB*DV))'(j * DV + e);
        code_rb = ($clog2(MB))'(ref_m.rb[j][e]); code_sh = ($clog2(L))'(ref_m.sh[j][e]);
      end
    @(negedge clk); code_we = 0;
    n_code_load++;
  endtask

  task automatic load_lut();
    for (int a = 0; a < DEPTH; a++) begin
      ref_m.tbl[0][a] = map_entry(a, 1);
      ref_m.tbl[1][a] = map_entry(a, 2);
    end
    // table 0 keeps its reset contents (same values); table 1 is written
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      lut_we = 1; lut_sel = 1; lut_addr = ($clog2(DEPTH))'(a); lut_wdata = msg_t'(ref_m.tbl[1][a]);
    end
    @(negedge clk); lut_we = 0;
    n_lut_load++;
  endtask

  task automatic run_frame(int nflip, bit soft_in);
    bit flip [N];
    longint t0, t1;
    foreach (flip[v]) flip[v] = 0;
    for (int f = 0; f < nflip; f++) flip[$urandom_range(N - 1, 0)] = 1;
    for (int v = 0; v < N; v++) begin
      ref_m.ch_sgn[v] = cw[v] ^ flip[v];
      ref_m.ch_rel[v] = soft_in ? ((flip[v] ? ($urandom_range(99, 0) < 25) : ($urandom_range(99, 0) < 75))) : 1'b0;
    end
    for (int j = 0; j < NB; j++) begin
      @(negedge clk);
      ch_we = 1; ch_col = ($clog2(NB))'(j);
      for (int k = 0; k < L; k++) begin
        ch_wdata[k].sgn = ref_m.ch_sgn[j * L + k];
        ch_wdata[k].rel = ref_m.ch_rel[j * L + k];
      end
    end
    @(negedge clk); ch_we = 0; start = 1;
    @(posedge clk); t0 = $time;
    @(negedge clk); start = 0;
    @(posedge done); t1 = $time;
    ref_m.run();
    check(success == ref_m.success, $sformatf("success %0d ref %0d", success, ref_m.success));
    check(int'(iterations) == ref_m.iterations, $sformatf("iterations %0d ref %0d", iterations, ref_m.iterations));
    check((t1 - t0) / 10 == NB * (ref_m.iterations + 1),
          $sformatf("latency %0d cycles, expected %0d", (t1 - t0) / 10, NB * (ref_m.iterations + 1)));
    begin
      bit same, is_cw;
      same = 1; is_cw = 1;
      for (int j = 0; j < NB; j++) begin
        @(negedge clk); dec_col = ($clog2(NB))'(j); #1;
        for (int k = 0; k < L; k++) begin
          if (dec_data[k] != ref_m.dec[j * L + k]) same = 0;
          if (dec_data[k] != cw[j * L + k]) is_cw = 0;
        end
      end
      check(same, "decisions match reference");
      if (success && is_cw) n_to_codeword++;
    end
    if (ref_m.success && ref_m.iterations == 0) n_clean++;
    if (ref_m.success && ref_m.iterations > 0) n_iter_stop++;
    if (!ref_m.success) n_fail++;
    if (soft_in) n_soft++;
  endtask

  initial begin
    ref_m = new(L, NB, MB, DV, MAX_ITER, 1, 2);
    repeat (3) @(negedge clk);
    rst_n = 1;
    make_code();
    load_code();
    load_lut();
    for (int f = 0; f < NFRAMES; f++) begin
      int nflip;
      make_codeword();
      nflip = (f % 10 == 0) ? 0 : (f % 10 == 9) ? 40 : 1 + (f % 4);
      run_frame(nflip, f % 3 == 2);
    end
    $display("mechanisms: clean=%0d stopped_after_iterations=%0d iteration_limit=%0d soft=%0d code_load=%0d lut_load=%0d decoded_to_sent=%0d",
             n_clean, n_iter_stop, n_fail, n_soft, n_code_load, n_lut_load, n_to_codeword);
    check(n_clean > 0, "clean channel word stop happened");
    check(n_iter_stop > 0, "stop after iterations happened");
    check(n_fail > 0, "iteration limit reached");
    check(n_soft > 0, "soft-decision frames decoded");
    check(n_code_load > 0 && n_lut_load > 0, "configuration loaded");
    check(n_to_codeword > 0, "some corrupted frame decoded to the sent codeword");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
