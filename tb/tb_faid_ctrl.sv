// tb_faid_ctrl: checks the controller at NB=6, MAX_ITER=4.
//
// For frames whose syndrome becomes zero at pass 0, 1, 3, or never, it
// checks the clear pulse, the column sequence and last flag of every
// pass, that done comes NB*(passes) cycles after the edge that samples
// start, and the reported success and iteration count.
module tb_faid_ctrl;

  localparam int NB = 6, MAX_ITER = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start = 0, syn_zero_next = 0;
  logic       clear, fold, last, busy, done, success;
  logic [2:0] col;
  logic [2:0] iterations;

  faid_ctrl #(.NB(NB), .MAX_ITER(MAX_ITER)) dut (.*);

  int checks = 0, failures = 0;

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

  task automatic frame(int zero_at);
    int cyc, pass, exp_passes;
    exp_passes = (zero_at < 0 || zero_at > MAX_ITER) ? MAX_ITER + 1 : zero_at + 1;
    @(negedge clk);
    check(!busy && !fold, "idle before start");
    start = 1; #1;
    check(clear, "clear with start");
    @(negedge clk); start = 0;
    cyc = 0; pass = 0;
    while (!done) begin
      check(fold && busy && int'(col) == cyc % NB, $sformatf("column %0d at cycle %0d", col, cyc));
      check(last == (cyc % NB == NB - 1), "last flag");
      syn_zero_next = last && (pass == zero_at);
      @(negedge clk);
      if (cyc % NB == NB - 1) pass++;
      cyc++;
      syn_zero_next = 0;
      if (cyc > NB * (MAX_ITER + 3)) break;
    end
    check(done, "done pulse");
    check(cyc == NB * exp_passes, $sformatf("latency %0d cycles, expected %0d", cyc, NB * exp_passes));
    check(success == (zero_at >= 0 && zero_at <= MAX_ITER), "success flag");
    check(int'(iterations) == exp_passes - 1, "iteration count");
    @(negedge clk);
    check(!done && !busy, "done is one cycle");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    frame(0);
    frame(1);
    frame(3);
    frame(-1);
    frame(MAX_ITER);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
