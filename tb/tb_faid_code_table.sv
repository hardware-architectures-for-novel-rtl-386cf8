// tb_faid_code_table: checks the base-matrix table at L=140, NB=64, MB=4,
// DV=4: placeholder contents after reset, then random writes read back one
// column block at a time against a shadow copy.
module tb_faid_code_table;

  localparam int L = 140, NB = 64, MB = 4, DV = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       we = 0;
  logic [7:0] waddr = '0;
  logic [1:0] wrb = '0;
  logic [7:0] wsh = '0;
  logic [5:0] col = '0;
  logic [1:0] rb [DV];
  logic [7:0] sh [DV];
  int         srb [NB][DV], ssh [NB][DV];

  faid_code_table #(.L(L), .NB(NB), .MB(MB), .DV(DV)) dut (.*);

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

  task automatic compare_all(string what);
    for (int j = 0; j < NB; j++) begin
      @(negedge clk); col = 6'(j); #1;
      for (int e = 0; e < DV; e++)
        check(int'(rb[e]) == srb[j][e] && int'(sh[e]) == ssh[j][e], $sformatf("%s col %0d slot %0d", what, j, e));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < NB; j++)
      for (int e = 0; e < DV; e++) begin srb[j][e] = (j + e) % MB; ssh[j][e] = (e * j) % L; end
    compare_all("reset");
    repeat (300) begin
      int j, e;
      @(negedge clk);
      j = $urandom_range(NB - 1, 0); e = $urandom_range(DV - 1, 0);
      we = 1; waddr = 8'(j * DV + e); wrb = 2'($urandom_range(MB - 1, 0)); wsh = 8'($urandom_range(L - 1, 0));
      srb[j][e] = int'(wrb); ssh[j][e] = int'(wsh);
    end
    @(negedge clk); we = 0;
    compare_all("after writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
