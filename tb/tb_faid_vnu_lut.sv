// tb_faid_vnu_lut: checks the map table storage.
//
// After reset a column-weight-three instance must hold the printed map in
// both tables and a column-weight-four instance the saturated sum of its
// inputs minus one. Random writes to either table must then be read back,
// with all other entries unchanged.
module tb_faid_vnu_lut;
  import faid_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        we3 = 0, sel3 = 0, we4 = 0, sel4 = 0;
  logic [5:0]  a3 = '0;
  logic [8:0]  a4 = '0;
  msg_t        d3 = '0, d4 = '0;
  msg_t        t3 [2][49];
  msg_t        t4 [2][343];
  msg_t        s4 [2][343];

  faid_vnu_lut #(.DV(3)) u3 (.clk, .rst_n, .we(we3), .sel(sel3), .addr(a3), .wdata(d3), .tbl(t3));
  faid_vnu_lut #(.DV(4)) u4 (.clk, .rst_n, .we(we4), .sel(sel4), .addr(a4), .wdata(d4), .tbl(t4));

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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 2; t++) begin
      for (int a = 0; a < 7; a++)
        for (int b = 0; b < 7; b++)
          check(t3[t][a * 7 + b] == FAID_DV3_MAP[a][b], "dv3 reset map");
      for (int a = 0; a < 343; a++) begin
        int s;
        s = (a / 49) + (a / 7 % 7) + (a % 7) - 9 - 1;
        s = (s > 3) ? 3 : (s < -3) ? -3 : s;
        s4[t][a] = msg_t'(s);
        check(int'(t4[t][a]) == s, "dv4 reset map");
      end
    end
    // corner entries worked by hand: (-3,-3,-3) -> -3, (3,3,3) -> 3, (0,0,0) -> -1
    check(t4[0][0] == -3 && t4[0][342] == 3 && t4[0][171] == -1, "dv4 corner entries");
    // table 0 for dv=3, inputs (0,0) -> -1 and (3,-3) -> -1
    check(t3[0][24] == -1 && t3[0][42] == -1, "dv3 printed entries");
    repeat (500) begin
      @(negedge clk);
      we4 = 1; sel4 = 1'($urandom_range(1, 0)); a4 = 9'($urandom_range(342, 0));
      d4 = msg_t'($urandom_range(6, 0) - 3);
      @(negedge clk);
      we4 = 0;
      s4[sel4][a4] = d4;
      check(t4[sel4][a4] == d4, "dv4 write");
    end
    begin
      bit ok;
      ok = 1;
      foreach (s4[t, a]) if (t4[t][a] != s4[t][a]) ok = 0;
      check(ok, "dv4 whole table after writes");
    end
    @(negedge clk); we3 = 1; sel3 = 1; a3 = 6'd24; d3 = 3;
    @(negedge clk); we3 = 0;
    check(t3[1][24] == 3 && t3[0][24] == -1, "dv3 write to table 1 only");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
