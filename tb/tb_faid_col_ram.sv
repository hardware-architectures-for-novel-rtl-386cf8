// tb_faid_col_ram: random writes and reads against a shadow array,
// including read-during-write of the same address (old data expected).
module tb_faid_col_ram;

  localparam int DEPTH = 64;
  localparam int W     = 280;

  logic clk = 0;
  always #5 clk = ~clk;

  logic          we = 0;
  logic [5:0]    waddr = '0, raddr = '0;
  logic [W-1:0]  wdata = '0, rdata;
  logic [W-1:0]  shadow [DEPTH];
  bit            valid [DEPTH];

  faid_col_ram #(.DEPTH(DEPTH), .W(W)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (valid[i]) valid[i] = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'(i);
      for (int b = 0; b < W; b += 32) wdata[b +: 32] = $urandom;
      shadow[i] = wdata; valid[i] = 1;
    end
    repeat (2000) begin
      @(negedge clk);
      we = 1'($urandom_range(1, 0));
      waddr = 6'($urandom_range(DEPTH - 1, 0));
      raddr = ($urandom_range(3, 0) == 0) ? waddr : 6'($urandom_range(DEPTH - 1, 0));
      for (int b = 0; b < W; b += 32) wdata[b +: 32] = $urandom;
      #1;
      checks++;
      if (rdata != shadow[raddr]) begin failures++; $display("FAIL: read %0d", raddr); end
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
    end
    @(negedge clk); we = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
