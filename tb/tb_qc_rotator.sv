// tb_qc_rotator: checks the circulant shifter for every shift of a
// 140-lane and a 7-lane instance with random data, and that rotating by s
// then by L-s restores the input.
module tb_qc_rotator;

  localparam int LA = 140;
  localparam int LB = 7;

  logic [7:0]           sa, sa_back;
  logic [LA-1:0][2:0]   da, qa, ra;
  logic [2:0]           sb;
  logic [LB-1:0][12:0]  db, qb;

  qc_rotator #(.L(LA), .W(3))  ua  (.shift(sa), .din(da), .dout(qa));
  qc_rotator #(.L(LA), .W(3))  uab (.shift(sa_back), .din(qa), .dout(ra));
  qc_rotator #(.L(LB), .W(13)) ub  (.shift(sb), .din(db), .dout(qb));

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < LA; s++) begin
      bit ok;
      for (int k = 0; k < LA; k++) da[k] = 3'($urandom);
      sa = 8'(s);
      sa_back = 8'((LA - s) % LA);
      #1;
      ok = 1;
      for (int k = 0; k < LA; k++) if (qa[k] != da[(k + s) % LA]) ok = 0;
      checks++; if (!ok) begin failures++; $display("FAIL: L=140 shift %0d", s); end
      checks++; if (ra != da) begin failures++; $display("FAIL: round trip shift %0d", s); end
    end
    for (int s = 0; s < LB; s++) begin
      bit ok;
      for (int k = 0; k < LB; k++) db[k] = 13'($urandom);
      sb = 3'(s);
      #1;
      ok = 1;
      for (int k = 0; k < LB; k++) if (qb[k] != db[(k + s) % LB]) ok = 0;
      checks++; if (!ok) begin failures++; $display("FAIL: L=7 shift %0d", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
