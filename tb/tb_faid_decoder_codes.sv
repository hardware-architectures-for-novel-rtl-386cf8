// tb_faid_decoder_codes: runs the decoder on the two other code sizes the
// design targets, each with circulants of 140: rate 0.91 (6 row blocks, 66
// column blocks, 9240 bits) with random codewords, and rate 0.883 (16 row
// blocks, 136 column blocks, 19040 bits) with the all-zero codeword. Each
// size gets a clean frame, frames with flipped bits (hard and soft) and a
// frame with too many errors; all are compared with the reference model.
// A third instance runs the rate-0.94 code with two column blocks per
// cycle (P=2): same decisions and iteration counts as the reference, half
// the cycles per iteration.
module tb_faid_decoder_codes;

  int  c0, f0, c1, f1, c2, f2;
  bit  d0, d1, d2;
  int  cycles = 0;

  faid_decoder_env #(.L(140), .NB(66),  .MB(6),  .NFRAMES(5), .MANYFLIP(500),  .RAND_CW(1'b1)) u_r091  (.checks(c0), .failures(f0), .fin(d0));
  faid_decoder_env #(.L(140), .NB(136), .MB(16), .NFRAMES(4), .MANYFLIP(1200), .RAND_CW(1'b0)) u_r0883 (.checks(c1), .failures(f1), .fin(d1));
  faid_decoder_env #(.L(140), .NB(64),  .MB(4),  .P(2), .NFRAMES(5), .MANYFLIP(400), .RAND_CW(1'b1)) u_r094_p2 (.checks(c2), .failures(f2), .fin(d2));

  initial begin
    #20000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1 && d2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end

endmodule
