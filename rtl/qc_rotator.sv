// qc_rotator: cyclic shift of the L lanes of one circulant.
//
// out[k] = in[(k + shift) mod L] for every lane k. With a circulant whose
// row i has its one in column (i + s) mod L, rotating variable-ordered data
// by s gives it in check order, and rotating check-ordered data by
// (L - s) mod L gives it in variable order. Lanes are W bits wide. The
// document gives only the circulant size; the shifter is a plain
// multiplexer per lane.
//
// Purely combinational; shift must be below L.
module qc_rotator #(
  parameter int L  = 140,
  parameter int W  = 3,
  parameter int SW = $clog2(L)
) (
  input  logic [SW-1:0]      shift,
  input  logic [L-1:0][W-1:0] din,
  output logic [L-1:0][W-1:0] dout
);

  always_comb begin
    for (int k = 0; k < L; k++) begin
      int src;
      src = k + int'(shift);
      if (src >= L) src -= L;
      dout[k] = din[src];
    end
  end

endmodule
