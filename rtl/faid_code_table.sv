// faid_code_table: base matrix of the quasi-cyclic code.
//
// The parity-check matrix is an MB x NB array of L x L circulants; every
// column block holds DV circulant permutation matrices. For each column
// block j and slot e (0..DV-1) the table stores the row block rb and the
// shift s of that circulant: row i of the circulant has its one in column
// (i + s) mod L. Written through one synchronous port at address j*DV+e,
// read combinationally NPC whole column blocks at a time: outputs
// rb[p*DV+e], sh[p*DV+e] belong to column block col+p.
//
// The document gives the code dimensions but no base matrix, so after reset
// the table holds a placeholder of this design's choosing, rb = (j+e) mod MB
// and s = (e*j) mod L; the code in use is meant to be loaded.
module faid_code_table #(
  parameter int L   = 140,
  parameter int NB  = 64,
  parameter int MB  = 4,
  parameter int DV  = 4,
  parameter int NPC = 1,
  parameter int CW  = (NB > 1) ? $clog2(NB) : 1,
  parameter int AW  = $clog2(NB * DV),
  parameter int RBW = (MB > 1) ? $clog2(MB) : 1,
  parameter int SW  = $clog2(L)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           we,
  input  logic [AW-1:0]  waddr,
  input  logic [RBW-1:0] wrb,
  input  logic [SW-1:0]  wsh,
  input  logic [CW-1:0]  col,
  output logic [RBW-1:0] rb [DV*NPC],
  output logic [SW-1:0]  sh [DV*NPC]
);

  logic [RBW-1:0] rb_mem [NB*DV];
  logic [SW-1:0]  sh_mem [NB*DV];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NB; j++)
        for (int e = 0; e < DV; e++) begin
          rb_mem[j*DV+e] <= RBW'((j + e) % MB);
          sh_mem[j*DV+e] <= SW'((e * j) % L);
        end
    end else if (we && int'(waddr) < NB * DV) begin
      rb_mem[waddr] <= wrb;
      sh_mem[waddr] <= wsh;
    end
  end

  always_comb begin
    for (int p = 0; p < NPC; p++)
      for (int e = 0; e < DV; e++) begin
        int a;
        a = (int'(col) + p) * DV + e;
        if (a >= NB * DV) a = 0;
        rb[p*DV+e] = rb_mem[a];
        sh[p*DV+e] = sh_mem[a];
      end
  end

  property p_table_entry_valid;
    @(posedge clk) disable iff (!rst_n) we |-> (int'(wrb) < MB && int'(wsh) < L);
  endproperty
  a_table_entry_valid: assert property (p_table_entry_valid);

endmodule
