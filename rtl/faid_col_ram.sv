// faid_col_ram: memory one column block wide.
//
// DEPTH words of W bits, one word per column block of the code: the decoder
// uses it for the channel values (2 bits per variable), for the signs of
// the last variable-to-check messages (DV bits per variable) and for the
// hard decisions (1 bit per variable). One synchronous write port and one
// asynchronous read port; reading the address being written returns the
// old word. There is no reset: the decoder never reads a word it has not
// written (the sign word of the first pass is read but multiplies only
// zero-magnitude messages). Organisation and port style are this design's.
module faid_col_ram #(
  parameter int DEPTH = 64,
  parameter int W     = 140,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
