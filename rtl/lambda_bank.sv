// lambda_bank: one bank of the distributed extrinsic-message (Lambda) memory.
//
// Every SISO lane owns a bank. One word holds the two Lambda messages of one
// radix-4 pair, addressed by the pair's position in the code table, so a bank
// needs one read and one write port. Reads are synchronous. With en = 0 (a
// lane beyond the current sub-matrix size) the bank neither reads nor writes,
// which is the memory half of the power-saving scheme of the source design.
// Bank-per-lane organisation follows the source design; the pair-wide word is
// this design's choice.
module lambda_bank
  import ldpc_pkg::*;
#(
  parameter int unsigned DEPTH = EP_MAX
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [1:0][W-1:0]        rdata,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [1:0][W-1:0]        wdata
);
  logic [1:0][W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en && we) mem[waddr] <= wdata;
    if (en && re) rdata <= mem[raddr];
  end
endmodule
