// l_memory: the central memory of a-posteriori LLRs (L messages).
//
// One word holds the z L messages of one block column, so a single access
// feeds all z SISO lanes at once. The radix-4 datapath consumes two block
// columns per cycle, so the memory has two read and two write ports.
// Reads are synchronous (data one cycle after the address, as from an SRAM);
// writes take effect at the clock edge and carry a per-lane write mask, so
// the lanes of an unused part of the datapath (z < Z_MAX) are never written.
// Word organisation follows the source design; the port count and the lane
// mask are this design's choices. If both ports write the same word in one
// cycle, port 1 wins (the schedule never does this).
module l_memory
  import ldpc_pkg::*;
#(
  parameter int unsigned DEPTH = KB,
  parameter int unsigned ZM    = Z_MAX,
  parameter int unsigned DW    = WL
) (
  input  logic                        clk,
  input  logic [1:0]                  re,
  input  logic [1:0][CW-1:0]          raddr,
  output logic [1:0][ZM-1:0][DW-1:0]  rdata,
  input  logic [1:0]                  we,
  input  logic [1:0][CW-1:0]          waddr,
  input  logic [1:0][ZM-1:0][DW-1:0]  wdata,
  input  logic [ZM-1:0]               wmask
);
  logic [ZM-1:0][DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      if (we[p])
        for (int i = 0; i < ZM; i++)
          if (wmask[i]) mem[waddr[p]][i] <= wdata[p][i];
      if (re[p]) rdata[p] <= mem[raddr[p]];
    end
  end
endmodule
