// early_term: early-termination test that stops the iterations once the
// decoder has settled.
//
// Decoding may stop when both hold:
//   1) the hard decisions of the information bits did not change between two
//      successive iterations, and
//   2) the smallest |L| over the information bits exceeds a threshold.
// The unit watches the L-memory write ports. For every block column it keeps
// the hard decisions (sign bits) and the smallest magnitude of the latest
// write (lanes >= z ignored). `snap` copies the current hard decisions into the
// previous-iteration copy; the controller pulses it at the start of decoding
// (so the channel decisions are "iteration 0") and at every iteration end,
// sampling `converged` in the same cycle. Information bits are the first
// `kinfo` block columns (systematic codes). `converged` is combinational.
// The two criteria follow the source design; the bookkeeping per block column
// and the snapshot timing are this design's choices.
module early_term
  import ldpc_pkg::*;
#(
  parameter int unsigned ZM = Z_MAX,
  parameter int unsigned NC = KB
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [ZW-1:0]              z,
  input  logic [CW:0]                kinfo,
  input  amag_t                      thr,
  input  logic [1:0]                 upd_we,
  input  logic [1:0][CW-1:0]         upd_col,
  input  logic [1:0][ZM-1:0][WL-1:0] upd_data,
  input  logic                       snap,
  output logic                       converged,
  output amag_t                      min_mag
);
  logic [ZM-1:0] hd_cur  [NC];
  logic [ZM-1:0] hd_prev [NC];
  amag_t         mmag    [NC];

  logic [1:0][ZM-1:0] hd_new;
  amag_t [1:0]        mm_new;

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      mm_new[p] = amag_t'(APP_MAX);
      for (int i = 0; i < ZM; i++) begin
        hd_new[p][i] = (i < int'(z)) ? upd_data[p][i][WL-1] : 1'b0;
        if (i < int'(z) && amag_of(app_t'(upd_data[p][i])) < mm_new[p])
          mm_new[p] = amag_of(app_t'(upd_data[p][i]));
      end
    end
  end

  logic same;
  always_comb begin
    same    = 1'b1;
    min_mag = amag_t'(APP_MAX);
    for (int c = 0; c < NC; c++) begin
      if (c < int'(kinfo)) begin
        if (hd_cur[c] != hd_prev[c]) same = 1'b0;
        if (mmag[c] < min_mag) min_mag = mmag[c];
      end
    end
    converged = same && (min_mag > thr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NC; c++) begin
        hd_cur[c]  <= '0;
        hd_prev[c] <= '0;
        mmag[c]    <= '0;
      end
    end else begin
      for (int p = 0; p < 2; p++)
        if (upd_we[p]) begin
          hd_cur[upd_col[p]] <= hd_new[p];
          mmag[upd_col[p]]   <= mm_new[p];
        end
      if (snap)
        for (int c = 0; c < NC; c++) hd_prev[c] <= hd_cur[c];
    end
  end
endmodule
