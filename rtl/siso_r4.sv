// siso_r4: one radix-4 soft-input soft-output (SISO) check-node decoder lane.
//
// Each lane decodes one check row of the current layer; z lanes run in
// lock-step, one per row of a z x z sub-matrix. Two messages enter per clock.
//
// Forward (f) phase, one pair per cycle:
//   lam_i = L_i - Lambda_i                    (old extrinsic removed)
//   ab    = f(lam0, lam1)                     (look-ahead term, not in the loop)
//   S     = first ? ab : f(S, ab)             (the f recursion, once per cycle)
// Because boxplus is associative, f(f(S,a),b) = f(S,f(a,b)), which lets the
// loop absorb two messages per cycle (the one-level look-ahead transform).
// f() and g() see lam saturated to W bits (and 0 taken as +1 LSB); the FIFO
// keeps the full-precision lam, so that L_new = lam + Lambda_new does not lose
// the part of the evidence that the saturation cut off. When the last pair of the row arrives, the
// completed sum S_m and the row's pair count move to a small queue (NQ rows).
//
// Backward (g) phase, one pair per cycle, overlapped with the f phase of the
// next layer:
//   Lambda_new_i = g(S_m, lam_i),  L_new_i = lam_i + Lambda_new_i
//
// Interface: in_valid/in_ready handshake; in_first/in_last mark the first and
// last pair of a row; in_v1 = 0 means the second slot is empty (odd row degree)
// and it is then left out of the sum. Outputs are registered and come in input
// order, out_last marking the row's last pair. `en` = 0 freezes the lane (an
// unused lane when z < Z_MAX). Latency from the last input pair of a row to the
// first output pair is 2 cycles; throughput is one pair per cycle.
//
// The f/g split, the look-ahead and the overlap of two layers follow the
// source design. The FIFO, the NQ-entry sum queue and the handshake are this
// design's own way of realising them.
module siso_r4
  import ldpc_pkg::*;
#(
  parameter int unsigned NQ         = 3,          // rows held (1 in g phase, rest waiting)
  parameter int unsigned FIFO_DEPTH = NQ * PMAX
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  // input pair
  input  logic in_valid,
  output logic in_ready,
  input  logic in_first,
  input  logic in_last,
  input  logic in_v1,
  input  app_t in_l0,
  input  app_t in_l1,
  input  llr_t in_m0,
  input  llr_t in_m1,
  // output pair
  output logic out_valid,
  output logic out_last,
  output logic out_v1,
  output llr_t out_m0,
  output llr_t out_m1,
  output app_t out_l0,
  output app_t out_l1
);
  localparam int unsigned FAW = $clog2(FIFO_DEPTH);
  localparam int unsigned NW  = $clog2(PMAX + 1);

  // full-precision lambda (L - Lambda needs one bit more than L)
  typedef logic signed [WL:0] lamw_t;

  typedef struct packed {
    lamw_t lam0;
    lamw_t lam1;
    logic  v1;
  } fent_t;

  // message seen by f() and g(): saturated to W bits, exactly zero taken as
  // +1 LSB so that g(S, lam) can always recover a non-zero extrinsic value
  function automatic llr_t to_msg(input lamw_t v);
    llr_t m;
    m = sat(v);
    return (m == '0) ? llr_t'(1) : m;
  endfunction

  // ---------------- forward phase ----------------
  lamw_t lw0, lw1;
  llr_t  lam0, lam1, ab_pair, ab, s_acc, s_next, s_rec;
  logic [NW-1:0] row_cnt, cnt_now;

  always_comb begin
    lw0  = $signed({in_l0[WL-1], in_l0}) - $signed({{2{in_m0[W-1]}}, in_m0});
    lw1  = $signed({in_l1[WL-1], in_l1}) - $signed({{2{in_m1[W-1]}}, in_m1});
    lam0 = to_msg(lw0);
    lam1 = to_msg(lw1);
  end

  boxplus_f u_f_la  (.a(lam0),  .b(lam1), .y(ab_pair));   // look-ahead unit
  assign ab = in_v1 ? ab_pair : lam0;
  boxplus_f u_f_rec (.a(s_acc), .b(ab),   .y(s_rec));     // recursion unit
  assign s_next  = in_first ? ab : s_rec;
  assign cnt_now = in_first ? NW'(1) : row_cnt + 1'b1;

  // ---------------- lambda FIFO ----------------
  fent_t fifo [FIFO_DEPTH];
  logic [FAW-1:0] wp, rp;
  logic [FAW:0]   fcnt;

  // ---------------- sum queue (NQ entries) ----------------
  localparam int unsigned QW = $clog2(NQ + 1);
  localparam int unsigned QA = $clog2(NQ);
  llr_t          sq_s [NQ];
  logic [NW-1:0] sq_n [NQ];
  logic [QA-1:0] sq_h, sq_t;    // head and tail index
  logic [QW-1:0] sq_cnt;
  logic [NW-1:0] g_cnt;

  logic acc, push_s, g_go, g_end;
  llr_t g_s;
  fent_t g_e;
  llr_t gm0, gm1;

  assign in_ready = (sq_cnt < QW'(NQ)) && (fcnt < (FAW+1)'(FIFO_DEPTH));
  assign acc      = en && in_valid && in_ready;
  assign push_s   = acc && in_last;
  assign g_go     = en && (sq_cnt != '0);
  assign g_s      = sq_s[sq_h];
  assign g_e      = fifo[rp];
  assign g_end    = g_go && (g_cnt == sq_n[sq_h] - 1'b1);

  boxminus_g u_g0 (.a(g_s), .b(to_msg(g_e.lam0)), .y(gm0));
  boxminus_g u_g1 (.a(g_s), .b(to_msg(g_e.lam1)), .y(gm1));

  always_ff @(posedge clk) begin
    if (acc) fifo[wp] <= '{lam0: lw0, lam1: lw1, v1: in_v1};
    if (push_s) begin
      sq_s[sq_t] <= s_next;
      sq_n[sq_t] <= cnt_now;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_acc     <= '0;
      row_cnt   <= '0;
      wp        <= '0;
      rp        <= '0;
      fcnt      <= '0;
      sq_h      <= '0;
      sq_t      <= '0;
      sq_cnt    <= '0;
      g_cnt     <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_v1    <= 1'b0;
      out_m0    <= '0;
      out_m1    <= '0;
      out_l0    <= '0;
      out_l1    <= '0;
    end else if (en) begin
      // forward phase
      if (acc) begin
        s_acc   <= s_next;
        row_cnt <= cnt_now;
        wp      <= (wp == FAW'(FIFO_DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      // backward phase
      out_valid <= g_go;
      if (g_go) begin
        out_last <= g_end;
        out_v1   <= g_e.v1;
        out_m0   <= gm0;
        out_m1   <= gm1;
        out_l0   <= sat_app($signed({g_e.lam0[WL], g_e.lam0}) + $signed({{3{gm0[W-1]}}, gm0}));
        out_l1   <= sat_app($signed({g_e.lam1[WL], g_e.lam1}) + $signed({{3{gm1[W-1]}}, gm1}));
        rp       <= (rp == FAW'(FIFO_DEPTH - 1)) ? '0 : rp + 1'b1;
        g_cnt    <= g_end ? '0 : g_cnt + 1'b1;
        if (g_end) sq_h <= (sq_h == QA'(NQ - 1)) ? '0 : sq_h + 1'b1;
      end
      fcnt   <= fcnt + (FAW+1)'(acc) - (FAW+1)'(g_go);
      if (push_s) sq_t <= (sq_t == QA'(NQ - 1)) ? '0 : sq_t + 1'b1;
      sq_cnt <= sq_cnt + QW'(push_s) - QW'(g_end);
    end
  end

  // a row never holds more pairs than the queue can count
  assert property (@(posedge clk) disable iff (!rst_n) acc |-> cnt_now <= NW'(PMAX));
endmodule
