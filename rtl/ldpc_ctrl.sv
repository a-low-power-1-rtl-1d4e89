// ldpc_ctrl: controller of the layered decoder; it holds the code description
// and runs the block-serial schedule.
//
// Code table (written by the host while idle):
//   pair table  - the non-zero sub-matrices of H, layer after layer, two per
//                 entry (block column, cyclic shift); an odd row degree leaves
//                 the second slot empty (v1 = 0). Entry index = Lambda address.
//   layer table - number of pair entries of each layer.
// Together with z, the number of layers and the iteration limit this is all
// that changes from one code to another, so any block-structured code of up
// to KB block columns, JB_MAX layers and Z_MAX x Z_MAX sub-matrices can be
// decoded, and the code can be switched between frames.
//
// Schedule: per iteration, the layers in table order; per layer, one pair
// entry per cycle. For every entry it issues the two L-memory reads with the
// rotation r = (shift - stored_rotation) mod z, because a block column stays in
// memory in the rotation of the last layer that wrote it, so only one shifter
// per read port is needed. The read of a layer may begin while the previous
// layer is still in its backward phase (layer overlap); a read waits (`stall`)
// while its block column has a write-back outstanding, which keeps the result
// identical to strictly sequential layered decoding. At most NQ rows may be
// waiting in the SISO lanes. After the last layer of an iteration the next
// iteration follows without a break, the stall rule covering the boundary
// like any other layer change, unless a decision is due: with early
// termination enabled, or at the iteration limit, it waits until all
// write-backs are done, pulses the early-termination snapshot and either
// (from the second iteration on, when the test passes, or at the limit)
// starts the next iteration or reads the hard decisions out, one block
// column per cycle, rotating each back to natural order. The Lambda banks
// need no check of their own: a pair's next read also reads its block
// columns, so it waits for the pair's write-back.
//
// Timing: a read issued in cycle t reaches the SISO lanes (or the hard-decision
// output) in cycle t+2. `done` pulses in the cycle of the last output word.
// The schedule and the write-back dependency stall follow the source design;
// the table format, the rotation bookkeeping, the drain before each
// early-termination test and the output phase are this design's choices.
module ldpc_ctrl
  import ldpc_pkg::*;
#(
  parameter int unsigned NQ = 3,
  parameter int unsigned TD = 64     // write-back tag FIFO depth
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // code configuration
  input  logic                   cfg_pair_we,
  input  logic [PW-1:0]          cfg_pair_addr,
  input  pair_t                  cfg_pair,
  input  logic                   cfg_layer_we,
  input  logic [LW-1:0]          cfg_layer_addr,
  input  logic [$clog2(PMAX+1)-1:0] cfg_layer_np,
  input  logic [ZW-1:0]          z,
  input  logic [LW:0]            nlayers,
  input  logic [3:0]             max_iter,
  input  logic                   et_en,
  // channel LLR load (a word written to column ld_col in natural order)
  input  logic                   ld_we,
  input  logic [CW-1:0]          ld_col,
  // frame control
  input  logic                   start,
  output logic                   busy,
  output logic                   done,
  output logic [3:0]             iters,
  // read issue
  output logic [1:0]             rd_en,
  output logic [1:0][CW-1:0]     rd_col,
  output logic [1:0][ZW-1:0]     rd_r,
  output logic                   iss_valid,
  output logic                   iss_first,
  output logic                   iss_last,
  output logic                   iss_v1,
  output logic [PW-1:0]          iss_p,
  output logic                   iss_iter0,
  output logic                   ob_valid,
  output logic [CW-1:0]          ob_col,
  // write-back
  input  logic                   so_valid,
  input  logic                   so_last,
  output logic [1:0][CW-1:0]     wb_col,
  output logic                   wb_v1,
  output logic [PW-1:0]          wb_p,
  // early termination
  output logic                   et_snap,
  input  logic                   et_converged,
  // status
  output logic                   stall
);
  localparam int unsigned NW = $clog2(PMAX + 1);
  localparam int unsigned TW = $clog2(TD);

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_DRAIN, S_EVAL, S_OUT, S_FIN} state_t;
  state_t state;

  typedef struct packed {
    logic [CW-1:0] col0;
    logic [CW-1:0] col1;
    logic          v1;
    logic [PW-1:0] p;
  } tag_t;

  pair_t         ptab [EP_MAX];
  logic [NW-1:0] ltab [JB_MAX];
  logic [ZW-1:0] off  [KB];
  logic [KB-1:0] pending;

  logic [PW-1:0] p;        // pair pointer
  logic [LW-1:0] l;        // layer
  logic [NW-1:0] q;        // pair within layer
  logic [3:0]    iter;
  logic [CW-1:0] oc;       // output column
  logic          fin_cnt;
  logic [$clog2(NQ+1)-1:0] inflight;

  tag_t          tfifo [TD];
  logic [TW-1:0] twp, trp;
  logic [TW:0]   tcnt;

  pair_t cur;
  logic  first, last, hazard, can_issue, issue;

  function automatic logic [ZW-1:0] rot(input logic [ZW-1:0] s, input logic [ZW-1:0] o,
                                        input logic [ZW-1:0] zz);
    logic signed [ZW+1:0] d;
    d = $signed({2'b00, s}) - $signed({2'b00, o});
    if (d < 0) d = d + $signed({2'b00, zz});
    return ZW'(d);
  endfunction

  always_ff @(posedge clk) begin
    if (cfg_pair_we  && state == S_IDLE) ptab[cfg_pair_addr]  <= cfg_pair;
    if (cfg_layer_we && state == S_IDLE) ltab[cfg_layer_addr] <= cfg_layer_np;
    if (issue) tfifo[twp] <= '{col0: cur.col0, col1: cur.col1, v1: cur.v1, p: p};
  end

  always_comb begin
    cur       = ptab[p];
    first     = (q == '0);
    last      = (q == ltab[l] - 1'b1);
    hazard    = pending[cur.col0] || (cur.v1 && pending[cur.col1]);
    can_issue = (state == S_RUN) && (inflight < ($clog2(NQ+1))'(NQ));
    issue     = can_issue && !hazard;
    stall     = can_issue && hazard;

    rd_en     = '0;
    rd_col    = '0;
    rd_r      = '0;
    ob_valid  = 1'b0;
    ob_col    = oc;
    if (issue) begin
      rd_en     = {cur.v1, 1'b1};
      rd_col[0] = cur.col0;
      rd_col[1] = cur.col1;
      rd_r[0]   = rot(cur.sh0, off[cur.col0], z);
      rd_r[1]   = rot(cur.sh1, off[cur.col1], z);
    end else if (state == S_OUT) begin
      rd_en[0]  = 1'b1;
      rd_col[0] = oc;
      rd_r[0]   = rot('0, off[oc], z);
      ob_valid  = 1'b1;
    end
    iss_valid = issue;
    iss_first = first;
    iss_last  = last;
    iss_v1    = cur.v1;
    iss_p     = p;
    iss_iter0 = (iter == '0);

    wb_col[0] = tfifo[trp].col0;
    wb_col[1] = tfifo[trp].col1;
    wb_v1     = tfifo[trp].v1;
    wb_p      = tfifo[trp].p;

    et_snap   = (state == S_IDLE && start) || (state == S_EVAL);
    busy      = (state != S_IDLE);
    done      = (state == S_FIN) && !fin_cnt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      p        <= '0;
      l        <= '0;
      q        <= '0;
      iter     <= '0;
      iters    <= '0;
      oc       <= '0;
      fin_cnt  <= 1'b0;
      inflight <= '0;
      pending  <= '0;
      twp      <= '0;
      trp      <= '0;
      tcnt     <= '0;
      for (int c = 0; c < KB; c++) off[c] <= '0;
    end else begin
      // rotation bookkeeping and write-back scoreboard
      if (ld_we && state == S_IDLE) off[ld_col] <= '0;
      if (so_valid) begin
        pending[wb_col[0]] <= 1'b0;
        if (wb_v1) pending[wb_col[1]] <= 1'b0;
      end
      if (issue) begin
        off[cur.col0]     <= cur.sh0;
        pending[cur.col0] <= 1'b1;
        if (cur.v1) begin
          off[cur.col1]     <= cur.sh1;
          pending[cur.col1] <= 1'b1;
        end
      end
      // tag FIFO
      if (issue)    twp <= (twp == TW'(TD - 1)) ? '0 : twp + 1'b1;
      if (so_valid) trp <= (trp == TW'(TD - 1)) ? '0 : trp + 1'b1;
      tcnt     <= tcnt + (TW+1)'(issue) - (TW+1)'(so_valid);
      inflight <= inflight + ($clog2(NQ+1))'(issue && last) - ($clog2(NQ+1))'(so_valid && so_last);

      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          iter  <= '0;
          p     <= '0;
          l     <= '0;
          q     <= '0;
        end
        S_RUN: if (issue) begin
          p <= p + 1'b1;
          if (last) begin
            q <= '0;
            if (l != LW'(nlayers - 1'b1)) begin
              l <= l + 1'b1;
            end else if (!et_en && iter + 1'b1 != max_iter) begin
              // no test to run: go on with the next iteration at once
              iter <= iter + 1'b1;
              p    <= '0;
              l    <= '0;
            end else begin
              state <= S_DRAIN;
            end
          end else begin
            q <= q + 1'b1;
          end
        end
        S_DRAIN: if (tcnt == '0) state <= S_EVAL;
        S_EVAL: begin
          iter <= iter + 1'b1;
          p    <= '0;
          l    <= '0;
          if ((et_en && et_converged && iter != '0) || (iter + 1'b1 == max_iter)) begin
            state <= S_OUT;
            oc    <= '0;
            iters <= iter + 1'b1;
          end else begin
            state <= S_RUN;
          end
        end
        S_OUT: begin
          oc <= oc + 1'b1;
          if (oc == CW'(KB - 1)) begin
            state   <= S_FIN;
            fin_cnt <= 1'b1;
          end
        end
        S_FIN: begin
          if (fin_cnt) fin_cnt <= 1'b0;
          else         state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) issue |-> tcnt < (TW+1)'(TD));
  assert property (@(posedge clk) disable iff (!rst_n) so_valid |-> tcnt != '0);
endmodule
