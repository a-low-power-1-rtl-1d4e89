// tb_ldpc_ctrl: test of the schedule controller with a behavioural model of
// the datapath around it.
//
// The model answers every issued pair as the SISO lanes would: a row's pairs
// come back (so_valid, one per cycle, so_last on the last) no earlier than 4
// cycles after the row's last pair was issued and after the previous row.
// Checked: pairs are issued in table order, once per pair per iteration;
// the rotation of each read is (shift - stored rotation) mod z, with the
// stored rotation tracked independently; no block column is read while a
// write-back to it is outstanding, and `stall` is raised exactly when the next
// pair waits for one; write-back tags match the issued pairs; iss_iter0 marks
// only the first iteration; without early termination the next iteration
// starts before the previous one has drained, with it never; the iteration
// count follows the limit and the
// early-termination input (never before the second iteration); the output
// phase reads block columns 0..KB-1 with the inverse rotation and `done`
// comes 2 cycles after the last one.
module tb_ldpc_ctrl;
  import ldpc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                   cfg_pair_we = 0;
  logic [PW-1:0]          cfg_pair_addr = '0;
  pair_t                  cfg_pair = '0;
  logic                   cfg_layer_we = 0;
  logic [LW-1:0]          cfg_layer_addr = '0;
  logic [$clog2(PMAX+1)-1:0] cfg_layer_np = '0;
  logic [ZW-1:0]          z = '0;
  logic [LW:0]            nlayers = '0;
  logic [3:0]             max_iter = '0;
  logic                   et_en = 0;
  logic                   ld_we = 0;
  logic [CW-1:0]          ld_col = '0;
  logic                   start = 0;
  logic                   busy, done;
  logic [3:0]             iters;
  logic [1:0]             rd_en;
  logic [1:0][CW-1:0]     rd_col;
  logic [1:0][ZW-1:0]     rd_r;
  logic                   iss_valid, iss_first, iss_last, iss_v1, iss_iter0;
  logic [PW-1:0]          iss_p;
  logic                   ob_valid;
  logic [CW-1:0]          ob_col;
  logic                   so_valid = 0, so_last = 0;
  logic [1:0][CW-1:0]     wb_col;
  logic                   wb_v1;
  logic [PW-1:0]          wb_p;
  logic                   et_snap;
  logic                   et_converged = 0;
  logic                   stall;

  ldpc_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // code: 3 layers over 8 block columns, z = 10, overlapping columns
  localparam int NL = 3;
  int deg [NL] = '{5, 4, 6};
  int cols[NL][6] = '{'{0, 1, 2, 3, 4, 0}, '{4, 5, 0, 6, 0, 0}, '{1, 4, 7, 2, 6, 5}};
  int np [NL];
  pair_t tab [EP_MAX];
  int npairs;
  localparam int ZC = 10;

  // model state
  int off [KB];
  bit pend [KB];
  int exp_p;            // next pair index expected
  int n_issue_it;
  int rowq[$];          // pairs of issued, not yet answered rows (pair indices)
  int row_start[$];     // earliest answer cycle per queued row
  int rows_closed;
  int cyc;
  int ans[$];           // pairs in answer order, with last flags
  bit ans_last[$];
  int ans_ready_cycle;
  int cur_row[$];
  int n_stall, n_ob, last_ob_cyc, done_cyc, n_snap, iter_seen, n_iovl;
  bit conv_from_iter2;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    // --- checks on this cycle's controller outputs (sampled before the edge)
    if (iss_valid) begin
      pair_t e;
      e = tab[exp_p % npairs];
      check(int'(iss_p) == exp_p % npairs, $sformatf("issued pair %0d, expected %0d", iss_p, exp_p % npairs));
      check(rd_en[0] && rd_col[0] == e.col0 && rd_en[1] == e.v1 && (!e.v1 || rd_col[1] == e.col1),
            $sformatf("read columns of pair %0d", iss_p));
      check(int'(rd_r[0]) == (int'(e.sh0) - off[e.col0] + ZC) % ZC,
            $sformatf("rotation port 0 of pair %0d: %0d", iss_p, rd_r[0]));
      if (e.v1)
        check(int'(rd_r[1]) == (int'(e.sh1) - off[e.col1] + ZC) % ZC,
              $sformatf("rotation port 1 of pair %0d: %0d", iss_p, rd_r[1]));
      check(!pend[e.col0] && !(e.v1 && pend[e.col1]),
            $sformatf("pair %0d read a column with a write-back outstanding", iss_p));
      check(iss_iter0 == (exp_p < npairs), "iss_iter0");
      if (exp_p > 0 && exp_p % npairs == 0 && (ans.size() > 0 || pend.or() != 0)) begin
        n_iovl++;
        check(!et_en, "iteration overlap although the early-termination test is due");
      end
      off[e.col0] = int'(e.sh0); pend[e.col0] = 1;
      if (e.v1) begin off[e.col1] = int'(e.sh1); pend[e.col1] = 1; end
      cur_row.push_back(int'(iss_p));
      if (iss_last) begin
        int t0;
        t0 = (ans_ready_cycle > cyc + 4) ? ans_ready_cycle : cyc + 4;
        foreach (cur_row[k]) begin
          ans.push_back(cur_row[k]);
          ans_last.push_back(k == cur_row.size() - 1);
        end
        ans_ready_cycle = t0 + cur_row.size();
        row_start.push_back(t0);
        cur_row.delete();
      end
      exp_p++;
    end
    if (stall) begin
      pair_t e;
      e = tab[exp_p % npairs];
      n_stall++;
      check(pend[e.col0] || (e.v1 && pend[e.col1]), "stall without a pending column");
      check(!iss_valid, "stall together with an issue");
    end
    if (so_valid) begin
      pair_t e;
      e = tab[int'(wb_p)];
      check(wb_col[0] == e.col0 && wb_v1 == e.v1 && (!e.v1 || wb_col[1] == e.col1),
            $sformatf("write-back tag of pair %0d", wb_p));
      pend[e.col0] = 0;
      if (e.v1) pend[e.col1] = 0;
    end
    if (et_snap && busy) iter_seen++;
    if (ob_valid) begin
      check(int'(ob_col) == n_ob && rd_en[0] && rd_col[0] == ob_col &&
            int'(rd_r[0]) == (ZC - off[ob_col]) % ZC,
            $sformatf("output read %0d", n_ob));
      n_ob++;
      last_ob_cyc = cyc;
    end
    if (done) done_cyc = cyc;
  end

  // answer driver: one pair per cycle once its row may start
  always @(negedge clk) begin
    so_valid <= 0;
    so_last  <= 0;
    if (row_start.size() > 0 && cyc + 1 >= row_start[0]) begin
      so_valid <= 1;
      so_last  <= ans_last[0];
      if (ans_last[0]) void'(row_start.pop_front());
      void'(ans.pop_front());
      void'(ans_last.pop_front());
    end
  end

  task automatic frame(input int maxit, input bit eten, input bit conv, input int exp_it);
    @(negedge clk);
    max_iter = 4'(maxit); et_en = eten; et_converged = conv;
    exp_p = 0; n_ob = 0; iter_seen = 0; done_cyc = -1;
    for (int c = 0; c < KB; c++) begin
      @(negedge clk);
      ld_we = 1; ld_col = CW'(c); off[c] = 0;
    end
    @(negedge clk); ld_we = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (busy) @(negedge clk);
    check(int'(iters) == exp_it, $sformatf("iterations %0d, expected %0d", iters, exp_it));
    check(exp_p == exp_it * npairs, $sformatf("%0d issues, expected %0d", exp_p, exp_it * npairs));
    check(n_ob == KB, $sformatf("%0d output reads", n_ob));
    check(done_cyc == last_ob_cyc + 2, $sformatf("done at %0d, last output read at %0d", done_cyc, last_ob_cyc));
  endtask

  initial begin
    cyc = 0; n_stall = 0; n_iovl = 0; ans_ready_cycle = 0;
    for (int c = 0; c < KB; c++) begin off[c] = 0; pend[c] = 0; end
    // build the pair table
    npairs = 0;
    for (int l = 0; l < NL; l++) begin
      np[l] = (deg[l] + 1) / 2;
      for (int q = 0; q < np[l]; q++) begin
        tab[npairs].col0 = CW'(cols[l][2*q]);
        tab[npairs].sh0  = ZW'($urandom % ZC);
        tab[npairs].v1   = (2*q + 1 < deg[l]);
        tab[npairs].col1 = tab[npairs].v1 ? CW'(cols[l][2*q+1]) : '0;
        tab[npairs].sh1  = tab[npairs].v1 ? ZW'($urandom % ZC) : '0;
        npairs++;
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < npairs; p++) begin
      @(negedge clk);
      cfg_pair_we = 1; cfg_pair_addr = PW'(p); cfg_pair = tab[p];
    end
    @(negedge clk); cfg_pair_we = 0;
    for (int l = 0; l < NL; l++) begin
      @(negedge clk);
      cfg_layer_we = 1; cfg_layer_addr = LW'(l); cfg_layer_np = ($clog2(PMAX+1))'(np[l]);
    end
    @(negedge clk); cfg_layer_we = 0;
    z = ZW'(ZC); nlayers = (LW+1)'(NL);

    frame(3, 0, 1, 3);     // early termination off: the limit decides
    frame(6, 1, 1, 2);     // converged at once: stop after the second iteration
    frame(4, 1, 0, 4);     // never converged: the limit decides
    check(n_stall > 0, "no dependency stall happened");
    check(n_iovl > 0, "no iteration started before the previous one had drained");
    $display("stall cycles %0d, iteration overlaps %0d", n_stall, n_iovl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
