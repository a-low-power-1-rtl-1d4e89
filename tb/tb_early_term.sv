// tb_early_term: random test of the early-termination unit against a model.
//
// Random L words (mostly confident, sometimes with a flipped or weak lane,
// random garbage in lanes >= z) are written through both ports, snapshots are
// taken at random, and every cycle `converged` and `min_mag` are compared with
// a model that keeps hard decisions and magnitudes per block column. z, the
// number of information columns and the threshold change between phases.
module tb_early_term;
  import ldpc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [ZW-1:0]                 z;
  logic [CW:0]                   kinfo;
  amag_t                         thr;
  logic [1:0]                    upd_we;
  logic [1:0][CW-1:0]            upd_col;
  logic [1:0][Z_MAX-1:0][WL-1:0] upd_data;
  logic                          snap, converged;
  amag_t                         min_mag;

  early_term dut (.clk, .rst_n, .z, .kinfo, .thr, .upd_we, .upd_col, .upd_data, .snap,
                  .converged, .min_mag);

  bit hc [KB][Z_MAX];
  bit hp [KB][Z_MAX];
  int mm [KB];
  int checks = 0, failures = 0, n_conv = 0, n_nconv = 0;

  initial begin
    z = ZW'(Z_MAX); kinfo = (CW+1)'(12); thr = amag_t'(20);
    upd_we = '0; upd_col = '0; upd_data = '0; snap = 0;
    for (int c = 0; c < KB; c++) begin
      mm[c] = 0;
      for (int i = 0; i < Z_MAX; i++) begin hc[c][i] = 0; hp[c][i] = 0; end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      int zz, kk, th;
      bit same, exp_c;
      int emin;
      if (t % 1000 == 0) begin
        zz = (t == 0) ? Z_MAX : 1 + int'($urandom % Z_MAX);
        kk = 1 + int'($urandom % KB);
        th = int'($urandom % 60);
        z = ZW'(zz); kinfo = (CW+1)'(kk); thr = amag_t'(th);
      end
      @(negedge clk);
      // model result for the state before this cycle's edge
      same = 1; emin = APP_MAX;
      for (int c = 0; c < int'(kinfo); c++) begin
        for (int i = 0; i < int'(z); i++) if (hc[c][i] != hp[c][i]) same = 0;
        if (mm[c] < emin) emin = mm[c];
      end
      exp_c = same && (emin > int'(thr));
      checks++;
      if (converged != exp_c || int'(min_mag) != emin) begin
        failures++;
        if (failures < 10) $display("FAIL: t=%0d converged=%0d (exp %0d) min=%0d (exp %0d)",
                                    t, converged, exp_c, min_mag, emin);
      end
      if (converged) n_conv++; else n_nconv++;
      // new stimulus
      upd_we     = 2'($urandom);
      upd_col[0] = CW'($urandom % KB);
      upd_col[1] = CW'((int'(upd_col[0]) + 1 + int'($urandom % (KB - 1))) % KB);
      snap       = ($urandom % 8) == 0;
      for (int p = 0; p < 2; p++)
        for (int i = 0; i < Z_MAX; i++) begin
          int v;
          v = 40 + int'($urandom % 200);
          if ($urandom % 600 == 0) v = -v;
          if ($urandom % 300 == 0) v = int'($urandom % 30);
          if (i >= int'(z)) v = int'($urandom % 511) - 255;
          upd_data[p][i] = WL'(v);
        end
      // model update at the coming edge
      if (snap)
        for (int c = 0; c < KB; c++)
          for (int i = 0; i < Z_MAX; i++) hp[c][i] = hc[c][i];
      for (int p = 0; p < 2; p++)
        if (upd_we[p]) begin
          int m;
          m = APP_MAX;
          for (int i = 0; i < Z_MAX; i++) begin
            int v, a;
            v = int'($signed(upd_data[p][i]));
            a = (v < 0) ? -v : v;
            hc[upd_col[p]][i] = (i < int'(z)) ? (v < 0) : 1'b0;
            if (i < int'(z) && a < m) m = a;
          end
          mm[upd_col[p]] = m;
        end
    end
    checks++;
    if (n_conv == 0 || n_nconv == 0) begin
      failures++;
      $display("FAIL: converged never %s", (n_conv == 0) ? "set" : "cleared");
    end
    $display("converged cycles %0d, not converged %0d", n_conv, n_nconv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
