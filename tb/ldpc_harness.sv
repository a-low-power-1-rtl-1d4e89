// ldpc_harness: shared test environment for the decoder testbenches.
//
// Instantiates the decoder at its default (full) size and provides tasks to
// generate random block-structured codes (distinct block columns per layer,
// random cyclic shifts), a noisy all-zero codeword, a layered-BP reference
// model built on ldpc_ref_pkg, and run_frame(), which programs the code,
// loads the channel LLRs, decodes one frame and compares with the reference:
// the complete L-memory (undoing the stored rotation), the hard-decision
// output, the iteration count (including the early-termination decision), the
// number of pair issues (E/2 rounded up per layer, per iteration) and a bound
// on the cycle count. It also counts how often each mechanism occurred
// (dependency stall, layer overlap, iteration overlap, odd-degree padding,
// unused lanes, code switch, early stop, iteration-limit stop). The calling testbench reads
// `checks` and `failures` and ends the simulation.
module ldpc_harness;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                      cfg_pair_we = 0;
  logic [PW-1:0]             cfg_pair_addr = '0;
  pair_t                     cfg_pair = '0;
  logic                      cfg_layer_we = 0;
  logic [LW-1:0]             cfg_layer_addr = '0;
  logic [$clog2(PMAX+1)-1:0] cfg_layer_np = '0;
  logic [ZW-1:0]             z = '0;
  logic [LW:0]               nlayers = '0;
  logic [CW:0]               kinfo = '0;
  logic [3:0]                max_iter = '0;
  logic                      et_en = 0;
  amag_t                     et_thr = '0;
  logic                      llr_we = 0;
  logic [CW-1:0]             llr_col = '0;
  logic [Z_MAX-1:0][W-1:0]   llr_data = '0;
  logic                      start = 0;
  logic                      busy, done;
  logic [3:0]                iters;
  logic                      hd_valid;
  logic [CW-1:0]             hd_col;
  logic [Z_MAX-1:0]          hd_bits;
  logic                      stall;
  logic [Z_MAX-1:0]          lane_en;

  ldpc_decoder dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- code and reference state ----------------
  int nl, zc, npairs;
  int deg  [JB_MAX];
  int ccol [JB_MAX][KB];
  int csh  [JB_MAX][KB];
  int np_l [JB_MAX];
  pair_t ptab [EP_MAX];
  int chan [KB][Z_MAX];
  int Lr   [KB][Z_MAX];
  int Mr   [EP_MAX][Z_MAX][2];
  int ref_iters;

  // mode 0: random columns per layer, every block column used at least twice
  // mode 1: layer l uses block columns {g*6 .. g*6+5}, g = l mod 4, so that
  //         consecutive layers share no column (a stall-free layer order)
  // mode 2: as mode 0, with the column order inside each layer chosen to
  //         reduce dependency stalls
  task automatic gen_code(input int nlay, input int zz, input int dlo, input int dhi,
                          input int mode = 0);
    int must[2*KB];
    int nm, p;
    nl = nlay; zc = zz; p = 0;
    for (int c = 0; c < 2*KB; c++) must[c] = c % KB;
    for (int c = 2*KB - 1; c > 0; c--) begin
      int r, t;
      r = int'($urandom % (c + 1));
      t = must[c]; must[c] = must[r]; must[r] = t;
    end
    nm = 2*KB;
    for (int l = 0; l < nl; l++) begin
      bit used[KB];
      int n;
      for (int c = 0; c < KB; c++) used[c] = 0;
      deg[l] = (mode == 1) ? 6 : dlo + int'($urandom % (dhi - dlo + 1));
      n = 0;
      if (mode == 1) begin
        for (int d = 0; d < 6; d++) begin
          ccol[l][n] = (l % 4) * 6 + d; n++;
        end
      end else begin
        // take still-needed columns first, evenly spread over the layers
        for (int k = 0; k < nm && n < deg[l] && n < (2*KB + nl - 1) / nl; k++)
          if (!used[must[k]]) begin
            used[must[k]] = 1;
            ccol[l][n] = must[k]; n++;
            for (int j = k; j < nm - 1; j++) must[j] = must[j+1];
            nm--; k--;
          end
        while (n < deg[l]) begin
          int c;
          c = int'($urandom % KB);
          if (!used[c]) begin
            used[c] = 1; ccol[l][n] = c; n++;
          end
        end
        // shuffle the order inside the layer
        for (int d = deg[l] - 1; d > 0; d--) begin
          int r, t;
          r = int'($urandom % (d + 1));
          t = ccol[l][d]; ccol[l][d] = ccol[l][r]; ccol[l][r] = t;
        end
      end
    end
    // mode 2: order each layer so that block columns shared with the next
    // layer come first (written back early) and columns shared with the
    // previous layer come last (read late), which shortens dependency stalls
    if (mode == 2)
      for (int l = 0; l < nl; l++) begin
        int key[KB];
        for (int d = 0; d < deg[l]; d++) begin
          key[d] = 0;
          for (int e = 0; e < deg[(l + nl - 1) % nl]; e++)
            if (ccol[(l + nl - 1) % nl][e] == ccol[l][d]) key[d] += 1;
          for (int e = 0; e < deg[(l + 1) % nl]; e++)
            if (ccol[(l + 1) % nl][e] == ccol[l][d]) key[d] -= 1;
        end
        for (int d = 1; d < deg[l]; d++)
          for (int e = d; e > 0 && key[e-1] > key[e]; e--) begin
            int t;
            t = key[e]; key[e] = key[e-1]; key[e-1] = t;
            t = ccol[l][e]; ccol[l][e] = ccol[l][e-1]; ccol[l][e-1] = t;
          end
      end
    for (int l = 0; l < nl; l++) begin
      for (int d = 0; d < deg[l]; d++) csh[l][d] = int'($urandom % zc);
      np_l[l] = (deg[l] + 1) / 2;
      for (int q = 0; q < np_l[l]; q++) begin
        ptab[p].col0 = CW'(ccol[l][2*q]);
        ptab[p].sh0  = ZW'(csh[l][2*q]);
        if (2*q + 1 < deg[l]) begin
          ptab[p].col1 = CW'(ccol[l][2*q+1]);
          ptab[p].sh1  = ZW'(csh[l][2*q+1]);
          ptab[p].v1   = 1'b1;
        end else begin
          ptab[p].col1 = '0;
          ptab[p].sh1  = '0;
          ptab[p].v1   = 1'b0;
        end
        p++;
      end
    end
    npairs = p;
  endtask

  task automatic gen_chan(input int mu, input int a);
    for (int c = 0; c < KB; c++)
      for (int i = 0; i < Z_MAX; i++) begin
        int n;
        n = 0;
        for (int u = 0; u < 4; u++) n += int'($urandom % (2*a + 1)) - a;
        chan[c][i] = (i < zc) ? rsat(mu + n) : 0;
      end
  endtask

  // layered BP reference with the pair-wise recursion of the radix-4 lanes
  task automatic ref_decode(input int maxit, input bit eten, input int kinf, input int thr);
    bit hdp [KB][Z_MAX];
    for (int c = 0; c < KB; c++)
      for (int i = 0; i < Z_MAX; i++) Lr[c][i] = chan[c][i];
    for (int p = 0; p < EP_MAX; p++)
      for (int i = 0; i < Z_MAX; i++) begin Mr[p][i][0] = 0; Mr[p][i][1] = 0; end
    ref_iters = maxit;
    for (int it = 0; it < maxit; it++) begin
      int pb;
      bit same;
      int mn;
      pb = 0;
      for (int l = 0; l < nl; l++) begin
        for (int i = 0; i < zc; i++) begin
          int lam [KB];
          int s;
          s = 0;
          for (int d = 0; d < deg[l]; d++) begin
            int v;
            v = (i + csh[l][d]) % zc;
            lam[d] = Lr[ccol[l][d]][v] - Mr[pb + d/2][i][d%2];
          end
          for (int q = 0; q < np_l[l]; q++) begin
            int ab;
            ab = (2*q + 1 < deg[l]) ? ref_f(ref_msg(lam[2*q]), ref_msg(lam[2*q+1]))
                                    : ref_msg(lam[2*q]);
            s  = (q == 0) ? ab : ref_f(s, ab);
          end
          for (int d = 0; d < deg[l]; d++) begin
            int v, m;
            v = (i + csh[l][d]) % zc;
            m = ref_g(s, ref_msg(lam[d]));
            Mr[pb + d/2][i][d%2] = m;
            Lr[ccol[l][d]][v] = rsat_app(lam[d] + m);
          end
        end
        pb += np_l[l];
      end
      same = 1; mn = LMAX;
      for (int c = 0; c < kinf; c++)
        for (int i = 0; i < zc; i++) begin
          if (hdp[c][i] != (Lr[c][i] < 0)) same = 0;
          if (rabs(Lr[c][i]) < mn) mn = rabs(Lr[c][i]);
        end
      for (int c = 0; c < KB; c++)
        for (int i = 0; i < zc; i++) hdp[c][i] = (Lr[c][i] < 0);
      if (eten && it >= 1 && same && mn > thr) begin
        ref_iters = it + 1;
        break;
      end
    end
  endtask

  // ---------------- bus tasks ----------------
  task automatic program_code(input int kinf, input int maxit, input bit eten, input int thr);
    for (int p = 0; p < npairs; p++) begin
      @(negedge clk);
      cfg_pair_we = 1; cfg_pair_addr = PW'(p); cfg_pair = ptab[p];
    end
    for (int l = 0; l < nl; l++) begin
      @(negedge clk);
      cfg_pair_we = 0;
      cfg_layer_we = 1; cfg_layer_addr = LW'(l); cfg_layer_np = ($clog2(PMAX+1))'(np_l[l]);
    end
    @(negedge clk);
    cfg_pair_we = 0; cfg_layer_we = 0;
    z = ZW'(zc); nlayers = (LW+1)'(nl); kinfo = (CW+1)'(kinf);
    max_iter = 4'(maxit); et_en = eten; et_thr = amag_t'(thr);
  endtask

  task automatic load_chan();
    for (int c = 0; c < KB; c++) begin
      @(negedge clk);
      llr_we = 1; llr_col = CW'(c);
      for (int i = 0; i < Z_MAX; i++) llr_data[i] = W'(chan[c][i]);
    end
    @(negedge clk);
    llr_we = 0;
  endtask

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_overlap = 0, n_odd = 0, n_issue = 0, n_gated = 0;
  int n_switch = 0, n_et_stop = 0, n_lim_stop = 0, n_iovl = 0;

  always @(posedge clk) if (rst_n) begin
    if (stall) n_stall++;
    if (dut.p_v && dut.so_valid) n_overlap++;
    if (dut.iss_valid) n_issue++;
    if (dut.iss_valid && !dut.iss_v1) n_odd++;
    // first pair of a later iteration issued while write-backs are in flight
    if (dut.iss_valid && dut.iss_p == '0 && !dut.iss_iter0 && dut.u_ctrl.tcnt != '0) n_iovl++;
  end

  int last_nl = -1, last_z = -1;

  task automatic run_frame(input int nlay, input int zz, input int dlo, input int dhi,
                           input int mu, input int a, input int maxit, input bit eten,
                           input int kinf, input int thr, input int mode = 0,
                           input bit must_decode = 0);
    int cyc, nhd, iss0, st0, bound;
    bit hd_ok, hd_zero;
    gen_code(nlay, zz, dlo, dhi, mode);
    gen_chan(mu, a);
    ref_decode(maxit, eten, kinf, thr);
    program_code(kinf, maxit, eten, thr);
    load_chan();
    if (last_nl >= 0 && (last_nl != nl || last_z != zc)) n_switch++;
    last_nl = nl; last_z = zc;
    if (zc < Z_MAX) n_gated++;
    iss0 = n_issue;
    st0  = n_stall;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1; nhd = 0; hd_ok = 1; hd_zero = 1;
    while (!done) begin
      @(posedge clk); #1;
      cyc++;
      if (hd_valid) begin
        if (int'(hd_col) != nhd) hd_ok = 0;
        for (int i = 0; i < Z_MAX; i++) begin
          bit exp_b;
          exp_b = (i < zc) ? (Lr[hd_col][i] < 0) : 1'b0;
          if (hd_bits[i] != exp_b) hd_ok = 0;
          if (hd_bits[i]) hd_zero = 0;
        end
        nhd++;
      end
    end
    while (busy) @(posedge clk);
    // final L-memory against the reference (undo the stored rotation)
    begin
      int bad;
      bad = 0;
      for (int c = 0; c < KB; c++) begin
        int off;
        off = int'(dut.u_ctrl.off[c]);
        for (int i = 0; i < zc; i++)
          if (int'($signed(dut.u_lmem.mem[c][i])) != Lr[c][(i + off) % zc]) bad++;
      end
      check(bad == 0, $sformatf("L-memory differs from reference in %0d entries (z=%0d)", bad, zc));
    end
    check(hd_ok && nhd == KB, $sformatf("hard decisions (%0d words)", nhd));
    check(int'(iters) == ref_iters, $sformatf("iterations %0d, reference %0d", iters, ref_iters));
    check(n_issue - iss0 == ref_iters * npairs,
          $sformatf("pair issues %0d, expected %0d", n_issue - iss0, ref_iters * npairs));
    // each iteration: one issue per pair, plus at most ~8 cycles per layer of
    // stall/credit wait and a drain of one layer; output phase KB + 2
    bound = ref_iters * (npairs + 8 * nl + PMAX + 8) + KB + 8;
    check(cyc <= bound, $sformatf("frame took %0d cycles, bound %0d", cyc, bound));
    if (mode == 1) begin
      // stall-free order: one pair per cycle, then a drain of one layer
      check(n_stall == st0, "stall in a stall-free layer order");
      bound = ref_iters * (npairs + PMAX + 8) + KB + 8;
      check(cyc <= bound, $sformatf("stall-free frame took %0d cycles, bound %0d", cyc, bound));
      if (!eten) begin
        // iterations follow each other without a drain: one pair per cycle
        bound = ref_iters * npairs + 2 * PMAX + KB + 16;
        check(cyc <= bound, $sformatf("iterations not overlapped: %0d cycles, bound %0d", cyc, bound));
      end
    end
    if (must_decode) check(hd_zero, "low-noise frame not decoded to the sent codeword");
    $display("frame: z=%0d layers=%0d E/2=%0d iters=%0d cycles=%0d (%0.1f per iteration) decoded=%0d",
             zc, nl, npairs, iters, cyc, real'(cyc - KB - 3) / iters, hd_zero);
    if (eten && ref_iters < maxit) n_et_stop++;
    if (ref_iters == maxit) n_lim_stop++;
  endtask


  task automatic do_reset();
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  endtask
endmodule
