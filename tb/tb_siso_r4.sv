// tb_siso_r4: random test of one radix-4 SISO lane.
//
// Rows of random degree (1 to 24 messages, so odd degrees leave the second
// slot of the last pair empty) with random L and old Lambda inputs are
// streamed back to back. Every output pair (new Lambda, new L) is compared
// with a reference computed with ldpc_ref_pkg. Phase 1 keeps the lane enabled
// and the input always valid and checks the timing: the first row's first
// output comes 2 cycles after its last input, and 40 rows of equal degree
// finish within one cycle per pair plus a small constant (two messages per
// cycle). Phase 2 mixes degrees; phase 3 drops in_valid and `en` at random to
// check the handshake and the freeze.
module tb_siso_r4;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en, in_valid, in_ready, in_first, in_last, in_v1;
  app_t in_l0, in_l1, out_l0, out_l1;
  llr_t in_m0, in_m1, out_m0, out_m1;
  logic out_valid, out_last, out_v1;

  siso_r4 dut (.*);

  typedef struct {
    int l0, l1, m0, m1;
    bit v1, first, last;
  } ipair_t;
  typedef struct {
    int m0, m1, l0, l1;
    bit v1, last;
  } opair_t;

  ipair_t iq[$];
  opair_t oq[$];
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic gen_row(input int d);
    int lam[24], l[24], m[24];
    int s, np;
    np = (d + 1) / 2;
    for (int k = 0; k < d; k++) begin
      l[k]   = int'($urandom % 511) - 255;
      m[k]   = int'($urandom % 255) - 127;
      if ($urandom % 8 == 0) m[k] = l[k] > 127 ? 127 : (l[k] < -127 ? -127 : l[k]);
      lam[k] = l[k] - m[k];
    end
    s = 0;
    for (int q = 0; q < np; q++) begin
      int ab;
      ab = (2*q + 1 < d) ? ref_f(ref_msg(lam[2*q]), ref_msg(lam[2*q+1])) : ref_msg(lam[2*q]);
      s  = (q == 0) ? ab : ref_f(s, ab);
    end
    for (int q = 0; q < np; q++) begin
      ipair_t ip;
      opair_t op;
      bit v1;
      v1 = (2*q + 1 < d);
      ip.l0 = l[2*q]; ip.m0 = m[2*q];
      ip.l1 = v1 ? l[2*q+1] : int'($urandom % 511) - 255;
      ip.m1 = v1 ? m[2*q+1] : int'($urandom % 255) - 127;
      ip.v1 = v1; ip.first = (q == 0); ip.last = (q == np - 1);
      iq.push_back(ip);
      op.m0 = ref_g(s, ref_msg(lam[2*q]));
      op.l0 = rsat_app(lam[2*q] + op.m0);
      if (v1) begin
        op.m1 = ref_g(s, ref_msg(lam[2*q+1]));
        op.l1 = rsat_app(lam[2*q+1] + op.m1);
      end else begin
        op.m1 = 0; op.l1 = 0;
      end
      op.v1 = v1; op.last = ip.last;
      oq.push_back(op);
    end
  endtask

  int cyc = 0, nout = 0, first_last_in = -1, first_out = -1, npairs1 = 0, last_out = 0;

  task automatic run_phase(input int nrows, input bit random_gaps, input int fixed_d = 0);
    bit rdy, en_k, acc;
    int npairs;
    npairs = 0;
    for (int r = 0; r < nrows; r++) begin
      int d;
      d = 1 + int'($urandom % 24);
      if (r == 1) d = 24;
      if (fixed_d > 0) d = fixed_d;
      gen_row(d);
      npairs += (d + 1) / 2;
    end
    if (fixed_d > 0) npairs1 = npairs;
    acc = 0; en_k = 1;
    while (oq.size() > 0) begin
      @(negedge clk);
      cyc++;
      // input of the last cycle
      if (acc) begin
        if (iq[0].last && first_last_in < 0) first_last_in = cyc - 1;  // cycle it was presented
        void'(iq.pop_front());
      end
      // output produced by the last edge
      if (en_k && out_valid) begin
        opair_t op;
        op = oq.pop_front();
        if (first_out < 0) first_out = cyc;
        last_out = cyc;
        nout++;
        check(out_last == op.last && out_v1 == op.v1,
              $sformatf("pair %0d flags last=%0d v1=%0d", nout, out_last, out_v1));
        check(int'(out_m0) == op.m0 && int'(out_l0) == op.l0,
              $sformatf("pair %0d slot 0: Lambda %0d L %0d, expected %0d %0d",
                        nout, out_m0, out_l0, op.m0, op.l0));
        if (op.v1)
          check(int'(out_m1) == op.m1 && int'(out_l1) == op.l1,
                $sformatf("pair %0d slot 1: Lambda %0d L %0d, expected %0d %0d",
                          nout, out_m1, out_l1, op.m1, op.l1));
      end
      // new stimulus
      en       = random_gaps ? ($urandom % 4 != 0) : 1'b1;
      in_valid = (iq.size() > 0) && (random_gaps ? ($urandom % 3 != 0) : 1'b1);
      if (iq.size() > 0) begin
        in_l0 = app_t'(iq[0].l0); in_l1 = app_t'(iq[0].l1);
        in_m0 = llr_t'(iq[0].m0); in_m1 = llr_t'(iq[0].m1);
        in_v1 = iq[0].v1; in_first = iq[0].first; in_last = iq[0].last;
      end
      #1;
      rdy  = in_ready;
      en_k = en;
      acc  = in_valid && rdy && en;
    end
  endtask

  initial begin
    en = 1; in_valid = 0; in_first = 0; in_last = 0; in_v1 = 0;
    in_l0 = '0; in_l1 = '0; in_m0 = '0; in_m1 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_phase(40, 0, 13);
    check(first_out - first_last_in == 2,
          $sformatf("latency last input to first output %0d, expected 2", first_out - first_last_in));
    // the last row's backward phase follows its forward phase: + 7 pairs + 2
    check(last_out <= npairs1 + 7 + 2,
          $sformatf("%0d pairs took %0d cycles", npairs1, last_out));
    $display("phase 1: %0d pairs in %0d cycles", npairs1, last_out);
    run_phase(60, 0);
    run_phase(60, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
