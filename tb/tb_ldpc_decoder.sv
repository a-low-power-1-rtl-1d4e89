// tb_ldpc_decoder: end-to-end test of the decoder at its full default size
// (96 lanes, 24 block columns, up to 12 layers), using ldpc_harness.
//
// Five frames switch between code shapes: rate-1/2-like 12x24 at z = 96 with
// a fixed 10 iterations, rate-5/6-like 4x24 at z = 24 (72 lanes idle) with
// early termination, 8x24 at z = 48 at high noise with a 5-iteration limit,
// 12x24 at z = 96 at low noise with early termination, and an 8x24 code whose
// consecutive layers share no block column, where no stall may occur and,
// with early termination off, the iterations must follow each other at one
// cycle per pair entry (the throughput case). Every frame is compared with
// the reference model, and each mechanism of the design must have occurred
// at least once.
module tb_ldpc_decoder;
  ldpc_harness h ();

  initial begin
    h.do_reset();
    //          layers z  deg   mu  a  iters et  kinfo thr  mode decode
    h.run_frame(12, 96, 6, 7,   16, 8, 10,  0,  12,   20);
    h.run_frame(4,  24, 19, 21, 24, 10, 10, 1,  20,   30,  0,   1);
    h.run_frame(8,  48, 8, 10,  6, 14, 5,   1,  16,   120);
    h.run_frame(12, 96, 6, 7,   20, 6, 10,  1,  12,   30,  0,   1);
    h.run_frame(8,  96, 6, 6,   20, 6, 10,  0,  12,   30,  1,   1);

    h.check(h.n_stall > 0,    "dependency stall never happened");
    h.check(h.n_overlap > 0,  "layer overlap never happened");
    h.check(h.n_iovl > 0,     "iteration overlap never happened");
    h.check(h.n_odd > 0,      "odd row degree never happened");
    h.check(h.n_gated > 0,    "lane gating never happened");
    h.check(h.n_switch > 0,   "code switch never happened");
    h.check(h.n_et_stop > 0,  "early termination never stopped a frame");
    h.check(h.n_lim_stop > 0, "iteration limit never stopped a frame");
    $display("mechanisms: stall=%0d overlap=%0d iteration_overlap=%0d odd=%0d gated=%0d switch=%0d et_stop=%0d limit_stop=%0d",
             h.n_stall, h.n_overlap, h.n_iovl, h.n_odd, h.n_gated, h.n_switch, h.n_et_stop, h.n_lim_stop);
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge h.clk);
    h.failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures);
    $finish;
  end
endmodule
