// tb_ldpc_workloads: the code sizes of IEEE 802.16e and IEEE 802.11n on the
// full-size decoder, using ldpc_harness.
//
// For each standard, one frame per code rate with the standard's layer count,
// row degrees and a sub-matrix size it defines (802.16e: z = 24..96 in steps
// of 4; 802.11n: z = 27, 54, 81). The codes keep the standards' shapes but
// have random block-column positions and shifts (the base matrices are not
// reproduced); the columns inside each layer are ordered to shorten
// dependency stalls, as a code compiler for the decoder would do. Every frame runs with early termination and the 10-iteration
// limit, is compared with the reference model and must decode the sent
// all-zero codeword; the channel noise is lower for the higher rates.
module tb_ldpc_workloads;
  ldpc_harness h ();

  initial begin
    h.do_reset();
    //          layers z  deg    mu  a  iters et kinfo thr mode decode
    // IEEE 802.16e: rates 1/2, 2/3, 3/4, 5/6
    h.run_frame(12, 96, 6, 7,    16, 8, 10, 1, 12, 30, 2, 1);
    h.run_frame(8,  72, 10, 11,  18, 8, 10, 1, 16, 30, 2, 1);
    h.run_frame(6,  48, 14, 15,  20, 7, 10, 1, 18, 30, 2, 1);
    h.run_frame(4,  24, 20, 20,  24, 7, 10, 1, 20, 30, 2, 1);
    // IEEE 802.11n: rates 1/2, 2/3, 3/4, 5/6
    h.run_frame(12, 27, 7, 8,    16, 8, 10, 1, 12, 30, 2, 1);
    h.run_frame(8,  54, 11, 11,  18, 8, 10, 1, 16, 30, 2, 1);
    h.run_frame(6,  81, 14, 15,  20, 7, 10, 1, 18, 30, 2, 1);
    h.run_frame(4,  81, 22, 22,  24, 7, 10, 1, 20, 30, 2, 1);
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge h.clk);
    h.failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures);
    $finish;
  end
endmodule
