// tb_boxplus_f: exhaustive test of the boxplus f(a,b) unit.
//
// Every pair of inputs in [-127, 127] is applied and the output compared with
// ref_f from ldpc_ref_pkg, which computes the correction tables from their
// logarithmic definitions with real arithmetic.
module tb_boxplus_f;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  llr_t a, b, y;
  int checks = 0, failures = 0;

  boxplus_f dut (.a, .b, .y);

  initial begin
    for (int i = -127; i <= 127; i++)
      for (int j = -127; j <= 127; j++) begin
        a = llr_t'(i);
        b = llr_t'(j);
        #1;
        checks++;
        if (int'(y) != ref_f(i, j)) begin
          failures++;
          if (failures < 10) $display("FAIL: boxplus_f(%0d,%0d) = %0d, expected %0d", i, j, y, ref_f(i, j));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
