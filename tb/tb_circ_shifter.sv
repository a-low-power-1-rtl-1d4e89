// tb_circ_shifter: random test of the variable-size cyclic shifter at its
// full width (96 lanes of L messages): for random z in 1..96 and r in 0..z-1,
// out[i] must equal in[(i + r) mod z] for i < z and 0 above.
module tb_circ_shifter;
  import ldpc_pkg::*;

  logic [ZW-1:0]              z, r;
  logic [Z_MAX-1:0][WL-1:0]   din, dout;
  int checks = 0, failures = 0;

  circ_shifter #(.ZM(Z_MAX), .DW(WL)) dut (.z, .r, .din, .dout);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int zz, rr;
      bit ok;
      zz = 1 + int'($urandom % Z_MAX);
      if (t < 4) zz = (t < 2) ? Z_MAX : 1;
      rr = int'($urandom % zz);
      if (t == 0) rr = zz - 1;
      z = ZW'(zz);
      r = ZW'(rr);
      for (int i = 0; i < Z_MAX; i++) din[i] = WL'($urandom);
      #1;
      ok = 1;
      for (int i = 0; i < Z_MAX; i++)
        if (dout[i] != ((i < zz) ? din[(i + rr) % zz] : '0)) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("FAIL: z=%0d r=%0d", zz, rr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
