// tb_l_memory: random test of the two-read, two-write L-memory against a
// behavioural model: per-lane write mask, one-cycle read latency, both write
// ports active in the same cycle on different words.
module tb_l_memory;
  import ldpc_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [1:0]                  re, we;
  logic [1:0][CW-1:0]          raddr, waddr;
  logic [1:0][Z_MAX-1:0][WL-1:0] rdata, wdata;
  logic [Z_MAX-1:0]            wmask;
  logic [Z_MAX-1:0][WL-1:0]    model [KB];
  logic [1:0][Z_MAX-1:0][WL-1:0] expd;
  logic [1:0]                  exp_v;
  int checks = 0, failures = 0;

  l_memory dut (.clk, .re, .raddr, .rdata, .we, .waddr, .wdata, .wmask);

  initial begin
    re = '0; we = '0; raddr = '0; waddr = '0; wdata = '0; wmask = '1;
    // fill every word through both ports
    for (int c = 0; c < KB; c += 2) begin
      @(negedge clk);
      we = 2'b11; waddr[0] = CW'(c); waddr[1] = CW'(c + 1); wmask = '1;
      for (int p = 0; p < 2; p++)
        for (int i = 0; i < Z_MAX; i++) wdata[p][i] = WL'($urandom);
      model[c] = wdata[0]; model[c+1] = wdata[1];
    end
    exp_v = '0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // results of last cycle's reads
      for (int p = 0; p < 2; p++)
        if (exp_v[p]) begin
          checks++;
          if (rdata[p] != expd[p]) begin
            failures++;
            if (failures < 10) $display("FAIL: read port %0d at t=%0d", p, t);
          end
        end
      re = 2'($urandom);
      raddr[0] = CW'($urandom % KB);
      raddr[1] = CW'($urandom % KB);
      we = 2'($urandom);
      waddr[0] = CW'($urandom % KB);
      waddr[1] = CW'((int'(waddr[0]) + 1 + int'($urandom % (KB - 1))) % KB);
      wmask = (t % 3 == 0) ? '1 : {$urandom, $urandom, $urandom};
      for (int p = 0; p < 2; p++)
        for (int i = 0; i < Z_MAX; i++) wdata[p][i] = WL'($urandom);
      // reads see the memory before this cycle's writes
      for (int p = 0; p < 2; p++) begin
        exp_v[p] = re[p];
        expd[p]  = model[raddr[p]];
      end
      for (int p = 0; p < 2; p++)
        if (we[p])
          for (int i = 0; i < Z_MAX; i++)
            if (wmask[i]) model[waddr[p]][i] = wdata[p][i];
    end
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
