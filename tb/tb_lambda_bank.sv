// tb_lambda_bank: random test of one Lambda bank against a behavioural
// model: one-cycle read latency, read-before-write on the same address, and
// no access at all while the bank is disabled (its read register holds).
module tb_lambda_bank;
  import ldpc_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic                en, re, we;
  logic [PW-1:0]       raddr, waddr;
  logic [1:0][W-1:0]   rdata, wdata;
  logic [1:0][W-1:0]   model [EP_MAX];
  logic [1:0][W-1:0]   expd;
  int checks = 0, failures = 0;

  lambda_bank dut (.clk, .en, .re, .raddr, .rdata, .we, .waddr, .wdata);

  initial begin
    en = 1; re = 0; we = 0; raddr = '0; waddr = '0; wdata = '0;
    for (int a = 0; a < EP_MAX; a++) begin
      @(negedge clk);
      we = 1; waddr = PW'(a); wdata = {$urandom}; model[a] = wdata;
    end
    @(negedge clk);
    we = 0; re = 1; raddr = '0; expd = model[0];
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (rdata != expd) begin
        failures++;
        if (failures < 10) $display("FAIL: t=%0d read %h expected %h", t, rdata, expd);
      end
      en    = ($urandom % 4) != 0;
      re    = $urandom;
      we    = $urandom;
      raddr = PW'($urandom % EP_MAX);
      waddr = (t % 5 == 0) ? raddr : PW'($urandom % EP_MAX);
      wdata = {$urandom};
      if (en && re) expd = model[raddr];
      if (en && we) model[waddr] = wdata;
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
