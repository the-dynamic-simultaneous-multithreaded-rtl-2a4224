// tb_ipc_monitor: runs pre-DSMT and full-DSMT periods of random length with
// random commit counts and checks that the result appears exactly when the
// full-DSMT cycle count reaches the pre-DSMT one, with the comparison of
// instruction counts over equal cycle windows (<, =, > each exercised).
module tb_ipc_monitor;
  import dsmt_pkg::*;
  logic clk = 0, rst_n = 0;
  dsmt_mode_e mode;
  logic [3:0] commit_n;
  ipc_cmp_e result;
  logic result_valid;
  logic [23:0] pre_cycles, pre_instrs, full_cycles, full_instrs;
  int checks = 0, failures = 0;
  int seen [4];

  ipc_monitor dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    mode = MODE_NON; commit_n = 0;
    foreach (seen[i]) seen[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 60; run++) begin
      int pc, pi, fi, plen, rate_p, rate_f;
      ipc_cmp_e exp;
      plen = 5 + $urandom % 40;
      rate_p = 1 + $urandom % 4; rate_f = (run % 3 == 0) ? rate_p : 1 + $urandom % 6;
      pi = 0; fi = 0;
      mode = MODE_NON; commit_n = 0;
      @(negedge clk);
      mode = MODE_PRE;
      for (int c = 0; c < plen; c++) begin
        commit_n = 4'(rate_p); pi += rate_p; @(negedge clk);
      end
      mode = MODE_FULL;
      for (int c = 0; c < plen + 5; c++) begin
        commit_n = (run % 3 == 0) ? 4'(rate_p) : 4'(rate_f);
        if (c < plen) fi += int'(commit_n);
        @(posedge clk); #1;
        checks++;
        if (result_valid != (c == plen - 1)) begin
          failures++; $display("run %0d cycle %0d valid=%0d", run, c, result_valid);
        end
        if (result_valid) begin
          exp = (fi > pi) ? IPC_GT : (fi == pi) ? IPC_EQ : IPC_LT;
          checks++;
          if (result != exp) begin failures++; $display("run %0d result %0d exp %0d", run, result, exp); end
          seen[exp]++;
        end
        @(negedge clk);
      end
    end
    for (int k = 1; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("outcome %0d never happened", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
