// tb_lsst: loop stride speculation table with the induction variables of a
// matrix-multiplication inner loop ($v1 += 80, $a1 += 1, $a0 += 4; the
// compare "slti $v0, $a1, 100" is not a candidate). Checks the spawn values
// r + k*imm for contexts 1..8 iterations ahead, the end-of-iteration check
// (correct and wrong final values), the misprediction counter that stops
// predicting a register after repeated misses, and the clear. A random part
// checks the formula for random strides (negative ones included).
module tb_lsst;
  import dsmt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic clear, cand_valid, spawn_valid, chk_valid, chk_mismatch;
  logic [5:0] cand_rd, cand_rs;
  logic [15:0] cand_imm;
  logic [2:0] spawn_ctx, chk_ctx;
  logic [3:0] spawn_dist;
  logic [31:0] base_regs [64], final_regs [64], ovr_value [64];
  logic [63:0] ovr_valid, chk_bad_regs, stride_valid;
  int checks = 0, failures = 0;

  lsst dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic cand(int rd, int rs, int imm);
    @(negedge clk); cand_valid = 1; cand_rd = 6'(rd); cand_rs = 6'(rs); cand_imm = 16'(imm);
    @(negedge clk); cand_valid = 0;
  endtask
  task automatic ck(string what, bit cond);
    checks++; if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    clear = 0; cand_valid = 0; spawn_valid = 0; chk_valid = 0; cand_rd = 0; cand_rs = 0; cand_imm = 0;
    spawn_ctx = 0; chk_ctx = 0; spawn_dist = 0;
    foreach (base_regs[i]) begin base_regs[i] = 32'(1000 * i); final_regs[i] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    cand(3, 3, 80); cand(5, 5, 1); cand(4, 4, 4); cand(2, 5, 100);
    @(negedge clk);
    ck("stride mask", stride_valid == 64'h38);
    for (int k = 1; k <= 7; k++) begin
      spawn_valid = 1; spawn_ctx = 3'(k); spawn_dist = 4'(k); #1;
      ck("ovr mask", ovr_valid == 64'h38);
      ck("v1", ovr_value[3] == 32'(3000 + 80 * k));
      ck("a1", ovr_value[5] == 32'(5000 + k));
      ck("a0", ovr_value[4] == 32'(4000 + 4 * k));
      @(negedge clk);
    end
    spawn_valid = 0;
    // successor of context 0 is context 1 (one iteration ahead)
    foreach (final_regs[i]) final_regs[i] = base_regs[i];
    final_regs[3] = 3080; final_regs[5] = 5001; final_regs[4] = 4004; final_regs[2] = 77;
    chk_valid = 1; chk_ctx = 1; #1;
    ck("correct prediction", !chk_mismatch && chk_bad_regs == 0);
    final_regs[4] = 4008; #1;
    ck("wrong a0", chk_mismatch && chk_bad_regs == 64'h10);
    chk_valid = 0; final_regs[4] = 4004;
    // three more misses of $a0 saturate its counter -> not predicted
    repeat (3) begin
      @(negedge clk); chk_valid = 1; chk_ctx = 2; final_regs[4] = 1; final_regs[3] = 3160; final_regs[5] = 5002; @(negedge clk); chk_valid = 0;
    end
    @(negedge clk); spawn_valid = 1; spawn_ctx = 5; spawn_dist = 4'd8; #1;
    ck("a0 no longer predicted", ovr_valid == 64'h28);
    ck("v1 8 ahead", ovr_value[3] == 32'(3000 + 640));
    @(negedge clk); spawn_valid = 0; clear = 1; @(negedge clk); clear = 0; #1;
    ck("cleared", stride_valid == 0);
    // random strides
    for (int t = 0; t < 2000; t++) begin
      int r, imm, k;
      @(negedge clk);
      r = $urandom % 64; imm = int'($urandom % 65536) - 32768;
      cand_valid = 1; cand_rd = 6'(r); cand_rs = 6'(r); cand_imm = 16'(imm);
      @(negedge clk); cand_valid = 0;
      k = 1 + $urandom % 8; base_regs[r] = $urandom;
      spawn_valid = 1; spawn_ctx = 3'($urandom); spawn_dist = 4'(k); #1;
      ck("random", ovr_valid[r] && ovr_value[r] == base_regs[r] + 32'(imm * k));
      @(negedge clk); spawn_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
