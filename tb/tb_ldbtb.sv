// tb_ldbtb: full-size (1024 x 2) loop detection BTB.
// Directed part: a loop whose branch misses is detected at the writeback of
// its third iteration, the same loop is detected at its second iteration
// the next time, a call never counts, a loop marked bad is not reported and
// becomes reportable again when marked good.
// Random part: branches from a pool that collides in a few sets, checked
// every cycle against a reference model (2-way LRU, 2-bit counters,
// consecutive-taken counts) for hit, direction, target, loop flag and
// detection.
module tb_ldbtb;
  logic clk = 0, rst_n = 0;
  logic [31:0] lk_pc, lk_target, wb_pc, wb_target, det_branch, det_target, upd_pc;
  logic lk_hit, lk_taken, lk_loop, wb_valid, wb_taken, wb_is_call, det_valid, upd_valid, upd_good;
  logic [7:0] det_iters;
  int checks = 0, failures = 0, dets = 0;

  ldbtb dut (.*);
  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // reference model
  typedef struct { bit v; int unsigned tag; int unsigned tgt; int ctr; bit loop; int it; bit bad; } me_t;
  me_t m [1024][2];
  bit  mlru [1024];

  function automatic int unsigned sidx(int unsigned pc); return (pc >> 3) & 1023; endfunction
  function automatic int unsigned stag(int unsigned pc); return pc >> 13; endfunction
  function automatic int mway(int unsigned pc);
    for (int w = 0; w < 2; w++) if (m[sidx(pc)][w].v && m[sidx(pc)][w].tag == stag(pc)) return w;
    return -1;
  endfunction

  // returns 1 when the model reports a detection
  function automatic bit mwb(int unsigned pc, bit taken, int unsigned tgt, bit call);
    int w; int unsigned s; bit d;
    s = sidx(pc); w = mway(pc); d = 0;
    if (w >= 0) begin
      mlru[s] = (w == 0);
      if (taken) begin
        if (m[s][w].ctr < 3) m[s][w].ctr++;
        m[s][w].tgt = tgt;
        if (tgt <= pc && !call) begin
          if (m[s][w].it != 0 && !m[s][w].bad) begin d = 1; m[s][w].loop = 1; end
          if (m[s][w].it < 255) m[s][w].it++;
        end
      end else begin
        if (m[s][w].ctr > 0) m[s][w].ctr--;
        m[s][w].it = 0;
      end
    end else if (taken) begin
      w = mlru[s];
      m[s][w] = '{v: 1, tag: stag(pc), tgt: tgt, ctr: 2, loop: 0, it: 0, bad: 0};
      mlru[s] = !mlru[s];
    end
    return d;
  endfunction

  task automatic wb(int unsigned pc, bit taken, int unsigned tgt, bit call, output bit got);
    @(negedge clk);
    wb_valid = 1; wb_pc = pc; wb_taken = taken; wb_target = tgt; wb_is_call = call;
    @(negedge clk);
    wb_valid = 0;
    #1 got = det_valid;
  endtask

  task automatic expect_det(string what, bit got, bit exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: det=%0d expected %0d", what, got, exp); end
  endtask

  initial begin
    bit g;
    wb_valid = 0; wb_pc = 0; wb_taken = 0; wb_target = 0; wb_is_call = 0; upd_valid = 0; upd_pc = 0; upd_good = 0; lk_pc = 0;
    foreach (m[i, j]) m[i][j].v = 0;
    foreach (mlru[i]) mlru[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    // loop at 0x4002e8 -> 0x400290 (cf. an 11-instruction inner loop)
    wb(32'h4002e8, 1, 32'h400290, 0, g); expect_det("iter1 (miss)", g, 0);
    void'(mwb(32'h4002e8, 1, 32'h400290, 0));
    wb(32'h4002e8, 1, 32'h400290, 0, g); expect_det("iter2", g, 0);
    void'(mwb(32'h4002e8, 1, 32'h400290, 0));
    wb(32'h4002e8, 1, 32'h400290, 0, g); expect_det("iter3", g, 1);
    checks++; if (det_branch != 32'h4002e8 || det_target != 32'h400290) failures++;
    void'(mwb(32'h4002e8, 1, 32'h400290, 0));
    wb(32'h4002e8, 0, 32'h400290, 0, g); expect_det("exit", g, 0);
    void'(mwb(32'h4002e8, 0, 32'h400290, 0));
    lk_pc = 32'h4002e8; #1; checks++;
    if (!lk_hit || !lk_loop || lk_target != 32'h400290) begin failures++; $display("lookup after loop"); end
    // second execution: entry present, detection in iteration 2
    wb(32'h4002e8, 1, 32'h400290, 0, g); expect_det("2nd run iter1", g, 0);
    void'(mwb(32'h4002e8, 1, 32'h400290, 0));
    wb(32'h4002e8, 1, 32'h400290, 0, g); expect_det("2nd run iter2", g, 1);
    void'(mwb(32'h4002e8, 1, 32'h400290, 0));
    // mark bad: no more detections
    @(negedge clk); upd_valid = 1; upd_pc = 32'h4002e8; upd_good = 0; @(negedge clk); upd_valid = 0;
    m[sidx(32'h4002e8)][mway(32'h4002e8)].bad = 1;
    wb(32'h4002e8, 1, 32'h400290, 0, g); expect_det("bad loop", g, 0);
    void'(mwb(32'h4002e8, 1, 32'h400290, 0));
    @(negedge clk); upd_valid = 1; upd_good = 1; @(negedge clk); upd_valid = 0;
    m[sidx(32'h4002e8)][mway(32'h4002e8)].bad = 0;
    wb(32'h4002e8, 1, 32'h400290, 0, g); expect_det("good again", g, 1);
    void'(mwb(32'h4002e8, 1, 32'h400290, 0));
    // calls never form loops
    for (int i = 0; i < 4; i++) begin
      wb(32'h500100, 1, 32'h400000, 1, g); expect_det("call", g, 0);
      void'(mwb(32'h500100, 1, 32'h400000, 1));
    end
    // random against the model
    for (int t = 0; t < 20000; t++) begin
      int unsigned pc, tgt; bit tk, call, e;
      pc  = 32'h400000 + ((($urandom % 6) * 8192) + (($urandom % 3) * 8));
      tgt = ($urandom % 4 != 0) ? pc - 32'(8 * (1 + $urandom % 20)) : pc + 64;
      tk  = ($urandom % 5 != 0);
      call = ($urandom % 16 == 0);
      @(negedge clk);
      lk_pc = 32'h400000 + ((($urandom % 6) * 8192) + (($urandom % 3) * 8));
      wb_valid = 1; wb_pc = pc; wb_taken = tk; wb_target = tgt; wb_is_call = call;
      #1;
      begin
        int w; w = mway(lk_pc);
        checks++;
        if (lk_hit != (w >= 0) || (w >= 0 && (lk_taken != (m[sidx(lk_pc)][w].ctr >= 2) ||
            lk_target != m[sidx(lk_pc)][w].tgt || lk_loop != m[sidx(lk_pc)][w].loop))) begin
          failures++; $display("t=%0d lookup mismatch pc %h", t, lk_pc);
        end
      end
      e = mwb(pc, tk, tgt, call);
      @(negedge clk);
      wb_valid = 0;
      #1; checks++;
      if (det_valid != e) begin failures++; $display("t=%0d det %0d exp %0d", t, det_valid, e); end
      if (e) dets++;
    end
    checks++;
    if (dets == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
