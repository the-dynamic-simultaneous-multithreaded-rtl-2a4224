// tb_tciu: thread creation and initiation unit with 8 contexts. Walks the
// operating modes (non-DSMT, pre-DSMT for two committed iterations, full-DSMT)
// and checks the anchors, the cloning sequence (one context per cycle, in
// context order, with iteration distances 1..7 and commit held), the J bit
// and synchronizing state, hold and release, a squash of a context and all
// later ones, the flag transfer (head moves, finished and squashed contexts
// are cloned again as the newest iterations, the synchronizing successor
// runs non-speculatively), the exit on a worse IPC (loop marked bad) and the
// exit on the loop's not-taken branch (loop marked good).
module tb_tciu;
  import dsmt_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic det_valid, cm_br_valid, cm_br_taken, ipc_result_valid, conf_inc, conf_dec;
  logic [31:0] det_branch, det_target, cm_br_pc, continuation, loop_branch, ldbtb_upd_pc;
  ipc_cmp_e ipc_result;
  logic [N-1:0] reach_end, unend, hold_req, squash_req, v_bits, s_bits, j_bits, flush_mask;
  logic [63:0] ns_r_bits, ns_d_bits, d_anchor, r_anchor;
  logic [5:0] conf_reg;
  logic [5:0] conf_lk_reg [2];
  logic conf_lk_low [2];
  dsmt_mode_e mode;
  logic m_bit, commit_hold, spawn_valid, xfer, pre_iter, dsmt_exit, ldbtb_upd_valid, ldbtb_upd_good;
  logic [2:0] head, tail, spawn_ctx, spawn_src, xfer_old, xfer_new;
  logic [3:0] spawn_dist;
  ctx_state_e state [N];
  logic [15:0] ns_iter;
  int checks = 0, failures = 0;

  tciu dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic ck(string what, bit cond);
    checks++; if (!cond) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask
  task automatic idle();
    det_valid = 0; cm_br_valid = 0; ipc_result_valid = 0; reach_end = 0; squash_req = 0;
    conf_inc = 0; conf_dec = 0;
  endtask
  task automatic commit_branch(bit taken);
    @(negedge clk); idle(); cm_br_valid = 1; cm_br_pc = 32'h4002e8; cm_br_taken = taken;
  endtask
  // collect one full cloning sequence; returns contexts in order and distances
  task automatic collect(int n, output int ctxs [8], output int dists [8], output int cycles);
    int k; k = 0; cycles = 0;
    while (k < n && cycles < 40) begin
      #1;
      if (spawn_valid) begin ctxs[k] = int'(spawn_ctx); dists[k] = int'(spawn_dist); k++; end
      @(negedge clk); idle(); cycles++;
    end
  endtask

  initial begin
    int cx [8], ds [8], cyc;
    idle(); hold_req = 0; unend = 0; ns_r_bits = 0; ns_d_bits = 0; ipc_result = IPC_NONE;
    det_branch = 0; det_target = 0; cm_br_pc = 0; cm_br_taken = 0; conf_reg = 0;
    conf_lk_reg[0] = 0; conf_lk_reg[1] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    #1 ck("reset", mode == MODE_NON && head == 0 && state[0] == CTX_RUNNING && state[1] == CTX_INVALID);
    @(negedge clk); det_valid = 1; det_branch = 32'h4002e8; det_target = 32'h400290;
    @(negedge clk); idle(); #1;
    ck("pre-DSMT", mode == MODE_PRE && continuation == 32'h400290 && loop_branch == 32'h4002e8);
    ns_r_bits = 64'h3c; ns_d_bits = 64'h0;
    commit_branch(1); #1 ck("pre iteration 1", pre_iter);
    @(negedge clk); idle(); #1 ck("still pre", mode == MODE_PRE && r_anchor == 64'h3c);
    ns_d_bits = 64'h8;
    commit_branch(1); @(negedge clk); idle(); #1;
    ck("full-DSMT", mode == MODE_FULL && m_bit && d_anchor == 64'h8 && ns_iter == 0);
    ck("commit held while cloning", commit_hold);
    collect(7, cx, ds, cyc);
    for (int k = 0; k < 7; k++) ck("clone order", cx[k] == k + 1 && ds[k] == k + 1);
    ck("clone one per cycle", cyc == 7);
    #1 ck("all running", v_bits == 8'hff && s_bits == 8'hfe && !commit_hold);
    // context 3 finishes its iteration, context 4 holds
    @(negedge clk); reach_end = 8'h08; hold_req = 8'h10;
    @(negedge clk); idle(); #1;
    ck("sync", state[3] == CTX_SYNC && j_bits[3]);
    ck("hold", state[4] == CTX_HOLD);
    hold_req = 0; @(negedge clk); #1 ck("released", state[4] == CTX_RUNNING);
    // squash context 5 -> 5, 6, 7
    squash_req = 8'h20; #1 ck("flush mask", flush_mask == 8'he0);
    @(negedge clk); idle(); #1;
    ck("squashed", v_bits == 8'h1f && state[6] == CTX_INVALID);
    // context 1 done; flag transfer 0 -> 1
    reach_end = 8'h02; @(negedge clk); idle();
    commit_branch(1); #1 ck("xfer", xfer && xfer_old == 0 && xfer_new == 1);
    ns_r_bits = 64'hf0; ns_d_bits = 64'h30;
    @(negedge clk); idle(); #1;
    ck("new head", head == 1 && !s_bits[1] && state[1] == CTX_RUNNING && ns_iter == 1);
    ck("anchors from finished", r_anchor == 64'hf0 && d_anchor == 64'h30);
    collect(4, cx, ds, cyc);
    ck("respawn order", cx[0] == 5 && cx[1] == 6 && cx[2] == 7 && cx[3] == 0);
    ck("respawn dists", ds[0] == 4 && ds[1] == 5 && ds[2] == 6 && ds[3] == 7);
    #1 ck("all valid again", v_bits == 8'hff);
    // worse IPC: leave DSMT mode, loop marked bad
    @(negedge clk); ipc_result_valid = 1; ipc_result = IPC_LT; #1;
    ck("exit on IPC", dsmt_exit && ldbtb_upd_valid && !ldbtb_upd_good && flush_mask == 8'hfd);
    @(negedge clk); idle(); #1;
    ck("non-DSMT", mode == MODE_NON && v_bits == 8'h02 && head == 1);
    // again, exit through the not-taken loop branch
    @(negedge clk); det_valid = 1; @(negedge clk); idle();
    commit_branch(1); commit_branch(1); @(negedge clk); idle();
    #1 ck("full again", mode == MODE_FULL);
    collect(7, cx, ds, cyc);
    commit_branch(0); #1 ck("exit on loop end", dsmt_exit && ldbtb_upd_valid && ldbtb_upd_good);
    @(negedge clk); idle(); #1 ck("back to one thread", mode == MODE_NON && v_bits == 8'h02);
    // confidence counters
    for (int i = 0; i < 3; i++) begin @(negedge clk); conf_inc = 1; conf_reg = 9; end
    @(negedge clk); idle(); conf_lk_reg[0] = 9; #1 ck("confidence low", conf_lk_low[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
