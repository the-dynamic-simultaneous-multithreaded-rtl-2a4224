// tb_rob: full-size (32-entry) reorder buffer against a queue model: random
// allocation, out-of-order writeback by tag, in-order commit gated by
// commit_en, flush of the entries younger than a branch, full flush, and the
// rename lookup (youngest in-flight writer, ready bit and value).
module tb_rob;
  import dsmt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic flush_all, flush_after_valid, alloc_valid, alloc_dest_v, alloc_ready, commit_en;
  logic commit_valid, commit_rdy, commit_dest_v;
  logic [4:0] flush_after_tag, alloc_tag;
  logic [5:0] alloc_dest, commit_dest;
  logic [3:0] alloc_flags, commit_flags;
  logic wb_valid [2];
  logic [4:0] wb_tag [2];
  logic [31:0] wb_value [2];
  logic [31:0] commit_value;
  logic [5:0] lk_reg [2];
  logic lk_pending [2], lk_ready [2];
  logic [4:0] lk_tag [2];
  logic [31:0] lk_value [2];
  logic [5:0] count;
  int checks = 0, failures = 0, commits = 0, partial_flushes = 0, fulls = 0;

  typedef struct { int tag; bit dv; int dest; bit done; int unsigned val; int flags; } me_t;
  me_t q [$];

  rob dut (.*);
  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    flush_all = 0; flush_after_valid = 0; flush_after_tag = 0; alloc_valid = 0; alloc_dest_v = 0;
    alloc_dest = 0; alloc_flags = 0; commit_en = 0;
    foreach (wb_valid[i]) begin wb_valid[i] = 0; wb_tag[i] = 0; wb_value[i] = 0; end
    foreach (lk_reg[i]) lk_reg[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      int nd;
      @(negedge clk);
      alloc_valid = ($urandom % 4 != 0); alloc_dest_v = ($urandom % 5 != 0);
      alloc_dest = 6'($urandom % 8); alloc_flags = 4'($urandom);
      commit_en = ($urandom % 3 != 0) && !(t % 2000 < 200);
      // writeback two random not-done entries
      for (int w = 0; w < 2; w++) begin
        wb_valid[w] = 0;
        if (q.size() > 0 && $urandom % 2) begin
          int k; k = $urandom % q.size();
          if (!q[k].done && !(w == 1 && wb_valid[0] && int'(wb_tag[0]) == q[k].tag)) begin
            wb_valid[w] = 1; wb_tag[w] = 5'(q[k].tag); wb_value[w] = $urandom;
          end
        end
      end
      flush_all = ($urandom % 1500 == 0);
      flush_after_valid = q.size() > 0 && ($urandom % 60 == 0);
      if (flush_after_valid) flush_after_tag = 5'(q[$urandom % q.size()].tag);
      for (int p = 0; p < 2; p++) lk_reg[p] = 6'($urandom % 8);
      #1;
      // checks of combinational outputs
      checks++;
      if (int'(count) != q.size() || alloc_ready != (q.size() < 32)) begin failures++; $display("t=%0d count %0d exp %0d", t, count, q.size()); end
      if (!alloc_ready) fulls++;
      nd = q.size() > 0 && q[0].done && commit_en;
      checks++;
      if (commit_valid != nd) begin failures++; $display("t=%0d commit_valid %0d exp %0d", t, commit_valid, nd); end
      if (nd) begin
        checks++;
        if (commit_dest_v != q[0].dv || int'(commit_dest) != q[0].dest || commit_value != q[0].val || int'(commit_flags) != q[0].flags)
          begin failures++; $display("t=%0d commit payload", t); end
      end
      for (int p = 0; p < 2; p++) begin
        int y; y = -1;
        for (int i = 0; i < q.size(); i++) if (q[i].dv && q[i].dest == int'(lk_reg[p])) y = i;
        checks++;
        if (lk_pending[p] != (y >= 0) || (y >= 0 && (int'(lk_tag[p]) != q[y].tag || lk_ready[p] != q[y].done ||
            (q[y].done && lk_value[p] != q[y].val)))) begin failures++; $display("t=%0d lookup %0d", t, p); end
      end
      if (alloc_valid && alloc_ready && !flush_all && !flush_after_valid) begin
        checks++;
        if (q.size() > 0 && int'(alloc_tag) != (q[$].tag + 1) % 32) failures++;
      end
      @(posedge clk);
      // model update
      if (flush_all) q.delete();
      else begin
        for (int w = 0; w < 2; w++) if (wb_valid[w])
          foreach (q[i]) if (q[i].tag == int'(wb_tag[w])) begin q[i].done = 1; q[i].val = wb_value[w]; end
        if (nd) begin void'(q.pop_front()); commits++; end
        if (flush_after_valid) begin
          int k; k = -1;
          foreach (q[i]) if (q[i].tag == int'(flush_after_tag)) k = i;
          while (q.size() > k + 1) void'(q.pop_back());
          partial_flushes++;
        end else if (alloc_valid && q.size() < 32 + (nd ? 1 : 0) && int'(count) < 32)
          q.push_back('{tag: int'(alloc_tag), dv: alloc_dest_v, dest: int'(alloc_dest), done: 0, val: 0, flags: int'(alloc_flags)});
      end
    end
    checks++;
    if (commits == 0 || partial_flushes == 0 || fulls == 0) begin failures++; $display("coverage %0d %0d %0d", commits, partial_flushes, fulls); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
