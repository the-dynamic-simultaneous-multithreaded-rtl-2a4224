// tb_mob: full-size (64-entry) memory order buffer against a queue model:
// in-order allocation of loads and stores, address/data updates in any
// order, store-to-load forwarding from the youngest older store to the same
// word, in-order commit marking, store drain only while drain_en and the
// cache grants, load release at the head, and flush.
module tb_mob;
  import dsmt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic flush, alloc_valid, alloc_store, alloc_ready, upd_valid, fwd_hit, commit_valid, drain_en, st_req, st_gnt;
  logic cut_valid;
  logic [5:0] cut_tail;
  assign cut_valid = 1'b0;
  assign cut_tail  = '0;
  logic [5:0] alloc_idx, upd_idx, ld_idx;
  logic [31:0] upd_addr, upd_data, fwd_data, st_addr, st_data;
  logic [6:0] count;
  int checks = 0, failures = 0, fwds = 0, drains = 0;
  typedef struct { int idx; bit st; bit av; int unsigned a; bit dv; int unsigned d; bit cm; } me_t;
  me_t q [$];
  int ncm;   // committed entries in q (prefix)

  mob dut (.*);
  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    flush = 0; alloc_valid = 0; alloc_store = 0; upd_valid = 0; upd_idx = 0; upd_addr = 0; upd_data = 0;
    ld_idx = 0; commit_valid = 0; drain_en = 0; st_gnt = 0; ncm = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      int li, ehit; int unsigned ed; bit pop;
      @(negedge clk);
      alloc_valid = ($urandom % 3 != 0); alloc_store = $urandom % 2;
      upd_valid = 0;
      if (q.size() > 0 && $urandom % 2) begin
        int k; k = $urandom % q.size();
        upd_valid = 1; upd_idx = 6'(q[k].idx); upd_addr = 32'(4 * ($urandom % 6)); upd_data = $urandom;
      end
      commit_valid = (ncm < q.size()) && ($urandom % 3 == 0);
      drain_en = (t % 3000) > 500;
      st_gnt = $urandom % 2;
      flush = ($urandom % 2500 == 0);
      li = -1;
      for (int i = q.size() - 1; i >= 0; i--) if (!q[i].st && q[i].av) li = i;
      if (li >= 0 && $urandom % 2) begin
        int k; k = $urandom % q.size(); if (!q[k].st && q[k].av) li = k;
      end
      ld_idx = (li >= 0) ? 6'(q[li].idx) : 6'd0;
      #1;
      checks++;
      if (int'(count) != q.size() || alloc_ready != (q.size() < 64)) begin failures++; $display("t=%0d count", t); end
      if (li >= 0) begin
        ehit = 0; ed = 0;
        for (int i = 0; i < li; i++) if (q[i].st && q[i].av && q[i].dv && (q[i].a >> 2) == (q[li].a >> 2)) begin ehit = 1; ed = q[i].d; end
        checks++;
        if (fwd_hit != ehit || (ehit && fwd_data != ed)) begin failures++; $display("t=%0d fwd %0d exp %0d", t, fwd_hit, ehit); end
        if (ehit) fwds++;
      end
      begin
        bit er;
        er = q.size() > 0 && q[0].st && q[0].cm && drain_en;
        checks++;
        if (st_req != er || (er && (st_addr != q[0].a || st_data != q[0].d))) begin failures++; $display("t=%0d st_req", t); end
        pop = q.size() > 0 && q[0].cm && (!q[0].st || (er && st_gnt));
        if (er && st_gnt) drains++;
      end
      @(posedge clk);
      if (flush) begin q.delete(); ncm = 0; end
      else begin
        if (upd_valid) foreach (q[i]) if (q[i].idx == int'(upd_idx)) begin
          q[i].av = 1; q[i].a = upd_addr; if (q[i].st) begin q[i].dv = 1; q[i].d = upd_data; end
        end
        if (commit_valid) begin q[ncm].cm = 1; ncm++; end
        if (pop) begin void'(q.pop_front()); ncm--; end
        if (alloc_valid && int'(count) < 64)
          q.push_back('{idx: int'(alloc_idx), st: alloc_store, av: 0, a: 0, dv: 0, d: 0, cm: 0});
      end
    end
    checks++;
    if (fwds == 0 || drains == 0) begin failures++; $display("coverage %0d %0d", fwds, drains); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
