// tb_loop_stack: random loop detections drawn from a nest of address ranges
// plus unrelated loops, and random IPC records, checked against a reference
// model of the nested-loop stack (push enclosing loops, restart otherwise,
// best = highest IPC, innermost first on ties). Overflow of the 4-deep stack
// is exercised.
module tb_loop_stack;
  logic clk = 0, rst_n = 0;
  logic det_valid, ipc_valid;
  logic [31:0] det_branch, det_target, ipc_branch;
  logic [7:0] ipc_value;
  logic [2:0] depth;
  logic best_valid;
  logic [31:0] best_branch, best_target, top_branch, top_target;
  int checks = 0, failures = 0, pushes = 0, overflows = 0, restarts = 0;
  int mb [4], mt [4], mi [4];
  int md;
  int lvl = 0;
  // nest: level k spans [1000-100k, 2000+100k]
  loop_stack dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    det_valid = 0; ipc_valid = 0; det_branch = 0; det_target = 0; ipc_branch = 0; ipc_value = 0; md = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      det_valid = $urandom % 3 == 0;
      if ($urandom % 6 == 0) begin
        det_target = 32'(8000 + 8 * ($urandom % 4)); det_branch = det_target + 64;
      end else begin
        int k; k = ($urandom % 4 == 0) ? $urandom % 6 : lvl; lvl = (lvl + 1) % 6;
        det_target = 32'(1000 - 100 * k); det_branch = 32'(2000 + 100 * k);
      end
      ipc_valid = !det_valid && ($urandom % 2);
      ipc_branch = (md > 0) ? 32'(mb[$urandom % md]) : 32'd0;
      ipc_value = 8'($urandom % 16);
      @(posedge clk);
      if (det_valid) begin
        logic same, encl;
        same = md > 0 && int'(det_branch) == mb[md-1] && int'(det_target) == mt[md-1];
        encl = md > 0 && int'(det_target) <= mt[md-1] && int'(det_branch) >= mb[md-1] && !same;
        if (same) ;
        else if (encl && md < 4) begin mb[md] = int'(det_branch); mt[md] = int'(det_target); mi[md] = 0; md++; pushes++; end
        else if (encl) begin
          for (int i = 0; i < 3; i++) begin mb[i] = mb[i+1]; mt[i] = mt[i+1]; mi[i] = mi[i+1]; end
          mb[3] = int'(det_branch); mt[3] = int'(det_target); mi[3] = 0; overflows++;
        end else begin mb[0] = int'(det_branch); mt[0] = int'(det_target); mi[0] = 0; md = 1; restarts++; end
      end else if (ipc_valid) begin
        for (int i = 0; i < md; i++) if (mb[i] == int'(ipc_branch)) mi[i] = int'(ipc_value);
      end
      #1;
      checks++;
      if (int'(depth) != md) begin failures++; $display("depth %0d exp %0d", depth, md); end
      if (md > 0) begin
        int b, bi;
        checks++;
        if (int'(top_branch) != mb[md-1] || int'(top_target) != mt[md-1]) failures++;
        b = -1; bi = 0;
        for (int i = 0; i < md; i++) if (mi[i] > b) begin b = mi[i]; bi = i; end
        checks++;
        if (!best_valid || int'(best_branch) != mb[bi] || int'(best_target) != mt[bi]) begin
          failures++; $display("best %0h exp %0h", best_branch, mb[bi]);
        end
      end
    end
    checks++;
    if (pushes == 0 || overflows == 0 || restarts == 0) begin failures++; $display("coverage %0d %0d %0d", pushes, overflows, restarts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
