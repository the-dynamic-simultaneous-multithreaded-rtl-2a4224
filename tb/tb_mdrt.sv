// tb_mdrt: memory dataflow resolution table, 32 entries, 8 contexts, 4
// ports. Directed checks: allocation by speculative loads, sharing of an
// entry, no tracking of non-speculative loads, store with the same value
// (no squash), store with a new value (squash of the nearest early loader in
// context order after the non-speculative one), confidence saturation,
// several ports in one cycle, table full (refusal), per-context clear and
// clear_all.
module tb_mdrt;
  import dsmt_pkg::*;
  localparam int N = 8, NP = 4;
  logic clk = 0, rst_n = 0;
  logic enable, clear_all, sq_valid, lk_low;
  logic [2:0] head, sq_ctx;
  logic [N-1:0] ctx_clear;
  logic acc_valid [NP], acc_store [NP], acc_nack [NP];
  logic [2:0] acc_ctx [NP];
  logic [31:0] acc_addr [NP], acc_value [NP], lk_addr;
  logic [5:0] used;
  int checks = 0, failures = 0;

  mdrt dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic ck(string what, bit cond);
    checks++; if (!cond) begin failures++; $display("FAIL %s (used=%0d)", what, used); end
  endtask
  task automatic idle();
    for (int p = 0; p < NP; p++) begin acc_valid[p] = 0; acc_store[p] = 0; end
    ctx_clear = 0; clear_all = 0;
  endtask
  task automatic acc(int p, bit st, int c, int unsigned a, int unsigned v);
    acc_valid[p] = 1; acc_store[p] = st; acc_ctx[p] = 3'(c); acc_addr[p] = a; acc_value[p] = v;
  endtask

  initial begin
    enable = 1; head = 0; lk_addr = 0;
    foreach (acc_ctx[p]) begin acc_ctx[p] = 0; acc_addr[p] = 0; acc_value[p] = 0; end
    idle();
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); acc(0, 0, 2, 32'h1000, 5); @(negedge clk); idle(); #1;
    ck("alloc", used == 1);
    acc(0, 0, 3, 32'h1000, 5); acc(1, 0, 0, 32'h2000, 1); @(negedge clk); idle(); #1;
    ck("share + ns untracked", used == 1);
    acc(0, 1, 0, 32'h1000, 5); #1; ck("same value no squash", !sq_valid);
    @(negedge clk); idle();
    acc(0, 1, 0, 32'h1000, 9); #1; ck("new value squashes nearest", sq_valid && sq_ctx == 2);
    @(negedge clk); idle();
    acc(0, 1, 0, 32'h1000, 10); @(negedge clk); idle();
    acc(0, 1, 0, 32'h1000, 11); @(negedge clk); idle();
    lk_addr = 32'h1000; #1; ck("low confidence", lk_low);
    lk_addr = 32'h1004; #1; ck("other word", !lk_low);
    // ring order with head 5: loaders 1 and 7, nearest after 5 is 7
    head = 5;
    acc(0, 0, 1, 32'h3000, 1); acc(1, 0, 7, 32'h3000, 1); @(negedge clk); idle(); #1;
    ck("two ports one entry", used == 2);
    acc(2, 1, 5, 32'h3000, 2); #1; ck("ring order", sq_valid && sq_ctx == 7);
    @(negedge clk); idle();
    // fill the table
    for (int i = 0; i < 40; i += 4) begin
      for (int p = 0; p < 4; p++) acc(p, 0, 6, 32'h8000 + 32'(4 * (i + p)), 0);
      #1;
      if (i == 28) ck("nack when full", !acc_nack[0] && !acc_nack[1] && acc_nack[2] && acc_nack[3]);
      @(negedge clk); idle();
    end
    #1; ck("full", used == 32);
    ctx_clear = 8'b0100_0000; @(negedge clk); idle(); #1;
    ck("context clear frees entries", used == 2);
    enable = 0; acc(0, 0, 3, 32'h9000, 0); @(negedge clk); idle(); #1;
    ck("disabled", used == 2);
    enable = 1; clear_all = 1; @(negedge clk); idle(); #1;
    ck("clear_all", used == 0 && !lk_low);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
