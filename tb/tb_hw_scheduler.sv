// tb_hw_scheduler: hybrid-model hardware scheduler at its defaults (8
// contexts, L = 500 cycles, hardware context switch c = 2 cycles), plus a
// variable-latency instance woken by cache-line tags. Checks the context
// switch cost, the RQ order, that a thread sleeps exactly L cycles, that the
// saved PC travels with the tag, finishing threads, the request for a new
// set, and wake-up by line tag in any order.
module tb_hw_scheduler;
  logic clk = 0, rst_n = 0;
  logic load_valid, load_ready, need_set, run_valid, switching, save_valid, miss, finish, resolve_valid;
  logic [7:0] load_tid, run_tid;
  logic [31:0] load_pc, load_sp, run_pc, run_sp, save_pc;
  logic [15:0] miss_line, resolve_line;
  logic [3:0] resident, rq_count, sq_count;
  // variable latency instance
  logic v_run_valid, v_switching, v_need_set, v_load_ready, v_miss, v_finish;
  logic [7:0] v_run_tid;
  logic [31:0] v_run_pc, v_run_sp;
  logic [3:0] v_resident, v_rq, v_sq;
  int checks = 0, failures = 0;
  int cyc = 0;

  hw_scheduler dut (.*);
  hw_scheduler #(.VAR_LAT(1'b1)) dut_v (
    .clk, .rst_n, .load_valid, .load_tid, .load_pc, .load_sp, .load_ready(v_load_ready),
    .need_set(v_need_set), .resident(v_resident), .run_valid(v_run_valid), .run_tid(v_run_tid),
    .run_pc(v_run_pc), .run_sp(v_run_sp), .switching(v_switching), .save_valid(1'b0), .save_pc(32'd0),
    .miss(v_miss), .miss_line, .finish(v_finish), .resolve_valid, .resolve_line,
    .rq_count(v_rq), .sq_count(v_sq));

  always #5 clk = ~clk;
  int sw_cycles = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (switching) sw_cycles <= sw_cycles + 1;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic ck(string what, bit cond);
    checks++; if (!cond) begin failures++; $display("FAIL %s @cycle %0d", what, cyc); end
  endtask

  initial begin
    int t0, sw;
    load_valid = 0; load_tid = 0; load_pc = 0; load_sp = 0; save_valid = 0; save_pc = 0; miss = 0; finish = 0;
    miss_line = 0; resolve_valid = 0; resolve_line = 0; v_miss = 0; v_finish = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    #1 ck("empty set", need_set && !run_valid);
    // software downloads threads 1..3
    for (int i = 1; i <= 3; i++) begin
      @(negedge clk); load_valid = 1; load_tid = 8'(i); load_pc = 32'(32'h1000 * i); load_sp = 32'(32'h8000 + i);
    end
    @(negedge clk); load_valid = 0;
    // count the switch cycles before thread 1 runs
    while (!run_valid) @(negedge clk);
    ck("switch cost", sw_cycles == 2);
    ck("first thread", run_tid == 1 && run_pc == 32'h1000 && run_sp == 32'h8001);
    ck("resident", resident == 3 && !need_set);
    // thread 1 misses at PC 0x1040
    @(negedge clk); miss = 1; save_valid = 1; save_pc = 32'h1040; miss_line = 16'h11;
    @(negedge clk); miss = 0; save_valid = 0; t0 = cyc;
    #1 ck("thread 1 sleeping", sq_count == 1);
    while (!run_valid) @(negedge clk);
    ck("thread 2 runs", run_tid == 2);
    // thread 2 finishes, thread 3 runs
    @(negedge clk); finish = 1; @(negedge clk); finish = 0;
    while (!run_valid) @(negedge clk);
    ck("thread 3 runs", run_tid == 3);
    // thread 1 wakes exactly L cycles after its miss
    while (sq_count != 0 && cyc < t0 + 600) @(negedge clk);
    ck("sleeps L cycles", cyc - t0 == 500);
    if (cyc - t0 != 500) $display("slept %0d", cyc - t0);
    @(negedge clk); finish = 1; @(negedge clk); finish = 0;
    while (!run_valid) @(negedge clk);
    ck("thread 1 resumes at saved PC", run_tid == 1 && run_pc == 32'h1040);
    @(negedge clk); finish = 1; @(negedge clk); finish = 0; #1;
    ck("set done", need_set && resident == 0);
    // variable latency: threads 1..3 loaded above into dut_v too
    while (!v_run_valid) @(negedge clk);
    ck("v first", v_run_tid == 1);
    @(negedge clk); v_miss = 1; miss_line = 16'hA1; @(negedge clk); v_miss = 0;
    while (!v_run_valid) @(negedge clk);
    @(negedge clk); v_miss = 1; miss_line = 16'hB2; @(negedge clk); v_miss = 0;
    while (!v_run_valid) @(negedge clk);
    ck("v third runs", v_run_tid == 3 && v_sq == 2);
    repeat (700) @(negedge clk);
    ck("no timer wake in line-tag mode", v_sq == 2);
    @(negedge clk); resolve_valid = 1; resolve_line = 16'hB2; @(negedge clk); resolve_valid = 0; #1;
    ck("thread 2 woken first", v_sq == 1 && v_rq == 1);
    @(negedge clk); v_finish = 1; @(negedge clk); v_finish = 0;
    while (!v_run_valid) @(negedge clk);
    ck("v thread 2 runs", v_run_tid == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
