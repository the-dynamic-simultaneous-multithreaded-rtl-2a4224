// tb_dsmt_top: end-to-end test of dsmt_top at its default (full) size: 8
// contexts, 64-entry IQs and MOBs, 32-entry ROBs, 2K-entry LDBTB, 4 cache
// ports, and the hybrid scheduler with 8 contexts and a 500-cycle latency.
// The testbench plays the parts the core leaves outside: the instruction
// cache and decoder (a small program held as a function of the PC, with the
// loop-end branches predicted taken), the execution units (random 1..4-cycle
// latency, two writebacks per cycle), the load unit (cache-port requests)
// and a single-cycle data cache.
// Program: loop A (8 iterations) sums a[i] into r3 and stores b[i] = 2*a[i]
// with the induction variable r1 += 1; loop B (64 iterations) loads a shared
// counter, adds 1 and stores it back, a true memory dependence between
// iterations; loop C (40 iterations) adds the odd values of its induction
// variable into r24, a register written only in every other iteration
// behind a forward branch (predicted not taken); loop D (30 iterations) sums
// its induction variable while the testbench reports data-cache misses of
// the non-speculative context early in full-DSMT mode, so that the relative
// IPC falls and the core leaves DSMT mode for that loop. Checks: every store that reaches the cache is the next one of
// the sequential program (address and data), the final non-speculative
// registers r1, r3, r11, r16, r23, r24 and r28 and the counter cell hold the sequential
// results, and the core reaches the end of the program.
// Mechanism counters (each must be non-zero): loop detection, pre-DSMT and
// full-DSMT entry, context spawn, LSST-predicted clone, flag transfer,
// register-dependence squash, MDRT memory squash, hold, synchronize,
// mispredicted-branch recovery, exit at loop end, exit on worse IPC, two
// fetch ports used, extra cache ports to the non-speculative context, and
// the hybrid scheduler's context switch and timer wake-up.
module tb_dsmt_top;
  import dsmt_pkg::*;
  localparam int N = NCTX;
  localparam int NA = 6, NB = 64, NC = 40, ND = 30;
  localparam logic [31:0] END_PC = 32'h0120;

  logic clk = 0, rst_n = 0;
  logic [1:0]  f_valid, f_accept;
  logic [2:0]  f_ctx [FETCH_PORTS];
  logic [31:0] f_pc [FETCH_PORTS];
  logic [2:0]  f_n [FETCH_PORTS];
  uop_t        f_uops [FETCH_PORTS][4];
  logic [31:0] f_next_pc [FETCH_PORTS];
  logic bp_hit, bp_taken;
  logic [31:0] bp_target;
  logic [N-1:0] icache_miss;
  logic ns_dmiss;
  logic exe_valid;
  logic [2:0] exe_ctx;
  logic [4:0] exe_tag;
  logic [5:0] exe_mobidx;
  uop_t exe_uop;
  logic [31:0] exe_a, exe_b;
  logic [1:0] wb_valid, wb_mem, wb_store, wb_branch, wb_call, wb_mispred;
  logic [2:0] wb_ctx [2];
  logic [4:0] wb_tag [2];
  logic [31:0] wb_value [2], wb_addr [2], wb_pc [2], wb_target [2];
  logic [5:0] wb_mobidx [2];
  logic [N-1:0] ld_req, ld_gnt;
  logic [4:0] ld_tag [N];
  logic [5:0] ld_mobidx [N];
  logic [31:0] ld_addr [N];
  logic [3:0] dc_valid, dc_we;
  logic [31:0] dc_addr [4], dc_wdata [4], dc_rdata [4];
  logic [1:0] mode;
  logic [2:0] ns_ctx, commit_ctx, dc_used, loop_depth;
  logic [N-1:0] ctx_valid, ctx_spec, ctx_done, ctx_hold, ctx_sync, ctx_flush;
  logic spawn_pulse, xfer_pulse, exit_pulse, commit_valid;
  logic [31:0] commit_pc, loop_best_branch;
  logic hs_load_valid, hs_load_ready, hs_need_set, hs_run_valid, hs_switching;
  logic hs_save_valid, hs_miss, hs_finish, hs_resolve_valid;
  logic [7:0] hs_load_tid, hs_run_tid;
  logic [31:0] hs_load_pc, hs_load_sp, hs_run_pc, hs_run_sp, hs_save_pc;
  logic [15:0] hs_miss_line, hs_resolve_line;
  logic [3:0] hs_rq_count, hs_sq_count;

  dsmt_top dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    #4000000;
    $display("watchdog: mode=%0d ns=%0d valid=%b hold=%b sync=%b done=%b loop=%h", mode, ns_ctx, ctx_valid,
             ctx_hold, ctx_sync, ctx_done, dut.loop_branch);
    for (int c = 0; c < N; c++)
      $display("  ctx %0d: pc=%h iq=%0d rob=%0d mob=%0d crdy=%0d head_pc=%h", c, dut.fpc[c], dut.iq_count[c],
               dut.rob_count[c], dut.mob_count[c], dut.rob_crdy[c], dut.cf[c].pc);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ program
  localparam logic [3:0] OP_NOP = 0, OP_LI = 1, OP_LIH = 2, OP_ADD = 3, OP_ADDI = 4,
                         OP_ADDSH = 5, OP_LD = 6, OP_ST = 7, OP_BNE = 8,
                         OP_ANDI = 9, OP_BEQ = 10;
  function automatic uop_t mk(logic [31:0] pc, logic [3:0] op, int d, int s1, int s2, int imm);
    uop_t u;
    u = '0;
    u.pc = pc; u.op = op; u.imm = 16'(imm);
    u.dest_v = d >= 0;  u.dest = 6'(d < 0 ? 0 : d);
    u.src1_v = s1 >= 0; u.src1 = 6'(s1 < 0 ? 0 : s1);
    u.src2_v = s2 >= 0; u.src2 = 6'(s2 < 0 ? 0 : s2);
    u.is_branch = op == OP_BNE || op == OP_BEQ;
    u.is_load = op == OP_LD;
    u.is_store = op == OP_ST;
    u.stride_cand = op == OP_ADDI && d == s1;
    return u;
  endfunction
  // the core starts at address 0; the listing below is written from 0x1000
  function automatic uop_t prog(logic [31:0] pc);
    case (pc + 32'h1000)
      32'h1000: return mk(pc, OP_LI, 1, -1, -1, 0);
      32'h1008: return mk(pc, OP_LI, 2, -1, -1, NA);
      32'h1010: return mk(pc, OP_LI, 3, -1, -1, 0);
      32'h1018: return mk(pc, OP_LIH, 7, -1, -1, 32'h100);
      32'h1020: return mk(pc, OP_LIH, 8, -1, -1, 32'h200);
      32'h1028: return mk(pc, OP_ADDSH, 4, 7, 1, 0);   // loop A
      32'h1030: return mk(pc, OP_LD, 5, 4, -1, 0);
      32'h1038: return mk(pc, OP_ADD, 3, 3, 5, 0);
      32'h1040: return mk(pc, OP_ADD, 6, 5, 5, 0);
      32'h1048: return mk(pc, OP_ADDSH, 9, 8, 1, 0);
      32'h1050: return mk(pc, OP_ST, -1, 9, 6, 0);
      32'h1058: return mk(pc, OP_ADDI, 1, 1, -1, 1);
      32'h1060: return mk(pc, OP_BNE, -1, 1, 2, -56);
      32'h1068: return mk(pc, OP_LI, 11, -1, -1, 0);
      32'h1070: return mk(pc, OP_LI, 12, -1, -1, NB);
      32'h1078: return mk(pc, OP_LIH, 13, -1, -1, 32'h300);
      32'h1080: return mk(pc, OP_LI, 17, -1, -1, 1);
      32'h1088: return mk(pc, OP_LD, 14, 13, -1, 0);   // loop B
      32'h1090: return mk(pc, OP_ADD, 16, 14, 17, 0);
      32'h1098: return mk(pc, OP_ST, -1, 13, 16, 0);
      32'h10a0: return mk(pc, OP_ADDI, 11, 11, -1, 1);
      32'h10a8: return mk(pc, OP_BNE, -1, 11, 12, -32);
      32'h10b0: return mk(pc, OP_LI, 23, -1, -1, 0);
      32'h10b8: return mk(pc, OP_LI, 25, -1, -1, NC);
      32'h10c0: return mk(pc, OP_LI, 24, -1, -1, 0);
      32'h10c8: return mk(pc, OP_ANDI, 22, 23, -1, 1);  // loop C
      32'h10d0: return mk(pc, OP_BEQ, -1, 22, 0, 16);
      32'h10d8: return mk(pc, OP_ADD, 24, 24, 23, 0);   // odd iterations only
      32'h10e0: return mk(pc, OP_ADDI, 23, 23, -1, 1);
      32'h10e8: return mk(pc, OP_BNE, -1, 23, 25, -32);
      32'h10f0: return mk(pc, OP_LI, 26, -1, -1, 0);
      32'h10f8: return mk(pc, OP_LI, 27, -1, -1, ND);
      32'h1100: return mk(pc, OP_LI, 28, -1, -1, 0);
      32'h1108: return mk(pc, OP_ADDI, 26, 26, -1, 1);  // loop D
      32'h1110: return mk(pc, OP_ADD, 28, 28, 26, 0);
      32'h1118: return mk(pc, OP_BNE, -1, 26, 27, -16);
      default:  return mk(pc, OP_NOP, -1, -1, -1, 0);
    endcase
  endfunction

  // ------------------------------------------------------------ data memory
  logic [31:0] dmem [65536];
  always_comb for (int q = 0; q < 4; q++) dc_rdata[q] = dmem[dc_addr[q][17:2]];
  function automatic int a_init(int i); return i * 3 + 1; endfunction

  // expected cache writes in program order
  logic [31:0] exp_addr [$], exp_data [$];
  initial begin
    for (int i = 0; i < NA; i++) begin exp_addr.push_back(32'h20000 + 4 * i); exp_data.push_back(32'(2 * a_init(i))); end
    for (int i = 0; i < NB; i++) begin exp_addr.push_back(32'h30000); exp_data.push_back(32'(i + 1)); end
  end

  // ------------------------------------------------------------ execution model
  typedef struct {
    int          ctx, seq, ready;
    logic [4:0]  tag;
    logic [5:0]  mobidx;
    uop_t        u;
    logic [31:0] value, addr;
    logic        taken, mispred;
    logic [31:0] target;
  } op_t;
  op_t inflight [$];
  op_t ldq [N][$];
  int  seqc [N];
  op_t drv [2];
  bit  drv_v [2];

  function automatic op_t execute(op_t o, logic [31:0] a, logic [31:0] b);
    logic [31:0] simm;
    simm = {{16{o.u.imm[15]}}, o.u.imm};
    o.taken = 0; o.mispred = 0; o.target = 0; o.addr = 0; o.value = 0;
    case (o.u.op)
      OP_LI:    o.value = simm;
      OP_LIH:   o.value = simm << 8;
      OP_ADD:   o.value = a + b;
      OP_ADDI:  o.value = a + simm;
      OP_ADDSH: o.value = a + (b << 2);
      OP_LD:    o.addr = a + simm;
      OP_ST:    begin o.addr = a + simm; o.value = b; end
      OP_ANDI:  o.value = a & simm;
      OP_BNE, OP_BEQ: begin
        o.taken = (o.u.op == OP_BNE) ? a != b : a == b;
        o.value = {31'b0, o.taken};
        o.mispred = o.taken != simm[31];           // front end: backward taken, forward not
        o.target = o.taken ? o.u.pc + simm : o.u.pc + 8;
      end
      default: ;
    endcase
    return o;
  endfunction

  // counters of mechanisms
  int n_det, n_pre, n_full, n_spawn, n_pred_clone, n_xfer, n_rsq, n_msq, n_hold, n_sync, n_mispred;
  int n_exit_end, n_exit_ipc, n_fetch2, n_extra_port, n_hs_switch, n_hs_wake, n_stores, n_lsst_ok;
  logic [1:0] mode_q;
  logic hs_sw_q;
  logic [3:0] hs_sq_q;
  bit   done_flag;

  // observe at the clock edge (values before the update)
  always @(posedge clk) if (rst_n) begin
    // issue
    if (exe_valid) begin
      op_t o;
      o.ctx = int'(exe_ctx); o.seq = seqc[exe_ctx]; o.tag = exe_tag; o.mobidx = exe_mobidx; o.u = exe_uop;
      seqc[exe_ctx]++;
      o = execute(o, exe_a, exe_b);
      o.ready = int'(cyc) + 1 + ($urandom % 4);
      inflight.push_back(o);
    end
    // loads that got a port
    for (int c = 0; c < N; c++) if (ld_req[c] && ld_gnt[c]) void'(ldq[c].pop_front());
    // branch recovery: drop younger work of the context
    for (int p = 0; p < 2; p++)
      if (drv_v[p] && drv[p].u.is_branch && drv[p].mispred) begin
        int c, s;
        c = drv[p].ctx; s = drv[p].seq;
        n_mispred++;
        for (int i = inflight.size() - 1; i >= 0; i--)
          if (inflight[i].ctx == c && inflight[i].seq > s) inflight.delete(i);
        for (int i = ldq[c].size() - 1; i >= 0; i--)
          if (ldq[c][i].seq > s) ldq[c].delete(i);
      end
    // flushed contexts lose everything in flight
    for (int c = 0; c < N; c++)
      if (ctx_flush[c]) begin
        for (int i = inflight.size() - 1; i >= 0; i--) if (inflight[i].ctx == c) inflight.delete(i);
        ldq[c].delete();
      end
    // cache writes
    for (int q = 0; q < 4; q++)
      if (dc_valid[q] && dc_we[q]) begin
        checks++; n_stores++;
        if (exp_addr.size() == 0 || exp_addr[0] != dc_addr[q] || exp_data[0] != dc_wdata[q]) begin
          failures++;
          $display("FAIL store %0d: %h <= %0d, expected %h <= %0d", n_stores, dc_addr[q], dc_wdata[q],
                   exp_addr.size() ? exp_addr[0] : 0, exp_data.size() ? exp_data[0] : 0);
        end
        if (exp_addr.size()) begin void'(exp_addr.pop_front()); void'(exp_data.pop_front()); end
        dmem[dc_addr[q][17:2]] = dc_wdata[q];
      end
    // mechanisms
    if (dut.det_valid) n_det++;
    if (mode_q != 2'd1 && mode == 2'd1) n_pre++;
    if (mode_q != 2'd2 && mode == 2'd2) n_full++;
    mode_q = mode;
    if (spawn_pulse) n_spawn++;
    if (spawn_pulse && dut.ovr_valid != '0) n_pred_clone++;
    if (xfer_pulse) n_xfer++;
    if (xfer_pulse && !dut.chk_mismatch && dut.stride_valid != '0) n_lsst_ok++;
    if (dut.rf_sq_valid && mode == 2'd2 && dut.rf_sq_ctx != ns_ctx) n_rsq++;
    if (dut.mdrt_sq_valid) n_msq++;
    if (ctx_hold != '0) n_hold++;
    if (ctx_sync != '0) n_sync++;
    if (exit_pulse && mode == 2'd2 && dut.u_tciu.abandon) n_exit_ipc++;
    if (exit_pulse && mode == 2'd2 && !dut.u_tciu.abandon) n_exit_end++;
    if (f_valid == 2'b11) n_fetch2++;
    if (dut.grant_n[ns_ctx] > 3'd1) n_extra_port++;
    if (hs_switching && !hs_sw_q) n_hs_switch++;
    hs_sw_q = hs_switching;
    if (hs_sq_count < hs_sq_q && !hs_resolve_valid) n_hs_wake++;
    hs_sq_q = hs_sq_count;
    if (commit_valid && commit_ctx == ns_ctx && commit_pc == END_PC) done_flag = 1;
  end

  // drive inputs after the edge (fetch data last: the grants depend on the
  // writebacks through branch recovery)
  always @(negedge clk) if (rst_n) begin
    icache_miss = ($urandom % 50 == 0) ? N'(1) << ($urandom % N) : '0;
    // data misses hold the non-speculative context early in loop D's full-DSMT phase
    ns_dmiss = mode == 2'd2 && dut.loop_branch == 32'h0118 && dut.full_cycles < dut.pre_cycles && ($urandom % 4 != 0);
    // writebacks: up to two ready operations, oldest first
    for (int p = 0; p < 2; p++) begin
      drv_v[p] = 0;
      for (int i = 0; i < inflight.size(); i++)
        if (!drv_v[p] && inflight[i].ready <= int'(cyc)) begin
          drv[p] = inflight[i]; drv_v[p] = 1; inflight.delete(i);
        end
      // two mispredictions of one context in one cycle: keep the second for later
      if (p == 1 && drv_v[1] && drv_v[0] && drv[1].ctx == drv[0].ctx && drv[1].u.is_branch && drv[0].u.is_branch) begin
        inflight.push_front(drv[1]); drv_v[1] = 0;
      end
      wb_valid[p] = drv_v[p];
      wb_ctx[p] = 3'(drv[p].ctx); wb_tag[p] = drv[p].tag; wb_value[p] = drv[p].value;
      wb_mem[p] = drv_v[p] && (drv[p].u.is_load || drv[p].u.is_store);
      wb_store[p] = drv[p].u.is_store; wb_addr[p] = drv[p].addr; wb_mobidx[p] = drv[p].mobidx;
      wb_branch[p] = drv[p].u.is_branch; wb_call[p] = 1'b0; wb_pc[p] = drv[p].u.pc;
      wb_target[p] = drv[p].target; wb_mispred[p] = drv[p].mispred;
      if (drv_v[p] && drv[p].u.is_load) ldq[drv[p].ctx].push_back(drv[p]);
    end
    // a load asks for a port once no older store of its context lacks an address
    for (int c = 0; c < N; c++) begin
      bit older_st;
      older_st = 0;
      ld_req[c] = 0; ld_tag[c] = '0; ld_mobidx[c] = '0; ld_addr[c] = '0;
      if (ldq[c].size() != 0) begin
        foreach (inflight[i])
          if (inflight[i].ctx == c && inflight[i].u.is_store && inflight[i].seq < ldq[c][0].seq) older_st = 1;
        for (int p = 0; p < 2; p++)
          if (drv_v[p] && drv[p].ctx == c && drv[p].u.is_store && drv[p].seq < ldq[c][0].seq) older_st = 1;
        if (!older_st && !(drv_v[0] && drv[0].ctx == c && drv[0].seq == ldq[c][0].seq) &&
            !(drv_v[1] && drv[1].ctx == c && drv[1].seq == ldq[c][0].seq)) begin
          ld_req[c] = 1; ld_tag[c] = ldq[c][0].tag; ld_mobidx[c] = ldq[c][0].mobidx; ld_addr[c] = ldq[c][0].addr;
        end
      end
    end
    // front end, once the grants have settled with this cycle's inputs
    #1;
    for (int p = 0; p < FETCH_PORTS; p++) begin
      logic [31:0] pc;
      int n;
      pc = f_pc[p]; n = 0;
      for (int k = 0; k < 4; k++) f_uops[p][k] = '0;
      if (f_valid[p]) begin
        while (n < 4) begin
          uop_t u;
          u = prog(pc);
          f_uops[p][n] = u; n++;
          if (u.is_branch) begin pc = u.imm[15] ? pc + {{16{u.imm[15]}}, u.imm} : pc + 8; break; end
          pc = pc + 8;
        end
      end
      f_n[p] = 3'(n); f_next_pc[p] = pc;
    end
  end

  // ------------------------------------------------------------ hybrid scheduler stimulus
  initial begin
    hs_load_valid = 0; hs_load_tid = 0; hs_load_pc = 0; hs_load_sp = 0; hs_save_valid = 0; hs_save_pc = 0;
    hs_miss = 0; hs_miss_line = 0; hs_finish = 0; hs_resolve_valid = 0; hs_resolve_line = 0;
    wait (rst_n);
    for (int t = 0; t < 4; t++) begin
      @(negedge clk);
      hs_load_valid = 1; hs_load_tid = 8'(t + 1); hs_load_pc = 32'h8000 + 32'(t) * 32'h100; hs_load_sp = 32'hf000 - 32'(t) * 32'h400;
      @(negedge clk); hs_load_valid = 0;
    end
    repeat (3000) begin
      @(negedge clk);
      hs_miss = 0; hs_finish = 0;
      if (hs_run_valid && !hs_switching && $urandom % 40 == 0) begin
        hs_miss = 1; hs_miss_line = 16'($urandom);
        checks++;
        if (!(hs_run_tid >= 1 && hs_run_tid <= 4)) begin failures++; $display("FAIL hs tid %0d", hs_run_tid); end
      end
    end
    @(negedge clk); hs_miss = 0;
  end

  // ------------------------------------------------------------ main
  initial begin
    for (int i = 0; i < 65536; i++) dmem[i] = '0;
    for (int i = 0; i < NA + 16; i++) dmem[(32'h10000 >> 2) + i] = 32'(a_init(i));
    for (int c = 0; c < N; c++) seqc[c] = 0;
    wb_valid = 0; ld_req = 0; icache_miss = 0; ns_dmiss = 0; done_flag = 0; mode_q = 0; hs_sw_q = 0; hs_sq_q = 0;
    for (int p = 0; p < 2; p++) begin
      f_n[p] = 0; f_next_pc[p] = 0; drv_v[p] = 0;
      wb_ctx[p] = 0; wb_tag[p] = 0; wb_value[p] = 0; wb_mem[p] = 0; wb_store[p] = 0; wb_addr[p] = 0;
      wb_mobidx[p] = 0; wb_branch[p] = 0; wb_call[p] = 0; wb_pc[p] = 0; wb_target[p] = 0; wb_mispred[p] = 0;
      for (int k = 0; k < 4; k++) f_uops[p][k] = '0;
    end
    for (int c = 0; c < N; c++) begin ld_tag[c] = 0; ld_mobidx[c] = 0; ld_addr[c] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done_flag);
    repeat (200) @(negedge clk);
    // final state
    begin
      int sum;
      sum = 0;
      for (int i = 0; i < NA; i++) sum += a_init(i);
      checks++;
      if (mode != 2'd0) begin failures++; $display("FAIL mode %0d at end", mode); end
      checks++;
      if (dut.view_regs[1] != NA || dut.view_regs[3] != 32'(sum) || dut.view_regs[11] != NB || dut.view_regs[16] != NB ||
          dut.view_regs[23] != NC || dut.view_regs[24] != (NC / 2) * (NC / 2) ||
          dut.view_regs[28] != ND * (ND + 1) / 2) begin
        failures++;
        $display("FAIL regs r1=%0d r3=%0d (exp %0d) r11=%0d r16=%0d r23=%0d r24=%0d r28=%0d", dut.view_regs[1],
                 dut.view_regs[3], sum, dut.view_regs[11], dut.view_regs[16], dut.view_regs[23], dut.view_regs[24], dut.view_regs[28]);
      end
      checks++;
      if (dmem[32'h30000 >> 2] != NB || exp_addr.size() != 0) begin
        failures++; $display("FAIL counter %0d, %0d stores missing", dmem[32'h30000 >> 2], exp_addr.size());
      end
    end
    $display("cycles=%0d stores=%0d", cyc, n_stores);
    $display("det=%0d pre=%0d full=%0d spawn=%0d pred_clone=%0d lsst_ok=%0d xfer=%0d reg_squash=%0d mem_squash=%0d",
             n_det, n_pre, n_full, n_spawn, n_pred_clone, n_lsst_ok, n_xfer, n_rsq, n_msq);
    $display("hold=%0d sync=%0d mispred=%0d exit_end=%0d exit_ipc=%0d fetch2=%0d extra_port=%0d hs_switch=%0d hs_wake=%0d",
             n_hold, n_sync, n_mispred, n_exit_end, n_exit_ipc, n_fetch2, n_extra_port, n_hs_switch, n_hs_wake);
    begin
      int cnt [19];
      string nm [19];
      cnt = '{n_det, n_pre, n_full, n_spawn, n_pred_clone, n_lsst_ok, n_xfer, n_rsq, n_msq, n_hold, n_sync,
              n_mispred, n_exit_end, n_exit_ipc, n_fetch2, n_extra_port, n_hs_switch, n_hs_wake, n_stores};
      nm  = '{"loop detection", "pre-DSMT entry", "full-DSMT entry", "spawn", "LSST-predicted clone",
              "LSST check passed", "flag transfer", "register squash", "memory squash", "hold", "synchronize",
              "branch recovery", "exit at loop end", "exit on IPC", "two fetch ports", "extra cache port",
              "scheduler switch", "scheduler wake", "stores"};
      for (int i = 0; i < 19; i++) begin
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL mechanism never seen: %s", nm[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
