// dsmt_top: the thread-control core of a Dynamic Simultaneous Multithreaded
// processor. It connects every block of this design:
//   fetch_sched  - picks up to two contexts to fetch each cycle (ICount2.8-
//                  modified); per-context fetch PCs live here;
//   iq/rob/mob   - one instruction queue, reorder buffer and memory order
//                  buffer per context;
//   ldbtb        - branch target buffer that also detects loops;
//   loop_stack   - nest of detected loops with the IPC seen for each;
//   tciu         - operating mode, context states, spawn and flag transfer;
//   ctx_regfile  - per-context register files with R/L/D bits;
//   lsst         - stride predictions for cloned contexts;
//   mdrt         - memory dependence resolution between contexts;
//   dcache_arb   - shares the data-cache ports among contexts;
//   ipc_monitor  - compares full-DSMT IPC with pre-DSMT IPC;
//   hw_scheduler - hybrid-model hardware thread scheduler (a separate
//                  processor organisation from the same document, placed
//                  beside the DSMT core with its own ports).
// Flow: the external front end returns up to 4 decoded instructions (uop_t)
// per fetch port; they enter the IQ of the fetched context. One instruction
// per cycle is dispatched (the register file has two read ports): the
// non-speculative context first, then the others in turn. An instruction is
// dispatched only when its operands are available (from its own ROB, its own
// register file or, by register dependence speculation, a predecessor's);
// then it gets a ROB entry (and a MOB slot for a load/store) and leaves on
// the exe_* port with its operand values. The external execution units
// answer on the wb_* ports: ALU results and branch outcomes complete the ROB
// entry; load/store address results fill the MOB slot; a load then asks for a
// cache port (ld_req_*) and gets its value from MOB forwarding or the cache
// (dc_rdata), which completes it. Loads of speculative contexts and stores of
// the non-speculative context go through the MDRT. One ROB head per cycle
// commits into the context's register file (non-speculative first); commits
// of memory instructions mark the MOB slot; only the non-speculative MOB
// writes stores to the cache. A mispredicted branch (wb_mispred) cuts the
// context's ROB and MOB after the branch, flushes its IQ and redirects its
// fetch PC. ctx_flush tells the external units which contexts lost their
// in-flight work.
// Interface timing: fetch grants, dispatch, cache port grants and flush
// pulses are combinational from the current state; everything else changes
// at the rising clock edge. The wb ports must carry only work of contexts
// not flushed since issue.
// Architecture: the block set, one IQ/ROB/MOB per context, the commit rule
// (speculative stores wait in the MOB), the MDRT on loads of speculative and
// stores of non-speculative contexts and the spawn/transfer/squash protocol.
// This design's own choices: dispatch of one instruction per cycle with
// operands ready (no reservation stations inside this block), one commit per
// cycle, dispatch stall on low-confidence inter-thread operands until the
// predecessor is final, release of a held context at the next commit, MDRT
// confidence consulted when the load asks for a cache port, the loop stack
// kept as a monitor, and the external-port boundary itself.
module dsmt_top
  import dsmt_pkg::*;
#(
  parameter int N        = NCTX,
  parameter int NW       = $clog2(N),
  parameter int IQD      = IQ_DEPTH,
  parameter int ROBD     = ROB_DEPTH,
  parameter int MOBD     = MOB_DEPTH,
  parameter int SETS     = BTB_SETS,
  parameter int PRE_ITERS = 2,
  parameter int MDRT_NE  = 32,
  parameter int HS_N     = 8,
  parameter int HS_LAT   = 500,
  parameter int HS_CSW   = 2,
  parameter int TW       = $clog2(ROBD),
  parameter int MW       = $clog2(MOBD),
  parameter int PW       = $clog2(DC_PORTS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // ---------------- front end (instruction cache + decode, external)
  output logic [1:0]       f_valid,          // fetch port p fetches f_ctx[p] at f_pc[p]
  output logic [NW-1:0]    f_ctx   [FETCH_PORTS],
  output logic [AW-1:0]    f_pc    [FETCH_PORTS],
  input  logic [2:0]       f_n     [FETCH_PORTS],   // decoded instructions returned (0..4)
  input  uop_t             f_uops  [FETCH_PORTS][4],
  input  logic [AW-1:0]    f_next_pc [FETCH_PORTS],
  output logic [1:0]       f_accept,         // instructions entered the IQ
  output logic             bp_hit,           // LDBTB prediction for fetch port 0
  output logic             bp_taken,
  output logic [AW-1:0]    bp_target,
  input  logic [N-1:0]     icache_miss,      // per-context fetch blocked by a miss
  input  logic             ns_dmiss,         // non-speculative context waits on a data miss
  // ---------------- issue to the execution units (external)
  output logic             exe_valid,
  output logic [NW-1:0]    exe_ctx,
  output logic [TW-1:0]    exe_tag,
  output logic [MW-1:0]    exe_mobidx,       // MOB slot, or MOB tail for a branch
  output uop_t             exe_uop,
  output logic [XLEN-1:0]  exe_a,
  output logic [XLEN-1:0]  exe_b,
  // ---------------- writeback from the execution units
  input  logic [1:0]       wb_valid,
  input  logic [NW-1:0]    wb_ctx     [2],
  input  logic [TW-1:0]    wb_tag     [2],
  input  logic [XLEN-1:0]  wb_value   [2],   // result, store data, or branch taken in bit 0
  input  logic [1:0]       wb_mem,           // address result of a load/store
  input  logic [1:0]       wb_store,
  input  logic [AW-1:0]    wb_addr    [2],
  input  logic [MW-1:0]    wb_mobidx  [2],
  input  logic [1:0]       wb_branch,
  input  logic [1:0]       wb_call,
  input  logic [AW-1:0]    wb_pc      [2],
  input  logic [AW-1:0]    wb_target  [2],   // branch target (taken) / correct next PC
  input  logic [1:0]       wb_mispred,
  // ---------------- load cache access
  input  logic [N-1:0]     ld_req,
  input  logic [TW-1:0]    ld_tag    [N],
  input  logic [MW-1:0]    ld_mobidx [N],
  input  logic [AW-1:0]    ld_addr   [N],
  output logic [N-1:0]     ld_gnt,
  // ---------------- data cache ports (external cache)
  output logic [DC_PORTS-1:0] dc_valid,
  output logic [DC_PORTS-1:0] dc_we,
  output logic [AW-1:0]    dc_addr  [DC_PORTS],
  output logic [XLEN-1:0]  dc_wdata [DC_PORTS],
  input  logic [XLEN-1:0]  dc_rdata [DC_PORTS],
  // ---------------- status
  output logic [1:0]       mode,
  output logic [NW-1:0]    ns_ctx,
  output logic [N-1:0]     ctx_valid,
  output logic [N-1:0]     ctx_spec,
  output logic [N-1:0]     ctx_done,
  output logic [N-1:0]     ctx_hold,
  output logic [N-1:0]     ctx_sync,
  output logic [N-1:0]     ctx_flush,        // context lost its in-flight work
  output logic             spawn_pulse,
  output logic             xfer_pulse,
  output logic             exit_pulse,
  output logic             commit_valid,
  output logic [NW-1:0]    commit_ctx,
  output logic [AW-1:0]    commit_pc,
  output logic [2:0]       dc_used,
  output logic [AW-1:0]    loop_best_branch,
  output logic [2:0]       loop_depth,
  // ---------------- hybrid-model hardware scheduler
  input  logic             hs_load_valid,
  input  logic [7:0]       hs_load_tid,
  input  logic [AW-1:0]    hs_load_pc,
  input  logic [AW-1:0]    hs_load_sp,
  output logic             hs_load_ready,
  output logic             hs_need_set,
  output logic             hs_run_valid,
  output logic [7:0]       hs_run_tid,
  output logic [AW-1:0]    hs_run_pc,
  output logic [AW-1:0]    hs_run_sp,
  output logic             hs_switching,
  input  logic             hs_save_valid,
  input  logic [AW-1:0]    hs_save_pc,
  input  logic             hs_miss,
  input  logic [15:0]      hs_miss_line,
  input  logic             hs_finish,
  input  logic             hs_resolve_valid,
  input  logic [15:0]      hs_resolve_line,
  output logic [$clog2(HS_N+1)-1:0] hs_rq_count,
  output logic [$clog2(HS_N+1)-1:0] hs_sq_count
);
  localparam int FW = $bits(rob_flags_t);

  // ================================================================ TCIU
  dsmt_mode_e      t_mode;
  logic            m_bit;
  logic [AW-1:0]   continuation, loop_branch;
  logic [NW-1:0]   head, tail;
  ctx_state_e      state [N];
  logic [N-1:0]    v_bits, s_bits, j_bits;
  logic [15:0]     ns_iter;
  logic [NREG-1:0] d_anchor, r_anchor;
  logic            commit_hold, spawn_valid, xfer, pre_iter, dsmt_exit;
  logic [NW-1:0]   spawn_ctx, spawn_src, xfer_old, xfer_new;
  logic [NW:0]     spawn_dist;
  logic [N-1:0]    flush_mask, reach_end, unend, hold_req, squash_req;
  logic            ldbtb_upd_valid, ldbtb_upd_good;
  logic [AW-1:0]   ldbtb_upd_pc;
  logic            det_valid;
  logic [AW-1:0]   det_branch, det_target;
  logic [7:0]      det_iters;
  logic            cm_br_valid, cm_br_taken;
  logic [AW-1:0]   cm_br_pc;
  ipc_cmp_e        ipc_result;
  logic            ipc_result_valid;
  logic            conf_inc, conf_dec;
  logic [RW-1:0]   conf_reg;
  logic [RW-1:0]   conf_lk_reg [2];
  logic            conf_lk_low [2];
  logic [XLEN-1:0] view_regs [NREG];
  logic [NREG-1:0] view_r, view_d;

  tciu #(.N(N), .PRE_ITERS(PRE_ITERS)) u_tciu (
    .clk, .rst_n,
    .det_valid, .det_branch, .det_target,
    .cm_br_valid, .cm_br_pc, .cm_br_taken,
    .ipc_result, .ipc_result_valid,
    .reach_end, .unend, .hold_req, .squash_req,
    .ns_r_bits(view_r), .ns_d_bits(view_d),
    .conf_inc, .conf_dec, .conf_reg, .conf_lk_reg, .conf_lk_low,
    .mode(t_mode), .m_bit, .continuation, .loop_branch, .head, .tail,
    .state, .v_bits, .s_bits, .j_bits, .ns_iter, .d_anchor, .r_anchor,
    .commit_hold, .spawn_valid, .spawn_ctx, .spawn_src, .spawn_dist,
    .xfer, .xfer_old, .xfer_new, .pre_iter, .flush_mask, .dsmt_exit,
    .ldbtb_upd_valid, .ldbtb_upd_pc, .ldbtb_upd_good
  );

  // ================================================================ LDBTB + loop stack
  logic            bwb_valid, bwb_taken, bwb_call;
  logic [AW-1:0]   bwb_pc, bwb_target;
  logic            bp_loop;

  always_comb begin
    bwb_valid = 1'b0; bwb_taken = 1'b0; bwb_call = 1'b0; bwb_pc = '0; bwb_target = '0;
    for (int p = 1; p >= 0; p--)
      if (wb_valid[p] && wb_branch[p]) begin
        bwb_valid = 1'b1; bwb_taken = wb_value[p][0]; bwb_call = wb_call[p];
        bwb_pc = wb_pc[p]; bwb_target = wb_target[p];
      end
  end

  ldbtb #(.SETS(SETS)) u_ldbtb (
    .clk, .rst_n,
    .lk_pc(f_pc[0]), .lk_hit(bp_hit), .lk_taken(bp_taken), .lk_target(bp_target), .lk_loop(bp_loop),
    .wb_valid(bwb_valid), .wb_pc(bwb_pc), .wb_taken(bwb_taken), .wb_target(bwb_target),
    .wb_is_call(bwb_call),
    .det_valid, .det_branch, .det_target, .det_iters,
    .upd_valid(ldbtb_upd_valid), .upd_pc(ldbtb_upd_pc), .upd_good(ldbtb_upd_good)
  );

  logic [AW-1:0] ls_best_target, ls_top_branch, ls_top_target;
  logic          ls_best_valid;
  loop_stack #(.DEPTH(4)) u_loops (
    .clk, .rst_n,
    .det_valid, .det_branch, .det_target,
    .ipc_valid(ipc_result_valid), .ipc_branch(loop_branch), .ipc_value(8'(ipc_result)),
    .depth(loop_depth), .best_valid(ls_best_valid), .best_branch(loop_best_branch),
    .best_target(ls_best_target), .top_branch(ls_top_branch), .top_target(ls_top_target)
  );

  // ================================================================ IPC monitor
  logic [23:0] pre_cycles, pre_instrs, full_cycles, full_instrs;
  // IPC counts the instructions committed by all contexts
  ipc_monitor #(.CW_IN(4)) u_ipc (
    .clk, .rst_n, .mode(t_mode), .commit_n(4'(commit_valid)),
    .result(ipc_result), .result_valid(ipc_result_valid),
    .pre_cycles, .pre_instrs, .full_cycles, .full_instrs
  );

  // ================================================================ register files + LSST
  logic            rd_valid [2], rd_pending [2], rd_ready [2], rd_inter [2];
  logic [NW-1:0]   rd_ctx [2], rd_src [2];
  logic [RW-1:0]   rd_reg [2];
  logic [XLEN-1:0] rd_value [2];
  logic            wr_valid, rf_sq_valid, rf_ok_valid;
  logic [NW-1:0]   wr_ctx, rf_sq_ctx;
  logic [RW-1:0]   wr_reg;
  logic [XLEN-1:0] wr_value;
  logic [NREG-1:0] ovr_valid, chk_bad_regs, stride_valid;
  logic [XLEN-1:0] ovr_value [NREG];
  logic [XLEN-1:0] cl_src_regs [NREG];
  logic            lsst_cand, chk_mismatch;

  ctx_regfile #(.N(N)) u_regs (
    .clk, .rst_n, .head, .done(j_bits), .d_anchor, .r_anchor,
    .rd_valid, .rd_ctx, .rd_reg, .rd_pending, .rd_value, .rd_ready, .rd_src, .rd_inter,
    .wr_valid, .wr_ctx, .wr_reg, .wr_value,
    .sq_valid(rf_sq_valid), .sq_ctx(rf_sq_ctx), .ok_valid(rf_ok_valid),
    .cl_valid(spawn_valid), .cl_dst(spawn_ctx), .cl_src(spawn_src),
    .cl_ovr_valid(ovr_valid), .cl_ovr_value(ovr_value), .cl_src_regs,
    .bc_valid(pre_iter), .bc_ctx(head),
    .mg_valid(xfer), .mg_src(xfer_old), .mg_dst(xfer_new),
    .view_ctx(head), .view_regs, .view_r, .view_d
  );

  lsst #(.N(N)) u_lsst (
    .clk, .rst_n, .clear(dsmt_exit),
    .cand_valid(lsst_cand), .cand_rd(exe_uop.dest), .cand_rs(exe_uop.src1), .cand_imm(exe_uop.imm),
    .spawn_valid, .spawn_ctx, .spawn_dist, .base_regs(cl_src_regs),
    .ovr_valid, .ovr_value,
    .chk_valid(xfer), .chk_ctx(xfer_new), .final_regs(view_regs),
    .chk_mismatch, .chk_bad_regs, .stride_valid
  );

  assign conf_inc = rf_ok_valid;
  assign conf_dec = rf_sq_valid;
  assign conf_reg = wr_reg;

  // ================================================================ per-context IQ / ROB / MOB
  logic [N-1:0]    iq_flush, rob_flush, mob_flush, rob_cut, mob_cut;
  logic [TW-1:0]   rob_cut_tag [N];
  logic [MW-1:0]   mob_cut_tail [N];
  logic [2:0]      iq_push_n [N];
  uop_t            iq_push [N][4];
  logic [N-1:0]    iq_ready, iq_pop;
  uop_t            iq_head [N][1];
  logic [$clog2(IQD+1)-1:0]  iq_count [N];
  logic [N-1:0]    rob_alloc, rob_ready, rob_cen, rob_cvalid, rob_crdy, rob_cdest_v;
  logic [TW-1:0]   rob_tag [N];
  logic [RW-1:0]   rob_cdest [N];
  logic [XLEN-1:0] rob_cvalue [N];
  logic [FW-1:0]   rob_cflags [N];
  logic            rob_wb_v [N][3];
  logic [TW-1:0]   rob_wb_tag [N][3];
  logic [XLEN-1:0] rob_wb_val [N][3];
  logic            rob_lk_pend [N][2], rob_lk_ready [N][2];
  logic [TW-1:0]   rob_lk_tag [N][2];
  logic [XLEN-1:0] rob_lk_val [N][2];
  logic [RW-1:0]   lk_regs [2];
  logic [$clog2(ROBD+1)-1:0] rob_count [N];
  logic [N-1:0]    mob_alloc, mob_ready, mob_upd, mob_commit, mob_drain, mob_st_req, mob_st_gnt, mob_fwd_hit;
  logic [MW-1:0]   mob_idx [N], mob_upd_idx [N];
  logic [AW-1:0]   mob_upd_addr [N], mob_st_addr [N];
  logic [XLEN-1:0] mob_upd_data [N], mob_st_data [N], mob_fwd_data [N];
  logic [$clog2(MOBD+1)-1:0] mob_count [N];

  for (genvar c = 0; c < N; c++) begin : g_c
    iq #(.DEPTH(IQD), .PUSH_W(4), .POP_W(1), .T(uop_t)) u_iq (
      .clk, .rst_n, .flush(iq_flush[c]), .push_n(iq_push_n[c]), .push_data(iq_push[c]),
      .push_ready(iq_ready[c]), .pop_n(iq_pop[c]), .head_data(iq_head[c]), .count(iq_count[c])
    );
    rob #(.DEPTH(ROBD), .FW(FW), .WB_W(3)) u_rob (
      .clk, .rst_n, .flush_all(rob_flush[c]),
      .flush_after_valid(rob_cut[c]), .flush_after_tag(rob_cut_tag[c]),
      .alloc_valid(rob_alloc[c]), .alloc_dest_v(exe_uop.dest_v), .alloc_dest(exe_uop.dest),
      .alloc_flags(FW'({exe_uop.pc, exe_uop.is_branch, exe_uop.is_load, exe_uop.is_store, exe_uop.is_call})),
      .alloc_ready(rob_ready[c]), .alloc_tag(rob_tag[c]),
      .wb_valid(rob_wb_v[c]), .wb_tag(rob_wb_tag[c]), .wb_value(rob_wb_val[c]),
      .commit_en(rob_cen[c]), .commit_valid(rob_cvalid[c]), .commit_rdy(rob_crdy[c]),
      .commit_dest_v(rob_cdest_v[c]), .commit_dest(rob_cdest[c]), .commit_value(rob_cvalue[c]),
      .commit_flags(rob_cflags[c]),
      .lk_reg(lk_regs), .lk_pending(rob_lk_pend[c]), .lk_tag(rob_lk_tag[c]),
      .lk_ready(rob_lk_ready[c]), .lk_value(rob_lk_val[c]), .count(rob_count[c])
    );
    mob #(.DEPTH(MOBD)) u_mob (
      .clk, .rst_n, .flush(mob_flush[c]), .cut_valid(mob_cut[c]), .cut_tail(mob_cut_tail[c]),
      .alloc_valid(mob_alloc[c]), .alloc_store(exe_uop.is_store), .alloc_ready(mob_ready[c]),
      .alloc_idx(mob_idx[c]),
      .upd_valid(mob_upd[c]), .upd_idx(mob_upd_idx[c]), .upd_addr(mob_upd_addr[c]), .upd_data(mob_upd_data[c]),
      .ld_idx(ld_mobidx[c]), .fwd_hit(mob_fwd_hit[c]), .fwd_data(mob_fwd_data[c]),
      .commit_valid(mob_commit[c]), .drain_en(mob_drain[c]),
      .st_req(mob_st_req[c]), .st_addr(mob_st_addr[c]), .st_data(mob_st_data[c]),
      .st_gnt(mob_st_gnt[c]), .count(mob_count[c])
    );
  end

  // ================================================================ fetch
  logic [AW-1:0]  fpc [N];
  logic [7:0]     icount [N];
  logic [N-1:0]   fblocked;
  logic           g_valid [FETCH_PORTS];
  logic [NW-1:0]  g_ctx [FETCH_PORTS];
  logic [N-1:0]   redirect;
  logic [AW-1:0]  redirect_pc [N];

  always_comb
    for (int c = 0; c < N; c++) begin
      icount[c]   = 8'(iq_count[c]) + 8'(rob_count[c]);
      fblocked[c] = icache_miss[c] || j_bits[c] || !iq_ready[c] || iq_flush[c];
    end

  fetch_sched #(.N(N)) u_fetch (
    .ns_ctx(head), .state, .blocked(fblocked), .icount,
    .grant_valid(g_valid), .grant_ctx(g_ctx)
  );

  always_comb begin
    for (int p = 0; p < FETCH_PORTS; p++) begin
      f_valid[p] = g_valid[p];
      f_ctx[p]   = g_ctx[p];
      f_pc[p]    = fpc[g_ctx[p]];
      f_accept[p] = g_valid[p] && f_n[p] != '0;
    end
    for (int c = 0; c < N; c++) begin
      iq_push_n[c] = '0;
      for (int k = 0; k < 4; k++) iq_push[c][k] = '0;
      for (int p = 0; p < FETCH_PORTS; p++)
        if (g_valid[p] && int'(g_ctx[p]) == c) begin
          iq_push_n[c] = (f_n[p] > 3'd4) ? 3'd4 : f_n[p];
          iq_push[c]   = f_uops[p];
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N; c++) fpc[c] <= '0;
    end else begin
      for (int p = 0; p < FETCH_PORTS; p++)
        if (g_valid[p] && f_n[p] != '0) fpc[g_ctx[p]] <= f_next_pc[p];
      for (int c = 0; c < N; c++)
        if (redirect[c]) fpc[c] <= redirect_pc[c];
      if (spawn_valid) fpc[spawn_ctx] <= continuation;
    end
  end

  // ================================================================ dispatch
  logic [N-1:0]  cand, hold_flag, pred_final;
  logic [NW-1:0] rr_disp, dsel;
  logic          dtry, ns_fail_q, op_ok, inter_stall, dgo;
  uop_t          du;
  logic [XLEN-1:0] opv [2];

  always_comb begin
    for (int c = 0; c < N; c++) begin
      int unsigned pr;
      pr = (c + N - 1) % N;
      cand[c] = v_bits[c] && state[c] == CTX_RUNNING && !j_bits[c] && iq_count[c] != '0 &&
                !hold_flag[c] && !flush_mask[c] && !iq_flush[c] && !redirect[c];
      pred_final[c] = (c == int'(head)) || (j_bits[pr] && rob_count[pr] == '0 && v_bits[pr]);
    end
  end

  always_comb begin
    logic found;
    found = 1'b0; dsel = head;
    if (cand[head] && !ns_fail_q) begin found = 1'b1; dsel = head; end
    for (int k = 0; k < N; k++) begin
      logic [NW-1:0] c;
      c = NW'((int'(rr_disp) + k) % N);
      if (!found && cand[c]) begin found = 1'b1; dsel = c; end
    end
    dtry = found;
    du   = iq_head[dsel][0];
  end

  assign lk_regs     = '{du.src1, du.src2};
  assign conf_lk_reg = '{du.src1, du.src2};

  always_comb begin
    logic [1:0] sv;
    sv = {du.src2_v, du.src1_v};
    op_ok = 1'b1; inter_stall = 1'b0;
    for (int k = 0; k < 2; k++) begin
      rd_valid[k]   = dtry && sv[k];
      rd_ctx[k]     = dsel;
      rd_reg[k]     = (k == 0) ? du.src1 : du.src2;
      rd_pending[k] = rob_lk_pend[dsel][k];
      opv[k]        = '0;
      if (sv[k]) begin
        if (rob_lk_pend[dsel][k]) begin
          opv[k] = rob_lk_val[dsel][k];
          if (!rob_lk_ready[dsel][k]) op_ok = 1'b0;
        end else begin
          opv[k] = rd_value[k];
          if (!rd_ready[k]) begin op_ok = 1'b0; inter_stall = 1'b1; end
          else if (rd_inter[k] && conf_lk_low[k] && !pred_final[dsel]) begin
            op_ok = 1'b0; inter_stall = 1'b1;
          end
        end
      end
    end
    dgo = dtry && op_ok && rob_ready[dsel] && ((!du.is_load && !du.is_store) || mob_ready[dsel]);
  end

  assign exe_valid  = dgo;
  assign exe_ctx    = dsel;
  assign exe_tag    = rob_tag[dsel];
  assign exe_mobidx = mob_idx[dsel];
  assign exe_uop    = du;
  assign exe_a      = opv[0];
  assign exe_b      = opv[1];
  assign lsst_cand  = dgo && t_mode == MODE_PRE && dsel == head && du.stride_cand && du.dest_v &&
                      du.src1_v && du.dest == du.src1;

  always_comb
    for (int c = 0; c < N; c++) begin
      iq_pop[c]    = dgo && int'(dsel) == c;
      rob_alloc[c] = iq_pop[c];
      mob_alloc[c] = iq_pop[c] && (du.is_load || du.is_store);
      reach_end[c] = iq_pop[c] && t_mode == MODE_FULL && du.is_branch && du.pc == loop_branch;
      hold_req[c]  = (hold_flag[c] && c != int'(head)) || (c == int'(head) && ns_dmiss);
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_disp <= '0; ns_fail_q <= 1'b0; hold_flag <= '0;
    end else begin
      ns_fail_q <= dtry && dsel == head && !dgo;
      if (dtry && dsel != head) rr_disp <= NW'((int'(dsel) + 1) % N);
      else if (!dtry) rr_disp <= NW'((int'(rr_disp) + 1) % N);
      for (int c = 0; c < N; c++) begin
        if (commit_valid || xfer || |reach_end || flush_mask[c] || spawn_valid) hold_flag[c] <= 1'b0;
        else if (dtry && int'(dsel) == c && inter_stall && c != int'(head)) hold_flag[c] <= 1'b1;
      end
    end
  end

  // ================================================================ writeback, branch recovery
  always_comb begin
    for (int c = 0; c < N; c++) begin
      redirect[c] = 1'b0; redirect_pc[c] = '0; unend[c] = 1'b0;
      rob_cut[c] = 1'b0; rob_cut_tag[c] = '0; mob_cut[c] = 1'b0; mob_cut_tail[c] = '0;
      mob_upd[c] = 1'b0; mob_upd_idx[c] = '0; mob_upd_addr[c] = '0; mob_upd_data[c] = '0;
      for (int p = 0; p < 2; p++) begin
        rob_wb_v[c][p]   = wb_valid[p] && int'(wb_ctx[p]) == c && !(wb_mem[p] && !wb_store[p]);
        rob_wb_tag[c][p] = wb_tag[p];
        rob_wb_val[c][p] = wb_value[p];
        if (wb_valid[p] && int'(wb_ctx[p]) == c && wb_mem[p]) begin
          mob_upd[c] = 1'b1; mob_upd_idx[c] = wb_mobidx[p];
          mob_upd_addr[c] = wb_addr[p]; mob_upd_data[c] = wb_value[p];
        end
        if (wb_valid[p] && int'(wb_ctx[p]) == c && wb_branch[p] && wb_mispred[p] && !redirect[c]) begin
          redirect[c] = 1'b1; redirect_pc[c] = wb_target[p];
          // a branch older than the loop branch: the loop branch was on the wrong path
          unend[c] = wb_pc[p] != loop_branch;
          rob_cut[c] = 1'b1; rob_cut_tag[c] = wb_tag[p];
          mob_cut[c] = 1'b1; mob_cut_tail[c] = wb_mobidx[p];
        end
      end
    end
  end

  // ================================================================ memory: ports, MDRT
  logic [N-1:0]    ld_masked, ld_ok, st_ok;
  logic [2:0]      req_n [N], grant_n [N];
  logic [AW-1:0]   mdrt_lk_addr;
  logic            mdrt_lk_low, mdrt_sq_valid;
  logic [NW-1:0]   mdrt_sq_ctx;
  logic            acc_valid [DC_PORTS], acc_store [DC_PORTS], acc_nack [DC_PORTS];
  logic [NW-1:0]   acc_ctx [DC_PORTS];
  logic [AW-1:0]   acc_addr [DC_PORTS];
  logic [XLEN-1:0] acc_value [DC_PORTS];
  logic [PW-1:0]   ld_port [N], st_port [N];
  logic [$clog2(MDRT_NE+1)-1:0] mdrt_used;

  // MDRT confidence: the first speculative load asking for a port
  always_comb begin
    logic found;
    found = 1'b0; mdrt_lk_addr = '0; ld_masked = '0;
    for (int k = 1; k < N; k++) begin
      int unsigned c;
      c = (int'(head) + k) % N;
      if (!found && ld_req[c]) begin found = 1'b1; mdrt_lk_addr = ld_addr[c]; end
    end
    for (int k = 1; k < N; k++) begin
      int unsigned c;
      c = (int'(head) + k) % N;
      if (ld_req[c] && m_bit && ld_addr[c] == mdrt_lk_addr && mdrt_lk_low && !pred_final[c])
        ld_masked[c] = 1'b1;
    end
    for (int c = 0; c < N; c++) begin
      mob_drain[c] = (c == int'(head));
      req_n[c] = 3'(ld_req[c] && !ld_masked[c] && !iq_flush[c]) + 3'(mob_st_req[c] && mob_drain[c]);
    end
  end

  dcache_arb #(.N(N)) u_arb (
    .clk, .rst_n, .ns_ctx(head), .req_n, .grant_n, .used_ports(dc_used)
  );

  // assign granted operations to ports: per context the store first
  always_comb begin
    int unsigned p;
    p = 0;
    for (int q = 0; q < DC_PORTS; q++) begin
      acc_valid[q] = 1'b0; acc_store[q] = 1'b0; acc_ctx[q] = '0; acc_addr[q] = '0; acc_value[q] = '0;
    end
    for (int c = 0; c < N; c++) begin
      logic st_g, ld_g;
      st_g = mob_st_req[c] && mob_drain[c] && grant_n[c] != '0;
      ld_g = ld_req[c] && !ld_masked[c] && !iq_flush[c] && grant_n[c] >= (st_g ? 3'd2 : 3'd1);
      st_port[c] = '0; ld_port[c] = '0;
      if (st_g && p < DC_PORTS) begin
        st_port[c] = PW'(p);
        acc_valid[p] = 1'b1; acc_store[p] = 1'b1; acc_ctx[p] = NW'(c);
        acc_addr[p] = mob_st_addr[c]; acc_value[p] = mob_st_data[c];
        p++;
      end
      if (ld_g && p < DC_PORTS) begin
        ld_port[c] = PW'(p);
        acc_valid[p] = 1'b1; acc_store[p] = 1'b0; acc_ctx[p] = NW'(c);
        acc_addr[p] = ld_addr[c];
        acc_value[p] = mob_fwd_hit[c] ? mob_fwd_data[c] : dc_rdata[p];
        p++;
      end
    end
  end

  mdrt #(.N(N), .NE(MDRT_NE)) u_mdrt (
    .clk, .rst_n, .enable(m_bit), .head, .clear_all(dsmt_exit),
    .ctx_clear(flush_mask | (xfer ? N'(1) << xfer_old : '0)),
    .acc_valid, .acc_store, .acc_ctx, .acc_addr, .acc_value, .acc_nack,
    .sq_valid(mdrt_sq_valid), .sq_ctx(mdrt_sq_ctx),
    .lk_addr(mdrt_lk_addr), .lk_low(mdrt_lk_low), .used(mdrt_used)
  );

  always_comb begin
    for (int c = 0; c < N; c++) begin
      logic st_g, ld_g;
      st_g = mob_st_req[c] && mob_drain[c] && grant_n[c] != '0;
      ld_g = ld_req[c] && !ld_masked[c] && !iq_flush[c] && grant_n[c] >= (st_g ? 3'd2 : 3'd1);
      st_ok[c] = st_g && acc_valid[st_port[c]] && acc_store[st_port[c]] && !acc_nack[st_port[c]];
      ld_ok[c] = ld_g && acc_valid[ld_port[c]] && !acc_store[ld_port[c]] && int'(acc_ctx[ld_port[c]]) == c &&
                 !acc_nack[ld_port[c]];
      mob_st_gnt[c] = st_ok[c];
      ld_gnt[c]     = ld_ok[c];
      rob_wb_v[c][2]   = ld_ok[c];
      rob_wb_tag[c][2] = ld_tag[c];
      rob_wb_val[c][2] = acc_value[ld_port[c]];
    end
    for (int q = 0; q < DC_PORTS; q++) begin
      dc_valid[q] = acc_valid[q] && !acc_nack[q];
      dc_we[q]    = acc_store[q];
      dc_addr[q]  = acc_addr[q];
      dc_wdata[q] = acc_value[q];
    end
  end

  // ================================================================ commit
  logic [NW-1:0] rr_cm, csel;
  logic [N-1:0]  callow;
  rob_flags_t    cf [N];

  always_comb begin
    logic found;
    for (int c = 0; c < N; c++) begin
      cf[c] = rob_flags_t'(rob_cflags[c]);
      callow[c] = v_bits[c] && rob_crdy[c] && !flush_mask[c] && !rob_cut[c] &&
                  !(c == int'(head) && commit_hold) &&
                  // the loop branch ends an iteration: only the non-speculative context
                  // commits it, and only after its stores have left
                  !(t_mode == MODE_FULL && cf[c].is_branch && cf[c].pc == loop_branch &&
                    (c != int'(head) || mob_count[c] != '0));
    end
    found = 1'b0; csel = head;
    if (callow[head]) found = 1'b1;
    for (int k = 0; k < N; k++) begin
      logic [NW-1:0] c;
      c = NW'((int'(rr_cm) + k) % N);
      if (!found && callow[c]) begin found = 1'b1; csel = c; end
    end
    for (int c = 0; c < N; c++) rob_cen[c] = found && int'(csel) == c;
    commit_valid = found;
    commit_ctx   = csel;
    commit_pc    = cf[csel].pc;
    wr_valid     = found && rob_cdest_v[csel];
    wr_ctx       = csel;
    wr_reg       = rob_cdest[csel];
    wr_value     = rob_cvalue[csel];
    for (int c = 0; c < N; c++)
      mob_commit[c] = rob_cen[c] && (cf[c].is_load || cf[c].is_store);
    cm_br_valid = found && csel == head && cf[csel].is_branch;
    cm_br_pc    = cf[csel].pc;
    cm_br_taken = rob_cvalue[csel][0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr_cm <= '0;
    else if (commit_valid && csel != head) rr_cm <= NW'((int'(csel) + 1) % N);
  end

  // ================================================================ squash / flush
  always_comb begin
    squash_req = '0;
    if (rf_sq_valid)   squash_req[rf_sq_ctx]   = 1'b1;
    if (mdrt_sq_valid) squash_req[mdrt_sq_ctx] = 1'b1;
    if (xfer && chk_mismatch) squash_req[xfer_new] = 1'b1;
    for (int c = 0; c < N; c++) begin
      rob_flush[c] = flush_mask[c] || (spawn_valid && int'(spawn_ctx) == c);
      mob_flush[c] = rob_flush[c];
      iq_flush[c]  = rob_flush[c] || redirect[c] || (xfer && int'(xfer_old) == c);
    end
  end

  // ================================================================ status
  always_comb
    for (int c = 0; c < N; c++) begin
      ctx_hold[c] = state[c] == CTX_HOLD;
      ctx_sync[c] = state[c] == CTX_SYNC;
    end
  assign mode        = 2'(t_mode);
  assign ns_ctx      = head;
  assign ctx_valid   = v_bits;
  assign ctx_spec    = s_bits;
  assign ctx_done    = j_bits;
  assign ctx_flush   = rob_flush;
  assign spawn_pulse = spawn_valid;
  assign xfer_pulse  = xfer;
  assign exit_pulse  = dsmt_exit;

  // ================================================================ hybrid-model scheduler
  logic [$clog2(HS_N+1)-1:0] hs_resident;
  hw_scheduler #(.N(HS_N), .TIDW(8), .AW(AW), .WTW(16), .LAT(HS_LAT), .CSW(HS_CSW)) u_hs (
    .clk, .rst_n,
    .load_valid(hs_load_valid), .load_tid(hs_load_tid), .load_pc(hs_load_pc), .load_sp(hs_load_sp),
    .load_ready(hs_load_ready), .need_set(hs_need_set), .resident(hs_resident),
    .run_valid(hs_run_valid), .run_tid(hs_run_tid), .run_pc(hs_run_pc), .run_sp(hs_run_sp),
    .switching(hs_switching), .save_valid(hs_save_valid), .save_pc(hs_save_pc),
    .miss(hs_miss), .miss_line(hs_miss_line), .finish(hs_finish),
    .resolve_valid(hs_resolve_valid), .resolve_line(hs_resolve_line),
    .rq_count(hs_rq_count), .sq_count(hs_sq_count)
  );
endmodule
