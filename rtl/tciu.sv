// tciu: Thread Creation and Initiation Unit. It runs the operating mode of
// the processor and the life of every context.
// Modes: non-DSMT -> (loop detected by the LDBTB) pre-DSMT -> (PRE_ITERS
// loop iterations committed by the single thread) full-DSMT -> (loop exit
// committed, or the relative IPC found worse) non-DSMT. On detection the loop
// start is latched in the Continuation register. During pre-DSMT each
// committed loop-continuation branch copies the running context's R and D
// bits into the R_Anchor/D_Anchor registers and clears them for the next
// iteration. Entering full-DSMT sets the M bit and clones every other context
// from the non-speculative one, one per cycle (commit of the non-speculative
// context is held meanwhile so that the source stays at the loop start);
// context k places after the source starts k iterations later.
// Per context it keeps V (valid), S (speculative), J (iteration finished)
// and a state: invalid, running, hold or synchronizing. A speculative context
// that reaches the end of its iteration sets J and synchronizes (undone if
// a mispredicted older branch removes the loop branch again); a context
// asked to hold (unresolved inter-thread dependence, or a cache miss of the
// non-speculative context) moves to hold and back. When the non-speculative
// context commits the loop-continuation branch, the non-speculative flag
// moves to the next context (Head advances), the anchors take the finished
// context's R and D bits, the iteration number advances and the finished
// context, plus any squashed ones, are cloned again from the finished one as
// the newest iterations (the finished context's registers are the state at
// the start of the new non-speculative iteration, so a context k places after
// the new head is cloned k iterations ahead of that state). A squash request for a context invalidates it and
// every later context (they restart at the next flag transfer). Committing
// the not-taken loop branch ends DSMT mode: all speculative contexts are
// flushed, the LDBTB learns whether the loop broke even, and the confidence
// tables are cleared. A relative IPC below the pre-DSMT one also ends DSMT
// mode and marks the loop bad. The unit also holds the per-register 2-bit
// confidence counters used by register dependence speculation.
// Modes, bits, states and their transitions follow the architecture. The
// number of pre-DSMT iterations, the one-per-cycle cloning, restarting
// squashed contexts at the next flag transfer and the interface are this
// design's choices. State changes at the rising edge; spawn, transfer and
// flush outputs are combinational pulses for the blocks that act on them.
module tciu
  import dsmt_pkg::*;
#(
  parameter int N         = NCTX,
  parameter int PRE_ITERS = 2,
  parameter int NW        = $clog2(N),
  parameter int ITW       = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  // loop detection (LDBTB, writeback stage)
  input  logic            det_valid,
  input  logic [AW-1:0]   det_branch,
  input  logic [AW-1:0]   det_target,
  // committed branch of the non-speculative context
  input  logic            cm_br_valid,
  input  logic [AW-1:0]   cm_br_pc,
  input  logic            cm_br_taken,
  // relative IPC
  input  ipc_cmp_e        ipc_result,
  input  logic            ipc_result_valid,
  // per-context events
  input  logic [N-1:0]    reach_end,     // dispatch met the loop branch
  input  logic [N-1:0]    unend,         // a mispredicted older branch removed it again
  input  logic [N-1:0]    hold_req,
  input  logic [N-1:0]    squash_req,
  // R and D bits of the non-speculative context (from the register files)
  input  logic [NREG-1:0] ns_r_bits,
  input  logic [NREG-1:0] ns_d_bits,
  // confidence counter updates and lookups
  input  logic            conf_inc,
  input  logic            conf_dec,
  input  logic [RW-1:0]   conf_reg,
  input  logic [RW-1:0]   conf_lk_reg [2],
  output logic            conf_lk_low [2],
  // mode and context status
  output dsmt_mode_e      mode,
  output logic            m_bit,
  output logic [AW-1:0]   continuation,
  output logic [AW-1:0]   loop_branch,
  output logic [NW-1:0]   head,
  output logic [NW-1:0]   tail,
  output ctx_state_e      state [N],
  output logic [N-1:0]    v_bits,
  output logic [N-1:0]    s_bits,
  output logic [N-1:0]    j_bits,
  output logic [ITW-1:0]  ns_iter,
  output logic [NREG-1:0] d_anchor,
  output logic [NREG-1:0] r_anchor,
  output logic            commit_hold,   // non-speculative commit held while cloning from it
  // actions
  output logic            spawn_valid,
  output logic [NW-1:0]   spawn_ctx,
  output logic [NW-1:0]   spawn_src,
  output logic [NW:0]     spawn_dist,
  output logic            xfer,          // non-speculative flag transfer
  output logic [NW-1:0]   xfer_old,
  output logic [NW-1:0]   xfer_new,
  output logic            pre_iter,      // pre-DSMT iteration committed
  output logic [N-1:0]    flush_mask,
  output logic            dsmt_exit,
  output logic            ldbtb_upd_valid,
  output logic [AW-1:0]   ldbtb_upd_pc,
  output logic            ldbtb_upd_good
);
  logic [N-1:0]   pend;          // contexts waiting to be cloned from spawn_src
  logic [NW-1:0]  src_q;
  logic [NW-1:0]  base_q;        // context whose iteration the source state starts
  logic [N-1:0]   restart;       // squashed, restart at next transfer
  logic [$clog2(PRE_ITERS+1)-1:0] pre_cnt;
  logic           ipc_bad;
  logic [1:0]     conf_lk_val [2];   // counter values (only the saturated flag is used)

  assign m_bit = (mode == MODE_FULL);
  assign tail  = NW'((int'(head) + N - 1) % N);

  conf_table #(.N(NREG)) u_conf (
    .clk, .rst_n, .clear(dsmt_exit),
    .inc_valid(conf_inc), .inc_idx(conf_reg),
    .dec_valid(conf_dec), .dec_idx(conf_reg),
    .rd_idx(conf_lk_reg), .rd_conf(conf_lk_val), .rd_low(conf_lk_low)
  );

  // events of this cycle
  logic loop_cm, cont, brk, abandon, enter_full;
  assign loop_cm    = cm_br_valid && cm_br_pc == loop_branch && !commit_hold;
  assign cont       = loop_cm && cm_br_taken;
  assign brk        = loop_cm && !cm_br_taken;
  assign pre_iter   = (mode == MODE_PRE) && cont;
  assign enter_full = pre_iter && (int'(pre_cnt) + 1 >= PRE_ITERS);
  assign xfer       = (mode == MODE_FULL) && cont;
  assign abandon    = (mode == MODE_FULL) && ipc_result_valid && ipc_result == IPC_LT && !cont;
  assign dsmt_exit  = ((mode == MODE_FULL) && (brk || abandon)) || ((mode == MODE_PRE) && brk);
  assign xfer_old   = head;
  assign xfer_new   = NW'((int'(head) + 1) % N);
  assign commit_hold = (mode == MODE_FULL) && pend != '0 && src_q == head;

  assign ldbtb_upd_valid = dsmt_exit && mode == MODE_FULL;
  assign ldbtb_upd_pc    = loop_branch;
  assign ldbtb_upd_good  = !(abandon || ipc_bad);

  // earliest squashed context (never the non-speculative one)
  logic [N-1:0] sq_mask;
  always_comb begin
    int unsigned first;
    first = N;
    for (int c = 0; c < N; c++)
      if (squash_req[c] && c != int'(head) && ring_dist(c, int'(head), N) < first)
        first = ring_dist(c, int'(head), N);
    for (int c = 0; c < N; c++)
      sq_mask[c] = (mode == MODE_FULL) && first < N && ring_dist(c, int'(head), N) >= first;
  end

  always_comb begin
    flush_mask = sq_mask;
    if (dsmt_exit)
      for (int c = 0; c < N; c++) flush_mask[c] = (c != int'(head));
  end

  // next context to clone: first pending one after the source
  always_comb begin
    logic found;
    found = 1'b0; spawn_ctx = '0;
    for (int k = 1; k <= N; k++) begin
      logic [NW-1:0] c;
      c = NW'((int'(src_q) + k) % N);
      if (!found && pend[c] && !sq_mask[c]) begin found = 1'b1; spawn_ctx = c; end
    end
    spawn_valid = found && mode == MODE_FULL && !dsmt_exit && !xfer;
    spawn_src   = src_q;
    spawn_dist  = (NW+1)'(ring_dist(spawn_ctx, int'(base_q), N));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode <= MODE_NON; continuation <= '0; loop_branch <= '0; head <= '0;
      for (int c = 0; c < N; c++) state[c] <= (c == 0) ? CTX_RUNNING : CTX_INVALID;
      v_bits <= N'(1); s_bits <= '0; j_bits <= '0; ns_iter <= '0;
      d_anchor <= '0; r_anchor <= '0; pend <= '0; src_q <= '0; base_q <= '0; restart <= '0;
      pre_cnt <= '0; ipc_bad <= 1'b0;
    end else begin
      if (ipc_result_valid) ipc_bad <= (ipc_result == IPC_LT);
      // per-context J / hold / sync
      for (int c = 0; c < N; c++) begin
        if (unend[c]) begin
          j_bits[c] <= 1'b0;
          if (state[c] == CTX_SYNC) state[c] <= CTX_RUNNING;
        end else if (v_bits[c] && reach_end[c] && mode == MODE_FULL) begin
          j_bits[c] <= 1'b1;
          if (s_bits[c]) state[c] <= CTX_SYNC;
        end else if (state[c] == CTX_RUNNING && hold_req[c] && !j_bits[c]) state[c] <= CTX_HOLD;
        else if (state[c] == CTX_HOLD && !hold_req[c]) state[c] <= CTX_RUNNING;
      end
      // cloning
      if (spawn_valid) begin
        pend[spawn_ctx]   <= 1'b0;
        state[spawn_ctx]  <= CTX_RUNNING;
        v_bits[spawn_ctx] <= 1'b1;
        s_bits[spawn_ctx] <= (spawn_ctx != head);
        j_bits[spawn_ctx] <= 1'b0;
      end
      // squashes
      for (int c = 0; c < N; c++)
        if (sq_mask[c]) begin
          state[c] <= CTX_INVALID; v_bits[c] <= 1'b0; j_bits[c] <= 1'b0;
          pend[c] <= 1'b0; restart[c] <= 1'b1;
        end
      unique case (mode)
        MODE_NON: begin
          if (det_valid) begin
            mode <= MODE_PRE; continuation <= det_target; loop_branch <= det_branch;
            pre_cnt <= '0; ipc_bad <= 1'b0;
          end
        end
        MODE_PRE: begin
          if (brk) mode <= MODE_NON;
          else if (pre_iter) begin
            r_anchor <= ns_r_bits;
            d_anchor <= ns_d_bits;
            pre_cnt  <= pre_cnt + 1'b1;
            if (enter_full) begin
              mode    <= MODE_FULL;
              ns_iter <= '0;
              src_q   <= head;
              base_q  <= head;
              for (int c = 0; c < N; c++) pend[c] <= (c != int'(head));
              restart <= '0;
            end
          end
        end
        default: begin // MODE_FULL
          if (dsmt_exit) begin
            mode <= MODE_NON;
            pend <= '0; restart <= '0;
            j_bits[head] <= 1'b0;
            for (int c = 0; c < N; c++)
              if (c != int'(head)) begin
                state[c] <= CTX_INVALID; v_bits[c] <= 1'b0; s_bits[c] <= 1'b0; j_bits[c] <= 1'b0;
              end
          end else if (xfer) begin
            logic [N-1:0] again;
            again = restart | sq_mask | pend;
            again[head] = 1'b1;
            head     <= xfer_new;
            ns_iter  <= ns_iter + 1'b1;
            r_anchor <= ns_r_bits;
            d_anchor <= ns_d_bits;
            src_q    <= head;
            base_q   <= xfer_new;
            pend     <= again;
            restart  <= '0;
            state[head]  <= CTX_INVALID;
            v_bits[head] <= 1'b0;
            j_bits[head] <= 1'b0;
            s_bits[xfer_new] <= 1'b0;
            if (state[xfer_new] != CTX_INVALID && !sq_mask[xfer_new]) state[xfer_new] <= CTX_RUNNING;
          end
        end
      endcase
    end
  end

  one_head: assert property (@(posedge clk) disable iff (!rst_n)
    (mode != MODE_FULL) || !s_bits[head]);
endmodule
