// ctx_regfile: the logical register files of all contexts, with the utility
// bits that track inter-thread register dependences. Per context and
// register it keeps the committed value and three bits:
//   R (ready)      - this context has committed a value to the register;
//   L (load)       - the register was read speculatively while R was clear
//                    and no local instruction was going to write it, either
//                    from this context's own copy or from a predecessor (the
//                    value read is then kept in the own copy);
//   D (dependence) - the register was read while R was clear and the
//                    R_Anchor bit said an earlier iteration had written it.
// Dispatch reads (two ports) follow register dependence speculation:
//   * the non-speculative (head) context, a set R bit, or a pending local
//     writer in the ROB: the context's own register;
//   * D_Anchor set: the value of the immediate predecessor once its R bit is
//     set; if the predecessor has finished its iteration without writing it,
//     the search moves back (second-level speculation); while a predecessor
//     that may still write it is found first, the read stalls (ready low);
//   * D_Anchor clear: the nearest predecessor with its R bit set (or being
//     written in this cycle, whose new value is bypassed), or the own
//     copy (setting L) when no predecessor has written it.
// A commit write (one port) sets R and checks the successors that would have
// taken their value from the writer: the nearest one whose L bit is set is
// squashed if its copy differs from the new value, and otherwise is reported
// as a correct early read (for the confidence counters).
// Cloning copies all registers of a source context into a new context, takes
// LSST predictions for strided registers and clears the new context's bits,
// except that a predicted register counts as already produced (R set) so
// that the context and its successors use the prediction.
// At the start of each pre-DSMT iteration the bits of the running context
// are cleared so that they describe one iteration.
// When the non-speculative flag moves on, the new non-speculative context
// takes the old one's value for every register it has not written (merge),
// so its register file holds the precise state.
// The R/L/D semantics and the speculation rules follow the architecture.
// The stall rule for an unfinished predecessor, the merge on flag transfer,
// checking only the nearest L-marked successor and the port counts are this
// design's choices. Reads, view and check outputs are combinational; all
// state changes at the rising edge.
module ctx_regfile
  import dsmt_pkg::*;
#(
  parameter int N = NCTX,
  parameter int NW = $clog2(N)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NW-1:0]   head,
  input  logic [N-1:0]    done,         // J bits: context finished its iteration
  input  logic [NREG-1:0] d_anchor,
  input  logic [NREG-1:0] r_anchor,
  // dispatch read ports
  input  logic            rd_valid   [2],
  input  logic [NW-1:0]   rd_ctx     [2],
  input  logic [RW-1:0]   rd_reg     [2],
  input  logic            rd_pending [2],  // the context's ROB will write it
  output logic [XLEN-1:0] rd_value   [2],
  output logic            rd_ready   [2],
  output logic [NW-1:0]   rd_src     [2],
  output logic            rd_inter   [2],  // inter-thread dependence on this read
  // commit write port
  input  logic            wr_valid,
  input  logic [NW-1:0]   wr_ctx,
  input  logic [RW-1:0]   wr_reg,
  input  logic [XLEN-1:0] wr_value,
  output logic            sq_valid,      // misspeculation: squash sq_ctx and later
  output logic [NW-1:0]   sq_ctx,
  output logic            ok_valid,      // early read found correct
  // clone
  input  logic            cl_valid,
  input  logic [NW-1:0]   cl_dst,
  input  logic [NW-1:0]   cl_src,
  input  logic [NREG-1:0] cl_ovr_valid,
  input  logic [XLEN-1:0] cl_ovr_value [NREG],
  output logic [XLEN-1:0] cl_src_regs  [NREG],
  // clear the utility bits of one context (start of a pre-DSMT iteration)
  input  logic            bc_valid,
  input  logic [NW-1:0]   bc_ctx,
  // merge on non-speculative flag transfer
  input  logic            mg_valid,
  input  logic [NW-1:0]   mg_src,
  input  logic [NW-1:0]   mg_dst,
  // view of one context (final values, R and D bits)
  input  logic [NW-1:0]   view_ctx,
  output logic [XLEN-1:0] view_regs [NREG],
  output logic [NREG-1:0] view_r,
  output logic [NREG-1:0] view_d
);
  logic [XLEN-1:0] rf [N][NREG];
  logic [NREG-1:0] rb [N];
  logic [NREG-1:0] lb [N];
  logic [NREG-1:0] db [N];

  function automatic logic [NW-1:0] prev(input logic [NW-1:0] c);
    return NW'((int'(c) + N - 1) % N);
  endfunction

  always_comb begin
    for (int r = 0; r < NREG; r++) begin
      cl_src_regs[r] = rf[cl_src][r];
      view_regs[r]   = rf[view_ctx][r];
    end
    view_r = rb[view_ctx];
    view_d = db[view_ctx];
  end

  // dispatch reads
  logic set_l [2];
  logic set_d [2];
  always_comb begin
    logic [NW-1:0] c, q;
    logic [RW-1:0] r;
    logic          searching;
    c = '0; q = '0; r = '0; searching = 1'b0;
    for (int p = 0; p < 2; p++) begin
      c = rd_ctx[p]; r = rd_reg[p];
      rd_value[p] = rf[c][r]; rd_ready[p] = 1'b1; rd_src[p] = c; rd_inter[p] = 1'b0;
      set_l[p] = 1'b0; set_d[p] = 1'b0;
      set_d[p] = !rb[c][r] && !rd_pending[p] && r_anchor[r];
      if (c != head && !rb[c][r] && !rd_pending[p]) begin
        q = c;
        searching = 1'b1;
        for (int k = 1; k < N; k++) begin
          if (searching && q != head) begin
            q = prev(q);
            if (wr_valid && wr_ctx == q && wr_reg == r) begin
              // written in this cycle: take the new value
              rd_value[p] = wr_value; rd_src[p] = q; rd_inter[p] = 1'b1;
              set_l[p] = 1'b1;
              searching = 1'b0;
            end else if (rb[q][r]) begin
              rd_value[p] = rf[q][r]; rd_src[p] = q; rd_inter[p] = 1'b1;
              set_l[p] = 1'b1;   // keep the value read, checked on later writes
              searching = 1'b0;
            end else if (d_anchor[r] && (q == head || !done[q])) begin
              rd_ready[p] = 1'b0; rd_src[p] = q; rd_inter[p] = 1'b1;
              searching = 1'b0;
            end
          end
        end
        if (searching) begin
          if (d_anchor[r]) begin
            rd_ready[p] = 1'b0; rd_inter[p] = 1'b1;
          end else begin
            set_l[p] = 1'b1;   // read own copy
          end
        end
      end
    end
  end

  // misspeculation check on a commit write
  always_comb begin
    logic [NW-1:0] s;
    logic          go;
    sq_valid = 1'b0; sq_ctx = '0; ok_valid = 1'b0;
    s = wr_ctx; go = wr_valid;
    for (int k = 1; k < N; k++) begin
      s = NW'((int'(s) + 1) % N);
      if (go && s != head) begin
        if (lb[s][wr_reg]) begin
          if (rf[s][wr_reg] != wr_value) sq_valid = 1'b1;
          else ok_valid = 1'b1;
          sq_ctx = s;
          go = 1'b0;
        end else if (rb[s][wr_reg]) begin
          go = 1'b0;   // later contexts read from this one
        end
      end else begin
        go = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N; c++) begin rb[c] <= '0; lb[c] <= '0; db[c] <= '0; end
    end else begin
      for (int p = 0; p < 2; p++) begin
        if (rd_valid[p] && rd_ready[p] && set_l[p]) lb[rd_ctx[p]][rd_reg[p]] <= 1'b1;
        if (rd_valid[p] && set_d[p])                db[rd_ctx[p]][rd_reg[p]] <= 1'b1;
      end
      if (wr_valid) rb[wr_ctx][wr_reg] <= 1'b1;
      if (mg_valid) rb[mg_dst] <= rb[mg_dst] | rb[mg_src];
      if (bc_valid) begin rb[bc_ctx] <= '0; lb[bc_ctx] <= '0; db[bc_ctx] <= '0; end
      if (cl_valid) begin rb[cl_dst] <= cl_ovr_valid; lb[cl_dst] <= '0; db[cl_dst] <= '0; end
    end
  end

  always_ff @(posedge clk) begin
    if (mg_valid)
      for (int r = 0; r < NREG; r++)
        if (!rb[mg_dst][r]) rf[mg_dst][r] <= rf[mg_src][r];
    if (cl_valid)
      for (int r = 0; r < NREG; r++)
        rf[cl_dst][r] <= cl_ovr_valid[r] ? cl_ovr_value[r] : rf[cl_src][r];
    // a speculative read from a predecessor keeps the value in the reader's copy
    for (int p = 0; p < 2; p++)
      if (rd_valid[p] && rd_ready[p] && set_l[p] && rd_inter[p]) rf[rd_ctx[p]][rd_reg[p]] <= rd_value[p];
    if (wr_valid) rf[wr_ctx][wr_reg] <= wr_value;
  end
endmodule
