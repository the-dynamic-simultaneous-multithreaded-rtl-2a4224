// lsst: Loop Stride Speculation Table. In pre-DSMT mode the decode stage
// reports candidate induction-variable updates, instructions of the form
// "add immediate r <- r + imm"; the table keeps the immediate (the stride) of
// each such register. When the TCIU spawns a context that is k iterations
// ahead of the non-speculative context, the table supplies for every
// strided register the speculative start value r + k * imm, computed from the
// register values being cloned, and remembers these predictions for that
// context. When the non-speculative context finishes an iteration, its final
// register values are compared with the predictions given to its successor;
// a difference requests a squash of the successor (and, through the TCIU, of
// all later contexts). Each register has a 2-bit counter of recent
// mispredictions; a register whose counter is saturated is no longer
// predicted. The table clears when a new pre-DSMT period starts.
// Learning, the r + k*imm formula and the end-of-iteration check follow the
// architecture. Overwriting a register's stride when a second candidate is
// seen, the counter rule (up on a miss, down on a hit, counters also clear
// with the table) and the interfaces are this design's choices. Predicted
// values are combinational from the spawn request; table updates happen at
// the rising edge.
module lsst
  import dsmt_pkg::*;
#(
  parameter int N     = NCTX,
  parameter int IMM_W = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  // learning in pre-DSMT mode
  input  logic                 cand_valid,
  input  logic [RW-1:0]        cand_rd,
  input  logic [RW-1:0]        cand_rs,
  input  logic [IMM_W-1:0]     cand_imm,
  // spawn
  input  logic                 spawn_valid,
  input  logic [$clog2(N)-1:0] spawn_ctx,
  input  logic [$clog2(N):0]   spawn_dist,     // 0..N-1 iterations ahead
  input  logic [XLEN-1:0]      base_regs [NREG],
  output logic [NREG-1:0]      ovr_valid,
  output logic [XLEN-1:0]      ovr_value [NREG],
  // end-of-iteration check
  input  logic                 chk_valid,
  input  logic [$clog2(N)-1:0] chk_ctx,       // successor of the finishing context
  input  logic [XLEN-1:0]      final_regs [NREG],
  output logic                 chk_mismatch,
  output logic [NREG-1:0]      chk_bad_regs,
  output logic [NREG-1:0]      stride_valid
);
  logic [IMM_W-1:0] imm  [NREG];
  logic [1:0]       miss [NREG];
  logic [XLEN-1:0]  pred [N][NREG];
  logic [NREG-1:0]  pmask [N];

  always_comb begin
    for (int r = 0; r < NREG; r++) begin
      logic [XLEN-1:0] simm;
      simm = XLEN'(signed'(imm[r]));
      ovr_valid[r] = stride_valid[r] && miss[r] != 2'd3;
      ovr_value[r] = base_regs[r] + simm * XLEN'(spawn_dist);
    end
  end

  always_comb begin
    for (int r = 0; r < NREG; r++)
      chk_bad_regs[r] = pmask[chk_ctx][r] && (pred[chk_ctx][r] != final_regs[r]);
    chk_mismatch = chk_valid && (chk_bad_regs != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stride_valid <= '0;
      for (int r = 0; r < NREG; r++) begin imm[r] <= '0; miss[r] <= '0; end
      for (int c = 0; c < N; c++) pmask[c] <= '0;
    end else if (clear) begin
      stride_valid <= '0;
      for (int r = 0; r < NREG; r++) miss[r] <= '0;
      for (int c = 0; c < N; c++) pmask[c] <= '0;
    end else begin
      if (cand_valid && cand_rd == cand_rs) begin
        stride_valid[cand_rd] <= 1'b1;
        imm[cand_rd]          <= cand_imm;
      end
      if (chk_valid) begin
        for (int r = 0; r < NREG; r++)
          if (pmask[chk_ctx][r]) begin
            if (chk_bad_regs[r] && miss[r] != 2'd3) miss[r] <= miss[r] + 2'd1;
            else if (!chk_bad_regs[r] && miss[r] != 2'd0) miss[r] <= miss[r] - 2'd1;
          end
      end
      if (spawn_valid) pmask[spawn_ctx] <= ovr_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (spawn_valid)
      for (int r = 0; r < NREG; r++) pred[spawn_ctx][r] <= ovr_value[r];
  end
endmodule
