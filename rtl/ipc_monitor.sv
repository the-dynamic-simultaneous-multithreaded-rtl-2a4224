// ipc_monitor: approximate relative-IPC measurement. Dividing committed
// instructions by cycles is avoided: the pre-DSMT cycle and committed-
// instruction counters run while the processor is in pre-DSMT mode and halt
// when it enters full-DSMT mode. The full-DSMT counters then run until the
// full-DSMT cycle count equals the halted pre-DSMT cycle count; at that cycle
// the two instruction counts, taken over the same number of cycles, are
// compared and the result (<, =, >: full-DSMT IPC against pre-DSMT IPC) is
// reported to the TCIU. Structure (two cycle counters, two instruction
// counters, two comparators, enables from the TCIU mode outputs) follows the
// architecture. Counter width, clearing all counters in non-DSMT mode, the
// one-cycle result_valid pulse and holding the result until the next
// non-DSMT period are this design's choices. Inputs are sampled at the rising
// edge; result/result_valid are registered.
module ipc_monitor
  import dsmt_pkg::*;
#(
  parameter int CNT_W = 24,
  parameter int CW_IN = 4      // width of the per-cycle commit count
) (
  input  logic             clk,
  input  logic             rst_n,
  input  dsmt_mode_e       mode,
  input  logic [CW_IN-1:0] commit_n,
  output ipc_cmp_e         result,
  output logic             result_valid,
  output logic [CNT_W-1:0] pre_cycles,
  output logic [CNT_W-1:0] pre_instrs,
  output logic [CNT_W-1:0] full_cycles,
  output logic [CNT_W-1:0] full_instrs
);
  logic done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre_cycles <= '0; pre_instrs <= '0; full_cycles <= '0; full_instrs <= '0;
      done <= 1'b0; result <= IPC_NONE; result_valid <= 1'b0;
    end else begin
      result_valid <= 1'b0;
      unique case (mode)
        MODE_NON: begin
          pre_cycles <= '0; pre_instrs <= '0; full_cycles <= '0; full_instrs <= '0;
          done <= 1'b0; result <= IPC_NONE;
        end
        MODE_PRE: begin
          pre_cycles  <= pre_cycles + 1'b1;
          pre_instrs  <= pre_instrs + CNT_W'(commit_n);
          full_cycles <= '0; full_instrs <= '0; done <= 1'b0;
        end
        default: begin // MODE_FULL
          if (!done) begin
            logic [CNT_W-1:0] fc, fi;
            fc = full_cycles + 1'b1;
            fi = full_instrs + CNT_W'(commit_n);
            full_cycles <= fc;
            full_instrs <= fi;
            if (fc >= pre_cycles) begin
              done         <= 1'b1;
              result_valid <= 1'b1;
              result       <= (fi > pre_instrs) ? IPC_GT :
                              (fi == pre_instrs) ? IPC_EQ : IPC_LT;
            end
          end
        end
      endcase
    end
  end
endmodule
