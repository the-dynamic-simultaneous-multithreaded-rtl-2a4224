// loop_stack: stack of nested loops kept beside the loop detection BTB. Each
// entry holds a loop's backward-branch address, its target (loop start)
// address and its last sustained-IPC figure. When a loop is detected its
// address range [target, branch] is compared with the entry on top of the
// stack; if the new range contains it (an enclosing loop) the new loop is
// pushed. An inner loop therefore sits below its enclosing loops. A detected
// loop that is not an enclosing one replaces the whole stack (a new nest
// starts). The stack offers the loop of the nest with the best recorded IPC
// as the one to run in DSMT mode. Push rule and inner-at-bottom order follow
// the architecture; the depth, the restart rule, the IPC field and the
// best-loop selection rule (highest IPC, innermost on a tie) are this
// design's choices. Outputs are combinational from the registered stack.
module loop_stack
  import dsmt_pkg::*;
#(
  parameter int DEPTH = 4,
  parameter int IPCW  = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            det_valid,
  input  logic [AW-1:0]   det_branch,
  input  logic [AW-1:0]   det_target,
  input  logic            ipc_valid,        // record IPC of a loop on the stack
  input  logic [AW-1:0]   ipc_branch,
  input  logic [IPCW-1:0] ipc_value,
  output logic [$clog2(DEPTH+1)-1:0] depth,
  output logic            best_valid,
  output logic [AW-1:0]   best_branch,
  output logic [AW-1:0]   best_target,
  output logic [AW-1:0]   top_branch,
  output logic [AW-1:0]   top_target
);
  typedef struct packed {
    logic [AW-1:0]   br;
    logic [AW-1:0]   tg;
    logic [IPCW-1:0] ipc;
  } ent_t;
  ent_t st [DEPTH];
  localparam int DW = $clog2(DEPTH+1);

  assign top_branch = (depth != '0) ? st[int'(depth)-1].br : '0;
  assign top_target = (depth != '0) ? st[int'(depth)-1].tg : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      depth <= '0;
      for (int i = 0; i < DEPTH; i++) st[i] <= '0;
    end else begin
      if (det_valid) begin
        logic same, encl;
        same = (depth != '0) && det_branch == top_branch && det_target == top_target;
        encl = (depth != '0) && det_target <= top_target && det_branch >= top_branch && !same;
        if (same) begin
          // already on top: nothing to do
        end else if (encl && int'(depth) < DEPTH) begin
          st[depth[$clog2(DEPTH)-1:0]] <= '{br: det_branch, tg: det_target, ipc: '0};
          depth     <= depth + 1'b1;
        end else if (encl) begin
          // full: drop the innermost loop, keep the outer ones
          for (int i = 0; i < DEPTH - 1; i++) st[i] <= st[i+1];
          st[DEPTH-1] <= '{br: det_branch, tg: det_target, ipc: '0};
        end else begin
          st[0] <= '{br: det_branch, tg: det_target, ipc: '0};
          depth <= DW'(1);
        end
      end
      if (ipc_valid && !det_valid) begin
        for (int i = 0; i < DEPTH; i++)
          if (i < int'(depth) && st[i].br == ipc_branch) st[i].ipc <= ipc_value;
      end
    end
  end

  always_comb begin
    logic [IPCW-1:0] b;
    best_valid = 1'b0; best_branch = '0; best_target = '0; b = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (i < int'(depth) && (!best_valid || st[i].ipc > b)) begin
        best_valid = 1'b1; best_branch = st[i].br; best_target = st[i].tg; b = st[i].ipc;
      end
    end
  end
endmodule
