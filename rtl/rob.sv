// rob: reorder buffer of one context. A circular FIFO whose entry index is
// the implicit ROB tag of an instruction. Dispatch allocates the tail entry
// (destination register, flag bits carried to commit). Results arrive from
// the writeback bus by tag and mark the entry done. The head entry retires in
// order when done and commit is enabled (speculative contexts are held until
// they become non-speculative). The buffer also renames: for a source
// register it reports whether an entry in flight will write that register,
// the tag of the youngest such entry and, when that entry is done, its value,
// so a dispatched instruction can read a result before it is committed. A
// mispredicted branch flushes every entry younger than its tag; a squash
// flushes everything. Organisation and depth follow the architecture; one
// allocation and one commit per cycle, two writeback and two lookup ports,
// and the flag field are this design's choices. Lookups and head outputs are
// combinational; updates happen at the rising edge.
module rob
  import dsmt_pkg::*;
#(
  parameter int DEPTH = ROB_DEPTH,
  parameter int FW    = 4,
  parameter int WB_W  = 2,
  parameter int TW    = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            flush_all,
  input  logic            flush_after_valid,
  input  logic [TW-1:0]   flush_after_tag,
  // allocate
  input  logic            alloc_valid,
  input  logic            alloc_dest_v,
  input  logic [RW-1:0]   alloc_dest,
  input  logic [FW-1:0]   alloc_flags,
  output logic            alloc_ready,
  output logic [TW-1:0]   alloc_tag,
  // writeback
  input  logic            wb_valid [WB_W],
  input  logic [TW-1:0]   wb_tag   [WB_W],
  input  logic [XLEN-1:0] wb_value [WB_W],
  // commit
  input  logic            commit_en,
  output logic            commit_valid,
  output logic            commit_rdy,     // head entry done (commit possible)
  output logic            commit_dest_v,
  output logic [RW-1:0]   commit_dest,
  output logic [XLEN-1:0] commit_value,
  output logic [FW-1:0]   commit_flags,
  // rename lookup
  input  logic [RW-1:0]   lk_reg     [2],
  output logic            lk_pending [2],
  output logic [TW-1:0]   lk_tag     [2],
  output logic            lk_ready   [2],
  output logic [XLEN-1:0] lk_value   [2],
  output logic [$clog2(DEPTH+1)-1:0] count
);
  typedef struct packed {
    logic            dest_v;
    logic [RW-1:0]   dest;
    logic            done;
    logic [XLEN-1:0] value;
    logic [FW-1:0]   flags;
  } ent_t;

  ent_t          e [DEPTH];
  logic [TW-1:0] head, tail;
  localparam int CNW = $clog2(DEPTH+1);

  assign alloc_ready   = int'(count) < DEPTH;
  assign alloc_tag     = tail;
  assign commit_rdy    = count != '0 && e[head].done;
  assign commit_valid  = commit_en && commit_rdy;
  assign commit_dest_v = e[head].dest_v;
  assign commit_dest   = e[head].dest;
  assign commit_value  = e[head].value;
  assign commit_flags  = e[head].flags;

  // youngest in-flight writer of each looked-up register
  always_comb begin
    for (int p = 0; p < 2; p++) begin
      lk_pending[p] = 1'b0; lk_tag[p] = '0; lk_ready[p] = 1'b0; lk_value[p] = '0;
      for (int k = 0; k < DEPTH; k++) begin
        logic [TW-1:0] i;
        i = TW'((int'(head) + k) % DEPTH);
        if (k < int'(count) && e[i].dest_v && e[i].dest == lk_reg[p]) begin
          lk_pending[p] = 1'b1; lk_tag[p] = i; lk_ready[p] = e[i].done; lk_value[p] = e[i].value;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0; tail <= '0; count <= '0;
      for (int i = 0; i < DEPTH; i++) e[i] <= '0;
    end else if (flush_all) begin
      head <= '0; tail <= '0; count <= '0;
    end else begin
      int unsigned cnt;
      logic [TW-1:0] h;
      cnt = int'(count);
      h   = head;
      for (int w = 0; w < WB_W; w++)
        if (wb_valid[w]) begin e[wb_tag[w]].done <= 1'b1; e[wb_tag[w]].value <= wb_value[w]; end
      if (commit_valid) begin
        h   = TW'((int'(head) + 1) % DEPTH);
        cnt = cnt - 1;
      end
      if (flush_after_valid) begin
        // keep entries from the head up to and including the branch
        int unsigned keep;
        keep = ((int'(flush_after_tag) + DEPTH - int'(head)) % DEPTH) + 1;
        if (commit_valid) keep = keep - 1;
        if (keep < cnt) cnt = keep;
        tail <= TW'((int'(h) + cnt) % DEPTH);
      end else if (alloc_valid && alloc_ready) begin
        e[tail] <= '{dest_v: alloc_dest_v, dest: alloc_dest, done: 1'b0, value: '0, flags: alloc_flags};
        tail <= TW'((int'(tail) + 1) % DEPTH);
        cnt  = cnt + 1;
      end
      head  <= h;
      count <= CNW'(cnt);
    end
  end
endmodule
