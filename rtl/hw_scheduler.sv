// hw_scheduler: Hardware Scheduler of the hybrid multithreaded execution
// model. Software selects a set of threads and downloads their tags (thread
// ID, PC, stack pointer) into the Ready-thread Queue (RQ). The scheduler runs
// one thread at a time: when the processor has no running thread it takes
// the tag at the head of RQ and, after a hardware context switch of CSW
// cycles, the thread runs. A long-latency miss signalled by the MMU moves the
// running thread to the Sleeping-thread Queue (SQ) and the next ready thread
// is switched in. Each SQ entry carries a wait value wt. With fixed memory
// latency (VAR_LAT = 0) wt is a timer loaded with LAT and counted down every
// cycle; the thread returns to RQ when it reaches zero. With variable latency
// (VAR_LAT = 1) wt holds the tag of the missing cache line and the thread
// returns to RQ when the memory system reports that line served. A finished
// thread leaves the processor. need_set is raised when no thread of the set
// is left, so software can schedule the next set; resident tells software
// how many threads are on the processor, for policies that refill earlier.
// The queues, the states (ready, running, sleeping), the timer and line-tag
// wake-up follow the architecture. Queue depth N equal to the number of
// hardware contexts, one SQ-to-RQ move per cycle (oldest expired first) and
// the handshake are this design's choices. The defaults LAT = 500 and CSW = 2
// are the cycle counts the model was evaluated with.
module hw_scheduler #(
  parameter int N     = 8,
  parameter int TIDW  = 8,
  parameter int AW    = 32,
  parameter int WTW   = 16,
  parameter int LAT   = 500,
  parameter int CSW   = 2,
  parameter bit VAR_LAT = 1'b0
) (
  input  logic            clk,
  input  logic            rst_n,
  // software scheduler side
  input  logic            load_valid,
  input  logic [TIDW-1:0] load_tid,
  input  logic [AW-1:0]   load_pc,
  input  logic [AW-1:0]   load_sp,
  output logic            load_ready,
  output logic            need_set,
  output logic [$clog2(N+1)-1:0] resident,
  // processor side
  output logic            run_valid,
  output logic [TIDW-1:0] run_tid,
  output logic [AW-1:0]   run_pc,
  output logic [AW-1:0]   run_sp,
  output logic            switching,
  input  logic            save_valid,   // running thread's current PC to save in its tag
  input  logic [AW-1:0]   save_pc,
  input  logic            miss,         // long-latency operation of the running thread
  input  logic [WTW-1:0]  miss_line,
  input  logic            finish,
  // memory system (variable latency)
  input  logic            resolve_valid,
  input  logic [WTW-1:0]  resolve_line,
  output logic [$clog2(N+1)-1:0] rq_count,
  output logic [$clog2(N+1)-1:0] sq_count
);
  typedef struct packed {
    logic [TIDW-1:0] tid;
    logic [AW-1:0]   pc;
    logic [AW-1:0]   sp;
  } tag_t;

  localparam int QW = $clog2(N);
  localparam int CNW = $clog2(N+1);

  tag_t            rq [N];
  logic [QW-1:0]   rq_head, rq_tail;
  tag_t            sq_tag [N];
  logic [WTW-1:0]  sq_wt  [N];
  logic [N-1:0]    sq_v;
  logic [31:0]     sq_age [N];
  logic [31:0]     age_ctr;
  tag_t            cur;
  logic            cur_v;
  logic [$clog2(CSW+1)-1:0] sw_cnt;

  assign run_valid  = cur_v && sw_cnt == '0;
  assign switching  = cur_v && sw_cnt != '0;
  assign run_tid    = cur.tid;
  assign run_pc     = cur.pc;
  assign run_sp     = cur.sp;
  assign resident   = CNW'(int'(rq_count) + int'(sq_count) + int'(cur_v));
  assign load_ready = int'(resident) < N;
  assign need_set   = resident == '0;

  always_comb begin
    sq_count = '0;
    for (int i = 0; i < N; i++) sq_count = sq_count + CNW'(sq_v[i]);
  end

  // a sleeping thread whose wait is over (oldest first)
  logic          wake;
  logic [QW-1:0] wake_i;
  always_comb begin
    logic [31:0] best;
    wake = 1'b0; wake_i = '0; best = '1;
    for (int i = 0; i < N; i++) begin
      logic due;
      due = VAR_LAT ? (resolve_valid && sq_wt[i] == resolve_line) : (sq_wt[i] == '0);
      if (sq_v[i] && due && (!wake || sq_age[i] < best)) begin
        wake = 1'b1; wake_i = QW'(i); best = sq_age[i];
      end
    end
  end

  // free SQ slot
  logic [QW-1:0] free_i;
  always_comb begin
    free_i = '0;
    for (int i = N - 1; i >= 0; i--) if (!sq_v[i]) free_i = QW'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq_head <= '0; rq_tail <= '0; rq_count <= '0;
      sq_v <= '0; cur_v <= 1'b0; cur <= '0; sw_cnt <= '0; age_ctr <= '0;
      for (int i = 0; i < N; i++) begin rq[i] <= '0; sq_tag[i] <= '0; sq_wt[i] <= '0; sq_age[i] <= '0; end
    end else begin
      int unsigned rc;
      logic [QW-1:0] rt, rh;
      logic cv;
      rc = int'(rq_count); rt = rq_tail; rh = rq_head; cv = cur_v;
      age_ctr <= age_ctr + 1;
      if (sw_cnt != '0) sw_cnt <= sw_cnt - 1'b1;
      if (run_valid && save_valid) cur.pc <= save_pc;
      // timers
      if (!VAR_LAT)
        for (int i = 0; i < N; i++) if (sq_v[i] && sq_wt[i] != '0) sq_wt[i] <= sq_wt[i] - 1'b1;
      // running thread leaves
      if (run_valid && (miss || finish)) begin
        cv = 1'b0;
        if (miss) begin
          sq_v[free_i]   <= 1'b1;
          sq_tag[free_i] <= (save_valid) ? '{tid: cur.tid, pc: save_pc, sp: cur.sp} : cur;
          sq_wt[free_i]  <= VAR_LAT ? miss_line : WTW'(LAT - 1);
          sq_age[free_i] <= age_ctr;
        end
      end
      // sleeping thread becomes ready
      if (wake && !(run_valid && miss && free_i == wake_i)) begin
        sq_v[wake_i] <= 1'b0;
        rq[rt] <= sq_tag[wake_i];
        rt = QW'((int'(rt) + 1) % N);
        rc++;
      end
      // software downloads a tag
      if (load_valid && load_ready) begin
        rq[rt] <= '{tid: load_tid, pc: load_pc, sp: load_sp};
        rt = QW'((int'(rt) + 1) % N);
        rc++;
      end
      // context switch to the next ready thread
      if (!cv && rq_count != '0) begin
        cur    <= rq[rh];
        cv     = 1'b1;
        sw_cnt <= $bits(sw_cnt)'(CSW);
        rh     = QW'((int'(rh) + 1) % N);
        rc--;
      end
      cur_v    <= cv;
      rq_head  <= rh;
      rq_tail  <= rt;
      rq_count <= CNW'(rc);
    end
  end
endmodule
