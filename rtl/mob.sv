// mob: memory order buffer of one context. Load and store slots are allocated
// in program order at dispatch. The address unit fills in each slot's address
// (and a store's data). A load may go ahead of older stores: it looks for the
// youngest older store to the same word with known data and takes its value
// (store-to-load forwarding); otherwise it reads the data cache. When the ROB
// commits a memory instruction its slot is marked committed; this lets a
// speculative context "commit" stores into its MOB without blocking its ROB.
// Committed stores leave the head for the data cache in order, but only while
// drain_en is high (the context is non-speculative and owns a cache port);
// committed loads simply leave the head. A mispredicted branch cuts the
// buffer back to the tail position it saw at dispatch (cut_valid/cut_tail),
// dropping the younger wrong-path slots. Function, per-context organisation
// and the 64-entry depth follow the architecture; forwarding on word
// address equality, one allocation/commit/drain per cycle and the slot-index
// interface are this design's choices. Lookups and head outputs are
// combinational; updates happen at the rising edge.
module mob
  import dsmt_pkg::*;
#(
  parameter int DEPTH = MOB_DEPTH,
  parameter int IW    = $clog2(DEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            flush,
  // remove every slot allocated at or after cut_tail (branch recovery)
  input  logic            cut_valid,
  input  logic [IW-1:0]   cut_tail,
  // allocate at dispatch
  input  logic            alloc_valid,
  input  logic            alloc_store,
  output logic            alloc_ready,
  output logic [IW-1:0]   alloc_idx,
  // address / data from the address unit
  input  logic            upd_valid,
  input  logic [IW-1:0]   upd_idx,
  input  logic [AW-1:0]   upd_addr,
  input  logic [XLEN-1:0] upd_data,
  // load forwarding lookup
  input  logic [IW-1:0]   ld_idx,
  output logic            fwd_hit,
  output logic [XLEN-1:0] fwd_data,
  // commit from the ROB (oldest uncommitted slot)
  input  logic            commit_valid,
  // drain of committed stores to the data cache
  input  logic            drain_en,
  output logic            st_req,
  output logic [AW-1:0]   st_addr,
  output logic [XLEN-1:0] st_data,
  input  logic            st_gnt,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  typedef struct packed {
    logic            store;
    logic            addr_v;
    logic [AW-1:0]   addr;
    logic            data_v;
    logic [XLEN-1:0] data;
    logic            committed;
  } ent_t;

  ent_t          e [DEPTH];
  logic [IW-1:0] head, tail, cptr;
  localparam int CNW = $clog2(DEPTH+1);

  assign alloc_ready = int'(count) < DEPTH;
  assign alloc_idx   = tail;

  // head of the buffer
  logic pop;
  assign st_req  = count != '0 && e[head].store && e[head].committed && drain_en;
  assign st_addr = e[head].addr;
  assign st_data = e[head].data;
  assign pop     = count != '0 && e[head].committed && (!e[head].store || (st_req && st_gnt));

  // forwarding: youngest older store with the same word address
  always_comb begin
    int unsigned age;
    age = (int'(ld_idx) + DEPTH - int'(head)) % DEPTH;
    fwd_hit = 1'b0; fwd_data = '0;
    for (int k = 0; k < DEPTH; k++) begin
      logic [IW-1:0] i;
      i = IW'((int'(head) + k) % DEPTH);
      if (k < int'(age) && e[i].store && e[i].addr_v && e[i].data_v &&
          e[i].addr[AW-1:2] == e[ld_idx].addr[AW-1:2]) begin
        fwd_hit = 1'b1; fwd_data = e[i].data;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0; tail <= '0; cptr <= '0; count <= '0;
      for (int i = 0; i < DEPTH; i++) e[i] <= '0;
    end else if (flush) begin
      head <= '0; tail <= '0; cptr <= '0; count <= '0;
    end else begin
      int unsigned cnt;
      cnt = int'(count);
      if (upd_valid) begin
        e[upd_idx].addr_v <= 1'b1;
        e[upd_idx].addr   <= upd_addr;
        if (e[upd_idx].store) begin e[upd_idx].data_v <= 1'b1; e[upd_idx].data <= upd_data; end
      end
      if (commit_valid) begin
        e[cptr].committed <= 1'b1;
        cptr <= cptr + 1'b1;
      end
      if (pop) begin
        head <= head + 1'b1;
        cnt  = cnt - 1;
      end
      if (cut_valid) begin
        // fewer than DEPTH slots are ever younger than a branch in flight
        cnt  = cnt - (int'(tail) + DEPTH - int'(cut_tail)) % DEPTH;
        tail <= cut_tail;
      end else if (alloc_valid && alloc_ready) begin
        e[tail] <= '{store: alloc_store, addr_v: 1'b0, addr: '0, data_v: 1'b0, data: '0, committed: 1'b0};
        tail <= tail + 1'b1;
        cnt  = cnt + 1;
      end
      count <= CNW'(cnt);
    end
  end

  commit_in_range: assert property (@(posedge clk) disable iff (!rst_n || flush)
    commit_valid |-> ((int'(cptr) + DEPTH - int'(head)) % DEPTH) < int'(count));
endmodule
