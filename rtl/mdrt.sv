// mdrt: Memory Dataflow Resolution Table. A fully associative table that
// watches the memory operations sent to the data cache while the processor
// runs in DSMT mode, so that speculative loads cannot break sequential
// memory semantics. Each entry holds a valid bit, a word address, the value
// seen, a 2-bit confidence counter and, per context, an L bit (the context
// loaded the word) and an S bit (the context stored it).
//  * A load from a speculative context looks the address up; on a miss it
//    allocates an entry (value = loaded data). It then sets its L bit. If no
//    entry is free the access is refused (acc_nack) and must be retried.
//  * Loads of the non-speculative context are not tracked.
//  * A store (only the non-speculative context stores to memory) sets its S
//    bit and checks the L bits of the other contexts. If another context
//    loaded the word and the stored value differs from the value it loaded,
//    the nearest such context (in context order after the non-speculative
//    one) is squashed together with all later ones; the entry's confidence
//    counter counts up. An early load that saw the right value counts down.
//  * ctx_clear drops the L and S bits of contexts that were squashed or
//    whose iteration retired; entries with no bits left become free.
//    clear_all empties the table and its counters when DSMT mode ends.
// Dispatch can ask (lk_addr) whether early loads of a word have low
// confidence (counter saturated) and delay the load.
// Fields and rules follow the architecture. The 32-entry size, comparing
// values before squashing, the per-port sequential processing order, the
// refusal when full and lowest-free-entry allocation are this design's
// choices. Squash and nack outputs are combinational; the table updates at
// the rising edge.
module mdrt
  import dsmt_pkg::*;
#(
  parameter int N  = NCTX,
  parameter int NE = 32,
  parameter int NP = DC_PORTS,
  parameter int NW = $clog2(N)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,          // full-DSMT mode
  input  logic [NW-1:0]   head,            // non-speculative context
  input  logic            clear_all,
  input  logic [N-1:0]    ctx_clear,
  input  logic            acc_valid [NP],
  input  logic            acc_store [NP],
  input  logic [NW-1:0]   acc_ctx   [NP],
  input  logic [AW-1:0]   acc_addr  [NP],
  input  logic [XLEN-1:0] acc_value [NP],
  output logic            acc_nack  [NP],
  output logic            sq_valid,
  output logic [NW-1:0]   sq_ctx,
  input  logic [AW-1:0]   lk_addr,
  output logic            lk_low,
  output logic [$clog2(NE+1)-1:0] used
);
  typedef struct packed {
    logic            v;
    logic [AW-3:0]   addr;
    logic [XLEN-1:0] value;
    logic [1:0]      c;
    logic [N-1:0]    l;
    logic [N-1:0]    s;
  } ent_t;

  ent_t t  [NE];
  ent_t nx [NE];

  always_comb begin
    int unsigned best;
    logic [N-1:0] early;
    early = '0;
    for (int i = 0; i < NE; i++) nx[i] = t[i];
    sq_valid = 1'b0; sq_ctx = '0; best = N;
    for (int p = 0; p < NP; p++) begin
      logic          hit;
      int            hi;
      int            fi;
      logic [AW-3:0] wa;
      acc_nack[p] = 1'b0;
      wa = acc_addr[p][AW-1:2];
      hit = 1'b0; hi = 0; fi = -1;
      for (int i = NE - 1; i >= 0; i--) begin
        if (nx[i].v && nx[i].addr == wa) begin hit = 1'b1; hi = i; end
        if (!nx[i].v) fi = i;
      end
      if (enable && acc_valid[p] && !acc_store[p] && acc_ctx[p] != head) begin
        if (hit) nx[hi].l[acc_ctx[p]] = 1'b1;
        else if (fi >= 0) begin
          nx[fi].v = 1'b1; nx[fi].addr = wa; nx[fi].value = acc_value[p];
          nx[fi].c = 2'd0; nx[fi].l = '0; nx[fi].s = '0;
          nx[fi].l[acc_ctx[p]] = 1'b1;
        end else acc_nack[p] = 1'b1;
      end
      if (enable && acc_valid[p] && acc_store[p] && hit) begin
        early = nx[hi].l & ~(N'(1) << acc_ctx[p]);
        nx[hi].s[acc_ctx[p]] = 1'b1;
        if (early != '0) begin
          if (nx[hi].value != acc_value[p]) begin
            for (int c = 0; c < N; c++)
              if (early[c] && ring_dist(c, int'(head), N) < best) begin
                best = ring_dist(c, int'(head), N); sq_valid = 1'b1; sq_ctx = NW'(c);
              end
            if (nx[hi].c != 2'd3) nx[hi].c = nx[hi].c + 2'd1;
          end else if (nx[hi].c != 2'd0) nx[hi].c = nx[hi].c - 2'd1;
        end
        nx[hi].value = acc_value[p];
      end
    end
    for (int i = 0; i < NE; i++) begin
      nx[i].l = nx[i].l & ~ctx_clear;
      nx[i].s = nx[i].s & ~ctx_clear;
      if (nx[i].l == '0 && nx[i].s == '0) nx[i].v = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NE; i++) t[i] <= '0;
    end else if (clear_all) begin
      for (int i = 0; i < NE; i++) t[i] <= '0;
    end else begin
      for (int i = 0; i < NE; i++) t[i] <= nx[i];
    end
  end

  always_comb begin
    lk_low = 1'b0;
    used   = '0;
    for (int i = 0; i < NE; i++) begin
      if (t[i].v && t[i].addr == lk_addr[AW-1:2] && t[i].c == 2'd3) lk_low = 1'b1;
      if (t[i].v) used = used + 1'b1;
    end
  end
endmodule
