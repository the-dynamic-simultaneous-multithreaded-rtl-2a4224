// ldbtb: Loop Detection Branch Target Buffer, shared by all contexts. It is a
// 2K-entry, 2-way set-associative BTB (1024 sets) whose entries carry, besides
// tag, target and a 2-bit taken/not-taken counter, a loop flag, a count of
// consecutive taken executions and a "bad loop" type bit.
//  * Fetch side (combinational): lk_pc gives hit, predicted direction and
//    target, and whether the entry is a known loop.
//  * Writeback side (rising edge): a resolved branch trains the counter. A
//    taken backward branch that misses allocates an entry; a taken backward
//    branch that hits with at least one consecutive taken execution already
//    recorded signals loop detection (det_valid, one cycle later). A loop is
//    therefore found in its second iteration when its entry was present and in
//    its third when the entry missed. A not-taken outcome clears the count.
//    Subroutine calls and system calls (wb_is_call) never count as loops, and
//    an entry marked bad is not reported.
//  * Loop-end update from the TCIU: upd_good records whether DSMT execution of
//    the loop broke even.
// The fields, the detection rule and the sizes follow the architecture. The
// indexing (8-byte instructions: set index pc[12:3]), the LRU replacement,
// the counter update rule and the 8-bit saturating iteration count are this
// design's choices.
module ldbtb
  import dsmt_pkg::*;
#(
  parameter int SETS = BTB_SETS,
  parameter int ITW  = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  // fetch lookup
  input  logic [AW-1:0] lk_pc,
  output logic          lk_hit,
  output logic          lk_taken,
  output logic [AW-1:0] lk_target,
  output logic          lk_loop,
  // writeback update
  input  logic          wb_valid,
  input  logic [AW-1:0] wb_pc,
  input  logic          wb_taken,
  input  logic [AW-1:0] wb_target,
  input  logic          wb_is_call,
  // loop detection to the TCIU
  output logic          det_valid,
  output logic [AW-1:0] det_branch,
  output logic [AW-1:0] det_target,
  output logic [ITW-1:0] det_iters,
  // loop-end feedback from the TCIU
  input  logic          upd_valid,
  input  logic [AW-1:0] upd_pc,
  input  logic          upd_good
);
  localparam int SW = $clog2(SETS);
  localparam int TW = AW - SW - 3;

  typedef struct packed {
    logic [TW-1:0]  tag;
    logic [AW-1:0]  target;
    logic [1:0]     ctr;
    logic           loop;
    logic [ITW-1:0] iters;
    logic           bad;
  } ent_t;

  ent_t        ent   [SETS][2];
  logic [1:0]  vld   [SETS];
  logic        lru   [SETS];   // way to replace next

  function automatic logic [SW-1:0] idx(input logic [AW-1:0] pc);
    return pc[SW+2:3];
  endfunction
  function automatic logic [TW-1:0] tg(input logic [AW-1:0] pc);
    return pc[AW-1:SW+3];
  endfunction

  // fetch lookup
  always_comb begin
    lk_hit = 1'b0; lk_taken = 1'b0; lk_target = '0; lk_loop = 1'b0;
    for (int w = 0; w < 2; w++) begin
      if (vld[idx(lk_pc)][w] && ent[idx(lk_pc)][w].tag == tg(lk_pc)) begin
        lk_hit    = 1'b1;
        lk_taken  = ent[idx(lk_pc)][w].ctr[1];
        lk_target = ent[idx(lk_pc)][w].target;
        lk_loop   = ent[idx(lk_pc)][w].loop;
      end
    end
  end

  // writeback lookup
  logic         wb_hit;
  logic         wb_way;
  logic [SW-1:0] wi;
  assign wi = idx(wb_pc);
  always_comb begin
    wb_hit = 1'b0; wb_way = 1'b0;
    for (int w = 0; w < 2; w++)
      if (vld[wi][w] && ent[wi][w].tag == tg(wb_pc)) begin wb_hit = 1'b1; wb_way = w[0]; end
  end

  logic backward;
  assign backward = wb_target <= wb_pc;

  // writeback update, computed combinationally and written at the edge
  logic          e_we;
  logic          e_way;
  ent_t          e_wd;
  logic          e_det;
  always_comb begin
    e_we = 1'b0; e_way = wb_way; e_wd = ent[wi][wb_way]; e_det = 1'b0;
    if (wb_valid) begin
      if (wb_hit) begin
        e_we = 1'b1;
        if (wb_taken) begin
          if (e_wd.ctr != 2'b11) e_wd.ctr = e_wd.ctr + 2'b01;
          e_wd.target = wb_target;
          if (backward && !wb_is_call) begin
            if (e_wd.iters != '0 && !e_wd.bad) begin
              e_det     = 1'b1;
              e_wd.loop = 1'b1;
            end
            if (e_wd.iters != '1) e_wd.iters = e_wd.iters + 1'b1;
          end
        end else begin
          if (e_wd.ctr != 2'b00) e_wd.ctr = e_wd.ctr - 2'b01;
          e_wd.iters = '0;
        end
      end else if (wb_taken) begin
        e_we  = 1'b1;
        e_way = lru[wi];
        e_wd  = '{tag: tg(wb_pc), target: wb_target, ctr: 2'b10, loop: 1'b0, iters: '0, bad: 1'b0};
      end
    end
  end

  // loop-end feedback lookup
  logic          u_hit;
  logic          u_way;
  logic [SW-1:0] ui;
  assign ui = idx(upd_pc);
  always_comb begin
    u_hit = 1'b0; u_way = 1'b0;
    for (int w = 0; w < 2; w++)
      if (vld[ui][w] && ent[ui][w].tag == tg(upd_pc)) begin u_hit = 1'b1; u_way = w[0]; end
  end

  always_ff @(posedge clk) begin
    if (e_we) ent[wi][e_way] <= e_wd;
    if (upd_valid && u_hit && !(e_we && ui == wi && u_way == e_way)) ent[ui][u_way].bad <= !upd_good;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin vld[s] <= 2'b00; lru[s] <= 1'b0; end
      det_valid <= 1'b0; det_branch <= '0; det_target <= '0; det_iters <= '0;
    end else begin
      det_valid <= e_det;
      if (e_det) begin
        det_branch <= wb_pc;
        det_target <= wb_target;
        det_iters  <= ent[wi][wb_way].iters;
      end
      if (e_we) begin
        vld[wi][e_way] <= 1'b1;
        lru[wi]        <= ~e_way;
      end
    end
  end
endmodule
