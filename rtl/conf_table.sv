// conf_table: table of 2-bit saturating confidence counters, one per logical
// register. It guards register dependence speculation: a counter is
// incremented each time a thread is squashed because it read the register
// too early, and decremented when an early read is found to have used the
// right value. All counters clear when the processor leaves DSMT mode. At
// dispatch the counter of a source register is read; when it is saturated
// (low confidence) the dispatch stage holds back an instruction with an
// inter-thread dependence instead of speculating. The increment/decrement
// rule and the clear on DSMT exit follow the architecture; treating only the
// saturated value as "low confidence" is this design's choice.
// Interface: one increment and one decrement port (same-cycle inc and dec of
// the same entry cancel), a synchronous clear, two combinational read ports.
// Updates take effect at the next rising clock edge.
module conf_table #(
  parameter int N  = dsmt_pkg::NREG,
  parameter int IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          inc_valid,
  input  logic [IW-1:0] inc_idx,
  input  logic          dec_valid,
  input  logic [IW-1:0] dec_idx,
  input  logic [IW-1:0] rd_idx   [2],
  output logic [1:0]    rd_conf  [2],
  output logic          rd_low   [2]
);
  logic [1:0] cnt [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) cnt[i] <= 2'd0;
    end else if (clear) begin
      for (int i = 0; i < N; i++) cnt[i] <= 2'd0;
    end else begin
      for (int i = 0; i < N; i++) begin
        logic up, dn;
        up = inc_valid && (inc_idx == IW'(i));
        dn = dec_valid && (dec_idx == IW'(i));
        if (up && !dn && cnt[i] != 2'd3) cnt[i] <= cnt[i] + 2'd1;
        else if (dn && !up && cnt[i] != 2'd0) cnt[i] <= cnt[i] - 2'd1;
      end
    end
  end

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      rd_conf[p] = cnt[rd_idx[p]];
      rd_low[p]  = (cnt[rd_idx[p]] == 2'd3);
    end
  end
endmodule
