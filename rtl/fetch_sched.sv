// fetch_sched: ICount2.8-modified fetch port selection. Each cycle two
// I-cache ports are given to contexts (each port then fetches up to eight
// instructions of its context). Port 0 is reserved for the non-speculative
// context unless that context is blocked by a cache miss; it then goes to the
// eligible speculative context with the fewest instructions in its IQ and
// ROB. The remaining port goes to the eligible speculative context with the
// fewest such instructions. A speculative context is eligible when it is
// valid, running (not hold, synchronizing or invalid) and not blocked by a
// cache miss. Ties go to the lower context number (this design's choice), and
// a port with no eligible context is left idle. Purely combinational.
module fetch_sched
  import dsmt_pkg::*;
#(
  parameter int N   = NCTX,
  parameter int ICW = 8          // width of the IQ+ROB instruction count
) (
  input  logic [$clog2(N)-1:0] ns_ctx,
  input  ctx_state_e           state   [N],
  input  logic [N-1:0]         blocked,
  input  logic [ICW-1:0]       icount  [N],
  output logic                 grant_valid [FETCH_PORTS],
  output logic [$clog2(N)-1:0] grant_ctx   [FETCH_PORTS]
);
  localparam int W = $clog2(N);

  always_comb begin
    logic [N-1:0] elig;
    logic         ns_ok;
    logic [ICW-1:0] best;
    best = '1;
    for (int c = 0; c < N; c++)
      elig[c] = (state[c] == CTX_RUNNING) && !blocked[c] && (W'(c) != ns_ctx);
    ns_ok = (state[ns_ctx] == CTX_RUNNING) && !blocked[ns_ctx];
    for (int p = 0; p < FETCH_PORTS; p++) begin
      grant_valid[p] = 1'b0;
      grant_ctx[p]   = '0;
    end
    if (ns_ok) begin
      grant_valid[0] = 1'b1;
      grant_ctx[0]   = ns_ctx;
    end
    for (int p = 0; p < FETCH_PORTS; p++) begin
      if (!grant_valid[p]) begin
        best = '1;
        for (int c = 0; c < N; c++) begin
          if (elig[c] && (!grant_valid[p] || icount[c] < best)) begin
            grant_valid[p] = 1'b1;
            grant_ctx[p]   = W'(c);
            best           = icount[c];
          end
        end
        if (grant_valid[p]) elig[grant_ctx[p]] = 1'b0;
      end
    end
  end
endmodule
