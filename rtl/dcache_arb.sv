// dcache_arb: priority logic between the per-context memory order buffers and
// the four-ported data cache. One port is reserved for the non-speculative
// context. The other ports are handed out one per speculative context in
// round-robin order; when there are not enough requesting speculative
// contexts, the non-speculative context may use the ports left over. The port
// split follows the architecture. The round-robin pointer (advanced past the
// last speculative context served), one port per speculative context per
// cycle, and the per-context request count interface are this design's
// choices. Grants are combinational from the requests; the pointer updates at
// the rising edge.
module dcache_arb
  import dsmt_pkg::*;
#(
  parameter int N     = NCTX,
  parameter int PORTS = DC_PORTS,
  parameter int QW    = $clog2(PORTS+1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] ns_ctx,
  input  logic [QW-1:0]        req_n   [N],   // ready memory operations per context
  output logic [QW-1:0]        grant_n [N],   // ports granted per context
  output logic [QW-1:0]        used_ports
);
  localparam int W = $clog2(N);
  logic [W-1:0] rr;
  logic [W-1:0] last_spec;
  logic         any_spec;

  always_comb begin
    int free, extra;
    free = PORTS; extra = 0;
    any_spec = 1'b0;
    last_spec = rr;
    for (int c = 0; c < N; c++) grant_n[c] = '0;
    // reserved port
    if (req_n[ns_ctx] != '0) begin
      grant_n[ns_ctx] = QW'(1);
      free--;
    end
    // round robin over speculative contexts, one port each
    for (int k = 0; k < N; k++) begin
      logic [W-1:0] c;
      c = W'((int'(rr) + k) % N);
      if (c != ns_ctx && req_n[c] != '0 && free > 0) begin
        grant_n[c] = QW'(1);
        free--;
        any_spec  = 1'b1;
        last_spec = c;
      end
    end
    // leftovers to the non-speculative context
    if (free > 0 && int'(req_n[ns_ctx]) > int'(grant_n[ns_ctx])) begin
      extra = int'(req_n[ns_ctx]) - int'(grant_n[ns_ctx]);
      if (extra > free) extra = free;
      grant_n[ns_ctx] = QW'(int'(grant_n[ns_ctx]) + extra);
      free -= extra;
    end
    used_ports = QW'(PORTS - free);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr <= '0;
    else if (any_spec) rr <= W'((int'(last_spec) + 1) % N);
  end
endmodule
