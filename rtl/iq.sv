// iq: per-context instruction queue. Fetched instructions (after branch
// compaction) are written at the tail of a circular FIFO and the dispatch
// stage takes them from the head, up to the per-thread dispatch bandwidth.
// The circular-FIFO organisation and the 64-entry depth follow the
// architecture; the widths of the push and pop ports (up to PUSH_W entries
// written and POP_W entries read per cycle), the payload type and the flush
// that empties the queue when its context is squashed are this design's
// choices. The head entries are visible combinationally; a pop of n entries
// and a push of m entries take effect at the next rising edge. A push that
// does not fit is refused whole (push_ready low), which is how fetch stalls.
module iq #(
  parameter int DEPTH  = dsmt_pkg::IQ_DEPTH,
  parameter int PUSH_W = 4,
  parameter int POP_W  = 2,
  parameter type T     = logic [63:0]
) (
  input  logic clk,
  input  logic rst_n,
  input  logic flush,
  input  logic [$clog2(PUSH_W+1)-1:0] push_n,
  input  T     push_data [PUSH_W],
  output logic push_ready,
  input  logic [$clog2(POP_W+1)-1:0]  pop_n,
  output T     head_data [POP_W],
  output logic [$clog2(DEPTH+1)-1:0]  count
);
  localparam int PW = $clog2(DEPTH);
  T                 mem [DEPTH];
  logic [PW-1:0]    head, tail;

  assign push_ready = (int'(count) + PUSH_W) <= DEPTH;

  always_comb begin
    for (int i = 0; i < POP_W; i++) head_data[i] = mem[PW'((int'(head) + i) % DEPTH)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head <= '0; tail <= '0; count <= '0;
    end else if (flush) begin
      head <= '0; tail <= '0; count <= '0;
    end else begin
      int unsigned np, nq;
      np = (push_ready) ? int'(push_n) : 0;
      nq = (int'(pop_n) <= int'(count)) ? int'(pop_n) : int'(count);
      head  <= PW'((int'(head) + nq) % DEPTH);
      tail  <= PW'((int'(tail) + np) % DEPTH);
      count <= $bits(count)'(int'(count) + np - nq);
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < PUSH_W; i++)
      if (push_ready && !flush && i < int'(push_n)) mem[PW'((int'(tail) + i) % DEPTH)] <= push_data[i];
  end

  pop_le_count: assert property (@(posedge clk) disable iff (!rst_n || flush)
                                 int'(pop_n) <= int'(count));
endmodule
