// tb_fetch_sched: random context states, cache-miss blocks and instruction
// counts; an independent model of ICount2.8-modified (port 0 reserved for the
// non-speculative context unless it is blocked, otherwise fewest IQ+ROB
// instructions first, lowest number on ties) checks both grants.
module tb_fetch_sched;
  import dsmt_pkg::*;
  localparam int N = 8;
  logic [2:0] ns_ctx;
  ctx_state_e state [N];
  logic [N-1:0] blocked;
  logic [7:0] icount [N];
  logic grant_valid [2];
  logic [2:0] grant_ctx [2];
  int checks = 0, failures = 0, ns_blocked_cases = 0;

  fetch_sched dut (.*);
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int pick(input int excl1, input int excl2);
    int b, bc;
    b = -1; bc = 1000;
    for (int c = 0; c < N; c++)
      if (c != excl1 && c != excl2 && c != int'(ns_ctx) && state[c] == CTX_RUNNING && !blocked[c] && int'(icount[c]) < bc) begin
        b = c; bc = int'(icount[c]);
      end
    return b;
  endfunction

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int e0, e1;
      ns_ctx = 3'($urandom % N);
      for (int c = 0; c < N; c++) begin
        state[c] = ctx_state_e'($urandom % 4);
        if ($urandom % 2) state[c] = CTX_RUNNING;
        icount[c] = 8'($urandom % 6);
      end
      blocked = N'($urandom) & N'($urandom);
      #1;
      if (state[ns_ctx] == CTX_RUNNING && !blocked[ns_ctx]) begin
        e0 = int'(ns_ctx); e1 = pick(-1, -1);
      end else begin
        ns_blocked_cases++;
        e0 = pick(-1, -1); e1 = (e0 < 0) ? -1 : pick(e0, -1);
      end
      checks++;
      if (grant_valid[0] != (e0 >= 0) || (e0 >= 0 && int'(grant_ctx[0]) != e0)) begin
        failures++; $display("port0 got %0d/%0d exp %0d", grant_valid[0], grant_ctx[0], e0);
      end
      checks++;
      if (grant_valid[1] != (e1 >= 0) || (e1 >= 0 && int'(grant_ctx[1]) != e1)) begin
        failures++; $display("port1 got %0d/%0d exp %0d", grant_valid[1], grant_ctx[1], e1);
      end
    end
    checks++;
    if (ns_blocked_cases == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
