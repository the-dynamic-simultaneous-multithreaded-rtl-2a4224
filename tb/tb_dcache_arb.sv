// tb_dcache_arb: random per-context request counts; a reference model of the
// priority logic (one port to the non-speculative context, round robin one
// port per speculative context, leftovers to the non-speculative context)
// checks every grant and the round-robin pointer over time.
module tb_dcache_arb;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [2:0] ns_ctx;
  logic [2:0] req_n [N];
  logic [2:0] grant_n [N];
  logic [2:0] used_ports;
  int checks = 0, failures = 0, leftovers = 0;
  int rr;

  dcache_arb dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    ns_ctx = 0; foreach (req_n[i]) req_n[i] = 0;
    rr = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      int g [N];
      int free, last;
      @(negedge clk);
      ns_ctx = 3'($urandom % N);
      for (int c = 0; c < N; c++) req_n[c] = ($urandom % 3 == 0) ? 3'($urandom % 5) : 3'd0;
      #1;
      foreach (g[i]) g[i] = 0;
      free = 4; last = -1;
      if (req_n[ns_ctx] != 0) begin g[ns_ctx] = 1; free--; end
      for (int k = 0; k < N; k++) begin
        int c;
        c = (rr + k) % N;
        if (c != int'(ns_ctx) && req_n[c] != 0 && free > 0) begin g[c] = 1; free--; last = c; end
      end
      if (free > 0 && int'(req_n[ns_ctx]) > g[ns_ctx]) begin
        int x;
        x = int'(req_n[ns_ctx]) - g[ns_ctx];
        if (x > free) x = free;
        g[ns_ctx] += x; free -= x; leftovers++;
      end
      for (int c = 0; c < N; c++) begin
        checks++;
        if (int'(grant_n[c]) != g[c]) begin failures++; $display("t=%0d ctx %0d grant %0d exp %0d", t, c, grant_n[c], g[c]); end
      end
      checks++;
      if (int'(used_ports) != 4 - free) failures++;
      @(posedge clk);
      if (last >= 0) rr = (last + 1) % N;
    end
    checks++;
    if (leftovers == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
