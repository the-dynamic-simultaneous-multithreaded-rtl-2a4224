// tb_iq: random pushes (up to 4) and pops (up to 2) against a queue model;
// checks order, count, the full refusal and flush. Default 64-entry depth.
module tb_iq;
  logic clk = 0, rst_n = 0, flush;
  logic [2:0] push_n;
  logic [63:0] push_data [4];
  logic push_ready;
  logic [1:0] pop_n;
  logic [63:0] head_data [2];
  logic [6:0] count;
  int checks = 0, failures = 0, fulls = 0;
  logic [63:0] q [$];
  logic [63:0] seq = 0;

  iq dut (.*);
  always #5 clk = ~clk;
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    flush = 0; push_n = 0; pop_n = 0;
    foreach (push_data[i]) push_data[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // phases: fill up, drain, mixed
      push_n = 3'((t % 1000 < 300) ? $urandom % 5 : (t % 1000 < 600) ? $urandom % 2 : $urandom % 3);
      for (int i = 0; i < 4; i++) push_data[i] = seq + 64'(i);
      pop_n  = 2'($urandom % 3);
      if (pop_n > q.size()) pop_n = 2'(q.size());
      flush  = ($urandom % 700) == 0;
      #1;
      checks++;
      if (int'(count) != q.size()) begin failures++; $display("count %0d exp %0d", count, q.size()); end
      checks++;
      if (push_ready != (q.size() + 4 <= 64)) failures++;
      if (!push_ready) fulls++;
      for (int i = 0; i < 2; i++) if (i < q.size()) begin
        checks++;
        if (head_data[i] != q[i]) begin failures++; $display("head %0d mismatch", i); end
      end
      @(posedge clk);
      if (flush) q.delete();
      else begin
        for (int i = 0; i < int'(pop_n); i++) void'(q.pop_front());
        if (q.size() + 4 <= 64 || 1) begin
          if (push_ready) for (int i = 0; i < int'(push_n); i++) q.push_back(seq + 64'(i));
        end
      end
      seq += 4;
    end
    checks++;
    if (fulls == 0) begin failures++; $display("queue never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
