// tb_conf_table: random increments/decrements/clears against a reference
// model of 2-bit saturating counters; checks both read ports every cycle.
module tb_conf_table;
  localparam int N = 64;
  logic clk = 0, rst_n = 0;
  logic clear, inc_valid, dec_valid;
  logic [5:0] inc_idx, dec_idx;
  logic [5:0] rd_idx [2];
  logic [1:0] rd_conf [2];
  logic       rd_low [2];
  int checks = 0, failures = 0;
  int model [N];

  conf_table #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    clear = 0; inc_valid = 0; dec_valid = 0; inc_idx = 0; dec_idx = 0; rd_idx[0] = 0; rd_idx[1] = 0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      clear     = ($urandom % 200) == 0;
      inc_valid = $urandom % 2; inc_idx = 6'($urandom % 8);
      dec_valid = $urandom % 3 == 0; dec_idx = 6'($urandom % 8);
      rd_idx[0] = 6'($urandom % 8); rd_idx[1] = 6'($urandom % 8);
      #1;
      for (int p = 0; p < 2; p++) begin
        checks++;
        if (rd_conf[p] != 2'(model[rd_idx[p]]) || rd_low[p] != (model[rd_idx[p]] == 3)) begin
          failures++; $display("mismatch idx %0d got %0d exp %0d", rd_idx[p], rd_conf[p], model[rd_idx[p]]);
        end
      end
      @(posedge clk);
      if (clear) foreach (model[i]) model[i] = 0;
      else begin
        if (inc_valid && !(dec_valid && dec_idx == inc_idx) && model[inc_idx] < 3) model[inc_idx]++;
        if (dec_valid && !(inc_valid && dec_idx == inc_idx) && model[dec_idx] > 0) model[dec_idx]--;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
