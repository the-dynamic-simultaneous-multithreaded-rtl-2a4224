// tb_ctx_regfile: eight context register files (64 x 32 bit each).
// Directed checks of: cloning with LSST overrides; reads by the
// non-speculative context; own-copy reads that set L; nearest-writer reads
// with D_Anchor clear; D_Anchor reads that wait for the predecessor, take
// its value once written, and search further back once it has finished its
// iteration; misspeculation on a commit write (squash when the value
// differs, "correct" when equal, no check past a successor that wrote the
// register itself); D bits from R_Anchor; merge on flag transfer; bit clear.
// A random part compares the read rule with a reference model.
module tb_ctx_regfile;
  import dsmt_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [2:0] head;
  logic [N-1:0] done;
  logic [63:0] d_anchor, r_anchor;
  logic rd_valid [2], rd_pending [2], rd_ready [2], rd_inter [2];
  logic [2:0] rd_ctx [2], rd_src [2];
  logic [5:0] rd_reg [2];
  logic [31:0] rd_value [2];
  logic wr_valid, sq_valid, ok_valid, cl_valid, mg_valid, bc_valid;
  logic [2:0] wr_ctx, sq_ctx, cl_dst, cl_src, mg_src, mg_dst, bc_ctx, view_ctx;
  logic [5:0] wr_reg;
  logic [31:0] wr_value;
  logic [63:0] cl_ovr_valid, view_r, view_d;
  logic [31:0] cl_ovr_value [64], cl_src_regs [64], view_regs [64];
  int checks = 0, failures = 0;

  ctx_regfile dut (.*);
  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic ck(string what, bit cond);
    checks++; if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic idle();
    rd_valid[0] = 0; rd_valid[1] = 0; wr_valid = 0; cl_valid = 0; mg_valid = 0; bc_valid = 0;
  endtask
  task automatic write(int c, int r, int unsigned v);
    @(negedge clk); idle(); wr_valid = 1; wr_ctx = 3'(c); wr_reg = 6'(r); wr_value = v;
    @(negedge clk); wr_valid = 0;
  endtask
  task automatic clone(int dst, int src);
    @(negedge clk); idle(); cl_valid = 1; cl_dst = 3'(dst); cl_src = 3'(src);
    @(negedge clk); cl_valid = 0;
  endtask
  // read through port 0, committing the side effects (L/D bits)
  task automatic rd(int c, int r, bit pend, output int unsigned v, output bit rdy, output int src);
    @(negedge clk); idle(); rd_valid[0] = 1; rd_ctx[0] = 3'(c); rd_reg[0] = 6'(r); rd_pending[0] = pend;
    #1 v = rd_value[0]; rdy = rd_ready[0]; src = int'(rd_src[0]);
    @(negedge clk); rd_valid[0] = 0;
  endtask

  initial begin
    int unsigned v; bit rdy; int src;
    head = 0; done = 0; d_anchor = 0; r_anchor = 0; view_ctx = 0;
    rd_ctx[0] = 0; rd_ctx[1] = 0; rd_reg[0] = 0; rd_reg[1] = 0; rd_pending[0] = 0; rd_pending[1] = 0;
    wr_ctx = 0; wr_reg = 0; wr_value = 0; cl_dst = 0; cl_src = 0; mg_src = 0; mg_dst = 0; bc_ctx = 0;
    cl_ovr_valid = 0; foreach (cl_ovr_value[i]) cl_ovr_value[i] = 0;
    idle();
    repeat (2) @(negedge clk); rst_n = 1;
    // context 0 state: reg i = 100 + i
    for (int i = 0; i < 64; i++) write(0, i, 100 + i);
    @(negedge clk); bc_valid = 1; bc_ctx = 0; @(negedge clk); bc_valid = 0;
    // clone 1..3 from 0, register 3 is strided (+80 per iteration)
    for (int k = 1; k <= 3; k++) begin
      cl_ovr_valid = 64'h8; cl_ovr_value[3] = 32'(103 + 80 * k);
      clone(k, 0);
    end
    cl_ovr_valid = 0;
    view_ctx = 2; #1;
    ck("clone copy", view_regs[10] == 110 && view_regs[3] == 263 && view_r == 64'h8);  // the predicted register counts as produced
    // own-copy read (D_Anchor clear, nobody wrote): value own, L set
    rd(1, 10, 0, v, rdy, src); ck("own read", v == 110 && rdy && src == 1);
    rd(2, 10, 0, v, rdy, src); ck("own read 2", v == 110 && rdy && src == 2);
    // commit write of the same value by context 0: correct early read
    @(negedge clk); idle(); wr_valid = 1; wr_ctx = 0; wr_reg = 10; wr_value = 110; #1;
    ck("same value is correct", ok_valid && !sq_valid && sq_ctx == 1);
    @(negedge clk); wr_valid = 0;
    // context 1 read reg 10 early and then wrote it itself: a new value from
    // context 0 still squashes it
    write(1, 10, 555);
    @(negedge clk); idle(); wr_valid = 1; wr_ctx = 0; wr_reg = 10; wr_value = 999; #1;
    ck("early read before own write", sq_valid && sq_ctx == 1);
    @(negedge clk); wr_valid = 0;
    // reg 14: ctx 2 reads its own copy, ctx 1 writes it (squashing 2), and a
    // later write by 0 stops at ctx 1, which produced its own value
    rd(2, 14, 0, v, rdy, src);
    @(negedge clk); idle(); wr_valid = 1; wr_ctx = 1; wr_reg = 14; wr_value = 1; #1;
    ck("writer squashes reader", sq_valid && sq_ctx == 2);
    @(negedge clk); wr_valid = 0;
    @(negedge clk); idle(); wr_valid = 1; wr_ctx = 0; wr_reg = 14; wr_value = 2; #1;
    ck("stop at writer", !sq_valid && !ok_valid);
    @(negedge clk); wr_valid = 0;
    // reg 11: ctx 2 reads own copy, ctx 0 writes a new value -> squash ctx 2
    rd(2, 11, 0, v, rdy, src);
    @(negedge clk); idle(); wr_valid = 1; wr_ctx = 0; wr_reg = 11; wr_value = 7; #1;
    ck("squash on changed value", sq_valid && sq_ctx == 2);
    @(negedge clk); wr_valid = 0;
    // non-speculative context reads its own register
    rd(0, 11, 0, v, rdy, src); ck("head read", v == 7 && rdy && src == 0);
    // nearest writer with D_Anchor clear: ctx 3 reads reg 10 -> from ctx 1
    rd(3, 10, 0, v, rdy, src); ck("nearest writer", v == 555 && rdy && src == 1);
    // pending local writer: own
    rd(3, 12, 1, v, rdy, src); ck("pending local", rdy && src == 3);
    // D_Anchor on reg 20: ctx 2 waits for ctx 1
    d_anchor = 64'(1) << 20;
    rd(2, 20, 0, v, rdy, src); ck("wait for predecessor", !rdy && src == 1);
    write(1, 20, 4242);
    rd(2, 20, 0, v, rdy, src); ck("from predecessor", rdy && v == 4242 && src == 1);
    // reg 21: ctx 1 finished without writing, ctx 0 (head) wrote it
    d_anchor = 64'(1) << 21;
    done = 8'b0000_0010;
    rd(2, 21, 0, v, rdy, src); ck("second level waits on head", !rdy && src == 0);
    write(0, 21, 31337);
    rd(2, 21, 0, v, rdy, src); ck("second level", rdy && v == 31337 && src == 0);
    done = 0; d_anchor = 0;
    // D bits from R_Anchor
    r_anchor = 64'(1) << 30;
    rd(3, 30, 0, v, rdy, src);
    view_ctx = 3; #1; ck("D bit set", view_d == (64'(1) << 30));
    r_anchor = 0;
    // merge 0 -> 1: reg 10 kept (written by 1), reg 11 taken from 0
    @(negedge clk); idle(); mg_valid = 1; mg_src = 0; mg_dst = 1; @(negedge clk); mg_valid = 0;
    view_ctx = 1; #1;
    ck("merge keeps own", view_regs[10] == 555);
    ck("merge takes old", view_regs[11] == 7 && view_regs[21] == 31337);
    ck("merge R bits", view_r[11] && view_r[10]);
    // random: head 0, contexts 1..7 speculative; compare the read rule
    for (int t = 0; t < 3000; t++) begin
      int c, r; bit pend; int ev; bit er; int es; logic [31:0] vals [8];
      @(negedge clk); idle();
      c = $urandom % 8; r = 40 + $urandom % 4;
      if ($urandom % 3 == 0) begin
        wr_valid = 1; wr_ctx = 3'($urandom % 8); wr_reg = 6'(r); wr_value = $urandom;
        @(negedge clk); wr_valid = 0;
      end
      d_anchor = $urandom; d_anchor[63:32] = $urandom; done = 8'($urandom);
      pend = ($urandom % 5 == 0);
      rd_valid[1] = 1; rd_ctx[1] = 3'(c); rd_reg[1] = 6'(r); rd_pending[1] = pend;
      for (int k = 0; k < 8; k++) begin view_ctx = 3'(k); #1; vals[k] = view_regs[r]; end
      // model
      er = 1; es = c; ev = int'(vals[c]);
      if (c != 0 && !pend) begin
        bit rb [8];
        for (int k = 0; k < 8; k++) begin view_ctx = 3'(k); #1; rb[k] = view_r[r]; end
        if (!rb[c]) begin
          int q; bit searching; q = c; searching = 1;
          while (searching && q != 0) begin
            q--;
            if (rb[q]) begin ev = int'(vals[q]); es = q; searching = 0; end
            else if (d_anchor[r] && (q == 0 || !done[q])) begin er = 0; es = q; searching = 0; end
          end
          if (searching && d_anchor[r]) er = 0;
        end
      end
      #1;
      ck("random read", rd_ready[1] == er && int'(rd_src[1]) == es && (!er || rd_value[1] == 32'(ev)));
      @(negedge clk); rd_valid[1] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
