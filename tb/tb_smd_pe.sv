// tb_smd_pe: self-checking testbench of one processing element.
//
// The PE is run as column j of an edit-distance matrix whose column j-1 is a
// random walk L[i] with steps in [-C, C] (any such column is a legal left
// neighbour). The testbench keeps the absolute values D[i][j] of the column
// the PE computes and checks every registered output one clock after its
// inputs: ivc_out = D[i][j] - D[i-1][j], and the forwarded tag and
// substitution cost. Sequences of random length restart with init, which
// must reset the stored ihc to C (D[0][j] = L[0] + C).
module tb_smd_pe;
  import smd_pkg::*;

  localparam int C = 4;

  logic clk = 1'b0;
  logic rst_n;
  sub_t sub_in;
  inc_t ivc_in;
  tag_t tag_in;
  inc_t ivc_out;
  tag_t tag_out;
  sub_t sub_out;

  int checks = 0;
  int failures = 0;
  int cov_sub_wins = 0, cov_gap_wins = 0, cov_init = 0;

  smd_pe #(.C_COST(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int l_prev, l_cur, d_prev, d_cur, s, step, n;
    rst_n  = 1'b0;
    sub_in = '0; ivc_in = '0; tag_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check("tag after reset", int'(tag_out), 0);
    for (int seq = 0; seq < 400; seq++) begin
      n      = 1 + int'($urandom_range(11));
      l_prev = 100 + int'($urandom_range(20));   // L[0]
      d_prev = l_prev + C;                       // D[0][j]
      for (int i = 1; i <= n; i++) begin
        step  = int'($urandom_range(2 * C)) - C;
        l_cur = l_prev + step;
        s     = int'($urandom_range(7));
        @(negedge clk);
        sub_in = sub_t'(s);
        ivc_in = inc_t'(step);
        tag_in = '{valid: 1'b1, init: (i == 1)};
        d_cur = l_prev + s;
        if (d_prev + C < d_cur) d_cur = d_prev + C;
        if (l_cur + C < d_cur) d_cur = l_cur + C;
        if (d_cur == l_prev + s) cov_sub_wins++; else cov_gap_wins++;
        if (i == 1) cov_init++;
        @(posedge clk);
        #1;
        check("ivc_out", int'(ivc_out), d_cur - d_prev);
        check("tag_out", int'(tag_out), int'({1'b1, i == 1}));
        check("sub_out", int'(sub_out), s);
        d_prev = d_cur;
        l_prev = l_cur;
      end
      // an idle slot between some sequences
      if ($urandom_range(3) == 0) begin
        @(negedge clk);
        tag_in = '0;
        @(posedge clk);
        #1 check("idle tag", int'(tag_out), 0);
      end
    end
    if (cov_sub_wins == 0 || cov_gap_wins == 0 || cov_init == 0) failures++;
    $display("coverage: substitution=%0d gap=%0d init=%0d", cov_sub_wins, cov_gap_wins, cov_init);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
