// tb_smd_pe_array: self-checking testbench of a stand-alone PE array, used
// as a non-cyclic matcher against one reference sequence of length M.
//
// The testbench skews the substitution matrix itself (PE j gets row t-j in
// clock t, column j), ties the left input to C and checks, for every valid
// row, that the last PE delivers D[i][M] - D[i-1][M] of the reference model
// exactly M clocks after the row entered, with the row's tag. It also checks
// that every PE forwards its substitution cost one clock later, and that the
// summed increments give the edit distance M*C + sum(ivc).
module tb_smd_pe_array;
  import smd_pkg::*;
  import smd_tb_pkg::*;

  localparam int M    = 7;
  localparam int C    = 4;
  localparam int ROWS = 1500;

  logic         clk = 1'b0;
  logic         rst_n;
  sub_t [M-1:0] sub_in;
  inc_t         ivc_left;
  tag_t         tag_in;
  sub_t [M-1:0] sub_out;
  inc_t         ivc_out;
  tag_t         tag_out;

  int checks = 0;
  int failures = 0;

  smd_pe_array #(.M(M), .C_COST(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (ROWS + 1000) @(posedge clk);
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
    sub_t [M-1:0] sub_prev;
    int acc, seq, k;
    gen_stream(M, C, ROWS, 20, 30);
    rst_n    = 1'b0;
    sub_in   = '0;
    tag_in   = '0;
    ivc_left = inc_t'(C);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    acc = 0; seq = 0;
    for (int t = 0; t < ROWS; t++) begin
      @(negedge clk);
      for (int j = 0; j < M; j++) sub_in[j] = (t - j >= 0) ? sub_t'(st_sub[t-j][j]) : '0;
      tag_in   = '{valid: st_valid[t], init: st_init[t]};
      sub_prev = sub_in;
      @(posedge clk);
      #1;
      for (int j = 0; j < M; j++) check("sub_out", int'(sub_out[j]), int'(sub_prev[j]));
      k = t - (M - 1);   // row leaving the last PE
      if (k >= 0) begin
        check("tag_out", int'(tag_out), int'({st_valid[k], st_init[k]}));
        if (st_valid[k]) begin
          check("ivc_out", int'(ivc_out), st_exp[k][0]);
          if (st_init[k]) acc = M * C;
          acc += int'(ivc_out);
          if (k == sq_start[seq] + sq_len[seq] - 1) begin
            check("distance", acc, sq_dist[seq][0]);
            seq++;
          end
        end
      end
    end
    check("sequences completed", seq, st_nseq);
    $display("sequences=%0d", st_nseq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
