// tb_smd_top: end-to-end testbench of the structure measure distance unit at
// its default size (reference clique of 7 nodes, 7 arrays of 7 PEs, C = 4).
//
// A stream of input sequences (1 to 39 nodes, random substitution costs
// 0..7) is fed one substitution-matrix row per clock, back to back and with
// idle slots between sequences. The testbench checks
//   * every per-rotation increment ivc[r], M clocks after its row entered;
//   * every distance[r] against a direct edit-distance model of the input
//     against the reference rotated by r, and that it is shown exactly
//     M + n clocks after the sequence's first row entered, so a burst of k
//     back-to-back sequences finishes in M + sum(n_i) clocks;
//   * that each sequence is reported exactly once.
// It also forms the rotation-invariant distance (minimum over rotations)
// and counts how often each mechanism occurred: sequence start (init),
// back-to-back sequence change, idle slot between sequences, input shorter
// and longer than the reference, single-node input, increments at +C and
// -C, and a best rotation other than 0. A mechanism that never occurs
// counts as a failure.
module tb_smd_top;
  import smd_pkg::*;
  import smd_tb_pkg::*;

  localparam int M     = 7;    // defaults of smd_top
  localparam int C     = 4;
  localparam int ACC_W = 16;
  localparam int ROWS  = 3000;

  logic                    clk = 1'b0;
  logic                    rst_n;
  sub_t [M-1:0]            sub_row;
  logic                    row_valid;
  logic                    row_init;
  inc_t [M-1:0]            ivc;
  logic [M-1:0][ACC_W-1:0] distance;
  logic                    dist_valid;

  int checks = 0;
  int failures = 0;

  smd_top dut (.*);

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

  int n_init = 0, n_b2b = 0, n_gap = 0, n_short = 0, n_long = 0, n_single = 0;
  int n_pos_c = 0, n_neg_c = 0, n_rot = 0;

  task automatic mech(string what, int count);
    $display("mechanism %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism %s never occurred", what);
    end
  endtask

  initial begin
    int k, seq, best, best_r;
    gen_stream(M, C, ROWS, 40, 30);
    rst_n     = 1'b0;
    sub_row   = '0;
    row_valid = 1'b0;
    row_init  = 1'b0;
    seq       = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < ROWS; t++) begin
      @(negedge clk);
      for (int j = 0; j < M; j++) sub_row[j] = sub_t'(st_sub[t][j]);
      row_valid = st_valid[t];
      row_init  = st_init[t];
      if (st_init[t]) n_init++;
      if (st_init[t] && t > 0 && st_valid[t-1]) n_b2b++;
      if (!st_valid[t] && t > 0 && st_valid[t-1]) n_gap++;
      @(posedge clk);
      #1;
      k = t - (M - 1);
      if (k >= 0 && st_valid[k]) begin
        for (int r = 0; r < M; r++) begin
          check("ivc", int'(ivc[r]), st_exp[k][r]);
          if (int'(ivc[r]) == C) n_pos_c++;
          if (int'(ivc[r]) == -C) n_neg_c++;
        end
      end
      if (dist_valid) begin
        if (seq >= st_nseq) begin
          failures++;
          $display("FAIL extra distance at clock %0d", t);
        end else begin
          // first row in clock s, last in s+n-1, through M PEs, then shown
          check("latency", t, sq_start[seq] + sq_len[seq] + M - 1);
          best = 1 << 30; best_r = 0;
          for (int r = 0; r < M; r++) begin
            check("distance", int'(distance[r]), sq_dist[seq][r]);
            if (sq_dist[seq][r] < best) begin best = sq_dist[seq][r]; best_r = r; end
          end
          if (best_r != 0) n_rot++;
          if (sq_len[seq] < M) n_short++;
          if (sq_len[seq] > M) n_long++;
          if (sq_len[seq] == 1) n_single++;
          if (seq < 2)
            $display("input %0d (%0d nodes): dynamic distance %0d at rotation %0d",
                     seq, sq_len[seq], best, best_r);
          seq++;
        end
      end
    end
    check("sequences reported", seq, st_nseq);
    mech("sequence start (init)", n_init);
    mech("back-to-back sequences", n_b2b);
    mech("idle slot between sequences", n_gap);
    mech("input shorter than reference", n_short);
    mech("input longer than reference", n_long);
    mech("single-node input", n_single);
    mech("increment +C", n_pos_c);
    mech("increment -C", n_neg_c);
    mech("best rotation not 0", n_rot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
