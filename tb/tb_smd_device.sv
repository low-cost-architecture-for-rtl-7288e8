// tb_smd_device: self-checking testbench of the cyclic core (M arrays, one per
// rotation of the reference sequence).
//
// Only one unrotated substitution-matrix row enters per clock. For every
// valid row and every rotation r the testbench checks that array r delivers
// D_r[i][M] - D_r[i-1][M], where D_r is the reference model's matrix against
// the reference rotated by r places, exactly M clocks after the row entered.
// This checks the diagonal routing of substitution costs between arrays.
// Sequences are fed back to back and with idle slots in between.
module tb_smd_device;
  import smd_pkg::*;
  import smd_tb_pkg::*;

  localparam int M    = 7;
  localparam int C    = 4;
  localparam int ROWS = 1500;

  logic         clk = 1'b0;
  logic         rst_n;
  sub_t [M-1:0] sub_row;
  logic         row_valid;
  logic         row_init;
  inc_t [M-1:0] ivc;
  tag_t         tag;
  sub_t [M-2:0] wrap;
  sub_t [M-1:0] sub_last;

  int checks = 0;
  int failures = 0;

  smd_device #(.M(M), .C_COST(C)) dut (
    .clk          (clk),
    .rst_n        (rst_n),
    .sub_first    (sub_row),
    .sub_wrap_in  (wrap),
    .ivc_left     ({M{inc_t'(C)}}),
    .tag_in       ('{valid: row_valid, init: row_init}),
    .sub_last_out (sub_last),
    .sub_wrap_out (wrap),
    .ivc_out      (ivc),
    .tag_out      (tag)
  );

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
    int k;
    gen_stream(M, C, ROWS, 20, 30);
    rst_n     = 1'b0;
    sub_row   = '0;
    row_valid = 1'b0;
    row_init  = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < ROWS; t++) begin
      @(negedge clk);
      for (int j = 0; j < M; j++) sub_row[j] = sub_t'(st_sub[t][j]);
      row_valid = st_valid[t];
      row_init  = st_init[t];
      @(posedge clk);
      #1;
      k = t - (M - 1);   // row leaving the last PEs
      // the last PE of array r used column (M - 1 + r) mod M of that row
      if (k >= 0)
        for (int r = 0; r < M; r++)
          check("sub_last_out", int'(sub_last[r]), st_sub[k][(M - 1 + r) % M]);
      if (k >= 0) begin
        check("tag", int'(tag), int'({st_valid[k], st_init[k]}));
        if (st_valid[k])
          for (int r = 0; r < M; r++) check($sformatf("ivc[%0d]", r), int'(ivc[r]), st_exp[k][r]);
      end
    end
    $display("sequences=%0d", st_nseq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
