// tb_smd_core: self-checking testbench of the cascaded core: a 2 x 2 grid of
// 7 x 7 devices forms a matcher for a cyclic reference of 14 nodes.
//
// One unrotated substitution-matrix row (14 costs) enters per clock. For
// every valid row and every rotation r the testbench checks that array r
// delivers D_r[i][m] - D_r[i-1][m] of the direct edit-distance model against
// the reference rotated by r, exactly m = 14 clocks after the row entered,
// with the row's tag. This checks the diagonal substitution-cost routing
// inside and across devices and the ivc/tag chaining between devices.
module tb_smd_core;
  import smd_pkg::*;
  import smd_tb_pkg::*;

  localparam int M_DEV = 7;
  localparam int G     = 2;
  localparam int M     = G * M_DEV;
  localparam int C    = 4;
  localparam int ROWS = 1500;

  logic         clk = 1'b0;
  logic         rst_n;
  sub_t [M-1:0] sub_row;
  logic         row_valid;
  logic         row_init;
  inc_t [M-1:0] ivc;
  tag_t         tag;

  int checks = 0;
  int failures = 0;

  smd_core #(.M_DEV(M_DEV), .G(G), .C_COST(C)) dut (.*);

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
