// smd_top_harness: drives one smd_top instance of a given size and cost with
// a random stream of input sequences and checks every distance against the
// direct edit-distance model, including the M + n clock latency. It starts
// when go rises and raises done when finished; checks and failures count
// its results. Harnesses share the reference model's stream storage, so a
// testbench runs them one after another.
module smd_top_harness
  import smd_pkg::*;
  import smd_tb_pkg::*;
#(
  parameter int M_DEV = 7,
  parameter int G     = 1,
  parameter int C     = 4,
  parameter int ROWS  = 1200
) (
  input  logic clk,
  input  logic go,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int M     = G * M_DEV;
  localparam int ACC_W = 16;

  logic                    rst_n;
  sub_t [M-1:0]            sub_row;
  logic                    row_valid;
  logic                    row_init;
  inc_t [M-1:0]            ivc;
  logic [M-1:0][ACC_W-1:0] distance;
  logic                    dist_valid;

  smd_top #(.M_DEV(M_DEV), .G(G), .C_COST(C), .ACC_W(ACC_W)) dut (.*);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL m=%0d C=%0d %s: got %0d expected %0d", M, C, what, got, exp);
    end
  endtask

  initial begin
    int seq;
    done = 1'b0; checks = 0; failures = 0;
    rst_n = 1'b0; sub_row = '0; row_valid = 1'b0; row_init = 1'b0;
    wait (go);
    gen_stream(M, C, ROWS, 30, 30);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    seq = 0;
    for (int t = 0; t < ROWS; t++) begin
      @(negedge clk);
      for (int j = 0; j < M; j++) sub_row[j] = sub_t'(st_sub[t][j]);
      row_valid = st_valid[t];
      row_init  = st_init[t];
      @(posedge clk);
      #1;
      if (dist_valid && seq < st_nseq) begin
        check("latency", t, sq_start[seq] + sq_len[seq] + M - 1);
        for (int r = 0; r < M; r++) check("distance", int'(distance[r]), sq_dist[seq][r]);
        seq++;
      end
    end
    check("sequences reported", seq, st_nseq);
    $display("m=%0d (G=%0d) C=%0d: %0d sequences, %0d checks, %0d failures",
             M, G, C, st_nseq, checks, failures);
    done = 1'b1;
  end

endmodule
