// tb_smd_accumulator: self-checking testbench of the distance accumulator.
//
// Drives random increments in [-C, C] with a tag stream of sequences of
// random length, back to back and with idle slots, and checks that each
// finished sequence is reported once, in the cycle after its last row, as
// M*C plus the sum of its increments.
module tb_smd_accumulator;
  import smd_pkg::*;

  localparam int M     = 7;
  localparam int C     = 4;
  localparam int ACC_W = 16;

  logic             clk = 1'b0;
  logic             rst_n;
  inc_t             ivc_in;
  tag_t             tag_in;
  logic [ACC_W-1:0] distance;
  logic             dist_valid;

  int checks = 0;
  int failures = 0;

  smd_accumulator #(.M(M), .C_COST(C), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  int  expected;       // distance of the open sequence
  bit  open_seq;       // a sequence has rows in the accumulator
  int  reported;
  int  n, v;

  // one slot: drive before the edge, check what the accumulator shows
  task automatic slot(bit valid, bit init, int inc);
    @(negedge clk);
    ivc_in = inc_t'(inc);
    tag_in = '{valid: valid, init: init};
    #1;
    if (open_seq && (!valid || init)) begin
      check("dist_valid at end", int'(dist_valid), 1);
      check("distance", int'(distance), expected);
      reported++;
    end else begin
      check("dist_valid quiet", int'(dist_valid), 0);
    end
    if (valid) begin
      expected = (init ? M * C : expected) + inc;
      open_seq = 1'b1;
    end else begin
      open_seq = 1'b0;
    end
  endtask

  initial begin
    int seqs;
    rst_n  = 1'b0;
    ivc_in = '0;
    tag_in = '0;
    open_seq = 1'b0;
    reported = 0;
    seqs = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int s = 0; s < 500; s++) begin
      n = 1 + int'($urandom_range(30));
      for (int i = 0; i < n; i++) begin
        v = int'($urandom_range(2 * C)) - C;
        // a distance never drops below zero
        if ((i == 0 ? M * C : expected) + v < 0) v = -(i == 0 ? M * C : expected);
        slot(1'b1, i == 0, v);
      end
      seqs++;
      if ($urandom_range(2) == 0) slot(1'b0, 1'b0, int'($urandom_range(2 * C)) - C);
    end
    slot(1'b0, 1'b0, 0);
    check("sequences reported", reported, seqs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
