// tb_smd_top_variants: end-to-end checks of the distance unit at other
// build-time settings: insertion/deletion cost C = 1 and C = 7 (the largest
// the 4-bit increments hold) on one 7 x 7 device, and a 2 x 2 cascade of
// 7 x 7 devices for a 14-node reference clique (196 PEs). Each setting is
// run by an smd_top_harness in turn.
module tb_smd_top_variants;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic go0 = 1'b0, go1 = 1'b0, go2 = 1'b0;
  logic done0, done1, done2;
  int   c0, c1, c2, f0, f1, f2;

  smd_top_harness #(.M_DEV(7), .G(1), .C(1)) h_c1  (.clk, .go(go0), .done(done0), .checks(c0), .failures(f0));
  smd_top_harness #(.M_DEV(7), .G(1), .C(7)) h_c7  (.clk, .go(go1), .done(done1), .checks(c1), .failures(f1));
  smd_top_harness #(.M_DEV(7), .G(2), .C(4)) h_m14 (.clk, .go(go2), .done(done2), .checks(c2), .failures(f2));

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    go0 = 1'b1; wait (done0);
    go1 = 1'b1; wait (done1);
    go2 = 1'b1; wait (done2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end

endmodule
