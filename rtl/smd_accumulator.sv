// smd_accumulator: turns the incremental vertical costs leaving the last PE of
// one array into edit distances, one per input sequence.
//
// The edit distance between an input sequence of n elements and a reference
// of M elements is D[n][M] = M*C + sum over rows i of ivc[i][M]. The
// accumulator therefore loads M*C + ivc when a row tagged init arrives and
// adds ivc for every further valid row. Idle slots (valid = 0) leave it
// unchanged.
//
// A distance is complete when the row after the last row of its sequence
// arrives: either a new sequence's init row or an idle slot. In that cycle
// dist_valid is high and distance holds the finished distance (combinational
// from the accumulator register). Hence the last input sequence of a burst
// must be followed by at least one idle cycle or a new sequence. The width
// ACC_W is a parameter because the largest distance depends on C and on the
// input lengths: D[n][M] <= (n + M) * C. The end-of-sequence detection and
// the default width are this design's choices.
module smd_accumulator
  import smd_pkg::*;
#(
  parameter int unsigned M      = 7,   // reference sequence length
  parameter int unsigned C_COST = 4,   // insertion = deletion cost C
  parameter int unsigned ACC_W  = 16   // accumulator width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  inc_t             ivc_in,     // ivc of the last PE of the array
  input  tag_t             tag_in,     // tag of the row ivc_in belongs to
  output logic [ACC_W-1:0] distance,       // finished edit distance
  output logic             dist_valid  // distance is valid this cycle
);

  localparam logic [ACC_W-1:0] INIT_VALUE = ACC_W'(M * C_COST);

  logic [ACC_W-1:0] acc_q;
  logic             busy_q;   // acc_q holds a sequence that is still open
  logic [ACC_W-1:0] ivc_ext;

  assign ivc_ext = ACC_W'(ivc_in);  // sign extension

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q  <= '0;
      busy_q <= 1'b0;
    end else begin
      busy_q <= tag_in.valid;
      if (tag_in.valid) begin
        acc_q <= (tag_in.init ? INIT_VALUE : acc_q) + ivc_ext;
      end
    end
  end

  assign distance       = acc_q;
  assign dist_valid = busy_q && (!tag_in.valid || tag_in.init);

endmodule
