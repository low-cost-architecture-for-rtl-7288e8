// smd_pe: one processing element of the systolic edit-distance array.
//
// A PE owns one column j of the edit-distance matrix D of an input sequence
// (rows i) against a reference sequence (columns j). In the cycle it handles
// row i it receives
//   ivc_in  = D[i][j-1] - D[i-1][j-1]   (from the PE on its left),
//   ihc_top = D[i-1][j] - D[i-1][j-1]   (its own result of the previous row,
//                                        or C on the first row of a sequence),
//   sub_in  = substitution cost of input node i against reference node j,
// and forms
//   MIN     = min(min(ihc_top, ivc_in) + C, sub_in)  = D[i][j] - D[i-1][j-1]
//   ivc_out = MIN - ihc_top = D[i][j] - D[i-1][j]    (sent to the right)
//   ihc     = MIN - ivc_in  = D[i][j] - D[i][j-1]    (kept for row i+1).
// This is the incremental recurrence of the design; insertion and deletion
// share the one cost C, fixed at build time (parameter C_COST).
//
// Timing: all outputs are registered. ivc_out, tag_out and sub_out of a row
// appear one clock after its inputs, which is what lets the next PE in the
// chain work on the same row one cycle later (45-degree wavefront). The tag
// and the substitution cost are only passed on; sub_out is routed by the
// enclosing core to the next PE of a neighbouring array. When tag_in.init is
// set the stored ihc is replaced by C, starting a new input sequence.
// Reset (active low, synchronous) clears every register.
module smd_pe
  import smd_pkg::*;
#(
  parameter int unsigned C_COST = 4  // insertion = deletion cost C
) (
  input  logic clk,
  input  logic rst_n,
  input  sub_t sub_in,   // substitution cost for this PE's current element
  input  inc_t ivc_in,   // incremental vertical cost from the left neighbour
  input  tag_t tag_in,   // row tag entering with this element
  output inc_t ivc_out,  // incremental vertical cost to the right neighbour
  output tag_t tag_out,  // row tag, one cycle later
  output sub_t sub_out   // substitution cost, one cycle later
);

  // one bit wider than the incremental word: min(...) + C reaches 2*C
  typedef logic signed [INC_W:0] wide_t;

  localparam wide_t C_W = wide_t'(C_COST);

  inc_t  ihc_q;     // ihc of the previous row of this column
  wide_t ihc_top;   // D[i-1][j] - D[i-1][j-1]
  wide_t ivc_left;  // D[i][j-1] - D[i-1][j-1]
  wide_t gap_cost;  // cheapest insertion or deletion path
  wide_t min_cost;  // D[i][j] - D[i-1][j-1]
  wide_t ivc_new;
  wide_t ihc_new;

  always_comb begin
    ihc_top  = tag_in.init ? C_W : wide_t'(ihc_q);
    ivc_left = wide_t'(ivc_in);
    gap_cost = ((ihc_top < ivc_left) ? ihc_top : ivc_left) + C_W;
    min_cost = (wide_t'({1'b0, sub_in}) < gap_cost) ? wide_t'({1'b0, sub_in}) : gap_cost;
    ivc_new  = min_cost - ihc_top;
    ihc_new  = min_cost - ivc_left;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ihc_q   <= '0;
      ivc_out <= '0;
      tag_out <= '0;
      sub_out <= '0;
    end else begin
      ihc_q   <= inc_t'(ihc_new);
      ivc_out <= inc_t'(ivc_new);
      tag_out <= tag_in;
      sub_out <= sub_in;
    end
  end

  // the incremental word must be able to hold +C
  initial begin
    if (C_COST > C_MAX) $fatal(1, "smd_pe: C_COST %0d exceeds %0d", C_COST, C_MAX);
  end

  // with non-negative substitution costs both differences stay in [-C, C]
  property p_ivc_range;
    @(posedge clk) disable iff (!rst_n)
      tag_in.valid |-> (ivc_new >= -C_W) && (ivc_new <= C_W) &&
                       (ihc_new >= -C_W) && (ihc_new <= C_W);
  endproperty
  a_ivc_range: assert property (p_ivc_range);

endmodule
