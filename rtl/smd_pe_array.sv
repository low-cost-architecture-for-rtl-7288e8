// smd_pe_array: a linear chain of M processing elements that computes the edit
// distance between input sequences and one (non-cyclic) reference sequence of
// length M.
//
// PE j owns column j of the edit-distance matrix. The incremental vertical
// cost of PE j is the left input of PE j+1 one cycle later, so row i is
// handled by PE j in cycle i+j and the whole array works on one 45-degree
// anti-diagonal of the matrix at a time. PE 0 takes ivc_left as its left
// input: the constant C for a stand-alone array (D[i][0] - D[i-1][0] = C),
// or the ivc output of a previous array segment when several are chained to
// reach a longer reference sequence. The row tag {valid, init} enters with
// PE 0's element and moves down the chain with the wavefront.
//
// Interface: sub_in[j] is the substitution cost PE j needs in the current
// cycle, i.e. Sub[i-j][j] for the row i-j it is working on; sub_out[j] is the
// same value one cycle later, for the enclosing core to route onwards. In a
// stand-alone array the caller skews the matrix rows itself; the cyclic core
// (smd_core) instead chains the arrays so that only one matrix row enters per
// cycle. ivc_out/tag_out are the registered results of the last PE, M cycles
// after the row entered; summing ivc_out over a sequence's rows and adding
// M*C gives the edit distance (done outside, in smd_accumulator).
module smd_pe_array
  import smd_pkg::*;
#(
  parameter int unsigned M      = 7,  // PEs = reference sequence length
  parameter int unsigned C_COST = 4   // insertion = deletion cost C
) (
  input  logic           clk,
  input  logic           rst_n,
  input  sub_t [M-1:0]   sub_in,     // substitution cost used by each PE now
  input  inc_t           ivc_left,   // left input of PE 0
  input  tag_t           tag_in,     // tag of the row entering PE 0
  output sub_t [M-1:0]   sub_out,    // each PE's substitution cost, delayed
  output inc_t           ivc_out,    // ivc of the last PE (to accumulator)
  output tag_t           tag_out     // tag of the row leaving the last PE
);

  inc_t [M:0] ivc_chain;
  tag_t [M:0] tag_chain;

  assign ivc_chain[0] = ivc_left;
  assign tag_chain[0] = tag_in;

  for (genvar j = 0; j < M; j++) begin : g_pe
    smd_pe #(.C_COST(C_COST)) u_pe (
      .clk     (clk),
      .rst_n   (rst_n),
      .sub_in  (sub_in[j]),
      .ivc_in  (ivc_chain[j]),
      .tag_in  (tag_chain[j]),
      .ivc_out (ivc_chain[j+1]),
      .tag_out (tag_chain[j+1]),
      .sub_out (sub_out[j])
    );
  end

  assign ivc_out = ivc_chain[M];
  assign tag_out = tag_chain[M];

  // idle slots may only separate sequences: a valid row after an idle slot
  // must open a new sequence
  property p_restart_after_gap;
    @(posedge clk) disable iff (!rst_n)
      (!tag_in.valid ##1 tag_in.valid) |-> tag_in.init;
  endproperty
  a_restart_after_gap: assert property (p_restart_after_gap);

endmodule
