// smd_top: structure measure distance unit. Computes the edit distance
// between each of k input cliques and every rotation of one reference clique.
//
// The reference clique's M external nodes form a cyclic sequence; an input
// clique with n external nodes is a sequence of n nodes. The host supplies,
// one row per clock, the n x M substitution-cost matrix of each input clique
// against the unrotated reference (costs 0..7). smd_core runs M arrays of M
// PEs, one array per rotation, built from G x G devices of M_DEV x M_DEV PEs
// (M = G * M_DEV; one 7 x 7 device by default), and one smd_accumulator per
// array turns the incremental costs into distances. distance[r] is the distance to rotation r;
// the dynamic (rotation-invariant) distance is the minimum over r, left to
// the consumer.
//
// Timing: the row entering in cycle t leaves the last PEs in cycle t+M and is
// in the accumulators after the following edge. For k sequences fed back to
// back the last distance is complete after M + sum(n_i) cycles and is shown
// (dist_valid = 1) in the next cycle, once an idle slot or a new sequence's
// first row reaches the accumulators. row_init marks the first row of every
// sequence. Idle cycles (row_valid = 0) are allowed only between sequences.
// ivc is the raw array output (the per-rotation incremental values).
module smd_top
  import smd_pkg::*;
#(
  parameter int unsigned M_DEV  = 7,   // arrays per device = PEs per array
  parameter int unsigned G      = 1,   // devices per side (cascade)
  parameter int unsigned C_COST = 4,   // insertion = deletion cost C
  parameter int unsigned ACC_W  = 16,  // accumulator width
  localparam int unsigned M     = G * M_DEV  // reference clique size
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  sub_t [M-1:0]           sub_row,     // Sub[i][0..M-1] of current row
  input  logic                   row_valid,
  input  logic                   row_init,
  output inc_t [M-1:0]           ivc,         // last-PE ivc of each rotation
  output logic [M-1:0][ACC_W-1:0] distance,       // distance to each rotation
  output logic                   dist_valid
);

  tag_t         core_tag;
  logic [M-1:0] dv;

  smd_core #(.M_DEV(M_DEV), .G(G), .C_COST(C_COST)) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .sub_row   (sub_row),
    .row_valid (row_valid),
    .row_init  (row_init),
    .ivc       (ivc),
    .tag       (core_tag)
  );

  for (genvar r = 0; r < M; r++) begin : g_acc
    smd_accumulator #(.M(M), .C_COST(C_COST), .ACC_W(ACC_W)) u_acc (
      .clk        (clk),
      .rst_n      (rst_n),
      .ivc_in     (ivc[r]),
      .tag_in     (core_tag),
      .distance       (distance[r]),
      .dist_valid (dv[r])
    );
  end

  // every accumulator sees the same tag, so their valid flags agree
  assign dist_valid = dv[0];

  a_valid_agree: assert property (@(posedge clk) disable iff (!rst_n)
                                  dv == '0 || dv == '1);

endmodule
