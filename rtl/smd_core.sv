// smd_core: the complete systolic unit for a cyclic reference sequence of
// m = G * M_DEV nodes, built from a G x G grid of smd_device blocks. G = 1 is
// the single-device configuration (7 arrays of 7 PEs); larger G cascades
// devices for longer reference sequences.
//
// Device (a, p) holds global arrays a*M_DEV .. a*M_DEV+M_DEV-1 (rotations)
// and, within each, PEs p*M_DEV .. p*M_DEV+M_DEV-1 (reference columns).
// Along a row of devices the incremental vertical costs and the row tag pass
// from device (a, p-1) to (a, p). Substitution costs move diagonally from PE
// J of array R to PE J+1 of array (R-1) mod m, which crosses to the device
// below at the last local array (sub_wrap) and to the right-hand device at
// the last local PE (sub_last). The first PE block takes one row of the
// unrotated substitution matrix per clock: array R gets column R.
//
// Interface: sub_row is row i of the substitution matrix of an input
// sequence against the unrotated reference; row_valid marks a real row and
// row_init the first row of a sequence. Idle cycles (row_valid = 0) are
// allowed only between sequences. ivc[R] is the incremental vertical cost
// leaving the last PE of array R, m clocks after its row entered, and tag is
// that row's tag. The sub_last_out costs of the right-most device column
// have no further PE to feed and are left unconnected (a lint warning that
// stands by design).
module smd_core
  import smd_pkg::*;
#(
  parameter int unsigned M_DEV  = 7,  // arrays per device = PEs per array
  parameter int unsigned G      = 1,  // devices per side of the grid
  parameter int unsigned C_COST = 4,  // insertion = deletion cost C
  localparam int unsigned M     = G * M_DEV  // reference sequence length
) (
  input  logic         clk,
  input  logic         rst_n,
  input  sub_t [M-1:0] sub_row,    // one row of the unrotated Sub matrix
  input  logic         row_valid,  // sub_row holds a row of an input sequence
  input  logic         row_init,   // sub_row is the first row of a sequence
  output inc_t [M-1:0] ivc,        // last-PE ivc of every rotation array
  output tag_t         tag         // tag belonging to ivc
);

  localparam inc_t C_INC = inc_t'(C_COST);

  // signals on the sides of device (a, p)
  sub_t [G-1:0][G-1:0][M_DEV-1:0] d_sub_first, d_sub_last;
  sub_t [G-1:0][G-1:0][M_DEV-2:0] d_wrap_in, d_wrap_out;
  inc_t [G-1:0][G-1:0][M_DEV-1:0] d_ivc_left, d_ivc_out;
  tag_t [G-1:0][G-1:0]            d_tag_in, d_tag_out;

  for (genvar a = 0; a < G; a++) begin : g_a
    for (genvar p = 0; p < G; p++) begin : g_p
      for (genvar r = 0; r < M_DEV; r++) begin : g_r
        if (p == 0) begin : g_first
          assign d_sub_first[a][p][r] = sub_row[a*M_DEV + r];
          assign d_ivc_left[a][p][r]  = C_INC;
        end else begin : g_chain
          // PE 0 of global array R = a*M_DEV + r gets what PE M_DEV-1 of
          // array R+1 (left-hand device) used last cycle
          if (r < M_DEV - 1) begin : g_same
            assign d_sub_first[a][p][r] = d_sub_last[a][p-1][r+1];
          end else begin : g_next
            assign d_sub_first[a][p][r] = d_sub_last[(a+1) % G][p-1][0];
          end
          assign d_ivc_left[a][p][r] = d_ivc_out[a][p-1][r];
        end
      end
      if (p == 0) begin : g_tag_first
        assign d_tag_in[a][p] = '{valid: row_valid, init: row_init};
      end else begin : g_tag_chain
        assign d_tag_in[a][p] = d_tag_out[a][p-1];
      end
      assign d_wrap_in[a][p] = d_wrap_out[(a+1) % G][p];

      smd_device #(.M(M_DEV), .C_COST(C_COST)) u_dev (
        .clk          (clk),
        .rst_n        (rst_n),
        .sub_first    (d_sub_first[a][p]),
        .sub_wrap_in  (d_wrap_in[a][p]),
        .ivc_left     (d_ivc_left[a][p]),
        .tag_in       (d_tag_in[a][p]),
        .sub_last_out (d_sub_last[a][p]),
        .sub_wrap_out (d_wrap_out[a][p]),
        .ivc_out      (d_ivc_out[a][p]),
        .tag_out      (d_tag_out[a][p])
      );
    end
    for (genvar r = 0; r < M_DEV; r++) begin : g_out
      assign ivc[a*M_DEV + r] = d_ivc_out[a][G-1][r];
    end
  end

  assign tag = d_tag_out[0][G-1];

  // every device row carries the same tags
  for (genvar a = 1; a < G; a++) begin : g_tag_check
    a_tags_agree: assert property (@(posedge clk) disable iff (!rst_n)
                                   d_tag_out[a][G-1] == d_tag_out[0][G-1]);
  end

endmodule
