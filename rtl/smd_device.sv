// smd_device: one cascadable device of the structure measure distance unit:
// M arrays of M processing elements (M = 7 gives the 49-PE device of the
// reference implementation).
//
// Global array R of the complete unit compares the input sequence against
// the reference rotated by R places; its PE J needs Sub[i][(J + R) mod m].
// That is the cost PE J-1 of array R+1 used one clock earlier, so substitution
// costs move diagonally, from PE j of array r to PE j+1 of array r-1, and
// only one unrotated matrix row enters per clock. A device holds a square
// block of this grid: M consecutive arrays, M consecutive PEs of each.
//
// Ports on the four sides make the block cascadable:
//   sub_first[r]    cost for PE 0 of local array r (a matrix-row column on the
//                   first PE block, else sub_last_out of the device to the left)
//   sub_wrap_in[j]  cost for PE j+1 of the last local array, from PE j of the
//                   first array of the next array block (sub_wrap_out there)
//   ivc_left[r]     left input of PE 0 of local array r: C on the first PE
//                   block, else ivc_out of the device to the left
//   tag_in          row tag entering PE 0 (all arrays share it)
//   sub_last_out[r] cost used by the last PE of array r in the previous clock
//   sub_wrap_out[j] cost used by PE j of array 0 in the previous clock
//   ivc_out[r], tag_out  results of the last PE of each array, M clocks
//                   after the row entered this device
// A single device closes its own loops (sub_wrap_in = sub_wrap_out,
// ivc_left = C, sub_first = matrix row). The split into square blocks with
// these side ports is this design's reading of the cascade the architecture
// allows; the diagonal routing itself follows the architecture.
module smd_device
  import smd_pkg::*;
#(
  parameter int unsigned M      = 7,  // arrays per device = PEs per array
  parameter int unsigned C_COST = 4   // insertion = deletion cost C
) (
  input  logic         clk,
  input  logic         rst_n,
  input  sub_t [M-1:0] sub_first,
  input  sub_t [M-2:0] sub_wrap_in,
  input  inc_t [M-1:0] ivc_left,
  input  tag_t         tag_in,
  output sub_t [M-1:0] sub_last_out,
  output sub_t [M-2:0] sub_wrap_out,
  output inc_t [M-1:0] ivc_out,
  output tag_t         tag_out
);

  sub_t [M-1:0][M-1:0] sub_use;   // [array][pe] cost used this cycle
  sub_t [M-1:0][M-1:0] sub_q;     // [array][pe] cost used last cycle
  tag_t [M-1:0]        tag_arr;

  for (genvar r = 0; r < M; r++) begin : g_rot
    assign sub_use[r][0]   = sub_first[r];
    assign sub_last_out[r] = sub_q[r][M-1];
    // PE j of array r: what PE j-1 of array r+1 used last cycle
    for (genvar j = 1; j < M; j++) begin : g_diag
      if (r < M - 1) begin : g_inside
        assign sub_use[r][j] = sub_q[r+1][j-1];
      end else begin : g_edge
        assign sub_use[r][j] = sub_wrap_in[j-1];
      end
    end

    smd_pe_array #(.M(M), .C_COST(C_COST)) u_array (
      .clk      (clk),
      .rst_n    (rst_n),
      .sub_in   (sub_use[r]),
      .ivc_left (ivc_left[r]),
      .tag_in   (tag_in),
      .sub_out  (sub_q[r]),
      .ivc_out  (ivc_out[r]),
      .tag_out  (tag_arr[r])
    );
  end

  for (genvar j = 0; j < M - 1; j++) begin : g_wrap
    assign sub_wrap_out[j] = sub_q[0][j];
  end

  assign tag_out = tag_arr[0];

  // the arrays run in lock step: their tags must always agree
  for (genvar r = 1; r < M; r++) begin : g_tag_check
    a_tags_agree: assert property (@(posedge clk) disable iff (!rst_n)
                                   tag_arr[r] == tag_arr[0]);
  end

  initial begin
    if (M < 2) $fatal(1, "smd_device: M must be at least 2");
  end

endmodule
