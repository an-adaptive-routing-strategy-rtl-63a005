// nop_metric: Neighbors-on-Path congestion metric of one output direction.
//
// For a packet leaving this router through direction DIR, the metric looks
// one hop beyond the neighbour it would reach: it evaluates the odd-even
// routing function at that neighbour (same source and destination) and
// averages the neighbour's free buffer shares over the outputs the packet
// could take there. When the neighbour is the destination itself the
// look-ahead term is full (Q_MAX). The metric is the mean of that look-ahead
// term and the free share of the neighbour's input buffer behind DIR, so both
// the current node's and the neighbour's buffer information count, with the
// non-local view confined to one hop beyond the current router.
//
// Free shares are 8-bit fractions (noc_pkg::q_t). Combinational. How the two
// terms are combined (means of the values) is this design's choice.
module nop_metric
  import noc_pkg::*;
#(
  parameter int DIR = 0                 // noc_pkg::dir_e value, N/E/S/W
) (
  input  coord_t          cur_x,
  input  coord_t          cur_y,
  input  coord_t          src_x,
  input  coord_t          dst_x,
  input  coord_t          dst_y,
  input  q_t              own_free,     // free share toward DIR at this router
  input  q_t [NDIR-1:0]   nbr_free,     // free shares reported by the neighbour
  output q_t              metric
);

  coord_t           nx, ny;
  logic [NPORT-1:0] ndirs;
  logic [Q_W+1:0]   sum;
  q_t               ahead;

  always_comb begin
    nx = cur_x;
    ny = cur_y;
    case (DIR)
      int'(DIR_N): ny = cur_y - 1'b1;
      int'(DIR_E): nx = cur_x + 1'b1;
      int'(DIR_S): ny = cur_y + 1'b1;
      default:     nx = cur_x - 1'b1;
    endcase
  end

  oe_route u_route (
    .cur_x (nx),
    .cur_y (ny),
    .src_x (src_x),
    .dst_x (dst_x),
    .dst_y (dst_y),
    .dirs  (ndirs)
  );

  always_comb begin
    sum = '0;
    for (int d = 0; d < NDIR; d++)
      if (ndirs[d]) sum = sum + (Q_W+2)'(nbr_free[d]);
    if (ndirs[DIR_L])
      ahead = q_t'(Q_MAX);
    else if ((32'(ndirs[0]) + 32'(ndirs[1]) + 32'(ndirs[2]) + 32'(ndirs[3])) > 1)
      ahead = q_t'(sum >> 1);
    else
      ahead = q_t'(sum);
    metric = q_t'(((Q_W+1)'(own_free) + (Q_W+1)'(ahead)) >> 1);
  end

endmodule
