// rca_aggregator: Regional Congestion Awareness aggregation of one router.
//
// For each direction d the router merges its own congestion view of d (the
// free share of the neighbour's input buffer behind output d) with the
// regional aggregate that the neighbour in direction d reports for the same
// direction, giving both equal weight: rca_out[d] = (free_q[d] + rca_in[d])/2.
// rca_out is registered and is itself reported to the upstream neighbours, so
// congestion information travels one hop per cycle along each row and
// column and fades by half per hop. The equal weighting, the one-cycle hop and
// the reset value (all free) are this design's choices.
module rca_aggregator
  import noc_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  q_t [NDIR-1:0] free_q,
  input  q_t [NDIR-1:0] rca_in,
  output q_t [NDIR-1:0] rca_out
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rca_out <= {NDIR{q_t'(Q_MAX)}};
    end else begin
      for (int d = 0; d < NDIR; d++)
        rca_out[d] <= q_t'(((Q_W+1)'(free_q[d]) + (Q_W+1)'(rca_in[d])) >> 1);
    end
  end

endmodule
