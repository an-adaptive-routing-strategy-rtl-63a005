// score_select: the selection function of the router.
//
// Among the output directions the routing function admits (cand) and that
// are not reserved by another packet (avail), it computes for each one
//   Score[d] = alpha * Psel[d] + beta * B[d] + gamma * dP[d]
// where Psel[d] is the offline link-selection probability, B[d] the
// congestion (free-buffer) value supplied by the active strategy and dP[d]
// the instantaneous power change reported from direction d. All three are
// already normalised to 8-bit fractions (B by the buffer size, dP by the
// maximum power), and the weights are in tenths, so the score is ten times
// 255 times the real-valued score. The eligible direction with the highest
// score is chosen; on a tie the first in N, E, S, W order wins. valid is low
// when no admitted direction is free. Combinational.
module score_select
  import noc_pkg::*;
(
  input  logic [NDIR-1:0]           cand,
  input  logic [NDIR-1:0]           avail,
  input  q_t   [NDIR-1:0]           psel,
  input  q_t   [NDIR-1:0]           b_q,
  input  dq_t  [NDIR-1:0]           dp_q,
  input  weights_t                  w,
  output logic                      valid,
  output logic [1:0]                sel,
  output logic signed [SCORE_W-1:0] best_score
);

  logic signed [SCORE_W-1:0] score [NDIR];

  always_comb begin
    for (int d = 0; d < NDIR; d++)
      score[d] = $signed({1'b0, w.alpha}) * $signed({1'b0, psel[d]})
               + $signed({1'b0, w.beta})  * $signed({1'b0, b_q[d]})
               + $signed({1'b0, w.gamma}) * dp_q[d];
  end

  always_comb begin
    valid      = 1'b0;
    sel        = '0;
    best_score = '0;
    for (int d = 0; d < NDIR; d++) begin
      if (cand[d] && avail[d] && (!valid || score[d] > best_score)) begin
        valid      = 1'b1;
        sel        = 2'(d);
        best_score = score[d];
      end
    end
  end

endmodule
