// traffic_analyzer: measures how local the traffic through a router is.
//
// Every head flit the router routes is reported with hdr_valid together with
// its destination. The analyzer computes the hop distance |dx| + |dy| from
// this router to the destination; a packet two or more hops away counts as
// non-local (counter N), any other as local (counter L). Both counters are
// CNT_W = 5 bits wide and saturate at their maximum. Every T_PERIOD = 32
// cycles the counts of the closing period (including a header reported in the
// period's last cycle) are copied to l_cnt / n_cnt, period_done pulses for
// one cycle with them, and the counters restart from zero.
//
// The counter widths, the period and the two-hop boundary follow the
// description of the analyzer; saturation and the snapshot outputs are this
// design's choice.
module traffic_analyzer
  import noc_pkg::*;
#(
  parameter int T_PERIOD   = 32,
  parameter int CNT_W      = 5,
  parameter int LOCAL_HOPS = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  coord_t           cur_x,
  input  coord_t           cur_y,
  input  logic             hdr_valid,
  input  coord_t           dst_x,
  input  coord_t           dst_y,
  output logic             period_done,
  output logic [CNT_W-1:0] l_cnt,
  output logic [CNT_W-1:0] n_cnt
);

  localparam int TW = (T_PERIOD > 1) ? $clog2(T_PERIOD) : 1;
  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  logic [TW-1:0]      cyc;
  logic [CNT_W-1:0]   l_q, n_q, l_nxt, n_nxt;
  logic [COORD_W:0]   hops;
  logic               nonlocal;

  always_comb begin
    hops = {1'b0, (dst_x > cur_x) ? dst_x - cur_x : cur_x - dst_x}
         + {1'b0, (dst_y > cur_y) ? dst_y - cur_y : cur_y - dst_y};
    nonlocal = (hops >= (COORD_W+1)'(LOCAL_HOPS));
    l_nxt = l_q;
    n_nxt = n_q;
    if (hdr_valid) begin
      if (nonlocal) n_nxt = (n_q == CNT_MAX) ? n_q : n_q + 1'b1;
      else          l_nxt = (l_q == CNT_MAX) ? l_q : l_q + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cyc         <= '0;
      l_q         <= '0;
      n_q         <= '0;
      l_cnt       <= '0;
      n_cnt       <= '0;
      period_done <= 1'b0;
    end else if (cyc == TW'(T_PERIOD - 1)) begin
      cyc         <= '0;
      l_q         <= '0;
      n_q         <= '0;
      l_cnt       <= l_nxt;
      n_cnt       <= n_nxt;
      period_done <= 1'b1;
    end else begin
      cyc         <= cyc + 1'b1;
      l_q         <= l_nxt;
      n_q         <= n_nxt;
      period_done <= 1'b0;
    end
  end

endmodule
