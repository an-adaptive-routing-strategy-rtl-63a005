// power_monitor: instantaneous power change of a router.
//
// The instantaneous power is the difference between the power the router
// consumed in the current and in the previous cycle. Dynamic power of a
// router is dominated by flits crossing its crossbar, so this design takes the
// number of flits switched in a cycle (act, 0..PMAX) as its power estimate;
// that proxy is this design's choice. power is the estimate of the last
// cycle and dp_q = (power(t) - power(t-1)) / PMAX as a signed fraction of
// Q_MAX, normalised by the router's maximum power PMAX (all five outputs
// busy). Both are registered values and settle one cycle after act.
module power_monitor
  import noc_pkg::*;
#(
  parameter int PMAX = NPORT
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [$clog2(PMAX+1)-1:0]  act,
  output logic [$clog2(PMAX+1)-1:0]  power,
  output dq_t                        dp_q
);

  localparam int AW = $clog2(PMAX+1);

  logic [AW-1:0] power_prev;
  int            diff;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      power      <= '0;
      power_prev <= '0;
    end else begin
      power      <= act;
      power_prev <= power;
    end
  end

  always_comb begin
    diff = int'(power) - int'(power_prev);
    dp_q = dq_t'((diff * Q_MAX) / PMAX);
  end

endmodule
