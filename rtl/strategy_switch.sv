// strategy_switch: picks the selection strategy from the analyzer's counts.
//
// When update pulses (once per analyzer period) the switcher forms the
// non-local share x = N / (L + N) and compares it with the threshold
// THR_NUM / THR_DEN = 0.3 without dividing: x < 0.3 exactly when
// THR_DEN * N < THR_NUM * (L + N). Mostly local traffic (x < 0.3) selects
// Neighbors-on-Path (NoP); otherwise Regional Congestion Awareness (RCA) is
// selected. mode is registered and holds between updates. A period in which
// no packet was seen (L + N = 0) leaves the mode unchanged, and reset starts
// in NoP; both are this design's choices. switched pulses when mode changes.
module strategy_switch
  import noc_pkg::*;
#(
  parameter int CNT_W   = 5,
  parameter int THR_NUM = 3,
  parameter int THR_DEN = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             update,
  input  logic [CNT_W-1:0] l_cnt,
  input  logic [CNT_W-1:0] n_cnt,
  output sel_mode_e        mode,
  output logic             switched
);

  localparam int PW = CNT_W + 6;

  logic [PW-1:0] lhs, rhs;
  sel_mode_e     next_mode;

  always_comb begin
    lhs = PW'(THR_DEN) * PW'(n_cnt);
    rhs = PW'(THR_NUM) * (PW'(l_cnt) + PW'(n_cnt));
    next_mode = (lhs < rhs) ? SEL_NOP : SEL_RCA;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mode     <= SEL_NOP;
      switched <= 1'b0;
    end else begin
      switched <= 1'b0;
      if (update && (l_cnt != '0 || n_cnt != '0)) begin
        mode     <= next_mode;
        switched <= (next_mode != mode);
      end
    end
  end

endmodule
