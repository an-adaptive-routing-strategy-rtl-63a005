// tb_score_select: random candidates, reservations, Psel, free-buffer and
// power values and weights. The expected choice is computed here in real
// arithmetic from Score = a*Psel + b*B/255 + g*dP/255 (Psel as a fraction,
// weights in tenths), taking the first of equal scores; valid must be low
// when no candidate is free. Also checks the printed example weights
// (0.3, 0.4, 0.3) on a hand-worked case.
module tb_score_select;
  import noc_pkg::*;

  logic [3:0] cand, avail;
  q_t  [3:0] psel, b_q;
  dq_t [3:0] dp_q;
  weights_t w;
  logic valid;
  logic [1:0] sel;
  logic signed [SCORE_W-1:0] best_score;
  int checks = 0, failures = 0;

  score_select dut (.*);

  initial begin
    for (int i = 0; i < 20000; i++) begin
      real best;
      int  bi;
      cand = 4'($urandom); avail = 4'($urandom);
      for (int d = 0; d < 4; d++) begin
        psel[d] = q_t'($urandom_range(255));
        b_q[d]  = (i % 3 == 0) ? q_t'(64 * $urandom_range(3)) : q_t'($urandom_range(255));
        dp_q[d] = dq_t'(int'($urandom_range(510)) - 255);
      end
      if (i % 3 == 0) begin psel = {4{8'd100}}; dp_q = '0; end
      w.alpha = 4'($urandom_range(10));
      w.beta  = 4'($urandom_range(10 - w.alpha));
      w.gamma = 4'(10 - w.alpha - w.beta);
      #1;
      bi = -1; best = 0.0;
      for (int d = 0; d < 4; d++) if (cand[d] && avail[d]) begin
        automatic real s = real'(w.alpha) / 10.0 * real'(psel[d]) / 255.0
               + real'(w.beta)  / 10.0 * real'(b_q[d])  / 255.0
               + real'(w.gamma) / 10.0 * real'(dp_q[d]) / 255.0;
        if (bi < 0 || s > best + 1e-9) begin bi = d; best = s; end
      end
      checks++;
      if (valid != (bi >= 0) || (bi >= 0 && sel != 2'(bi))) begin
        failures++;
        if (failures < 10) $display("FAIL cand %b avail %b: valid %b sel %0d expected %0d", cand, avail, valid, sel, bi);
      end
    end
    // worked case: two candidates E and S, weights 0.3/0.4/0.3
    // E: Psel 0.2, B 1.0, dP 0   -> 0.06 + 0.40 + 0     = 0.46
    // S: Psel 0.8, B 0.5, dP 0.2 -> 0.24 + 0.20 + 0.06  = 0.50
    cand = 4'b0110; avail = 4'b1111;
    w = '{alpha: 4'd3, beta: 4'd4, gamma: 4'd3};
    psel = {8'd0, 8'd204, 8'd51, 8'd0};
    b_q  = {8'd0, 8'd128, 8'd255, 8'd0};
    dp_q = {9'sd0, 9'sd51, 9'sd0, 9'sd0};
    #1;
    checks++;
    if (!valid || sel != 2'd2) begin failures++; $display("FAIL worked case picks %0d", sel); end
    avail = 4'b1011;
    #1;
    checks++;
    if (!valid || sel != 2'd1) begin failures++; $display("FAIL reserved S not skipped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
