// tb_strategy_switch: drives the switcher with every (L, N) pair of 5-bit
// counts, and with random pairs, and checks the chosen strategy against the
// real-valued rule x = N / (L + N) < 0.3 -> NoP, else RCA. A period with no
// packets must keep the mode, and mode must hold between updates.
module tb_strategy_switch;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n;
  logic update, switched;
  logic [4:0] l_cnt, n_cnt;
  sel_mode_e mode;
  int checks = 0, failures = 0;
  sel_mode_e expect_mode;

  always #5 clk = ~clk;

  strategy_switch dut (.*);

  task automatic apply(int l, int n);
    real x;
    @(negedge clk);
    update = 1; l_cnt = 5'(l); n_cnt = 5'(n);
    if (l + n != 0) begin
      x = real'(n) / real'(l + n);
      expect_mode = (x < 0.3) ? SEL_NOP : SEL_RCA;
    end
    @(negedge clk);
    update = 0; l_cnt = 5'($urandom); n_cnt = 5'($urandom);
    checks++;
    if (mode != expect_mode) begin
      failures++;
      $display("FAIL L=%0d N=%0d: mode %s", l, n, mode.name());
    end
    @(negedge clk);
    checks++;
    if (mode != expect_mode) begin
      failures++;
      $display("FAIL mode changed without update");
    end
  endtask

  initial begin
    update = 0; l_cnt = 0; n_cnt = 0;
    rst_n = 0;
    @(posedge clk); @(posedge clk);
    rst_n = 1;
    expect_mode = SEL_NOP;
    checks++;
    if (mode != SEL_NOP) begin failures++; $display("FAIL reset mode"); end
    for (int l = 0; l < 32; l++)
      for (int n = 0; n < 32; n++)
        apply(l, n);
    for (int i = 0; i < 500; i++) apply($urandom_range(31), $urandom_range(31));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
