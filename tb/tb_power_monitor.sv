// tb_power_monitor: random activity; one cycle after each sample, power must
// be that sample and dp_q must equal (power(t) - power(t-1)) * 255 / 5,
// truncated toward zero.
module tb_power_monitor;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n;
  logic [2:0] act, power;
  dq_t dp_q;
  int checks = 0, failures = 0;
  int prev = 0;

  always #5 clk = ~clk;

  power_monitor dut (.*);

  initial begin
    act = 0;
    rst_n = 0;
    @(posedge clk); @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      automatic int a = $urandom_range(5);
      real e;
      act = 3'(a);
      @(negedge clk);
      e = real'(a - prev) * 255.0 / 5.0;
      checks++;
      if (power != 3'(a) || int'(dp_q) != ((e < 0) ? -int'($floor(-e)) : int'($floor(e)))) begin
        failures++;
        if (failures < 10) $display("FAIL act %0d prev %0d: power %0d dp %0d", a, prev, power, dp_q);
      end
      prev = a;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
