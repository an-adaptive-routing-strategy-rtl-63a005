// tb_rca_aggregator: random local and received congestion values; after each
// clock edge every direction's output must equal the mean (rounded down) of
// the local value and the value received for that direction one cycle
// earlier. Also checks the reset value and a chain of three aggregators,
// where a change at the far end must reach the first one two cycles later
// at a quarter of its weight.
module tb_rca_aggregator;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n;
  q_t [3:0] free_q, rca_in, rca_out;
  q_t [3:0] c_free [3];
  q_t [3:0] c_out  [3];
  q_t [3:0] c_in   [3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rca_aggregator dut (.*);

  // chain: aggregator k receives its east value from aggregator k+1
  for (genvar k = 0; k < 3; k++) begin : g_chain
    if (k < 2) begin : g_link
      always_comb begin
        c_in[k] = '0;
        c_in[k][1] = c_out[k+1][1];
      end
    end else begin : g_end
      assign c_in[k] = '0;
    end
    rca_aggregator u (.clk, .rst_n, .free_q(c_free[k]), .rca_in(c_in[k]), .rca_out(c_out[k]));
  end

  initial begin
    free_q = '0; rca_in = '0;
    for (int k = 0; k < 3; k++) c_free[k] = '0;
    rst_n = 0;
    @(posedge clk); @(negedge clk);
    checks++;
    if (rca_out != {4{8'd255}}) begin failures++; $display("FAIL reset value"); end
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      q_t [3:0] f, r;
      f = {$urandom}; r = {$urandom};
      free_q = f; rca_in = r;
      @(negedge clk);
      for (int d = 0; d < 4; d++) begin
        checks++;
        if (rca_out[d] != q_t'((int'(f[d]) + int'(r[d])) / 2)) begin
          failures++;
          if (failures < 10) $display("FAIL dir %0d: %0d from %0d and %0d", d, rca_out[d], f[d], r[d]);
        end
      end
    end
    // chain: all free at 0 settles to 0, then the far end becomes 200
    repeat (5) @(negedge clk);
    c_free[2][1] = 8'd200;
    @(negedge clk);
    checks++;
    if (c_out[2][1] != 8'd100 || c_out[0][1] != 8'd0) begin failures++; $display("FAIL chain step 1"); end
    @(negedge clk);
    checks++;
    if (c_out[1][1] != 8'd50 || c_out[0][1] != 8'd0) begin failures++; $display("FAIL chain step 2"); end
    @(negedge clk);
    checks++;
    if (c_out[0][1] != 8'd25) begin failures++; $display("FAIL chain step 3: %0d", c_out[0][1]); end
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
