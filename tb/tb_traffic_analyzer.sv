// tb_traffic_analyzer: reports random head flits to the analyzer of the
// router at (3,4) and compares the L and N counts handed over at the end of
// each period with a model (two-hop boundary, saturation at 31). Also checks
// that period_done comes exactly every 32 cycles.
module tb_traffic_analyzer;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n;
  coord_t cur_x, cur_y, dst_x, dst_y;
  logic hdr_valid, period_done;
  logic [4:0] l_cnt, n_cnt;
  int checks = 0, failures = 0;
  int ml = 0, mn = 0, last_done = -1, cyc = 0, periods = 0;
  int rate;

  always #5 clk = ~clk;

  traffic_analyzer dut (.*);

  initial begin
    cur_x = 3; cur_y = 4;
    hdr_valid = 0; dst_x = 0; dst_y = 0;
    rst_n = 0;
    @(posedge clk); @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (cyc = 0; cyc < 32 * 40; cyc++) begin
      // vary the load so that some periods saturate and some stay empty
      rate = ((cyc / 32) % 4 == 0) ? 100 : ((cyc / 32) % 4 == 1) ? 0 : 40;
      hdr_valid = ($urandom_range(99) < rate);
      if ((cyc / 64) % 3 == 0) begin
        dst_x = coord_t'(3 + $urandom_range(1)); dst_y = coord_t'(4 - $urandom_range(1));
      end else begin
        dst_x = coord_t'($urandom_range(7)); dst_y = coord_t'($urandom_range(7));
      end
      @(posedge clk);
      if (hdr_valid) begin
        automatic int h = ((dst_x > cur_x) ? dst_x - cur_x : cur_x - dst_x) +
                ((dst_y > cur_y) ? dst_y - cur_y : cur_y - dst_y);
        if (h >= 2) mn = (mn < 31) ? mn + 1 : 31;
        else        ml = (ml < 31) ? ml + 1 : 31;
      end
      if (cyc % 32 == 31) begin
        @(negedge clk);
        checks++;
        if (!period_done || l_cnt != 5'(ml) || n_cnt != 5'(mn)) begin
          failures++;
          $display("FAIL period end at %0d: done %b L %0d/%0d N %0d/%0d", cyc, period_done, l_cnt, ml, n_cnt, mn);
        end
        ml = 0; mn = 0;
        periods++;
      end else begin
        @(negedge clk);
        checks++;
        if (period_done) begin
          failures++;
          $display("FAIL period_done in cycle %0d of the period", cyc % 32);
        end
      end
    end
    $display("periods checked: %0d", periods);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
