// tb_input_fifo: random push/pop traffic against a queue model. Checks the
// head entry, empty, full and count every cycle; pushes only when there is
// room (or a pop in the same cycle), as the credit protocol guarantees.
module tb_input_fifo;
  localparam int W = 34;
  localparam int DEPTH = 4;

  logic clk = 1'b0, rst_n;
  logic push, pop, empty, full;
  logic [W-1:0] din, dout;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q [$];

  always #5 clk = ~clk;

  input_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  task automatic check_state();
    checks++;
    if (count != q.size() || empty != (q.size() == 0) || full != (q.size() == DEPTH) ||
        (q.size() > 0 && dout != q[0])) begin
      failures++;
      $display("FAIL size %0d: count %0d empty %b full %b dout %h", q.size(), count, empty, full, dout);
    end
  endtask

  initial begin
    push = 0; pop = 0; din = '0;
    rst_n = 0;
    @(posedge clk); @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check_state();
      pop  = (q.size() > 0) && ($urandom_range(99) < (i < 1500 ? 30 : 70));
      push = ((q.size() < DEPTH) || pop) && ($urandom_range(99) < 60);
      din  = {$urandom, 2'($urandom)};
      @(posedge clk);
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(din);
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
