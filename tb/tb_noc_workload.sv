// tb_noc_workload: the 5 x 5 mesh workload. Every node sends 6-flit packets
// to uniformly random destinations, with geometric (discrete exponential)
// gaps between packet starts whose mean is 1 / pir cycles. Three injection
// rates are run, each from reset, with a warm-up window followed by a
// measured window and a drain. For every rate it checks that every packet
// arrives once, at its destination, intact and in order, and reports the
// average and maximum delay (head flit entering the network to tail flit
// leaving it) of the packets injected in the measured window. The average
// delay must not fall as the rate rises and must be at least the two cycles
// per hop of an empty network.
module tb_noc_workload;
  import noc_pkg::*;

  localparam int ROWS = 5;
  localparam int COLS = 5;
  localparam int NN   = ROWS * COLS;
  localparam int PKT_LEN = 6;
  localparam int WARM = 1000;
  localparam int MEAS = 5000;
  localparam int NRATE = 3;
  localparam int RATE_PM [NRATE] = '{10, 25, 45};   // pir in packets per 1000 cycles

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  q_t [NN-1:0][NDIR-1:0] cfg_psel;
  weights_t [NN-1:0]     cfg_w;
  flit_t [NN-1:0]        inj_flit;
  logic  [NN-1:0]        inj_valid, inj_ready;
  flit_t [NN-1:0]        ej_flit;
  logic  [NN-1:0]        ej_valid, ej_ready;
  logic  [NN-1:0]        mode, ev_alloc, ev_choice, ev_stall, ev_bp;

  noc_mesh #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  int exp_dst [int];
  int inj_time [int];
  int next_id = 0, injected = 0, delivered = 0;
  int rate_pm = 10;
  logic inject_on = 1'b0;
  longint lat_sum = 0;
  int lat_n = 0, lat_max = 0;
  int min_hops_sum = 0;
  int hops_of [int];

  logic src_busy [NN];
  int   src_idx [NN], src_id [NN], src_dst [NN];
  logic snk_open [NN];
  int   snk_id [NN], snk_idx [NN];

  function automatic flit_t make_flit(int s, int idx, int id, int dst);
    flit_t f;
    header_t h;
    f.head = (idx == 0);
    f.tail = (idx == PKT_LEN - 1);
    if (idx == 0) begin
      h.payload = 16'(id);
      h.src_x = coord_t'(s % COLS); h.src_y = coord_t'(s / COLS);
      h.dst_x = coord_t'(dst % COLS); h.dst_y = coord_t'(dst / COLS);
      f.data = h;
    end else f.data = {16'(id), 16'(idx)};
    return f;
  endfunction

  function automatic int absdiff(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  always @(negedge clk) begin
    if (rst_n) begin
      for (int s = 0; s < NN; s++) begin
        // a new packet starts with probability pir each cycle: geometric gaps
        if (!src_busy[s] && inject_on && $urandom_range(999) < rate_pm) begin
          automatic int d;
          do d = int'($urandom_range(NN - 1)); while (d == s);
          src_busy[s] = 1'b1; src_idx[s] = 0; src_id[s] = next_id; src_dst[s] = d;
          next_id++;
        end
        inj_valid[s] = src_busy[s];
        inj_flit[s]  = make_flit(s, src_idx[s], src_id[s], src_dst[s]);
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      for (int s = 0; s < NN; s++) begin
        if (inj_valid[s] && inj_ready[s]) begin
          if (src_idx[s] == 0) begin
            exp_dst[src_id[s]] = src_dst[s];
            inj_time[src_id[s]] = (cycle >= WARM && cycle < WARM + MEAS) ? cycle : -1;
            hops_of[src_id[s]] = absdiff(s % COLS, src_dst[s] % COLS) + absdiff(s / COLS, src_dst[s] / COLS);
            injected++;
          end
          if (src_idx[s] == PKT_LEN - 1) src_busy[s] = 1'b0;
          else src_idx[s]++;
        end
        if (ej_valid[s] && ej_ready[s]) begin
          automatic flit_t f = ej_flit[s];
          checks++;
          if (f.head) begin
            automatic int id = int'(f.data[31:16]);
            if (snk_open[s] || !exp_dst.exists(id) || exp_dst[id] != s) begin
              failures++;
              $display("FAIL node %0d: unexpected head flit of packet %0d", s, id);
            end
            snk_open[s] = 1'b1; snk_id[s] = id; snk_idx[s] = 1;
          end else begin
            if (!snk_open[s] || f.data != {16'(snk_id[s]), 16'(snk_idx[s])} ||
                f.tail != (snk_idx[s] == PKT_LEN - 1)) begin
              failures++;
              $display("FAIL node %0d: flit out of order", s);
            end
            snk_idx[s]++;
            if (f.tail) begin
              snk_open[s] = 1'b0;
              if (inj_time[snk_id[s]] >= 0) begin
                automatic int lat = cycle - inj_time[snk_id[s]];
                lat_sum += lat; lat_n++;
                min_hops_sum += hops_of[snk_id[s]];
                if (lat > lat_max) lat_max = lat;
              end
              exp_dst.delete(snk_id[s]);
              inj_time.delete(snk_id[s]);
              hops_of.delete(snk_id[s]);
              delivered++;
            end
          end
        end
      end
    end
  end

  real avg [NRATE];

  initial begin
    for (int n = 0; n < NN; n++) begin
      cfg_psel[n] = {4{q_t'(128)}};
      cfg_w[n] = '{alpha: 4'd3, beta: 4'd4, gamma: 4'd3};
    end
    ej_ready = '1;
    inj_valid = '0;
    inj_flit = '0;
    for (int r = 0; r < NRATE; r++) begin
      rst_n = 1'b0;
      for (int n = 0; n < NN; n++) begin
        src_busy[n] = 0; src_idx[n] = 0; src_id[n] = 0; src_dst[n] = 0;
        snk_open[n] = 0; snk_id[n] = 0; snk_idx[n] = 0;
      end
      inj_valid = '0;
      injected = 0; delivered = 0; lat_sum = 0; lat_n = 0; lat_max = 0; min_hops_sum = 0;
      rate_pm = RATE_PM[r];
      repeat (3) @(posedge clk);
      @(negedge clk);
      cycle = 0;
      rst_n = 1'b1;
      inject_on = 1'b1;
      wait (cycle == WARM + MEAS);
      inject_on = 1'b0;
      wait (exp_dst.num() == 0 && !(|src_busy.or()));
      repeat (5) @(posedge clk);
      checks++;
      if (injected != delivered || lat_n == 0) begin
        failures++;
        $display("FAIL pir %0d/1000: injected %0d delivered %0d", rate_pm, injected, delivered);
      end
      avg[r] = real'(lat_sum) / real'(lat_n);
      $display("pir %0.3f: %0d packets measured, average delay %0.1f cycles, maximum delay %0d cycles, %0d routers in RCA at the end",
               real'(rate_pm) / 1000.0, lat_n, avg[r], lat_max, $countones(mode));
      checks++;
      if (avg[r] < 2.0 * real'(min_hops_sum) / real'(lat_n)) begin
        failures++;
        $display("FAIL average delay below the empty-network bound");
      end
      if (r > 0) begin
        checks++;
        if (avg[r] + 0.5 < avg[r-1]) begin
          failures++;
          $display("FAIL average delay fell as the rate rose");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * (WARM + MEAS) + 30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
