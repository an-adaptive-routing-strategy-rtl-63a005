// tb_noc_mesh: end-to-end test of the 8 x 8 mesh at its default parameters.
//
// Every node runs a traffic source and a sink. Packets are eight flits long
// (a head flit with source, destination and a 16-bit packet number, six body
// flits and a tail flit). Phase 1 sends to uniformly random destinations, so
// most packets travel two hops or more and the routers' analyzers should
// switch to RCA. Phase 2 sends only to a neighbouring node, so traffic
// becomes local and the routers should return to NoP. The network is then
// drained. Sinks sometimes drop ej_ready to exercise back-pressure.
//
// Checks: every packet arrives exactly once, at its destination, with its
// flits contiguous and in order; every injected packet is delivered; the
// routers are mostly in RCA at the end of phase 1 and mostly in NoP at the
// end of phase 2; and each mechanism (routing, adaptive choice, blocked head
// flit, credit back-pressure, switch to RCA, switch back to NoP) happened at
// least once. Average and maximum head-to-tail delay are printed.
module tb_noc_mesh;
  import noc_pkg::*;

  localparam int ROWS = 8;
  localparam int COLS = 8;
  localparam int NN   = ROWS * COLS;
  localparam int PKT_LEN = 8;
  localparam int PHASE1 = 3000;
  localparam int PHASE2 = 6000;
  localparam int WATCHDOG = 20000;

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

  noc_mesh dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;

  // packet bookkeeping
  int  exp_dst   [int];
  int  inj_time  [int];
  int  next_id = 0;
  int  injected = 0, delivered = 0;
  longint lat_sum = 0;
  int  lat_max = 0;

  // source state
  logic src_busy [NN];
  int   src_idx  [NN];
  int   src_id   [NN];
  int   src_dst  [NN];
  // sink state
  logic snk_open [NN];
  int   snk_id   [NN];
  int   snk_idx  [NN];

  // event counters
  int n_alloc = 0, n_choice = 0, n_stall = 0, n_bp = 0, n_to_rca = 0, n_to_nop = 0;
  int n_ej_block = 0;
  logic [NN-1:0] mode_prev;
  logic inject_on = 1'b0;
  int   phase = 1;

  function automatic flit_t make_flit(int s, int idx, int id, int dst);
    flit_t   f;
    header_t h;
    f.head = (idx == 0);
    f.tail = (idx == PKT_LEN - 1);
    if (idx == 0) begin
      h.payload = 16'(id);
      h.src_x = coord_t'(s % COLS);
      h.src_y = coord_t'(s / COLS);
      h.dst_x = coord_t'(dst % COLS);
      h.dst_y = coord_t'(dst / COLS);
      f.data = h;
    end else begin
      f.data = {16'(id), 16'(idx)};
    end
    return f;
  endfunction

  function automatic int pick_dst(int s);
    int x = s % COLS, y = s / COLS, d;
    if (phase == 1) begin
      do d = int'($urandom_range(NN - 1)); while (d == s);
    end else begin
      case ($urandom_range(3))
        0: d = (y > 0)        ? s - COLS : s + COLS;
        1: d = (x < COLS - 1) ? s + 1    : s - 1;
        2: d = (y < ROWS - 1) ? s + COLS : s - COLS;
        default: d = (x > 0)  ? s - 1    : s + 1;
      endcase
    end
    return d;
  endfunction

  // drive sources and sinks between clock edges
  always @(negedge clk) begin
    if (rst_n) begin
      for (int s = 0; s < NN; s++) begin
        if (!src_busy[s] && inject_on && $urandom_range(99) < 5) begin
          src_busy[s] = 1'b1;
          src_idx[s]  = 0;
          src_id[s]   = next_id;
          src_dst[s]  = pick_dst(s);
          next_id++;
        end
        inj_valid[s] = src_busy[s];
        inj_flit[s]  = make_flit(s, src_idx[s], src_id[s], src_dst[s]);
        ej_ready[s]  = ($urandom_range(99) < 85);
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      for (int s = 0; s < NN; s++) begin
        // injection handshake
        if (inj_valid[s] && inj_ready[s]) begin
          if (src_idx[s] == 0) begin
            exp_dst[src_id[s]]  = src_dst[s];
            inj_time[src_id[s]] = cycle;
            injected++;
          end
          if (src_idx[s] == PKT_LEN - 1) src_busy[s] = 1'b0;
          else                           src_idx[s]++;
        end
        // ejection
        if (ej_valid[s] && ej_ready[s]) begin
          automatic flit_t f = ej_flit[s];
          checks++;
          if (f.head) begin
            automatic header_t h = header_t'(f.data);
            automatic int id = int'(h.payload[15:0]);
            if (snk_open[s] || !exp_dst.exists(id) || exp_dst[id] != s ||
                int'(h.dst_x) + COLS * int'(h.dst_y) != s) begin
              failures++;
              $display("FAIL node %0d: unexpected head flit id %0d", s, id);
            end
            snk_open[s] = 1'b1;
            snk_id[s]   = id;
            snk_idx[s]  = 1;
          end else begin
            if (!snk_open[s] || f.data != {16'(snk_id[s]), 16'(snk_idx[s])} ||
                f.tail != (snk_idx[s] == PKT_LEN - 1)) begin
              failures++;
              $display("FAIL node %0d: flit %h out of order (packet %0d flit %0d)",
                       s, f.data, snk_id[s], snk_idx[s]);
            end
            snk_idx[s]++;
            if (f.tail) begin
              automatic int lat = cycle - inj_time[snk_id[s]];
              snk_open[s] = 1'b0;
              exp_dst.delete(snk_id[s]);
              delivered++;
              lat_sum += lat;
              if (lat > lat_max) lat_max = lat;
            end
          end
        end
      end
      // events
      for (int n = 0; n < NN; n++) begin
        n_alloc  += int'(ev_alloc[n]);
        n_choice += int'(ev_choice[n]);
        n_stall  += int'(ev_stall[n]);
        n_bp     += int'(ev_bp[n]);
        n_ej_block += int'(ej_valid[n] && !ej_ready[n]);
        if (mode[n] && !mode_prev[n]) n_to_rca++;
        if (!mode[n] && mode_prev[n]) n_to_nop++;
      end
      mode_prev <= mode;
    end
  end

  function automatic int count_rca();
    int c = 0;
    for (int n = 0; n < NN; n++) c += int'(mode[n]);
    return c;
  endfunction

  task automatic expect_count(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else begin
      $display("  %-28s %0d", what, n);
    end
  endtask

  initial begin
    for (int n = 0; n < NN; n++) begin
      for (int d = 0; d < NDIR; d++) cfg_psel[n][d] = q_t'($urandom_range(255));
      cfg_w[n] = '{alpha: 4'd3, beta: 4'd4, gamma: 4'd3};
      src_busy[n] = 1'b0; src_idx[n] = 0; src_id[n] = 0; src_dst[n] = 0;
      snk_open[n] = 1'b0; snk_id[n] = 0; snk_idx[n] = 0;
    end
    inj_valid = '0;
    inj_flit  = '0;
    ej_ready  = '1;
    mode_prev = '0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    inject_on = 1'b1;
    phase = 1;
    wait (cycle == PHASE1);
    checks++;
    $display("end of phase 1: %0d of %0d routers in RCA", count_rca(), NN);
    if (count_rca() < NN / 2) begin
      failures++;
      $display("FAIL uniform traffic left most routers in NoP");
    end
    phase = 2;
    wait (cycle == PHASE2);
    checks++;
    $display("end of phase 2: %0d of %0d routers in RCA", count_rca(), NN);
    if (count_rca() > NN / 4) begin
      failures++;
      $display("FAIL neighbour traffic left many routers in RCA");
    end
    inject_on = 1'b0;
    wait (!(|src_busy.or()) && exp_dst.num() == 0);
    repeat (10) @(posedge clk);
    checks++;
    if (injected != delivered || injected == 0) begin
      failures++;
      $display("FAIL injected %0d delivered %0d", injected, delivered);
    end
    $display("packets %0d, average delay %0d cycles, maximum delay %0d cycles",
             delivered, int'(lat_sum / longint'(delivered)), lat_max);
    expect_count("head flits routed", n_alloc);
    expect_count("adaptive choices", n_choice);
    expect_count("blocked head flits", n_stall);
    expect_count("credit back-pressure", n_bp);
    expect_count("ejection back-pressure", n_ej_block);
    expect_count("switches to RCA", n_to_rca);
    expect_count("switches to NoP", n_to_nop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d packets outstanding", exp_dst.num());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
