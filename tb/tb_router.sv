// tb_router: directed test of one router placed at (3,3) of an 8 x 8 mesh,
// with the testbench acting as its four neighbours and its processing
// element. Neighbour sinks return a credit one cycle after each flit unless
// a direction is held; neighbour sources respect the router's credits.
//
// Checked: head-flit latency of two cycles from injection to the output
// link; NoP selection following the neighbours' free buffers; Psel deciding
// when it carries all the weight; a reserved output being skipped; a head
// flit waiting while its only output is reserved; credit back-pressure
// stopping a packet after DEPTH flits and releasing it; flits of every
// packet arriving in order at an admissible output; the switch to RCA after
// a period of non-local traffic and RCA selection following the regional
// aggregates; the switch back to NoP after a period of local traffic.
module tb_router;
  import noc_pkg::*;

  localparam int MX = 3, MY = 3;

  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  q_t [3:0]        cfg_psel;
  weights_t        cfg_w;
  link_t [3:0]     in_link, out_link;
  logic [3:0]      in_credit, out_credit;
  nbr_info_t [3:0] nbr_info;
  nbr_info_t       info;
  flit_t           inj_flit, ej_flit;
  logic            inj_valid, inj_ready, ej_valid, ej_ready;
  sel_mode_e       mode;
  logic            ev_alloc, ev_choice, ev_stall, ev_bp;

  router dut (
    .clk, .rst_n, .my_x(coord_t'(MX)), .my_y(coord_t'(MY)), .cfg_psel, .cfg_w,
    .in_link, .in_credit, .out_link, .out_credit, .nbr_info, .info,
    .inj_flit, .inj_valid, .inj_ready, .ej_flit, .ej_valid, .ej_ready,
    .mode, .ev_alloc, .ev_choice, .ev_stall, .ev_bp
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  flit_t rx [5][$];
  int    rx_cycle [5][$];
  int    pend [4];
  logic  hold [4];
  int    tb_cred [4];
  int    n_stall = 0, n_bp = 0, n_choice = 0;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    cycle <= cycle + 1;
    for (int d = 0; d < 4; d++) begin
      if (out_link[d].valid) begin
        rx[d].push_back(out_link[d].flit);
        rx_cycle[d].push_back(cycle);
        pend[d]++;
      end
      if (in_credit[d]) tb_cred[d]++;
    end
    if (ej_valid && ej_ready) begin
      rx[4].push_back(ej_flit);
      rx_cycle[4].push_back(cycle);
    end
    n_stall  += int'(ev_stall);
    n_bp     += int'(ev_bp);
    n_choice += int'(ev_choice);
  end

  always @(negedge clk) begin
    for (int d = 0; d < 4; d++) begin
      out_credit[d] = 1'b0;
      if (!hold[d] && pend[d] > 0) begin
        out_credit[d] = 1'b1;
        pend[d]--;
      end
    end
  end

  function automatic flit_t head(int sx, int sy, int dx, int dy, int id, logic tail);
    flit_t f;
    header_t h;
    h.payload = 16'(id);
    h.src_x = coord_t'(sx); h.src_y = coord_t'(sy);
    h.dst_x = coord_t'(dx); h.dst_y = coord_t'(dy);
    f.head = 1'b1; f.tail = tail; f.data = h;
    return f;
  endfunction

  function automatic flit_t body(int id, int idx, logic tail);
    flit_t f;
    f.head = 1'b0; f.tail = tail; f.data = {16'(id), 16'(idx)};
    return f;
  endfunction

  // drive one flit into input port p (4 = local), waiting for room
  task automatic send_flit(int p, flit_t f);
    @(negedge clk);
    if (p == 4) begin
      while (!inj_ready) @(negedge clk);
      inj_valid = 1'b1; inj_flit = f;
      @(negedge clk);
      inj_valid = 1'b0;
    end else begin
      while (tb_cred[p] == 0) @(negedge clk);
      tb_cred[p]--;
      in_link[p].valid = 1'b1; in_link[p].flit = f;
      @(negedge clk);
      in_link[p].valid = 1'b0;
    end
  endtask

  task automatic send_packet(int p, int sx, int sy, int dx, int dy, int id, int len);
    send_flit(p, head(sx, sy, dx, dy, id, len == 1));
    for (int i = 1; i < len; i++) send_flit(p, body(id, i, i == len - 1));
  endtask

  // wait for a packet's head flit on any output, return the port
  task automatic wait_head(int id, output int port);
    port = -1;
    for (int t = 0; t < 200 && port < 0; t++) begin
      @(negedge clk);
      for (int d = 0; d < 5; d++)
        foreach (rx[d][k])
          if (rx[d][k].head && rx[d][k].data[31:16] == 16'(id)) port = d;
    end
  endtask

  task automatic clear_rx();
    for (int d = 0; d < 5; d++) begin rx[d].delete(); rx_cycle[d].delete(); end
  endtask

  // every packet on every output: head, then body flits in order, then tail
  task automatic check_order();
    for (int d = 0; d < 5; d++) begin
      int id = -1, idx = 0;
      foreach (rx[d][k]) begin
        if (rx[d][k].head) begin
          check(id < 0, "head flit inside another packet");
          id = int'(rx[d][k].data[31:16]); idx = 1;
          if (rx[d][k].tail) id = -1;
        end else begin
          check(rx[d][k].data == {16'(id), 16'(idx)}, "body flit out of order");
          idx++;
          if (rx[d][k].tail) id = -1;
        end
      end
    end
  endtask

  function automatic nbr_info_t uniform_info(int fr, int rc);
    nbr_info_t n;
    n.free_q = {4{q_t'(fr)}};
    n.rca_q  = {4{q_t'(rc)}};
    n.dp_q   = '0;
    return n;
  endfunction

  int port, t0;

  initial begin
    in_link = '0; inj_valid = 0; inj_flit = '0; ej_ready = 1; out_credit = '0;
    for (int d = 0; d < 4; d++) begin pend[d] = 0; hold[d] = 0; tb_cred[d] = 4; end
    for (int d = 0; d < 4; d++) nbr_info[d] = uniform_info(255, 255);
    cfg_psel = {4{8'd128}};
    cfg_w = '{alpha: 4'd0, beta: 4'd10, gamma: 4'd0};
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check(mode == SEL_NOP, "reset mode is NoP");

    // 1. latency of a one-flit packet from the local port to S
    @(negedge clk);
    t0 = cycle;
    inj_valid = 1; inj_flit = head(3, 3, 3, 5, 1, 1'b1);
    @(negedge clk); inj_valid = 0;
    wait_head(1, port);
    check(port == int'(DIR_S), "packet to (3,5) leaves south");
    if (rx_cycle[DIR_S].size() > 0) $display("latency %0d cycles", rx_cycle[DIR_S][0] - t0);
    check(rx_cycle[DIR_S].size() == 1 && rx_cycle[DIR_S][0] - t0 == 2, "head flit latency of two cycles");
    clear_rx();

    // 2. NoP: (3,3) -> (5,5) may go E or S; the east neighbour is free
    nbr_info[DIR_E] = uniform_info(255, 255);
    nbr_info[DIR_S] = uniform_info(0, 255);
    send_packet(4, 3, 3, 5, 5, 2, 1);
    wait_head(2, port);
    check(port == int'(DIR_E), "NoP picks the free east path");
    // 3. now the south neighbour is free
    nbr_info[DIR_E] = uniform_info(0, 255);
    nbr_info[DIR_S] = uniform_info(255, 255);
    send_packet(4, 3, 3, 5, 5, 3, 1);
    wait_head(3, port);
    check(port == int'(DIR_S), "NoP picks the free south path");
    // 4. Psel alone decides
    cfg_w = '{alpha: 4'd10, beta: 4'd0, gamma: 4'd0};
    cfg_psel = {8'd0, 8'd10, 8'd200, 8'd0};   // W, S, E, N
    send_packet(4, 3, 3, 5, 5, 4, 1);
    wait_head(4, port);
    check(port == int'(DIR_E), "Psel picks east");
    check(n_choice > 0, "adaptive choice reported");
    clear_rx();

    // 5. reservation, blocking and back-pressure
    repeat (3) @(negedge clk);
    hold[DIR_E] = 1;
    fork
      send_packet(4, 3, 3, 6, 3, 10, 8);        // long packet, east only
      begin
        repeat (4) @(negedge clk);
        send_packet(int'(DIR_W), 2, 3, 5, 5, 11, 4);  // E or S, Psel prefers E
      end
      begin
        repeat (6) @(negedge clk);
        send_packet(int'(DIR_N), 3, 1, 6, 3, 12, 2);  // east only, must wait
      end
    join_none
    repeat (30) @(negedge clk);
    $display("east flits while held: %0d", rx[DIR_E].size());
    check(rx[DIR_E].size() == 4, "east output stops after DEPTH flits without credit");
    check(n_bp > 0, "back-pressure reported");
    check(n_stall > 0, "blocked head flit reported");
    wait_head(11, port);
    check(port == int'(DIR_S), "reserved east output skipped");
    hold[DIR_E] = 0;
    repeat (40) @(negedge clk);
    check(rx[DIR_E].size() == 10, "long packet and waiting packet both sent east");
    check_order();
    clear_rx();

    // 6. a period of non-local traffic switches the router to RCA
    for (int i = 0; i < 12; i++) send_packet(4, 3, 3, 7, 0, 20 + i, 1);
    repeat (80) @(negedge clk);
    check(mode == SEL_RCA, "non-local traffic selects RCA");
    // RCA picks the region that is free further away
    cfg_w = '{alpha: 4'd0, beta: 4'd10, gamma: 4'd0};
    nbr_info[DIR_E] = uniform_info(255, 0);
    nbr_info[DIR_S] = uniform_info(0, 255);
    repeat (3) @(negedge clk);
    send_packet(4, 3, 3, 5, 5, 40, 1);
    wait_head(40, port);
    check(port == int'(DIR_S), "RCA follows the regional aggregate");
    nbr_info[DIR_E] = uniform_info(0, 255);
    nbr_info[DIR_S] = uniform_info(255, 0);
    repeat (3) @(negedge clk);
    send_packet(4, 3, 3, 5, 5, 41, 1);
    wait_head(41, port);
    check(port == int'(DIR_E), "RCA follows the regional aggregate (east)");

    // 7. a period of local traffic switches it back to NoP
    for (int i = 0; i < 12; i++) send_packet(4, 3, 3, 3, 4, 50 + i, 1);
    repeat (80) @(negedge clk);
    check(mode == SEL_NOP, "local traffic selects NoP");
    check(rx[DIR_S].size() == 13, "local packets delivered south");
    check_order();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
