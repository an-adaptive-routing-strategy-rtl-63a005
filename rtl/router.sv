// router: five-port wormhole router with traffic-aware output selection.
//
// Ports N, E, S, W connect to the neighbouring routers of the mesh, port L
// to the local processing element. Every input has a DEPTH-flit FIFO.
//
// Head flits are routed one per cycle: a round-robin pointer picks an input
// whose head-of-queue flit is a head flit without an output yet. The odd-even
// routing function gives the admissible outputs. A packet that has arrived
// is sent to L when L is free. Otherwise the selection function scores every
// admissible output that is not reserved in the reservation table (out_busy):
//   Score = alpha * Psel + beta * B + gamma * dP
// and reserves the best one. B comes from the strategy the switcher has
// chosen: the Neighbors-on-Path metric (nop_metric) while traffic is mostly
// local, the Regional Congestion Awareness aggregate (rca_aggregator)
// otherwise. dP is the power change reported by the neighbour behind the
// output. Each routed head flit is also reported to the traffic analyzer,
// which every T_PERIOD cycles hands its local/non-local counts to the
// switcher. A head flit whose admissible outputs are all reserved waits and
// is tried again when the pointer returns to it (ev_stall).
//
// A reserved output forwards one flit per cycle from its owner input while
// the owner's FIFO holds a flit and the output has a credit (mesh ports) or
// ej_ready is high (local port). The tail flit frees the reservation.
// Credit counters start at DEPTH and count the free rows of the
// downstream input buffer; in_credit returns a credit upstream in the
// cycle a flit leaves an input FIFO. A flit moves one hop per cycle: it is
// written into the downstream FIFO at the clock edge that follows the cycle
// in which it is sent. A head flit takes at least two cycles through a
// router, one to be routed and one to cross.
//
// Reported to the neighbours every cycle (info): the free share of each
// output's downstream buffer, the RCA aggregates and the power change.
// Event pulses: ev_alloc (head flit routed), ev_choice (two free admissible
// outputs, so the selection decided), ev_stall (head flit blocked), ev_bp
// (a flit waiting at a reserved output without credit or ready).
//
// The serial one-head-per-cycle routing, the credit protocol and the event
// outputs are this design's choices; the selection, analyzer and switcher
// follow the strategy described for the network.
module router
  import noc_pkg::*;
#(
  parameter int DEPTH      = 4,
  parameter int T_PERIOD   = 32,
  parameter int CNT_W      = 5,
  parameter int LOCAL_HOPS = 2,
  parameter int THR_NUM    = 3,
  parameter int THR_DEN    = 10
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  coord_t                 my_x,
  input  coord_t                 my_y,
  input  q_t        [NDIR-1:0]   cfg_psel,
  input  weights_t               cfg_w,
  input  link_t     [NDIR-1:0]   in_link,
  output logic      [NDIR-1:0]   in_credit,
  output link_t     [NDIR-1:0]   out_link,
  input  logic      [NDIR-1:0]   out_credit,
  input  nbr_info_t [NDIR-1:0]   nbr_info,
  output nbr_info_t              info,
  input  flit_t                  inj_flit,
  input  logic                   inj_valid,
  output logic                   inj_ready,
  output flit_t                  ej_flit,
  output logic                   ej_valid,
  input  logic                   ej_ready,
  output sel_mode_e              mode,
  output logic                   ev_alloc,
  output logic                   ev_choice,
  output logic                   ev_stall,
  output logic                   ev_bp
);

  localparam int CW = $clog2(DEPTH+1);
  localparam int FW = $bits(flit_t);
  localparam int AW = $clog2(NPORT+1);

  // ---------------------------------------------------------------- buffers
  flit_t [NPORT-1:0] f_din, f_dout;
  logic  [NPORT-1:0] f_push, f_pop, f_empty, f_full;

  always_comb begin
    for (int i = 0; i < NDIR; i++) begin
      f_push[i] = in_link[i].valid;
      f_din[i]  = in_link[i].flit;
    end
    f_push[DIR_L] = inj_valid && !f_full[DIR_L];
    f_din[DIR_L]  = inj_flit;
  end
  assign inj_ready = !f_full[DIR_L];

  for (genvar i = 0; i < NPORT; i++) begin : g_fifo
    logic [CW-1:0] cnt_unused;
    input_fifo #(.W(FW), .DEPTH(DEPTH)) u_fifo (
      .clk   (clk),
      .rst_n (rst_n),
      .push  (f_push[i]),
      .din   (f_din[i]),
      .pop   (f_pop[i]),
      .dout  (f_dout[i]),
      .empty (f_empty[i]),
      .full  (f_full[i]),
      .count (cnt_unused)
    );
  end

  // ------------------------------------------------- credits and free share
  logic [CW-1:0] cred [NDIR];
  q_t [NDIR-1:0] free_q;

  always_comb
    for (int d = 0; d < NDIR; d++)
      free_q[d] = q_t'((32'(cred[d]) * Q_MAX) / DEPTH);

  // ------------------------------------------------------ reservation table
  logic [NPORT-1:0] out_busy;
  logic [2:0]       out_owner [NPORT];
  logic [NPORT-1:0] in_busy;

  // ------------------------------------------------- head flit arbitration
  logic [2:0] rr, hdr_in;
  logic       hdr_found;

  always_comb begin
    hdr_found = 1'b0;
    hdr_in    = '0;
    for (int k = 0; k < NPORT; k++) begin
      automatic int idx = (int'(rr) + k) % NPORT;
      if (!hdr_found && !f_empty[idx] && f_dout[idx].head && !in_busy[idx]) begin
        hdr_found = 1'b1;
        hdr_in    = 3'(idx);
      end
    end
  end

  header_t          hdr;
  logic [NPORT-1:0] rdirs;

  assign hdr = header_t'(f_dout[hdr_in].data);

  oe_route u_route (
    .cur_x (my_x),
    .cur_y (my_y),
    .src_x (hdr.src_x),
    .dst_x (hdr.dst_x),
    .dst_y (hdr.dst_y),
    .dirs  (rdirs)
  );

  // ------------------------------------------------ congestion information
  q_t [NDIR-1:0] nop_q, rca_q, rca_in, b_q;
  dq_t [NDIR-1:0] dp_nbr;
  dq_t           dp_own;

  for (genvar d = 0; d < NDIR; d++) begin : g_nop
    nop_metric #(.DIR(d)) u_nop (
      .cur_x    (my_x),
      .cur_y    (my_y),
      .src_x    (hdr.src_x),
      .dst_x    (hdr.dst_x),
      .dst_y    (hdr.dst_y),
      .own_free (free_q[d]),
      .nbr_free (nbr_info[d].free_q),
      .metric   (nop_q[d])
    );
    assign rca_in[d] = nbr_info[d].rca_q[d];
    assign dp_nbr[d] = nbr_info[d].dp_q;
    assign b_q[d]    = (mode == SEL_NOP) ? nop_q[d] : rca_q[d];
  end

  rca_aggregator u_rca (
    .clk     (clk),
    .rst_n   (rst_n),
    .free_q  (free_q),
    .rca_in  (rca_in),
    .rca_out (rca_q)
  );

  // ------------------------------------------------------------- selection
  logic                      ss_valid;
  logic [1:0]                ss_sel;
  logic signed [SCORE_W-1:0] ss_score;

  score_select u_sel (
    .cand       (rdirs[NDIR-1:0]),
    .avail      (~out_busy[NDIR-1:0]),
    .psel       (cfg_psel),
    .b_q        (b_q),
    .dp_q       (dp_nbr),
    .w          (cfg_w),
    .valid      (ss_valid),
    .sel        (ss_sel),
    .best_score (ss_score)
  );

  logic       alloc_ok;
  logic [2:0] alloc_port;
  logic [NDIR-1:0] free_cand;

  always_comb begin
    free_cand = rdirs[NDIR-1:0] & ~out_busy[NDIR-1:0];
    if (rdirs[DIR_L]) begin
      alloc_ok   = !out_busy[DIR_L];
      alloc_port = 3'(DIR_L);
    end else begin
      alloc_ok   = ss_valid;
      alloc_port = {1'b0, ss_sel};
    end
    ev_alloc  = hdr_found && alloc_ok;
    ev_stall  = hdr_found && !alloc_ok;
    ev_choice = ev_alloc && !rdirs[DIR_L] &&
                ((32'(free_cand[0]) + 32'(free_cand[1]) +
                  32'(free_cand[2]) + 32'(free_cand[3])) > 1);
  end

  // ------------------------------------------------------ traffic analyzer
  logic             an_done;
  logic [CNT_W-1:0] an_l, an_n;
  logic             sw_switched;

  traffic_analyzer #(
    .T_PERIOD   (T_PERIOD),
    .CNT_W      (CNT_W),
    .LOCAL_HOPS (LOCAL_HOPS)
  ) u_an (
    .clk         (clk),
    .rst_n       (rst_n),
    .cur_x       (my_x),
    .cur_y       (my_y),
    .hdr_valid   (ev_alloc),
    .dst_x       (hdr.dst_x),
    .dst_y       (hdr.dst_y),
    .period_done (an_done),
    .l_cnt       (an_l),
    .n_cnt       (an_n)
  );

  strategy_switch #(
    .CNT_W   (CNT_W),
    .THR_NUM (THR_NUM),
    .THR_DEN (THR_DEN)
  ) u_sw (
    .clk      (clk),
    .rst_n    (rst_n),
    .update   (an_done),
    .l_cnt    (an_l),
    .n_cnt    (an_n),
    .mode     (mode),
    .switched (sw_switched)
  );

  // ----------------------------------------------------- switch traversal
  logic [NPORT-1:0] send, has_flit;
  flit_t [NPORT-1:0] out_flit;
  logic [AW-1:0]    act;

  always_comb begin
    for (int o = 0; o < NPORT; o++) begin
      has_flit[o] = out_busy[o] && !f_empty[out_owner[o]];
      out_flit[o] = f_dout[out_owner[o]];
    end
    for (int o = 0; o < NDIR; o++)
      send[o] = has_flit[o] && (cred[o] != '0);
    send[DIR_L] = has_flit[DIR_L] && ej_ready;

    f_pop = '0;
    for (int o = 0; o < NPORT; o++)
      if (send[o]) f_pop[out_owner[o]] = 1'b1;

    ev_bp = |(has_flit & ~send);
    act   = '0;
    for (int o = 0; o < NPORT; o++)
      act = act + AW'(send[o]);
  end

  always_comb begin
    for (int o = 0; o < NDIR; o++) begin
      out_link[o].valid = send[o];
      out_link[o].flit  = out_flit[o];
      in_credit[o]      = f_pop[o];
    end
  end

  assign ej_valid = has_flit[DIR_L];
  assign ej_flit  = out_flit[DIR_L];

  // ------------------------------------------------------------ state
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_busy <= '0;
      in_busy  <= '0;
      rr       <= '0;
      for (int o = 0; o < NPORT; o++) out_owner[o] <= '0;
      for (int d = 0; d < NDIR; d++)  cred[d] <= CW'(DEPTH);
    end else begin
      for (int d = 0; d < NDIR; d++)
        cred[d] <= cred[d] - CW'(send[d]) + CW'(out_credit[d]);
      for (int o = 0; o < NPORT; o++) begin
        if (send[o] && out_flit[o].tail) begin
          out_busy[o]             <= 1'b0;
          in_busy[out_owner[o]]   <= 1'b0;
        end
      end
      if (ev_alloc) begin
        out_busy[alloc_port]  <= 1'b1;
        out_owner[alloc_port] <= hdr_in;
        in_busy[hdr_in]       <= 1'b1;
      end
      if (hdr_found)
        rr <= (hdr_in == 3'(NPORT - 1)) ? '0 : hdr_in + 1'b1;
    end
  end

  // ------------------------------------------------------------- outputs
  power_monitor #(.PMAX(NPORT)) u_pwr (
    .clk   (clk),
    .rst_n (rst_n),
    .act   (act),
    .power (),
    .dp_q  (dp_own)
  );

  assign info.free_q = free_q;
  assign info.rca_q  = rca_q;
  assign info.dp_q   = dp_own;

  // ------------------------------------------------------------ assertions
  for (genvar d = 0; d < NDIR; d++) begin : g_chk
    a_credit_bound: assert property (@(posedge clk) disable iff (!rst_n)
      cred[d] <= CW'(DEPTH));
    a_no_send_without_credit: assert property (@(posedge clk) disable iff (!rst_n)
      send[d] |-> cred[d] != '0);
  end

endmodule
