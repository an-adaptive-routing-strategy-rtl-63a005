// noc_mesh: ROWS x COLS mesh network-on-chip with traffic-aware selection.
//
// The top level of the design: one router per node, node n = y * COLS + x at
// column x and row y (row 0 north, column 0 west). Neighbouring routers are
// joined by a flit link in each direction, a credit wire back along each link,
// and the status bundle (noc_pkg::nbr_info_t) each router shows its four
// neighbours. Links that would leave the mesh carry nothing; a router reads
// zero status from beyond the edge, where minimal routing never sends a
// packet anyway.
//
// Every node's local port is brought out for its processing element:
// inj_flit / inj_valid / inj_ready to inject (a flit is taken when valid and
// ready are both high) and ej_flit / ej_valid / ej_ready to eject. A packet
// is a head flit carrying source and destination (noc_pkg::header_t), any
// number of body flits and a tail flit; a one-flit packet has both markers.
// cfg_psel holds the link-selection probabilities of every router and
// direction and cfg_w every router's alpha, beta, gamma weights; both are
// computed offline and are expected to be held steady. mode shows each
// router's current strategy (1 = RCA, 0 = NoP) and the ev_* outputs are the
// routers' event pulses.
//
// Default size 8 x 8 with 4-flit input buffers and a 32-cycle analyzer
// period, the configuration the network is evaluated with.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int ROWS       = 8,
  parameter int COLS       = 8,
  parameter int DEPTH      = 4,
  parameter int T_PERIOD   = 32,
  parameter int CNT_W      = 5,
  parameter int LOCAL_HOPS = 2,
  parameter int THR_NUM    = 3,
  parameter int THR_DEN    = 10,
  localparam int NN        = ROWS * COLS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  q_t [NN-1:0][NDIR-1:0]  cfg_psel,
  input  weights_t [NN-1:0]      cfg_w,
  input  flit_t [NN-1:0]         inj_flit,
  input  logic  [NN-1:0]         inj_valid,
  output logic  [NN-1:0]         inj_ready,
  output flit_t [NN-1:0]         ej_flit,
  output logic  [NN-1:0]         ej_valid,
  input  logic  [NN-1:0]         ej_ready,
  output logic  [NN-1:0]         mode,
  output logic  [NN-1:0]         ev_alloc,
  output logic  [NN-1:0]         ev_choice,
  output logic  [NN-1:0]         ev_stall,
  output logic  [NN-1:0]         ev_bp
);

  link_t     [NDIR-1:0] r_out_link  [NN];
  logic      [NDIR-1:0] r_in_credit [NN];
  nbr_info_t            r_info      [NN];

  for (genvar y = 0; y < ROWS; y++) begin : g_row
    for (genvar x = 0; x < COLS; x++) begin : g_col
      localparam int n = y * COLS + x;

      link_t     [NDIR-1:0] in_link;
      logic      [NDIR-1:0] out_credit;
      nbr_info_t [NDIR-1:0] nbr_info;
      sel_mode_e            r_mode;

      if (y > 0) begin : g_n
        assign in_link[DIR_N]    = r_out_link[n-COLS][DIR_S];
        assign out_credit[DIR_N] = r_in_credit[n-COLS][DIR_S];
        assign nbr_info[DIR_N]   = r_info[n-COLS];
      end else begin : g_n_edge
        assign in_link[DIR_N]    = '0;
        assign out_credit[DIR_N] = 1'b0;
        assign nbr_info[DIR_N]   = '0;
      end

      if (x < COLS - 1) begin : g_e
        assign in_link[DIR_E]    = r_out_link[n+1][DIR_W];
        assign out_credit[DIR_E] = r_in_credit[n+1][DIR_W];
        assign nbr_info[DIR_E]   = r_info[n+1];
      end else begin : g_e_edge
        assign in_link[DIR_E]    = '0;
        assign out_credit[DIR_E] = 1'b0;
        assign nbr_info[DIR_E]   = '0;
      end

      if (y < ROWS - 1) begin : g_s
        assign in_link[DIR_S]    = r_out_link[n+COLS][DIR_N];
        assign out_credit[DIR_S] = r_in_credit[n+COLS][DIR_N];
        assign nbr_info[DIR_S]   = r_info[n+COLS];
      end else begin : g_s_edge
        assign in_link[DIR_S]    = '0;
        assign out_credit[DIR_S] = 1'b0;
        assign nbr_info[DIR_S]   = '0;
      end

      if (x > 0) begin : g_w
        assign in_link[DIR_W]    = r_out_link[n-1][DIR_E];
        assign out_credit[DIR_W] = r_in_credit[n-1][DIR_E];
        assign nbr_info[DIR_W]   = r_info[n-1];
      end else begin : g_w_edge
        assign in_link[DIR_W]    = '0;
        assign out_credit[DIR_W] = 1'b0;
        assign nbr_info[DIR_W]   = '0;
      end

      router #(
        .DEPTH      (DEPTH),
        .T_PERIOD   (T_PERIOD),
        .CNT_W      (CNT_W),
        .LOCAL_HOPS (LOCAL_HOPS),
        .THR_NUM    (THR_NUM),
        .THR_DEN    (THR_DEN)
      ) u_router (
        .clk        (clk),
        .rst_n      (rst_n),
        .my_x       (coord_t'(x)),
        .my_y       (coord_t'(y)),
        .cfg_psel   (cfg_psel[n]),
        .cfg_w      (cfg_w[n]),
        .in_link    (in_link),
        .in_credit  (r_in_credit[n]),
        .out_link   (r_out_link[n]),
        .out_credit (out_credit),
        .nbr_info   (nbr_info),
        .info       (r_info[n]),
        .inj_flit   (inj_flit[n]),
        .inj_valid  (inj_valid[n]),
        .inj_ready  (inj_ready[n]),
        .ej_flit    (ej_flit[n]),
        .ej_valid   (ej_valid[n]),
        .ej_ready   (ej_ready[n]),
        .mode       (r_mode),
        .ev_alloc   (ev_alloc[n]),
        .ev_choice  (ev_choice[n]),
        .ev_stall   (ev_stall[n]),
        .ev_bp      (ev_bp[n])
      );

      assign mode[n] = (r_mode == SEL_RCA);
    end
  end

endmodule
