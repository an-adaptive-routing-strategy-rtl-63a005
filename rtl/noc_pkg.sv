// noc_pkg: types and constants shared by the mesh network-on-chip with the
// traffic-aware hybrid output-selection strategy.
//
// Directions are numbered N, E, S, W, L (local). Row 0 of the mesh is the
// northern edge and column 0 the western edge, so going north decrements y
// and going east increments x.
//
// A flit carries a head and a tail marker and DATA_W bits. In a head flit the
// low 16 bits hold the destination and source coordinates (4 bits each,
// meshes of up to 16 x 16); the layout is this design's own choice.
//
// Congestion values exchanged between routers are 8-bit fractions, 0..255
// standing for 0..1 (the share of a buffer that is free). The instantaneous
// power change is a signed fraction -255..255 of the router's maximum power.
// Selection weights alpha, beta and gamma are kept in tenths (0..10), the
// granularity the selection weights are searched with.
package noc_pkg;

  localparam int NDIR   = 4;           // mesh directions
  localparam int NPORT  = 5;           // mesh directions plus the local port
  localparam int DATA_W = 32;          // flit payload width
  localparam int COORD_W = 4;          // coordinate width
  localparam int Q_W    = 8;           // congestion fraction width
  localparam int Q_MAX  = 255;         // value standing for 1.0
  localparam int SCORE_W = 16;         // signed score width
  localparam int WGT_W  = 4;           // weight width (tenths)

  typedef enum logic [2:0] {
    DIR_N = 3'd0,
    DIR_E = 3'd1,
    DIR_S = 3'd2,
    DIR_W = 3'd3,
    DIR_L = 3'd4
  } dir_e;

  // Selection strategy chosen by the traffic analyzer's switcher.
  typedef enum logic {
    SEL_NOP = 1'b0,                    // Neighbors-on-Path
    SEL_RCA = 1'b1                     // Regional Congestion Awareness
  } sel_mode_e;

  typedef logic [COORD_W-1:0] coord_t;
  typedef logic [Q_W-1:0]     q_t;
  typedef logic signed [Q_W:0] dq_t;   // signed fraction -255..255

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [DATA_W-1:0] data;
  } flit_t;

  // Field layout of the data word of a head flit.
  typedef struct packed {
    logic [DATA_W-4*COORD_W-1:0] payload;
    coord_t src_y;
    coord_t src_x;
    coord_t dst_y;
    coord_t dst_x;
  } header_t;

  // One direction of a mesh link.
  typedef struct packed {
    logic  valid;
    flit_t flit;
  } link_t;

  // Status a router shows to its four neighbours every cycle.
  typedef struct packed {
    q_t [NDIR-1:0] free_q;             // free share of the buffer behind each output
    q_t [NDIR-1:0] rca_q;              // regional (RCA) aggregate per direction
    dq_t           dp_q;               // instantaneous power change
  } nbr_info_t;

  typedef struct packed {
    logic [WGT_W-1:0] alpha;           // weight of Psel
    logic [WGT_W-1:0] beta;            // weight of the free-buffer term
    logic [WGT_W-1:0] gamma;           // weight of the power term
  } weights_t;

  function automatic dir_e opposite(dir_e d);
    case (d)
      DIR_N:   return DIR_S;
      DIR_S:   return DIR_N;
      DIR_E:   return DIR_W;
      DIR_W:   return DIR_E;
      default: return DIR_L;
    endcase
  endfunction

endpackage
