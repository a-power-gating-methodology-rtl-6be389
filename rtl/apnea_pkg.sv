// apnea_pkg: shared constants and types of the buffer power-gating design.
//
// The network carries three virtual networks (VNETs, the minimum a MESI
// coherence protocol needs), two virtual channels (VCs) per VNET, 4-flit input
// buffers and a 32-bit link; these are the evaluated router's values. Flits
// carry the usual head/tail flags, their VNET and the upstream VC they were
// allocated on. An APNEA command travels with the flits on the link: it asks
// the downstream input port to power one more buffer on, or to release the
// binding of one VC and power one buffer off.
package apnea_pkg;

  localparam int unsigned FLIT_W       = 32;  // link width
  localparam int unsigned VNETS        = 3;   // virtual networks
  localparam int unsigned VCS_PER_VNET = 2;   // VCs per virtual network
  localparam int unsigned NVC          = VNETS * VCS_PER_VNET;
  localparam int unsigned VNET_W       = $clog2(VNETS);
  localparam int unsigned VC_W         = $clog2(NVC);
  localparam int unsigned CNT_W        = 8;   // width of the traffic counters

  typedef logic [VNET_W-1:0] vnet_t;
  typedef logic [VC_W-1:0]   vc_t;
  typedef logic [CNT_W-1:0]  cnt_t;

  typedef struct packed {
    logic              head;
    logic              tail;
    vnet_t             vnet;
    vc_t               vc;    // upstream (virtual) channel
    logic [FLIT_W-1:0] data;
  } flit_t;

  // Local (per VNET) and global (per output port) decisions: R = +1, 0, -1.
  typedef enum logic [1:0] {
    DEC_KEEP = 2'd0,
    DEC_UP   = 2'd1,
    DEC_DOWN = 2'd2
  } decision_e;

  // Command sent from the upstream controller to the downstream actuator.
  typedef enum logic [1:0] {
    ACT_NONE = 2'd0,
    ACT_ON   = 2'd1,
    ACT_OFF  = 2'd2
  } action_e;

  typedef struct packed {
    action_e action;
    vc_t     vc;      // target VC (used by ACT_OFF to drop its binding)
  } pg_cmd_t;

  // Power state of one physical buffer.
  typedef enum logic [1:0] {
    PG_OFF       = 2'd0,
    PG_OFF_TO_ON = 2'd1,
    PG_ON        = 2'd2,
    PG_ON_TO_OFF = 2'd3
  } pg_state_e;

  // Allocation state of one upstream output VC.
  typedef enum logic [1:0] {
    VC_IDLE   = 2'd0,  // free, all credits back
    VC_ACTIVE = 2'd1,  // held by a packet whose tail has not left
    VC_TAIL   = 2'd2   // tail sent, credits outstanding: NAVCA-allocatable
  } vc_alloc_e;

  // Router ports of a 2D mesh and XY routing. A head flit carries its
  // destination in the low data bits: x in [COORD_W-1:0], y above it.
  localparam int unsigned NPORT   = 5;
  localparam int unsigned PORT_W  = 3;
  localparam int unsigned COORD_W = 4;
  localparam logic [PORT_W-1:0] P_LOCAL = 3'd0;
  localparam logic [PORT_W-1:0] P_NORTH = 3'd1;  // towards y - 1
  localparam logic [PORT_W-1:0] P_EAST  = 3'd2;  // towards x + 1
  localparam logic [PORT_W-1:0] P_SOUTH = 3'd3;  // towards y + 1
  localparam logic [PORT_W-1:0] P_WEST  = 3'd4;  // towards x - 1

  // Dimension-order routing: correct x first, then y, then eject.
  function automatic logic [PORT_W-1:0] xy_route(
      input logic [FLIT_W-1:0] data, input int unsigned x, input int unsigned y);
    int unsigned dx, dy;
    dx = int'(data[COORD_W-1:0]);
    dy = int'(data[2*COORD_W-1:COORD_W]);
    if      (dx > x) return P_EAST;
    else if (dx < x) return P_WEST;
    else if (dy > y) return P_SOUTH;
    else if (dy < y) return P_NORTH;
    else             return P_LOCAL;
  endfunction

endpackage
