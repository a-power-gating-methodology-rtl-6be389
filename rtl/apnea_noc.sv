// apnea_noc: 2D-mesh network-on-chip with APNEA buffer power gating.
//
// MESH_X x MESH_Y tiles; tile n = y * MESH_X + x sits at column x, row y.
// Every tile holds a NIC (apnea_nic), a five-port router (apnea_router) and
// the NIC's ejection input port (apnea_inport). Every hop is a link of
// LINK_LAT register stages (apnea_link) carrying flits and power-gating
// commands downstream and credits upstream:
//   NIC -> router Local input, router Local output -> NIC ejection port,
//   router East output -> West input of the tile at x + 1 (and so on).
// Each of these channels runs the policy end to end: the sending output
// port decides, the receiving input port wakes, binds and gates its buffers.
// Router outputs at the mesh edge are left without a link; XY routing never
// selects them, so their output ports see no traffic.
//
// Interface: per tile, message injection into the NIC (valid, length in
// flits, payload whose low bits hold the destination x and y, ready), and a
// read port on every ejection buffer (valid, flit, pop), the ejection
// buffers being read by the core side. Status: the power state of every
// router input buffer and of every ejection buffer; one event pulse vector
// per tile and mechanism, one bit per router port.
//
// The mesh, XY routing, one-cycle links and gated NIC-router channels
// follow the document (8x8 tiles, 3 virtual networks with 2 VCs each,
// 4-flit buffers); gating the router-to-NIC channel like any other
// router-to-router channel is this design's reading.
module apnea_noc
  import apnea_pkg::*;
#(
  parameter int unsigned MESH_X    = 8,
  parameter int unsigned MESH_Y    = 8,
  parameter int unsigned QDEPTH    = 4,
  parameter int unsigned LEN_W     = 4,
  parameter int unsigned BUF_DEPTH = 4,
  parameter int unsigned T_ON      = 2,
  parameter int unsigned T_OFF     = 1,
  parameter int unsigned LINK_LAT  = 1,
  localparam int unsigned NODES    = MESH_X * MESH_Y
) (
  input  logic              clk,
  input  logic              rst_n,
  // message injection, per tile and VNET
  input  logic              msg_valid [NODES][VNETS],
  input  logic [LEN_W-1:0]  msg_len   [NODES][VNETS],
  input  logic [FLIT_W-1:0] msg_data  [NODES][VNETS],
  output logic              msg_ready [NODES][VNETS],
  // ejection buffers, per tile
  output logic              ej_valid  [NODES][NVC],
  output flit_t             ej_flit   [NODES][NVC],
  input  logic              ej_pop    [NODES][NVC],
  // power states
  output pg_state_e         rt_state  [NODES][NPORT][NVC],
  output pg_state_e         ej_state  [NODES][NVC],
  // event pulses, per tile, one bit per router port
  output logic [NPORT-1:0]  ev_va_stall    [NODES],
  output logic [NPORT-1:0]  ev_navca       [NODES],
  output logic [NPORT-1:0]  ev_local_on    [NODES],
  output logic [NPORT-1:0]  ev_wake        [NODES],
  output logic [NPORT-1:0]  ev_sleep       [NODES],
  output logic [NPORT-1:0]  ev_abort       [NODES],
  output logic [NPORT-1:0]  ev_keep_last   [NODES],
  output logic [NPORT-1:0]  ev_bind        [NODES],
  output logic [NPORT-1:0]  ev_xb_conflict [NODES],
  output logic              ev_nic_va_stall [NODES],
  output logic              ev_nic_local_on [NODES],
  output logic              ev_ej_wake      [NODES]
);
  // router-side signals, [tile][port]
  logic           r_in_valid  [NODES][NPORT];
  flit_t          r_in_flit   [NODES][NPORT];
  pg_cmd_t        r_in_cmd    [NODES][NPORT];
  logic [NVC-1:0] r_cred_out  [NODES][NPORT];
  logic           r_out_valid [NODES][NPORT];
  flit_t          r_out_flit  [NODES][NPORT];
  pg_cmd_t        r_out_cmd   [NODES][NPORT];
  logic [NVC-1:0] r_cred_in   [NODES][NPORT];
  // far ends of the links leaving each router output, [tile][port]
  logic           l_valid     [NODES][NPORT];
  flit_t          l_flit      [NODES][NPORT];
  pg_cmd_t        l_cmd       [NODES][NPORT];
  logic [NVC-1:0] l_cred      [NODES][NPORT];   // credits into the far end

  for (genvar y = 0; y < MESH_Y; y++) begin : g_row
    for (genvar x = 0; x < MESH_X; x++) begin : g_col
      localparam int unsigned N = y * MESH_X + x;

      // ---------------------------------------------------------- NIC side
      logic           nic_valid;
      flit_t          nic_flit;
      pg_cmd_t        nic_cmd;
      logic [NVC-1:0] nic_cred;
      logic [NVC-1:0] nic_vc_on;
      logic           ej_abort, ej_sleep, ej_keep_last, ej_bind;
      logic [NVC-1:0] rt_vc_on [NPORT];

      apnea_nic #(.QDEPTH(QDEPTH), .LEN_W(LEN_W), .BUF_DEPTH(BUF_DEPTH), .T_ON(T_ON)) u_nic (
        .clk, .rst_n,
        .msg_valid (msg_valid[N]), .msg_len (msg_len[N]), .msg_data (msg_data[N]),
        .msg_ready (msg_ready[N]),
        .out_valid (nic_valid), .out_flit (nic_flit), .out_cmd (nic_cmd),
        .credit_in (nic_cred), .vc_on (nic_vc_on),
        .ev_va_stall (ev_nic_va_stall[N]), .ev_local_on (ev_nic_local_on[N])
      );

      apnea_link #(.LATENCY(LINK_LAT)) u_inj_link (
        .clk, .rst_n,
        .up_valid (nic_valid), .up_flit (nic_flit), .up_cmd (nic_cmd), .up_credit (nic_cred),
        .dn_valid (r_in_valid[N][P_LOCAL]), .dn_flit (r_in_flit[N][P_LOCAL]),
        .dn_cmd (r_in_cmd[N][P_LOCAL]), .dn_credit (r_cred_out[N][P_LOCAL])
      );

      apnea_inport #(.NPHYS(NVC), .BUF_DEPTH(BUF_DEPTH), .T_ON(T_ON), .T_OFF(T_OFF)) u_ej (
        .clk, .rst_n,
        .in_valid (l_valid[N][P_LOCAL]), .in_flit (l_flit[N][P_LOCAL]),
        .in_cmd (l_cmd[N][P_LOCAL]), .credit_out (l_cred[N][P_LOCAL]),
        .buf_valid (ej_valid[N]), .buf_flit (ej_flit[N]), .buf_pop (ej_pop[N]),
        .buf_state (ej_state[N]),
        .ev_wake (ev_ej_wake[N]), .ev_sleep (ej_sleep), .ev_abort (ej_abort),
        .ev_keep_last (ej_keep_last), .ev_bind (ej_bind)
      );

      // ------------------------------------------------------------ router
      apnea_router #(.BUF_DEPTH(BUF_DEPTH), .T_ON(T_ON), .T_OFF(T_OFF)) u_rt (
        .clk, .rst_n, .my_x (COORD_W'(x)), .my_y (COORD_W'(y)),
        .in_valid (r_in_valid[N]), .in_flit (r_in_flit[N]), .in_cmd (r_in_cmd[N]),
        .credit_out (r_cred_out[N]),
        .out_valid (r_out_valid[N]), .out_flit (r_out_flit[N]), .out_cmd (r_out_cmd[N]),
        .credit_in (r_cred_in[N]),
        .buf_state (rt_state[N]), .vc_on (rt_vc_on),
        .ev_va_stall (ev_va_stall[N]), .ev_navca (ev_navca[N]), .ev_local_on (ev_local_on[N]),
        .ev_wake (ev_wake[N]), .ev_sleep (ev_sleep[N]), .ev_abort (ev_abort[N]),
        .ev_keep_last (ev_keep_last[N]), .ev_bind (ev_bind[N]),
        .ev_xb_conflict (ev_xb_conflict[N])
      );

      // ------------------------------------------- links leaving the router
      for (genvar o = 0; o < NPORT; o++) begin : g_out
        localparam bit HAS = (o == P_LOCAL) || (o == P_NORTH && y > 0) ||
                             (o == P_EAST && x + 1 < MESH_X) ||
                             (o == P_SOUTH && y + 1 < MESH_Y) || (o == P_WEST && x > 0);
        if (HAS) begin : g_link
          apnea_link #(.LATENCY(LINK_LAT)) u_link (
            .clk, .rst_n,
            .up_valid (r_out_valid[N][o]), .up_flit (r_out_flit[N][o]),
            .up_cmd (r_out_cmd[N][o]), .up_credit (r_cred_in[N][o]),
            .dn_valid (l_valid[N][o]), .dn_flit (l_flit[N][o]),
            .dn_cmd (l_cmd[N][o]), .dn_credit (l_cred[N][o])
          );
        end else begin : g_edge
          assign r_cred_in[N][o] = '0;
          assign l_valid[N][o]   = 1'b0;
          assign l_flit[N][o]    = '0;
          assign l_cmd[N][o]     = '{action: ACT_NONE, vc: '0};
        end
      end

      // ------------------------------------- router inputs from neighbours
      // input North comes from the tile above, whose South output feeds it
      if (y > 0) begin : g_from_n
        assign r_in_valid[N][P_NORTH] = l_valid[N - MESH_X][P_SOUTH];
        assign r_in_flit[N][P_NORTH]  = l_flit[N - MESH_X][P_SOUTH];
        assign r_in_cmd[N][P_NORTH]   = l_cmd[N - MESH_X][P_SOUTH];
        assign l_cred[N - MESH_X][P_SOUTH] = r_cred_out[N][P_NORTH];
      end else begin : g_edge_n
        assign r_in_valid[N][P_NORTH] = 1'b0;
        assign r_in_flit[N][P_NORTH]  = '0;
        assign r_in_cmd[N][P_NORTH]   = '{action: ACT_NONE, vc: '0};
      end
      if (y + 1 < MESH_Y) begin : g_from_s
        assign r_in_valid[N][P_SOUTH] = l_valid[N + MESH_X][P_NORTH];
        assign r_in_flit[N][P_SOUTH]  = l_flit[N + MESH_X][P_NORTH];
        assign r_in_cmd[N][P_SOUTH]   = l_cmd[N + MESH_X][P_NORTH];
        assign l_cred[N + MESH_X][P_NORTH] = r_cred_out[N][P_SOUTH];
      end else begin : g_edge_s
        assign r_in_valid[N][P_SOUTH] = 1'b0;
        assign r_in_flit[N][P_SOUTH]  = '0;
        assign r_in_cmd[N][P_SOUTH]   = '{action: ACT_NONE, vc: '0};
      end
      if (x + 1 < MESH_X) begin : g_from_e
        assign r_in_valid[N][P_EAST] = l_valid[N + 1][P_WEST];
        assign r_in_flit[N][P_EAST]  = l_flit[N + 1][P_WEST];
        assign r_in_cmd[N][P_EAST]   = l_cmd[N + 1][P_WEST];
        assign l_cred[N + 1][P_WEST] = r_cred_out[N][P_EAST];
      end else begin : g_edge_e
        assign r_in_valid[N][P_EAST] = 1'b0;
        assign r_in_flit[N][P_EAST]  = '0;
        assign r_in_cmd[N][P_EAST]   = '{action: ACT_NONE, vc: '0};
      end
      if (x > 0) begin : g_from_w
        assign r_in_valid[N][P_WEST] = l_valid[N - 1][P_EAST];
        assign r_in_flit[N][P_WEST]  = l_flit[N - 1][P_EAST];
        assign r_in_cmd[N][P_WEST]   = l_cmd[N - 1][P_EAST];
        assign l_cred[N - 1][P_EAST] = r_cred_out[N][P_WEST];
      end else begin : g_edge_w
        assign r_in_valid[N][P_WEST] = 1'b0;
        assign r_in_flit[N][P_WEST]  = '0;
        assign r_in_cmd[N][P_WEST]   = '{action: ACT_NONE, vc: '0};
      end
      // edge-side far-end credits are never used
      if (y == 0)          begin : g_nc_n assign l_cred[N][P_NORTH] = '0; end
      if (y + 1 == MESH_Y) begin : g_nc_s assign l_cred[N][P_SOUTH] = '0; end
      if (x + 1 == MESH_X) begin : g_nc_e assign l_cred[N][P_EAST]  = '0; end
      if (x == 0)          begin : g_nc_w assign l_cred[N][P_WEST]  = '0; end
    end
  end
endmodule
