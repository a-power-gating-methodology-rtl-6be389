// apnea_router: five-port mesh router with power-gated input buffers.
//
// Ports 0..4 are Local, North, East, South and West. Every input port is an
// apnea_inport (late-binding remapper, power-gating actuator, NVC physical
// buffers); every output port is an apnea_outport in router mode, which
// allocates the output VCs and runs the upstream half of the power-gating
// policy for the input port of the next router (or of the NIC on Local).
//
// Pipeline of a head flit: BW/RC (written into a buffer; the route is
// computed from the destination in the head's data with XY routing), VA and
// SA in the output port, ST through the output register of the port, then
// one cycle of link traversal outside the router. Body and tail flits
// follow the route and VC of their head.
//
// Each input port offers one packet stream per output port: the packet in
// the lowest-numbered buffer whose front is a head routed there. The stream
// stays locked to that buffer until its tail has crossed the switch, and
// further heads waiting in other buffers of the same port for the same
// output are reported to the output port as queued traffic. The crossbar
// gives each input port one flit per cycle: among the output ports where
// the port's stream is ready for the switch, a round-robin pointer per input
// port picks one, and only that output port may grant it (separable switch
// allocation, input stage first).
//
// The pipeline stages, XY routing and non-atomic VC allocation follow the
// document. The destination encoding, the stream locking and the input-first
// switch arbitration are this design's own choices.
module apnea_router
  import apnea_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 4,
  parameter int unsigned T_ON      = 2,
  parameter int unsigned T_OFF     = 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // position of this router in the mesh
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  // input links
  input  logic           in_valid   [NPORT],
  input  flit_t          in_flit    [NPORT],
  input  pg_cmd_t        in_cmd     [NPORT],
  output logic [NVC-1:0] credit_out [NPORT],
  // output links
  output logic           out_valid  [NPORT],
  output flit_t          out_flit   [NPORT],
  output pg_cmd_t        out_cmd    [NPORT],
  input  logic [NVC-1:0] credit_in  [NPORT],
  // status: power state of every input buffer, output VC power view
  output pg_state_e      buf_state  [NPORT][NVC],
  output logic [NVC-1:0] vc_on      [NPORT],
  // event pulses, one bit per port
  output logic [NPORT-1:0] ev_va_stall,
  output logic [NPORT-1:0] ev_navca,
  output logic [NPORT-1:0] ev_local_on,
  output logic [NPORT-1:0] ev_wake,
  output logic [NPORT-1:0] ev_sleep,
  output logic [NPORT-1:0] ev_abort,
  output logic [NPORT-1:0] ev_keep_last,
  output logic [NPORT-1:0] ev_bind,
  output logic [NPORT-1:0] ev_xb_conflict
);
  localparam int unsigned B_W = $clog2(NVC);

  // ------------------------------------------------------------ input ports
  logic             b_valid [NPORT][NVC];
  flit_t            b_flit  [NPORT][NVC];
  logic             b_pop   [NPORT][NVC];
  logic [PORT_W-1:0] b_route [NPORT][NVC];   // route of the packet at the front
  logic [PORT_W-1:0] rt_q    [NPORT][NVC];   // route of a packet whose head left

  for (genvar p = 0; p < NPORT; p++) begin : g_in
    apnea_inport #(.NPHYS(NVC), .BUF_DEPTH(BUF_DEPTH), .T_ON(T_ON), .T_OFF(T_OFF)) u_in (
      .clk, .rst_n,
      .in_valid (in_valid[p]), .in_flit (in_flit[p]), .in_cmd (in_cmd[p]),
      .credit_out (credit_out[p]),
      .buf_valid (b_valid[p]), .buf_flit (b_flit[p]), .buf_pop (b_pop[p]),
      .buf_state (buf_state[p]),
      .ev_wake (ev_wake[p]), .ev_sleep (ev_sleep[p]), .ev_abort (ev_abort[p]),
      .ev_keep_last (ev_keep_last[p]), .ev_bind (ev_bind[p])
    );
  end

  // RC: a head computes its route, later flits reuse the stored one
  always_comb
    for (int unsigned p = 0; p < NPORT; p++)
      for (int unsigned b = 0; b < NVC; b++)
        b_route[p][b] = b_flit[p][b].head ? xy_route(b_flit[p][b].data, int'(my_x), int'(my_y)) : rt_q[p][b];

  // ------------------------------------------------- per (input, output) streams
  logic           lk_v [NPORT][NPORT];       // [input][output]
  logic [B_W-1:0] lk_b [NPORT][NPORT];
  logic           st_v [NPORT][NPORT];
  logic [B_W-1:0] st_b [NPORT][NPORT];
  cnt_t           st_q [NPORT][NPORT];

  always_comb begin
    for (int unsigned p = 0; p < NPORT; p++)
      for (int unsigned o = 0; o < NPORT; o++) begin
        st_v[p][o] = lk_v[p][o];
        st_b[p][o] = lk_b[p][o];
        st_q[p][o] = '0;
        for (int unsigned b = 0; b < NVC; b++)
          if (b_valid[p][b] && b_flit[p][b].head && b_route[p][b] == PORT_W'(o) &&
              !(lk_v[p][o] && lk_b[p][o] == B_W'(b))) begin
            if (!st_v[p][o]) begin
              st_v[p][o] = 1'b1;
              st_b[p][o] = B_W'(b);
            end else begin
              st_q[p][o] += cnt_t'(1);
            end
          end
      end
  end

  // ------------------------------------------------------------ output ports
  logic  src_valid  [NPORT][NPORT];          // [output][input]
  flit_t src_flit   [NPORT][NPORT];
  cnt_t  src_queued [NPORT][NPORT];
  logic  src_ready  [NPORT][NPORT];
  logic  sa_ok      [NPORT][NPORT];
  logic  sa_req     [NPORT][NPORT];

  always_comb
    for (int unsigned o = 0; o < NPORT; o++)
      for (int unsigned p = 0; p < NPORT; p++) begin
        src_valid[o][p]  = st_v[p][o] && b_valid[p][st_b[p][o]];
        src_flit[o][p]   = b_flit[p][st_b[p][o]];
        src_queued[o][p] = st_q[p][o];
      end

  for (genvar o = 0; o < NPORT; o++) begin : g_out
    apnea_outport #(.NSRC(NPORT), .IS_NIC(1'b0), .BUF_DEPTH(BUF_DEPTH), .T_ON(T_ON)) u_out (
      .clk, .rst_n,
      .src_valid (src_valid[o]), .src_flit (src_flit[o]), .src_queued (src_queued[o]),
      .src_ready (src_ready[o]), .src_sa_ok (sa_ok[o]), .src_sa_req (sa_req[o]),
      .out_valid (out_valid[o]), .out_flit (out_flit[o]), .out_cmd (out_cmd[o]),
      .credit_in (credit_in[o]), .vc_on (vc_on[o]),
      .ev_va_stall (ev_va_stall[o]), .ev_navca (ev_navca[o]), .ev_local_on (ev_local_on[o])
    );
  end

  // ------------------------------------------ switch allocation, input stage
  logic [PORT_W-1:0] xb_rr [NPORT];

  always_comb begin
    int unsigned o;
    logic        got;
    o = 0; got = 1'b0;
    for (int unsigned p = 0; p < NPORT; p++) begin
      got = 1'b0;
      ev_xb_conflict[p] = 1'b0;
      for (int unsigned k = 0; k < NPORT; k++) sa_ok[k][p] = 1'b0;
      for (int unsigned i = 0; i < NPORT; i++) begin
        o = (int'(xb_rr[p]) + i) % NPORT;
        if (sa_req[o][p]) begin
          if (!got) sa_ok[o][p] = 1'b1;
          else      ev_xb_conflict[p] = 1'b1;
          got = 1'b1;
        end
      end
    end
  end

  // pops follow the switch grants
  always_comb begin
    for (int unsigned p = 0; p < NPORT; p++)
      for (int unsigned b = 0; b < NVC; b++) b_pop[p][b] = 1'b0;
    for (int unsigned o = 0; o < NPORT; o++)
      for (int unsigned p = 0; p < NPORT; p++)
        if (src_ready[o][p]) b_pop[p][st_b[p][o]] = 1'b1;
  end

  // --------------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned p = 0; p < NPORT; p++) begin
        xb_rr[p] <= '0;
        for (int unsigned o = 0; o < NPORT; o++) begin
          lk_v[p][o] <= 1'b0; lk_b[p][o] <= '0;
        end
        for (int unsigned b = 0; b < NVC; b++) rt_q[p][b] <= P_LOCAL;
      end
    end else begin
      for (int unsigned p = 0; p < NPORT; p++) begin
        for (int unsigned b = 0; b < NVC; b++)
          if (b_pop[p][b] && b_flit[p][b].head) rt_q[p][b] <= b_route[p][b];
        for (int unsigned o = 0; o < NPORT; o++) begin
          if (src_ready[o][p] && b_flit[p][st_b[p][o]].tail) begin
            lk_v[p][o] <= 1'b0;
          end else if (st_v[p][o] && !lk_v[p][o]) begin
            lk_v[p][o] <= 1'b1;
            lk_b[p][o] <= st_b[p][o];
          end
          if (sa_ok[o][p] && src_ready[o][p])
            xb_rr[p] <= (o == NPORT - 1) ? '0 : PORT_W'(o + 1);
        end
      end
    end
  end

  // The crossbar passes at most one flit per input port per cycle.
  for (genvar p = 0; p < NPORT; p++) begin : g_chk
    a_xbar: assert property (@(posedge clk) disable iff (!rst_n)
                             $onehot0({src_ready[0][p], src_ready[1][p], src_ready[2][p],
                                       src_ready[3][p], src_ready[4][p]}))
      else $error("two output ports took flits from input port %0d", p);
  end
endmodule
