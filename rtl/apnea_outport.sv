// apnea_outport: upstream output port with the APNEA controller.
//
// The port owns the NVC output virtual channels of one link. NSRC packet
// sources compete for them: in a router these are the input ports whose
// packets were routed to this output, in a NIC (IS_NIC=1) they are the
// per-VNET message queues. Each source presents one flit at a time
// (valid/ready) plus the number of whole packets of the same VNET queued
// behind it.
//
// Pipeline, one flit per cycle on the link:
//   - a router source's head flit spends its first cycle in BW, then requests
//     VA; a NIC source requests VA at once;
//   - VA (one grant per cycle, round robin over sources) gives the packet the
//     lowest-numbered powered, ready VC of its VNET that is idle or, in a
//     router, whose previous packet has already sent its tail (non-atomic VC
//     allocation, NAVCA);
//   - SA/LA (round robin) sends one flit of a source that holds a VC with a
//     credit left (src_sa_req) and that the router's crossbar input
//     arbitration allows (src_sa_ok, tied high where a source has its own
//     switch input); flits leave through the out_* register.
// Credits: BUF_DEPTH per VC, one returned per credit_in bit. A VC whose tail
// has left becomes idle when all its credits are back.
//
// APNEA: every cycle the per-VNET counters (R_BW, R_VA, R_SA, usable VCs)
// feed the local rule (router or NIC variant) and the global decision. An UP
// powers on a VC in the upstream view and sends ACT_ON; the VC is allocatable
// T_ON cycles later, which is exactly when a flit allocated then would reach
// the downstream buffer just as it finishes waking (pipeline cycles hide the
// rest of the wake-up). A DOWN powers off an idle VC and sends ACT_OFF so the
// downstream drops its binding. The downstream keeps one buffer on at all
// times, so switching on the first VC is local: no command is sent and the VC
// is ready at once. If VA grants, in the same cycle, the idle VC a DOWN
// would switch off, the grant wins and no command is sent.
//
// The controller structure follows the document; the source interface, the
// single VA grant per cycle, the round-robin arbiters and the VC choice are
// this design's own choices.
module apnea_outport
  import apnea_pkg::*;
#(
  parameter int unsigned NSRC      = 5,
  parameter bit          IS_NIC    = 1'b0,
  parameter int unsigned BUF_DEPTH = 4,
  parameter int unsigned T_ON      = 2
) (
  input  logic           clk,
  input  logic           rst_n,
  // packet sources
  input  logic           src_valid  [NSRC],
  input  flit_t          src_flit   [NSRC],
  input  cnt_t           src_queued [NSRC],
  output logic           src_ready  [NSRC],
  // crossbar input arbitration: a source may be granted SA only with sa_ok;
  // sa_req tells the router which sources could use the switch this cycle
  input  logic           src_sa_ok  [NSRC],
  output logic           src_sa_req [NSRC],
  // link, downstream direction
  output logic           out_valid,
  output flit_t          out_flit,
  output pg_cmd_t        out_cmd,
  // link, upstream direction
  input  logic [NVC-1:0] credit_in,
  // status and event pulses
  output logic [NVC-1:0] vc_on,
  output logic           ev_va_stall,
  output logic           ev_navca,
  output logic           ev_local_on
);
  localparam int unsigned CR_W = $clog2(BUF_DEPTH + 1);
  localparam int unsigned WK_W = $clog2(T_ON + 1);
  localparam int unsigned SRC_W = (NSRC > 1) ? $clog2(NSRC) : 1;

  // source state
  logic             s_alloc [NSRC];
  vc_t              s_vc    [NSRC];
  logic             s_seen  [NSRC];
  // VC state
  vc_alloc_e        v_st    [NVC];
  logic [CR_W-1:0]  v_cred  [NVC];
  logic             v_pon   [NVC];
  logic [WK_W-1:0]  v_wake  [NVC];
  logic [SRC_W-1:0] va_rr, sa_rr;

  // ---------------------------------------------------------------- counters
  cnt_t      r_bw [VNETS], r_va [VNETS], r_sa [VNETS], w_use [VNETS];
  decision_e ldec [VNETS];
  decision_e gdec;
  vc_t       gtarget;
  logic [NVC-1:0] vc_off, vc_idle_on, vc_ready;
  int unsigned    n_on;

  always_comb begin
    for (int unsigned n = 0; n < VNETS; n++) begin
      r_bw[n] = '0; r_va[n] = '0; r_sa[n] = '0; w_use[n] = '0;
    end
    for (int unsigned s = 0; s < NSRC; s++) begin
      if (s_alloc[s])
        r_sa[src_flit[s].vnet] += cnt_t'(1);
      else if (src_valid[s] && src_flit[s].head) begin
        if (!IS_NIC && !s_seen[s]) r_bw[src_flit[s].vnet] += cnt_t'(1);
        else                       r_va[src_flit[s].vnet] += cnt_t'(1);
      end
      if (src_valid[s])
        r_va[src_flit[s].vnet] += src_queued[s];
    end
    n_on = 0;
    for (int unsigned v = 0; v < NVC; v++) begin
      vc_ready[v]   = v_pon[v] && (v_wake[v] == '0);
      vc_off[v]     = !v_pon[v];
      vc_idle_on[v] = vc_ready[v] && (v_st[v] == VC_IDLE);
      if (v_pon[v]) begin
        n_on = n_on + 1;
        if (v_st[v] == VC_IDLE || (!IS_NIC && v_st[v] == VC_TAIL))
          w_use[v / VCS_PER_VNET] += cnt_t'(1);
      end
    end
  end

  for (genvar n = 0; n < VNETS; n++) begin : g_local
    if (IS_NIC) begin : g_nic
      apnea_local_nic u_local (.r_va(r_va[n]), .r_sa(r_sa[n]), .w_usable(w_use[n]), .dec(ldec[n]));
    end else begin : g_r2r
      apnea_local_r2r u_local (.r_bw(r_bw[n]), .r_va(r_va[n]), .r_sa(r_sa[n]), .w_usable(w_use[n]), .dec(ldec[n]));
    end
  end

  apnea_global_decision u_global (
    .dec(ldec), .vc_off(vc_off), .vc_idle_on(vc_idle_on), .gdec(gdec), .target(gtarget)
  );

  // ---------------------------------------------------------------------- VA
  logic             va_go;
  logic [SRC_W-1:0] va_src;
  vc_t              va_vc;
  logic             va_req_any;
  logic             down_go;

  always_comb begin
    int unsigned s, v;
    s = 0; v = 0;
    va_go = 1'b0; va_src = '0; va_vc = '0; va_req_any = 1'b0;
    for (int unsigned i = 0; i < NSRC; i++) begin
      s = (int'(va_rr) + i) % NSRC;
      if (!va_go && src_valid[s] && src_flit[s].head && !s_alloc[s] && (IS_NIC || s_seen[s])) begin
        va_req_any = 1'b1;
        for (int unsigned k = 0; k < VCS_PER_VNET; k++) begin
          v = int'(src_flit[s].vnet) * VCS_PER_VNET + k;
          if (!va_go && vc_ready[v] &&
              (v_st[v] == VC_IDLE || (!IS_NIC && v_st[v] == VC_TAIL))) begin
            va_go  = 1'b1;
            va_src = SRC_W'(s);
            va_vc  = vc_t'(v);
          end
        end
      end
    end
  end

  // A VC picked by VA in the same cycle is no longer idle: VA wins.
  assign down_go = (gdec == DEC_DOWN) && !(va_go && va_vc == gtarget);

  // ---------------------------------------------------------------------- SA
  logic             sa_go;
  logic [SRC_W-1:0] sa_src;

  always_comb
    for (int unsigned t = 0; t < NSRC; t++)
      src_sa_req[t] = s_alloc[t] && src_valid[t] && v_cred[s_vc[t]] != '0;

  always_comb begin
    int unsigned s;
    s = 0;
    sa_go = 1'b0; sa_src = '0;
    for (int unsigned i = 0; i < NSRC; i++) begin
      s = (int'(sa_rr) + i) % NSRC;
      if (!sa_go && src_sa_req[s] && src_sa_ok[s]) begin
        sa_go  = 1'b1;
        sa_src = SRC_W'(s);
      end
    end
    for (int unsigned t = 0; t < NSRC; t++)
      src_ready[t] = sa_go && (sa_src == SRC_W'(t));
  end

  // --------------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < NSRC; s++) begin
        s_alloc[s] <= 1'b0; s_vc[s] <= '0; s_seen[s] <= 1'b0;
      end
      for (int unsigned v = 0; v < NVC; v++) begin
        v_st[v] <= VC_IDLE; v_cred[v] <= CR_W'(BUF_DEPTH);
        v_pon[v] <= 1'b0;   v_wake[v] <= '0;
      end
      va_rr <= '0; sa_rr <= '0;
      out_valid <= 1'b0; out_flit <= '0;
      out_cmd <= '{action: ACT_NONE, vc: '0};
    end else begin
      // BW bookkeeping: a waiting head has been seen
      for (int unsigned s = 0; s < NSRC; s++)
        if (src_valid[s] && src_flit[s].head && !s_alloc[s]) s_seen[s] <= 1'b1;
      // credits and VC allocation state
      for (int unsigned v = 0; v < NVC; v++) begin
        logic sent;
        logic [CR_W-1:0] cred_n;
        sent   = sa_go && (s_vc[sa_src] == vc_t'(v));
        cred_n = v_cred[v] + CR_W'(credit_in[v]) - CR_W'(sent);
        v_cred[v] <= cred_n;
        if (va_go && va_vc == vc_t'(v))
          v_st[v] <= VC_ACTIVE;
        else if (sent && src_flit[sa_src].tail)
          v_st[v] <= VC_TAIL;
        else if (v_st[v] == VC_TAIL && cred_n == CR_W'(BUF_DEPTH))
          v_st[v] <= VC_IDLE;
        if (v_wake[v] != '0) v_wake[v] <= v_wake[v] - 1'b1;
      end
      // VA grant
      if (va_go) begin
        s_alloc[va_src] <= 1'b1;
        s_vc[va_src]    <= va_vc;
        va_rr <= (va_src == SRC_W'(NSRC - 1)) ? '0 : va_src + 1'b1;
      end
      // SA grant
      out_valid <= sa_go;
      if (sa_go) begin
        out_flit    <= src_flit[sa_src];
        out_flit.vc <= s_vc[sa_src];
        if (src_flit[sa_src].tail) begin
          s_alloc[sa_src] <= 1'b0;
          s_seen[sa_src]  <= 1'b0;
        end
        sa_rr <= (sa_src == SRC_W'(NSRC - 1)) ? '0 : sa_src + 1'b1;
      end
      // APNEA command dispatch
      out_cmd <= '{action: ACT_NONE, vc: gtarget};
      if (gdec == DEC_UP) begin
        v_pon[gtarget] <= 1'b1;
        if (n_on == 0) begin
          v_wake[gtarget] <= '0;
        end else begin
          v_wake[gtarget] <= WK_W'(T_ON - 1);
          out_cmd.action  <= ACT_ON;
        end
      end else if (down_go) begin
        v_pon[gtarget] <= 1'b0;
        out_cmd.action <= ACT_OFF;
      end
    end
  end

  always_comb begin
    for (int unsigned v = 0; v < NVC; v++) vc_on[v] = v_pon[v];
    ev_va_stall = va_req_any && !va_go;
    ev_navca    = va_go && (v_st[va_vc] == VC_TAIL);
    ev_local_on = (gdec == DEC_UP) && (n_on == 0);
  end

  // A flit is only ever sent with a credit, on a VC that is powered.
  a_credit: assert property (@(posedge clk) disable iff (!rst_n)
                             sa_go |-> (v_cred[s_vc[sa_src]] != '0 && v_pon[s_vc[sa_src]]))
    else $error("flit sent without credit or on a powered-off VC");
endmodule
