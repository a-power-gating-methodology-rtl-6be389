// tb_chan_pair: test harness with two gated channels of a router input side.
//
// Two channels stand side by side, as in a router whose input ports are fed
// by a network interface and by a neighbouring router:
//   port 0 (NIC-to-router): apnea_nic -> apnea_link -> apnea_inport
//   port 1 (router-to-router): apnea_outport (router mode, the upstream
//          router's output port) -> apnea_link -> apnea_inport
// In each channel the upstream side decides, every cycle, whether the
// downstream input port needs one buffer more or one less, and the
// downstream side wakes, binds and gates its physical buffers accordingly.
// The rest of both routers (route computation, crossbar, the other ports) is
// outside this design: the upstream router's packet sources and the
// downstream router's buffer reads are ports of this module.
//
// Parameters are the document's evaluated router: 3 VNETs x 2 VCs, 4-flit
// buffers, T_ON = 2 cycles, single-cycle links. T_OFF = 1 and the 5 packet
// sources of the upstream output port are this design's choices.
module tb_chan_pair
  import apnea_pkg::*;
#(
  parameter int unsigned NSRC      = 5,
  parameter int unsigned QDEPTH    = 4,
  parameter int unsigned LEN_W     = 4,
  parameter int unsigned BUF_DEPTH = 4,
  parameter int unsigned T_ON      = 2,
  parameter int unsigned T_OFF     = 1,
  parameter int unsigned LINK_LAT  = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // NIC message injection (port 0)
  input  logic              msg_valid [VNETS],
  input  logic [LEN_W-1:0]  msg_len   [VNETS],
  input  logic [FLIT_W-1:0] msg_data  [VNETS],
  output logic              msg_ready [VNETS],
  // upstream router packet sources (port 1)
  input  logic              src_valid  [NSRC],
  input  flit_t             src_flit   [NSRC],
  input  cnt_t              src_queued [NSRC],
  output logic              src_ready  [NSRC],
  // downstream router reads of the physical buffers, [port][buffer]
  output logic              buf_valid [2][NVC],
  output flit_t             buf_flit  [2][NVC],
  input  logic              buf_pop   [2][NVC],
  output pg_state_e         buf_state [2][NVC],
  // upstream power view and event pulses, [port]
  output logic [NVC-1:0]    up_vc_on     [2],
  output logic              ev_va_stall  [2],
  output logic              ev_local_on  [2],
  output logic              ev_navca,
  output logic              ev_wake      [2],
  output logic              ev_sleep     [2],
  output logic              ev_abort     [2],
  output logic              ev_keep_last [2],
  output logic              ev_bind      [2]
);
  logic           up_valid [2];
  flit_t          up_flit  [2];
  pg_cmd_t        up_cmd   [2];
  logic [NVC-1:0] up_credit [2];
  logic           dn_valid [2];
  flit_t          dn_flit  [2];
  pg_cmd_t        dn_cmd   [2];
  logic [NVC-1:0] dn_credit [2];

  apnea_nic #(.QDEPTH(QDEPTH), .LEN_W(LEN_W), .BUF_DEPTH(BUF_DEPTH), .T_ON(T_ON)) u_nic (
    .clk, .rst_n,
    .msg_valid, .msg_len, .msg_data, .msg_ready,
    .out_valid (up_valid[0]), .out_flit (up_flit[0]), .out_cmd (up_cmd[0]),
    .credit_in (up_credit[0]),
    .vc_on (up_vc_on[0]), .ev_va_stall (ev_va_stall[0]), .ev_local_on (ev_local_on[0])
  );

  // every source has its own switch input here
  logic sa_ok [NSRC], sa_req [NSRC];
  always_comb for (int unsigned s = 0; s < NSRC; s++) sa_ok[s] = 1'b1;

  apnea_outport #(.NSRC(NSRC), .IS_NIC(1'b0), .BUF_DEPTH(BUF_DEPTH), .T_ON(T_ON)) u_up_router (
    .clk, .rst_n,
    .src_valid, .src_flit, .src_queued, .src_ready,
    .src_sa_ok (sa_ok), .src_sa_req (sa_req),
    .out_valid (up_valid[1]), .out_flit (up_flit[1]), .out_cmd (up_cmd[1]),
    .credit_in (up_credit[1]),
    .vc_on (up_vc_on[1]), .ev_va_stall (ev_va_stall[1]), .ev_navca (ev_navca),
    .ev_local_on (ev_local_on[1])
  );

  for (genvar i = 0; i < 2; i++) begin : g_ch
    apnea_link #(.LATENCY(LINK_LAT)) u_link (
      .clk, .rst_n,
      .up_valid (up_valid[i]), .up_flit (up_flit[i]), .up_cmd (up_cmd[i]),
      .up_credit (up_credit[i]),
      .dn_valid (dn_valid[i]), .dn_flit (dn_flit[i]), .dn_cmd (dn_cmd[i]),
      .dn_credit (dn_credit[i])
    );

    apnea_inport #(.NPHYS(NVC), .BUF_DEPTH(BUF_DEPTH), .T_ON(T_ON), .T_OFF(T_OFF)) u_in (
      .clk, .rst_n,
      .in_valid (dn_valid[i]), .in_flit (dn_flit[i]), .in_cmd (dn_cmd[i]),
      .credit_out (dn_credit[i]),
      .buf_valid (buf_valid[i]), .buf_flit (buf_flit[i]), .buf_pop (buf_pop[i]),
      .buf_state (buf_state[i]),
      .ev_wake (ev_wake[i]), .ev_sleep (ev_sleep[i]), .ev_abort (ev_abort[i]),
      .ev_keep_last (ev_keep_last[i]), .ev_bind (ev_bind[i])
    );
  end
endmodule
