// apnea_inport: downstream input port with power-gated buffers.
//
// Combines the remapper (late binding of upstream VCs to physical buffers),
// the power-gating actuator and NPHYS physical buffers of BUF_DEPTH flits.
// An arriving flit is written, in its arrival cycle, into the buffer its VC
// is bound to (binding it first if needed). An APNEA command arriving with it
// is executed in the same cycle: ACT_ON wakes a buffer, ACT_OFF releases the
// binding of the named VC and puts a free buffer to sleep.
//
// The rest of the downstream router reads the buffers through buf_valid /
// buf_flit / buf_pop, one port per physical buffer. Each pop returns one
// credit to the upstream VC bound to that buffer (credit_out, same cycle;
// the link adds the return latency). buf_state exposes the power states for
// energy accounting.
module apnea_inport
  import apnea_pkg::*;
#(
  parameter int unsigned NPHYS     = NVC,
  parameter int unsigned BUF_DEPTH = 4,
  parameter int unsigned T_ON      = 2,
  parameter int unsigned T_OFF     = 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  flit_t          in_flit,
  input  pg_cmd_t        in_cmd,
  output logic [NVC-1:0] credit_out,
  output logic           buf_valid [NPHYS],
  output flit_t          buf_flit  [NPHYS],
  input  logic           buf_pop   [NPHYS],
  output pg_state_e      buf_state [NPHYS],
  output logic           ev_wake,
  output logic           ev_sleep,
  output logic           ev_abort,
  output logic           ev_keep_last,
  output logic           ev_bind
);
  localparam int unsigned PH_W = $clog2(NPHYS);

  logic [NPHYS-1:0] powered, bound_eff;
  logic             map_ok, map_new;
  logic [PH_W-1:0]  map_phys;
  vc_t              phys_vc [NPHYS];
  logic             empty   [NPHYS];

  apnea_remapper #(.NPHYS(NPHYS)) u_remap (
    .clk, .rst_n,
    .in_valid  (in_valid),
    .in_vc     (in_flit.vc),
    .powered   (powered),
    .unbind    (in_cmd.action == ACT_OFF),
    .unbind_vc (in_cmd.vc),
    .map_ok, .map_phys, .map_new,
    .bound_eff (bound_eff),
    .phys_vc   (phys_vc)
  );

  apnea_pg_actuator #(.NPHYS(NPHYS), .T_ON(T_ON), .T_OFF(T_OFF)) u_pg (
    .clk, .rst_n,
    .cmd     (in_cmd),
    .bound   (bound_eff),
    .state   (buf_state),
    .powered (powered),
    .ev_wake, .ev_sleep, .ev_abort, .ev_keep_last
  );

  for (genvar p = 0; p < NPHYS; p++) begin : g_buf
    apnea_vc_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .powered  (powered[p]),
      .wr_en    (in_valid && map_ok && map_phys == PH_W'(p)),
      .wr_flit  (in_flit),
      .rd_en    (buf_pop[p]),
      .rd_valid (buf_valid[p]),
      .rd_flit  (buf_flit[p]),
      .empty    (empty[p])
    );
  end

  always_comb begin
    credit_out = '0;
    for (int unsigned p = 0; p < NPHYS; p++)
      if (buf_pop[p] && buf_valid[p]) credit_out[phys_vc[p]] = 1'b1;
    ev_bind = map_new;
  end

  // A buffer is only put to sleep when empty.
  for (genvar p = 0; p < NPHYS; p++) begin : g_chk
    a_sleep_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                    (buf_state[p] == PG_ON && powered[p] && ev_sleep &&
                                     !bound_eff[p] && !empty[p]) |-> 1'b0)
      else $error("unbound buffer holds flits");
  end
endmodule
