// apnea_pg_actuator: power-gating controller of the physical buffers of one
// input port.
//
// Each buffer has a state OFF, OFF_TO_ON (waking, T_ON cycles), ON or
// ON_TO_OFF (going to sleep, T_OFF cycles). Buffer 0 is ON after reset: one
// buffer per port is never gated. A command seen on `cmd` in cycle x changes
// the state register at the end of x, so a woken buffer is usable from
// cycle x+1+T_ON.
//   ACT_ON : the lowest-numbered OFF buffer starts waking (document's rule).
//            If every other buffer is still going to sleep (T_OFF not over),
//            the lowest-numbered sleeping one is woken instead; this case is
//            not covered by the document.
//   ACT_OFF: the lowest-numbered waking buffer is sent to sleep (its wake-up
//            is abandoned); failing that, the lowest-numbered ON buffer that
//            holds no binding (`bound`). The document picks "the lowest ON
//            buffer"; restricting it to unbound (hence empty) buffers is this
//            design's reading. If only one buffer is ON or waking the command
//            is ignored: the upstream sends the off of its last VC only so
//            the binding is released.
// `bound` must already exclude a binding released and include one created in
// the same cycle. Event pulses count wake-ups, sleeps, aborted wake-ups and
// ignored offs.
module apnea_pg_actuator
  import apnea_pkg::*;
#(
  parameter int unsigned NPHYS = 6,
  parameter int unsigned T_ON  = 2,
  parameter int unsigned T_OFF = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  pg_cmd_t          cmd,
  input  logic [NPHYS-1:0] bound,
  output pg_state_e        state   [NPHYS],
  output logic [NPHYS-1:0] powered,
  output logic             ev_wake,
  output logic             ev_sleep,
  output logic             ev_abort,
  output logic             ev_keep_last
);
  localparam int unsigned TMAX = (T_ON > T_OFF) ? T_ON : T_OFF;
  localparam int unsigned TC_W = $clog2(TMAX + 2);

  logic [TC_W-1:0] tcnt [NPHYS];
  logic            on_found, off_found, off_abort;
  int unsigned     on_sel, off_sel, n_live;

  always_comb begin
    on_found = 1'b0; on_sel = 0;
    off_found = 1'b0; off_abort = 1'b0; off_sel = 0;
    n_live = 0;
    for (int unsigned p = 0; p < NPHYS; p++) begin
      powered[p] = (state[p] == PG_ON);
      if (state[p] == PG_ON || state[p] == PG_OFF_TO_ON) n_live = n_live + 1;
      if (!on_found && state[p] == PG_OFF) begin
        on_found = 1'b1; on_sel = p;
      end
      if (!off_found && state[p] == PG_OFF_TO_ON) begin
        off_found = 1'b1; off_abort = 1'b1; off_sel = p;
      end
    end
    for (int unsigned p = 0; p < NPHYS; p++) begin
      if (!on_found && state[p] == PG_ON_TO_OFF) begin
        on_found = 1'b1; on_sel = p;
      end
      if (!off_found && state[p] == PG_ON && !bound[p]) begin
        off_found = 1'b1; off_sel = p;
      end
    end
    ev_wake      = (cmd.action == ACT_ON) && on_found;
    ev_keep_last = (cmd.action == ACT_OFF) && (n_live <= 1);
    ev_sleep     = (cmd.action == ACT_OFF) && (n_live > 1) && off_found;
    ev_abort     = ev_sleep && off_abort;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned p = 0; p < NPHYS; p++) begin
        state[p] <= (p == 0) ? PG_ON : PG_OFF;
        tcnt[p]  <= '0;
      end
    end else begin
      for (int unsigned p = 0; p < NPHYS; p++) begin
        if (ev_wake && on_sel == p) begin
          state[p] <= (T_ON == 0) ? PG_ON : PG_OFF_TO_ON;
          tcnt[p]  <= TC_W'(T_ON);
        end else if (ev_sleep && off_sel == p) begin
          state[p] <= (T_OFF == 0) ? PG_OFF : PG_ON_TO_OFF;
          tcnt[p]  <= TC_W'(T_OFF);
        end else if (state[p] == PG_OFF_TO_ON || state[p] == PG_ON_TO_OFF) begin
          if (tcnt[p] <= TC_W'(1))
            state[p] <= (state[p] == PG_OFF_TO_ON) ? PG_ON : PG_OFF;
          tcnt[p] <= tcnt[p] - 1'b1;
        end
      end
    end
  end

  // The policy never asks for more buffers than exist or for an impossible off.
  a_on_feasible: assert property (@(posedge clk) disable iff (!rst_n)
                                  (cmd.action == ACT_ON) |-> on_found)
    else $error("power-on request with no buffer off");
  a_off_feasible: assert property (@(posedge clk) disable iff (!rst_n)
                                   (cmd.action == ACT_OFF && n_live > 1) |-> off_found)
    else $error("power-off request with no free buffer");
endmodule
