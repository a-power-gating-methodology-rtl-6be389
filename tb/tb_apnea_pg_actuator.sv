// tb_apnea_pg_actuator: random feasible commands against a cycle-accurate
// reference of the buffer power states (wake T_ON, sleep T_OFF, target
// choice, last buffer kept on), plus a directed timing check.
module tb_apnea_pg_actuator;
  import apnea_pkg::*;
  localparam int unsigned NPHYS = 6, T_ON = 2, T_OFF = 1;
  logic clk = 0, rst_n = 0;
  pg_cmd_t cmd = '{action: ACT_NONE, vc: '0};
  logic [NPHYS-1:0] bound = '0, powered;
  pg_state_e state [NPHYS];
  logic ev_wake, ev_sleep, ev_abort, ev_keep_last;
  int checks = 0, failures = 0;

  apnea_pg_actuator #(.NPHYS(NPHYS), .T_ON(T_ON), .T_OFF(T_OFF)) dut (.*);
  always #5 clk = ~clk;

  pg_state_e m_st [NPHYS];
  int        m_t  [NPHYS];

  task automatic compare(string tag);
    for (int p = 0; p < NPHYS; p++) begin
      checks++;
      if (state[p] != m_st[p] || powered[p] != (m_st[p] == PG_ON)) begin
        failures++;
        if (failures < 10) $display("FAIL %s buffer %0d: %s expected %s", tag, p, state[p].name(), m_st[p].name());
      end
    end
  endtask

  // reference step for one clock edge
  task automatic model_step();
    int sel, live;
    sel = -1; live = 0;
    for (int p = 0; p < NPHYS; p++) if (m_st[p] inside {PG_ON, PG_OFF_TO_ON}) live++;
    if (cmd.action == ACT_ON) begin
      for (int p = NPHYS - 1; p >= 0; p--) if (m_st[p] == PG_OFF) sel = p;
      if (sel < 0) for (int p = NPHYS - 1; p >= 0; p--) if (m_st[p] == PG_ON_TO_OFF) sel = p;
    end else if (cmd.action == ACT_OFF && live > 1) begin
      for (int p = NPHYS - 1; p >= 0; p--) if (m_st[p] == PG_OFF_TO_ON) sel = p;
      if (sel < 0) for (int p = NPHYS - 1; p >= 0; p--) if (m_st[p] == PG_ON && !bound[p]) sel = p;
    end
    for (int p = 0; p < NPHYS; p++) begin
      if (p == sel && cmd.action == ACT_ON) begin m_st[p] = PG_OFF_TO_ON; m_t[p] = T_ON; end
      else if (p == sel) begin m_st[p] = PG_ON_TO_OFF; m_t[p] = T_OFF; end
      else if (m_st[p] inside {PG_OFF_TO_ON, PG_ON_TO_OFF}) begin
        m_t[p]--;
        if (m_t[p] == 0) m_st[p] = (m_st[p] == PG_OFF_TO_ON) ? PG_ON : PG_OFF;
      end
    end
  endtask

  int n_abort = 0, n_keep = 0, n_wake = 0;
  initial begin
    for (int p = 0; p < NPHYS; p++) begin m_st[p] = (p == 0) ? PG_ON : PG_OFF; m_t[p] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk); compare("reset");
    // directed: wake one buffer, it is usable exactly T_ON cycles after the edge
    cmd = '{action: ACT_ON, vc: '0};
    @(posedge clk); model_step(); @(negedge clk); cmd.action = ACT_NONE;
    checks++; if (state[1] != PG_OFF_TO_ON) failures++;
    repeat (T_ON - 1) begin @(posedge clk); model_step(); end
    @(negedge clk); checks++; if (state[1] != PG_OFF_TO_ON) failures++;
    @(posedge clk); model_step(); @(negedge clk);
    checks++; if (state[1] != PG_ON) failures++;
    // random
    for (int it = 0; it < 20000; it++) begin
      int n_off, n_on_free, live;
      n_off = 0; live = 0;
      for (int p = 0; p < NPHYS; p++) begin
        n_off += int'(m_st[p] inside {PG_OFF, PG_ON_TO_OFF});
        live  += int'(m_st[p] inside {PG_ON, PG_OFF_TO_ON});
      end
      bound = NPHYS'($urandom);
      n_on_free = 0;
      for (int p = 0; p < NPHYS; p++) n_on_free += int'(m_st[p] == PG_ON && !bound[p]);
      if (n_on_free == 0) bound = '0;
      case ($urandom % 4)
        0: cmd.action = (n_off > 0) ? ACT_ON : ACT_NONE;
        1: cmd.action = ACT_OFF;
        default: cmd.action = ACT_NONE;
      endcase
      #1;
      n_abort += int'(ev_abort); n_keep += int'(ev_keep_last); n_wake += int'(ev_wake);
      @(posedge clk); model_step(); @(negedge clk);
      compare("random");
    end
    checks++; if (n_abort == 0 || n_keep == 0 || n_wake == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
