// tb_apnea_global_decision: random local decisions and VC states against a
// reference of the global rule (UP first, lowest VNET and lowest off VC; else
// DOWN on the lowest VNET that has an idle VC, its highest idle VC).
module tb_apnea_global_decision;
  import apnea_pkg::*;
  decision_e      dec [VNETS];
  logic [NVC-1:0] vc_off, vc_idle_on;
  decision_e      gdec;
  vc_t            target;
  int checks = 0, failures = 0;

  apnea_global_decision dut (.*);

  task automatic reference(output decision_e g, output int t);
    g = DEC_KEEP; t = -1;
    for (int n = 0; n < VNETS && t < 0; n++)
      if (dec[n] == DEC_UP)
        for (int k = 0; k < VCS_PER_VNET && t < 0; k++)
          if (vc_off[n*VCS_PER_VNET+k]) begin g = DEC_UP; t = n*VCS_PER_VNET+k; end
    if (t >= 0) return;
    for (int n = 0; n < VNETS; n++) if (dec[n] == DEC_UP) return;
    for (int n = 0; n < VNETS && t < 0; n++)
      if (dec[n] == DEC_DOWN)
        for (int k = VCS_PER_VNET - 1; k >= 0 && t < 0; k--)
          if (vc_idle_on[n*VCS_PER_VNET+k]) begin g = DEC_DOWN; t = n*VCS_PER_VNET+k; end
  endtask

  initial begin
    int n_up = 0, n_down = 0;
    for (int it = 0; it < 20000; it++) begin
      decision_e g; int t;
      for (int n = 0; n < VNETS; n++) dec[n] = decision_e'($urandom % 3);
      vc_off = NVC'($urandom);
      vc_idle_on = NVC'($urandom) & ~vc_off;
      #1;
      reference(g, t);
      checks++;
      if (gdec != g || (t >= 0 && target != vc_t'(t))) begin
        failures++;
        if (failures < 10) $display("FAIL got %s/%0d expected %s/%0d", gdec.name(), target, g.name(), t);
      end
      n_up += int'(g == DEC_UP); n_down += int'(g == DEC_DOWN);
    end
    checks++; if (n_up == 0 || n_down == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
