// tb_apnea_remapper: random arrivals, releases and power masks against a
// reference remapping table (lowest ON unbound buffer, binding kept until
// released).
module tb_apnea_remapper;
  import apnea_pkg::*;
  localparam int unsigned NPHYS = 6;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, unbind = 0;
  vc_t in_vc = '0, unbind_vc = '0;
  logic [NPHYS-1:0] powered = '0, bound_eff;
  logic map_ok, map_new;
  logic [2:0] map_phys;
  vc_t phys_vc [NPHYS];
  int checks = 0, failures = 0;

  apnea_remapper #(.NPHYS(NPHYS)) dut (.*);
  always #5 clk = ~clk;

  int m_map [NVC];      // -1: unbound
  int m_owner [NPHYS];  // -1: free

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("FAIL %s", s);
  endtask

  initial begin
    int n_new = 0, n_reuse = 0;
    for (int v = 0; v < NVC; v++) m_map[v] = -1;
    for (int p = 0; p < NPHYS; p++) m_owner[p] = -1;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int it = 0; it < 20000; it++) begin
      int exp_p;
      logic [NPHYS-1:0] exp_bound;
      @(negedge clk);
      // powered: every bound buffer stays on, others random
      powered = NPHYS'($urandom);
      for (int p = 0; p < NPHYS; p++) if (m_owner[p] >= 0) powered[p] = 1'b1;
      in_valid = $urandom % 2;
      in_vc = vc_t'($urandom % NVC);
      unbind = ($urandom % 4) == 0;
      unbind_vc = vc_t'($urandom % NVC);
      if (in_valid && unbind && unbind_vc == in_vc) unbind = 0;
      // reference
      exp_p = m_map[in_vc];
      if (exp_p < 0)
        for (int p = NPHYS - 1; p >= 0; p--) if (powered[p] && m_owner[p] < 0) exp_p = p;
      if (in_valid && exp_p < 0) in_valid = 0;   // keep to feasible arrivals
      #1;
      exp_bound = '0;
      for (int p = 0; p < NPHYS; p++) exp_bound[p] = (m_owner[p] >= 0);
      if (unbind && m_map[unbind_vc] >= 0) exp_bound[m_map[unbind_vc]] = 1'b0;
      if (in_valid && m_map[in_vc] < 0) exp_bound[exp_p] = 1'b1;
      checks++;
      if (in_valid && (!map_ok || int'(map_phys) != exp_p || map_new != (m_map[in_vc] < 0)))
        fail($sformatf("it %0d vc %0d mapped to %0d expected %0d", it, in_vc, map_phys, exp_p));
      checks++;
      if (bound_eff != exp_bound) fail($sformatf("bound mask %b expected %b", bound_eff, exp_bound));
      for (int p = 0; p < NPHYS; p++)
        if (m_owner[p] >= 0) begin
          checks++;
          if (phys_vc[p] != vc_t'(m_owner[p])) fail("reverse map");
        end
      @(posedge clk);
      if (unbind && m_map[unbind_vc] >= 0) begin
        m_owner[m_map[unbind_vc]] = -1; m_map[unbind_vc] = -1;
      end
      if (in_valid) begin
        if (m_map[in_vc] < 0) n_new++; else n_reuse++;
        m_map[in_vc] = exp_p; m_owner[exp_p] = in_vc;
      end
    end
    checks++; if (n_new == 0 || n_reuse == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
