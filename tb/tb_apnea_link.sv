// tb_apnea_link: random traffic through a 1-cycle and a 3-cycle link; every
// value must come out exactly LATENCY cycles later, in both directions.
module tb_apnea_link;
  import apnea_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic up_valid = 0; flit_t up_flit = '0; pg_cmd_t up_cmd = '{action: ACT_NONE, vc: '0};
  logic [NVC-1:0] dn_credit = '0;
  logic [NVC-1:0] up_credit1, up_credit3;
  logic dn_valid1, dn_valid3; flit_t dn_flit1, dn_flit3; pg_cmd_t dn_cmd1, dn_cmd3;

  apnea_link #(.LATENCY(1)) u1 (.clk, .rst_n, .up_valid, .up_flit, .up_cmd, .up_credit(up_credit1),
                                .dn_valid(dn_valid1), .dn_flit(dn_flit1), .dn_cmd(dn_cmd1), .dn_credit);
  apnea_link #(.LATENCY(3)) u3 (.clk, .rst_n, .up_valid, .up_flit, .up_cmd, .up_credit(up_credit3),
                                .dn_valid(dn_valid3), .dn_flit(dn_flit3), .dn_cmd(dn_cmd3), .dn_credit);

  typedef struct packed { logic v; flit_t f; pg_cmd_t c; logic [NVC-1:0] k; } beat_t;
  beat_t hist [$];

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      up_valid = $urandom % 2; up_flit = flit_t'({$urandom, $urandom});
      up_cmd = '{action: action_e'($urandom % 3), vc: vc_t'($urandom % NVC)};
      dn_credit = NVC'($urandom);
      hist.push_front('{v: up_valid, f: up_flit, c: up_cmd, k: dn_credit});
      @(posedge clk); #1;
      if (hist.size() > 3) begin
        checks += 2;
        if (dn_valid1 != hist[0].v || (dn_valid1 && dn_flit1 != hist[0].f) || dn_cmd1 != hist[0].c ||
            up_credit1 != hist[0].k) failures++;
        if (dn_valid3 != hist[2].v || (dn_valid3 && dn_flit3 != hist[2].f) || dn_cmd3 != hist[2].c ||
            up_credit3 != hist[2].k) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
