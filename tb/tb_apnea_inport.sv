// tb_apnea_inport: directed test of one gated input port: late binding into
// the always-on buffer, a wake-up and its timing, credits returned to the
// right VC, release of a binding and sleep of a free buffer.
module tb_apnea_inport;
  import apnea_pkg::*;
  localparam int unsigned NPHYS = NVC, T_ON = 2, T_OFF = 1;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  flit_t in_flit = '0;
  pg_cmd_t in_cmd = '{action: ACT_NONE, vc: '0};
  logic [NVC-1:0] credit_out;
  logic buf_valid [NPHYS]; flit_t buf_flit [NPHYS];
  logic buf_pop [NPHYS]; pg_state_e buf_state [NPHYS];
  logic ev_wake, ev_sleep, ev_abort, ev_keep_last, ev_bind;
  int checks = 0, failures = 0;

  apnea_inport #(.NPHYS(NPHYS), .BUF_DEPTH(4), .T_ON(T_ON), .T_OFF(T_OFF)) dut (.*);
  always #5 clk = ~clk;

  task automatic expect_ok(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic flit_t mk(int vc, bit h, bit t, int d);
    flit_t f; f = '0; f.vc = vc_t'(vc); f.head = h; f.tail = t; f.data = FLIT_W'(d); return f;
  endfunction

  task automatic send(flit_t f, pg_cmd_t c, bit v = 1);
    @(negedge clk); in_valid = v; in_flit = f; in_cmd = c;
    @(negedge clk); in_valid = 0; in_cmd = '{action: ACT_NONE, vc: '0};
  endtask

  initial begin
    for (int p = 0; p < NPHYS; p++) buf_pop[p] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(negedge clk);
    expect_ok(buf_state[0] == PG_ON && buf_state[1] == PG_OFF, "reset: buffer 0 on, rest off");
    // a 2-flit packet on VC 3 binds to buffer 0, and ACT_ON arrives with its head
    send(mk(3, 1, 0, 'h31), '{action: ACT_ON, vc: 3'd4});
    expect_ok(buf_valid[0] && buf_flit[0].data == 'h31, "head in buffer 0");
    expect_ok(buf_state[1] == PG_OFF_TO_ON, "buffer 1 waking");
    send(mk(3, 0, 1, 'h32), '{action: ACT_NONE, vc: '0});
    expect_ok(buf_state[1] == PG_ON, "buffer 1 on after T_ON");
    // VC 4 now binds to buffer 1 (lowest ON unbound)
    send(mk(4, 1, 1, 'h41), '{action: ACT_NONE, vc: '0});
    expect_ok(buf_valid[1] && buf_flit[1].data == 'h41, "VC 4 in buffer 1");
    // NAVCA: new packet on VC 3 goes behind the old one in buffer 0
    send(mk(3, 1, 1, 'h33), '{action: ACT_NONE, vc: '0});
    // drain buffer 0, credits to VC 3
    for (int k = 0; k < 3; k++) begin
      @(negedge clk); buf_pop[0] = 1; #1;
      expect_ok(credit_out == NVC'(1 << 3), "credit to VC 3");
      expect_ok(buf_flit[0].data == 'h31 + k, "buffer 0 order");
      @(negedge clk); buf_pop[0] = 0;
    end
    @(negedge clk); buf_pop[1] = 1; #1;
    expect_ok(credit_out == NVC'(1 << 4), "credit to VC 4");
    @(negedge clk); buf_pop[1] = 0;
    // VC 3 released: buffer 0 unbound; the off takes the lowest free ON buffer
    send('0, '{action: ACT_OFF, vc: 3'd3}, 0);
    expect_ok(buf_state[0] == PG_ON_TO_OFF && buf_state[1] == PG_ON, "buffer 0 sleeping");
    @(negedge clk);
    expect_ok(buf_state[0] == PG_OFF, "buffer 0 off after T_OFF");
    // last live buffer is kept even when its VC is released
    send('0, '{action: ACT_OFF, vc: 3'd4}, 0);
    expect_ok(buf_state[1] == PG_ON, "last buffer kept on");
    // VC 0 now binds to buffer 1 (VC 4's binding was released)
    send(mk(0, 1, 1, 'h01), '{action: ACT_NONE, vc: '0});
    expect_ok(buf_valid[1] && buf_flit[1].data == 'h01, "VC 0 rebinds to buffer 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
