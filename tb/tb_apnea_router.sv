// tb_apnea_router: one router at mesh position (1,1) with gated channels on
// all five sides.
//
// Each input link is fed by a network interface and a link register, so
// every input channel runs the full power-gating protocol; each output link
// ends in a gated input port whose buffers are read every cycle (with random
// stalls in the random phase). Destinations are drawn from a 3x3 mesh, so
// all five outputs are used. Checked:
//   - a lone message is readable behind the router 11 cycles after it is
//     offered (NIC 6 cycles to the router's buffer, router 5 cycles);
//   - every head leaves through the output XY routing selects at (1,1);
//   - the flits of a message stay together, in order, in one buffer;
//   - every message offered arrives once (count and sum);
//   - crossbar conflicts, VA stalls, NAVCA reuse, bindings and commanded
//     wake-ups all happen.
module tb_apnea_router;
  import apnea_pkg::*;
  localparam int unsigned LEN_W = 4;

  logic clk = 1'b0, rst_n = 1'b0;

  // upstream NICs, one per router input
  logic              msg_valid [NPORT][VNETS];
  logic [LEN_W-1:0]  msg_len   [NPORT][VNETS];
  logic [FLIT_W-1:0] msg_data  [NPORT][VNETS];
  logic              msg_ready [NPORT][VNETS];
  logic              u_valid [NPORT]; flit_t u_flit [NPORT]; pg_cmd_t u_cmd [NPORT];
  logic [NVC-1:0]    u_cred [NPORT];
  logic [NVC-1:0]    u_vc_on [NPORT];
  logic              u_va_stall [NPORT], u_local_on [NPORT];

  // router
  logic              in_valid [NPORT]; flit_t in_flit [NPORT]; pg_cmd_t in_cmd [NPORT];
  logic [NVC-1:0]    credit_out [NPORT];
  logic              out_valid [NPORT]; flit_t out_flit [NPORT]; pg_cmd_t out_cmd [NPORT];
  logic [NVC-1:0]    credit_in [NPORT];
  pg_state_e         buf_state [NPORT][NVC];
  logic [NVC-1:0]    vc_on [NPORT];
  logic [NPORT-1:0]  ev_va_stall, ev_navca, ev_local_on, ev_wake, ev_sleep, ev_abort;
  logic [NPORT-1:0]  ev_keep_last, ev_bind, ev_xb_conflict;

  // downstream input ports
  logic              d_valid [NPORT]; flit_t d_flit [NPORT]; pg_cmd_t d_cmd [NPORT];
  logic [NVC-1:0]    d_cred [NPORT];
  logic              ej_valid [NPORT][NVC]; flit_t ej_flit [NPORT][NVC];
  logic              ej_pop [NPORT][NVC];
  pg_state_e         ej_state [NPORT][NVC];
  logic [NPORT-1:0]  d_wake, d_sleep, d_abort, d_keep, d_bind;

  for (genvar p = 0; p < NPORT; p++) begin : g_env
    apnea_nic u_src (
      .clk, .rst_n,
      .msg_valid (msg_valid[p]), .msg_len (msg_len[p]), .msg_data (msg_data[p]),
      .msg_ready (msg_ready[p]),
      .out_valid (u_valid[p]), .out_flit (u_flit[p]), .out_cmd (u_cmd[p]),
      .credit_in (u_cred[p]), .vc_on (u_vc_on[p]),
      .ev_va_stall (u_va_stall[p]), .ev_local_on (u_local_on[p])
    );
    apnea_link u_lin (
      .clk, .rst_n,
      .up_valid (u_valid[p]), .up_flit (u_flit[p]), .up_cmd (u_cmd[p]), .up_credit (u_cred[p]),
      .dn_valid (in_valid[p]), .dn_flit (in_flit[p]), .dn_cmd (in_cmd[p]),
      .dn_credit (credit_out[p])
    );
    apnea_link u_lout (
      .clk, .rst_n,
      .up_valid (out_valid[p]), .up_flit (out_flit[p]), .up_cmd (out_cmd[p]),
      .up_credit (credit_in[p]),
      .dn_valid (d_valid[p]), .dn_flit (d_flit[p]), .dn_cmd (d_cmd[p]), .dn_credit (d_cred[p])
    );
    apnea_inport u_dn (
      .clk, .rst_n,
      .in_valid (d_valid[p]), .in_flit (d_flit[p]), .in_cmd (d_cmd[p]), .credit_out (d_cred[p]),
      .buf_valid (ej_valid[p]), .buf_flit (ej_flit[p]), .buf_pop (ej_pop[p]),
      .buf_state (ej_state[p]),
      .ev_wake (d_wake[p]), .ev_sleep (d_sleep[p]), .ev_abort (d_abort[p]),
      .ev_keep_last (d_keep[p]), .ev_bind (d_bind[p])
    );
  end

  apnea_router dut (
    .clk, .rst_n, .my_x (COORD_W'(1)), .my_y (COORD_W'(1)),
    .in_valid, .in_flit, .in_cmd, .credit_out,
    .out_valid, .out_flit, .out_cmd, .credit_in,
    .buf_state, .vc_on,
    .ev_va_stall, .ev_navca, .ev_local_on, .ev_wake, .ev_sleep, .ev_abort,
    .ev_keep_last, .ev_bind, .ev_xb_conflict
  );

  always #5 clk = ~clk;

  int unsigned checks = 0, failures = 0;
  longint unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic expect_ok(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // payload: [3:0] dest x, [7:4] dest y, [13:8] source port, [31:14] sequence
  function automatic logic [FLIT_W-1:0] mk_data(int unsigned dx, int unsigned dy, int unsigned src,
                                                int unsigned seq);
    return {18'(seq), 6'(src), 4'(dy), 4'(dx)};
  endfunction

  // XY reference at (1,1), written independently of the router's function
  function automatic int unsigned ref_port(logic [FLIT_W-1:0] d);
    if (d[3:0] == 4'd2) return 2;
    if (d[3:0] == 4'd0) return 4;
    if (d[7:4] == 4'd2) return 3;
    if (d[7:4] == 4'd0) return 1;
    return 0;
  endfunction

  // ---------------------------------------------------------------- driver
  int unsigned rate = 0;
  bit          rand_on = 1'b0, pop_rand = 1'b0;
  int unsigned seq = 1;
  longint unsigned n_sent = 0, sum_sent = 0, n_recv = 0, sum_recv = 0;

  always @(posedge clk) if (rst_n)
    for (int p = 0; p < NPORT; p++)
      for (int v = 0; v < VNETS; v++)
        if (msg_valid[p][v] && msg_ready[p][v]) begin
          n_sent++; sum_sent += msg_data[p][v];
        end

  always @(negedge clk) if (rand_on)
    for (int p = 0; p < NPORT; p++)
      for (int v = 0; v < VNETS; v++) begin
        msg_valid[p][v] = ($urandom_range(999) < rate);
        msg_len[p][v]   = (v == 2) ? LEN_W'(3) : LEN_W'(1);
        msg_data[p][v]  = mk_data($urandom_range(2), $urandom_range(2), p, seq);
        seq++;
      end

  // -------------------------------------------------------------- receiver
  logic [FLIT_W-1:0] base [NPORT][NVC];
  int unsigned       idx  [NPORT][NVC];

  always_comb
    for (int p = 0; p < NPORT; p++)
      for (int b = 0; b < NVC; b++)
        ej_pop[p][b] = ej_valid[p][b] && !(pop_rand && (((cyc + p * 3 + b) % 4) == 0));

  initial for (int p = 0; p < NPORT; p++) for (int b = 0; b < NVC; b++) begin
    base[p][b] = '0; idx[p][b] = 0;
  end

  always @(posedge clk) if (rst_n)
    for (int p = 0; p < NPORT; p++)
      for (int b = 0; b < NVC; b++)
        if (ej_pop[p][b]) begin
          flit_t f;
          f = ej_flit[p][b];
          if (f.head) begin
            expect_ok(idx[p][b] == 0, "head inside a message");
            expect_ok(ref_port(f.data) == p,
                      $sformatf("head for %0d,%0d left through port %0d", f.data[3:0], f.data[7:4], p));
            base[p][b] = f.data; idx[p][b] = 0;
            n_recv++; sum_recv += f.data;
          end else begin
            expect_ok(idx[p][b] != 0 && f.data == base[p][b] + FLIT_W'(idx[p][b]),
                      "body flit out of order");
          end
          expect_ok(f.tail == (idx[p][b] == ((f.vnet == 2) ? 2 : 0)), "wrong message length");
          idx[p][b] = f.tail ? 0 : idx[p][b] + 1;
        end

  longint unsigned c_xb = 0, c_va = 0, c_navca = 0, c_bind = 0, c_wake = 0, c_dwake = 0;
  always @(posedge clk) if (rst_n) begin
    c_xb += $countones(ev_xb_conflict); c_va += $countones(ev_va_stall);
    c_navca += $countones(ev_navca); c_bind += $countones(ev_bind);
    c_wake += $countones(ev_wake); c_dwake += $countones(d_wake);
  end

  // ------------------------------------------------------------- sequence
  task automatic lone(int unsigned src, int unsigned dx, int unsigned dy);
    longint unsigned t0, t1;
    int unsigned o;
    o = ref_port(mk_data(dx, dy, 0, 0));
    @(negedge clk);
    msg_valid[src][0] = 1'b1; msg_len[src][0] = LEN_W'(1);
    msg_data[src][0] = mk_data(dx, dy, src, seq); seq++;
    t0 = cyc;
    @(negedge clk);
    msg_valid[src][0] = 1'b0;
    t1 = 0;
    for (int i = 0; i < 100 && t1 == 0; i++) begin
      @(negedge clk);
      for (int b = 0; b < NVC; b++) if (ej_valid[o][b] && t1 == 0) t1 = cyc;
    end
    expect_ok(t1 - t0 == 11, $sformatf("lone message %0d -> port %0d took %0d cycles", src, o, t1 - t0));
    repeat (30) @(negedge clk);
  endtask

  initial begin
    for (int p = 0; p < NPORT; p++)
      for (int v = 0; v < VNETS; v++) begin
        msg_valid[p][v] = 1'b0; msg_len[p][v] = '0; msg_data[p][v] = '0;
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    lone(0, 2, 1);
    lone(2, 0, 1);
    lone(4, 1, 0);
    lone(1, 1, 2);
    lone(3, 1, 1);
    rand_on = 1'b1; pop_rand = 1'b1;
    for (int ph = 0; ph < 6; ph++) begin
      rate = (ph % 3 == 0) ? 250 : (ph % 3 == 1) ? 0 : 30;
      repeat (2000) @(negedge clk);
    end
    rand_on = 1'b0;
    for (int p = 0; p < NPORT; p++) for (int v = 0; v < VNETS; v++) msg_valid[p][v] = 1'b0;
    pop_rand = 1'b0;
    repeat (500) @(negedge clk);
    expect_ok(n_recv == n_sent && sum_recv == sum_sent,
              $sformatf("sent %0d messages, received %0d", n_sent, n_recv));
    expect_ok(c_xb > 0,    "no crossbar conflict");
    expect_ok(c_va > 0,    "no VA stall");
    expect_ok(c_navca > 0, "no NAVCA reuse");
    expect_ok(c_bind > 0,  "no binding");
    expect_ok(c_wake > 0,  "no wake-up in the router's input buffers");
    expect_ok(c_dwake > 0, "no wake-up commanded by the router");
    $display("messages %0d; xb_conflict %0d va_stall %0d navca %0d bind %0d wake %0d/%0d",
             n_recv, c_xb, c_va, c_navca, c_bind, c_wake, c_dwake);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
