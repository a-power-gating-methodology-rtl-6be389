// tb_apnea_noc: end-to-end test of the whole mesh, on a 3x3 mesh (the
// same tiles as the 8x8 default; a smaller mesh keeps the build short).
//
// 1. Lone messages in an idle network: each must be readable at its
//    destination exactly 6 + 5 * (routers on the path) cycles after it is
//    offered (NIC: queue write, wake decision, VA, link allocation, then a
//    link cycle and a buffer write; each router: BW/RC, VA, SA, ST, then a
//    link cycle and a buffer write at the next hop).
// 2. Random traffic in phases (bursts, quiet, low load): every tile sends
//    messages to random destinations, 1-flit messages on VNETs 0 and 1 and
//    3-flit messages on VNET 2. The ejection side reads every buffer, with
//    random stalls. Checked: each flit arrives at the tile its head names,
//    flits of a message arrive in order in one buffer with the payload
//    sequence, and every message sent arrives exactly once (count and sum).
// 3. Every mechanism must have happened at least once over the run:
//    local wake-up without a command, commanded wake-up, sleep, aborted
//    wake-up, ignored sleep of the last buffer, late binding, VA stall,
//    NAVCA reuse, crossbar input conflict, NIC VA stall, NIC local wake-up,
//    ejection-buffer wake-up.
module tb_apnea_noc;
  import apnea_pkg::*;
  localparam int unsigned MX = 3, MY = 3, NODES = MX * MY, LEN_W = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic              msg_valid [NODES][VNETS];
  logic [LEN_W-1:0]  msg_len   [NODES][VNETS];
  logic [FLIT_W-1:0] msg_data  [NODES][VNETS];
  logic              msg_ready [NODES][VNETS];
  logic              ej_valid  [NODES][NVC];
  flit_t             ej_flit   [NODES][NVC];
  logic              ej_pop    [NODES][NVC];
  pg_state_e         rt_state  [NODES][NPORT][NVC];
  pg_state_e         ej_state  [NODES][NVC];
  logic [NPORT-1:0]  ev_va_stall [NODES], ev_navca [NODES], ev_local_on [NODES];
  logic [NPORT-1:0]  ev_wake [NODES], ev_sleep [NODES], ev_abort [NODES];
  logic [NPORT-1:0]  ev_keep_last [NODES], ev_bind [NODES], ev_xb_conflict [NODES];
  logic              ev_nic_va_stall [NODES], ev_nic_local_on [NODES], ev_ej_wake [NODES];

  apnea_noc #(.MESH_X(MX), .MESH_Y(MY)) dut (.*);

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

  // payload: [3:0] dest x, [7:4] dest y, [13:8] source tile, [31:14] sequence
  function automatic logic [FLIT_W-1:0] mk_data(int unsigned dst, int unsigned src, int unsigned seq);
    return {18'(seq), 6'(src), 4'(dst / MX), 4'(dst % MX)};
  endfunction

  // ---------------------------------------------------------------- driver
  int unsigned rate = 0;           // per tile and VNET, in 1/1000 per cycle
  bit          rand_on = 1'b0;
  int unsigned seq = 1;
  longint unsigned n_sent = 0, sum_sent = 0;

  // accepted messages are counted at the clock edge that takes them
  always @(posedge clk) if (rst_n)
    for (int n = 0; n < NODES; n++)
      for (int v = 0; v < VNETS; v++)
        if (msg_valid[n][v] && msg_ready[n][v]) begin
          n_sent++;
          sum_sent += msg_data[n][v];
        end

  always @(negedge clk) begin
    if (rand_on) begin
      for (int n = 0; n < NODES; n++)
        for (int v = 0; v < VNETS; v++) begin
          msg_valid[n][v] = ($urandom_range(999) < rate);
          msg_len[n][v]   = (v == 2) ? LEN_W'(3) : LEN_W'(1);
          msg_data[n][v]  = mk_data($urandom_range(NODES - 1), n, seq);
          seq++;
        end
    end
  end

  // -------------------------------------------------------------- receiver
  bit              pop_rand = 1'b0;
  logic [FLIT_W-1:0] base  [NODES][NVC];
  int unsigned     idx   [NODES][NVC];
  vnet_t           bvnet [NODES][NVC];
  longint unsigned n_recv = 0, sum_recv = 0;
  longint unsigned first_seen [NODES];

  always_comb
    for (int n = 0; n < NODES; n++)
      for (int b = 0; b < NVC; b++)
        ej_pop[n][b] = ej_valid[n][b] && !(pop_rand && (((cyc + n * 7 + b) % 5) == 0));

  initial for (int n = 0; n < NODES; n++) begin
    first_seen[n] = 0;
    for (int b = 0; b < NVC; b++) begin base[n][b] = '0; idx[n][b] = 0; bvnet[n][b] = '0; end
  end

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++)
      for (int b = 0; b < NVC; b++)
        if (ej_pop[n][b]) begin
          flit_t f;
          f = ej_flit[n][b];
          if (first_seen[n] == 0) first_seen[n] = cyc;
          if (f.head) begin
            expect_ok(idx[n][b] == 0, $sformatf("tile %0d buf %0d: head inside a message", n, b));
            expect_ok(int'(f.data[3:0]) == n % MX && int'(f.data[7:4]) == n / MX,
                      $sformatf("tile %0d got a flit for %0d,%0d", n, f.data[3:0], f.data[7:4]));
            base[n][b] = f.data; bvnet[n][b] = f.vnet; idx[n][b] = 0;
            n_recv++; sum_recv += f.data;
          end else begin
            expect_ok(idx[n][b] != 0, $sformatf("tile %0d buf %0d: body without head", n, b));
            expect_ok(f.data == base[n][b] + FLIT_W'(idx[n][b]) && f.vnet == bvnet[n][b],
                      $sformatf("tile %0d buf %0d: payload out of order", n, b));
          end
          expect_ok(f.tail == (idx[n][b] == ((f.vnet == 2) ? 2 : 0)),
                    $sformatf("tile %0d buf %0d: wrong message length", n, b));
          idx[n][b] = f.tail ? 0 : idx[n][b] + 1;
        end
  end

  // ---------------------------------------------------------- event counts
  longint unsigned c_va = 0, c_navca = 0, c_lon = 0, c_wake = 0, c_sleep = 0;
  longint unsigned c_abort = 0, c_keep = 0, c_bind = 0, c_xb = 0;
  longint unsigned c_nva = 0, c_nlon = 0, c_ejw = 0;
  longint unsigned st_cyc [4] = '{0, 0, 0, 0};

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NODES; n++) begin
      c_va += $countones(ev_va_stall[n]);  c_navca += $countones(ev_navca[n]);
      c_lon += $countones(ev_local_on[n]); c_wake += $countones(ev_wake[n]);
      c_sleep += $countones(ev_sleep[n]);  c_abort += $countones(ev_abort[n]);
      c_keep += $countones(ev_keep_last[n]); c_bind += $countones(ev_bind[n]);
      c_xb += $countones(ev_xb_conflict[n]);
      c_nva += ev_nic_va_stall[n]; c_nlon += ev_nic_local_on[n]; c_ejw += ev_ej_wake[n];
      for (int p = 0; p < NPORT; p++)
        for (int b = 0; b < NVC; b++) st_cyc[rt_state[n][p][b]]++;
    end
  end

  // ------------------------------------------------------------- sequence
  task automatic lone(int unsigned src, int unsigned dst);
    longint unsigned t0, t1;
    int unsigned routers, v;
    v = 0;
    routers = 1 + ((src % MX > dst % MX) ? src % MX - dst % MX : dst % MX - src % MX)
                + ((src / MX > dst / MX) ? src / MX - dst / MX : dst / MX - src / MX);
    @(negedge clk);
    msg_valid[src][v] = 1'b1; msg_len[src][v] = LEN_W'(1);
    msg_data[src][v] = mk_data(dst, src, seq); seq++;
    t0 = cyc;
    @(negedge clk);
    msg_valid[src][v] = 1'b0;
    t1 = 0;
    for (int i = 0; i < 200 && t1 == 0; i++) begin
      @(negedge clk);
      for (int b = 0; b < NVC; b++) if (ej_valid[dst][b] && t1 == 0) t1 = cyc;
    end
    expect_ok(t1 - t0 == longint'(6 + 5 * routers),
              $sformatf("lone %0d->%0d took %0d cycles, expected %0d", src, dst, t1 - t0, 6 + 5 * routers));
    repeat (100) @(negedge clk);
  endtask

  initial begin
    for (int n = 0; n < NODES; n++)
      for (int v = 0; v < VNETS; v++) begin
        msg_valid[n][v] = 1'b0; msg_len[n][v] = '0; msg_data[n][v] = '0;
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    lone(0, NODES - 1);
    lone(NODES - 1, 0);
    lone(4, 4);
    lone(1, 6);
    rand_on = 1'b1;
    pop_rand = 1'b1;
    for (int ph = 0; ph < 6; ph++) begin
      rate = (ph % 3 == 0) ? 120 : (ph % 3 == 1) ? 0 : 15;
      repeat (1500) @(negedge clk);
    end
    rate = 0;
    repeat (2) @(negedge clk);
    rand_on = 1'b0;
    for (int n = 0; n < NODES; n++) for (int v = 0; v < VNETS; v++) msg_valid[n][v] = 1'b0;
    pop_rand = 1'b0;
    repeat (1500) @(negedge clk);
    expect_ok(n_recv == n_sent && sum_recv == sum_sent,
              $sformatf("sent %0d messages, received %0d", n_sent, n_recv));
    expect_ok(c_lon > 0,   "no local wake-up");
    expect_ok(c_wake > 0,  "no commanded wake-up");
    expect_ok(c_sleep > 0, "no sleep");
    expect_ok(c_abort > 0, "no aborted wake-up");
    expect_ok(c_keep > 0,  "no ignored last sleep");
    expect_ok(c_bind > 0,  "no binding");
    expect_ok(c_va > 0,    "no VA stall");
    expect_ok(c_navca > 0, "no NAVCA reuse");
    expect_ok(c_xb > 0,    "no crossbar conflict");
    expect_ok(c_nva > 0,   "no NIC VA stall");
    expect_ok(c_nlon > 0,  "no NIC local wake-up");
    expect_ok(c_ejw > 0,   "no ejection-buffer wake-up");
    $display("messages %0d; events: local_on %0d wake %0d sleep %0d abort %0d keep_last %0d bind %0d",
             n_recv, c_lon, c_wake, c_sleep, c_abort, c_keep, c_bind);
    $display("  va_stall %0d navca %0d xb_conflict %0d nic_va_stall %0d nic_local_on %0d ej_wake %0d",
             c_va, c_navca, c_xb, c_nva, c_nlon, c_ejw);
    $display("router buffer-cycles: OFF %0d OFF->ON %0d ON %0d ON->OFF %0d",
             st_cyc[0], st_cyc[1], st_cyc[2], st_cyc[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
