// tb_apnea_channels: end-to-end test of both gated channels at default parameters.
//
// The NIC channel gets messages of 1 or 3 flits on all three VNETs; the
// router channel gets packets from five sources. Traffic alternates between
// bursts, quiet periods and moderate load, so buffers wake, fill, drain and
// sleep many times. The downstream router is modelled by popping each
// non-empty buffer with some probability.
//
// Every flit carries {source, length, packet number, flit index}. Checks:
// each popped flit continues the packet last read from the same buffer (no
// mixing, no loss, no reordering inside a packet, head/tail flags right);
// every packet sent is received once (count and checksum per source); the
// latency of a first, lonely packet is 5 cycles (BW, VA, SA, output register,
// link). Mechanisms counted and required: local first-VC wake-up, wake
// command, aborted wake-up, sleep, ignored last-buffer sleep, VA stall,
// non-atomic VC reuse and late binding.
module tb_apnea_channels;
  import apnea_pkg::*;

  localparam int unsigned NSRC = 5;
  localparam int unsigned NS_ALL = NSRC + VNETS;  // router sources, then NIC VNETs

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              msg_valid [VNETS];
  logic [3:0]        msg_len   [VNETS];
  logic [FLIT_W-1:0] msg_data  [VNETS];
  logic              msg_ready [VNETS];
  logic              src_valid  [NSRC];
  flit_t             src_flit   [NSRC];
  cnt_t              src_queued [NSRC];
  logic              src_ready  [NSRC];
  logic              buf_valid [2][NVC];
  flit_t             buf_flit  [2][NVC];
  logic              buf_pop   [2][NVC];
  pg_state_e         buf_state [2][NVC];
  logic [NVC-1:0]    up_vc_on [2];
  logic ev_va_stall [2], ev_local_on [2], ev_navca;
  logic ev_wake [2], ev_sleep [2], ev_abort [2], ev_keep_last [2], ev_bind [2];

  tb_chan_pair dut (.*);

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  function automatic logic [FLIT_W-1:0] mkdata(int unsigned s, int unsigned len,
                                               int unsigned id, int unsigned seq);
    return {4'(s), 4'(len), 16'(id), 8'(seq)};
  endfunction

  // ------------------------------------------------------------ traffic mode
  int unsigned rate;       // injection probability in 1/1000 per cycle
  int unsigned pop_rate;   // pop probability in 1/100
  bit          lone_mode;  // directed latency measurement

  // -------------------------------------------------- router packet sources
  bit          r_busy [NSRC];
  int unsigned r_len [NSRC], r_id [NSRC], r_seq [NSRC], r_vnet [NSRC];
  int unsigned sent_pkts [NS_ALL], recv_pkts [NS_ALL];
  longint unsigned sent_sum [NS_ALL], recv_sum [NS_ALL];

  always_comb
    for (int s = 0; s < NSRC; s++) begin
      src_valid[s]       = r_busy[s];
      src_flit[s].head   = (r_seq[s] == 0);
      src_flit[s].tail   = (r_seq[s] + 1 == r_len[s]);
      src_flit[s].vnet   = vnet_t'(r_vnet[s]);
      src_flit[s].vc     = '0;
      src_flit[s].data   = mkdata(s, r_len[s], r_id[s], r_seq[s]);
      src_queued[s]      = '0;
    end

  int unsigned lone_start;
  bit          lone_go;

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < NSRC; s++) begin
        r_busy[s] <= 0; r_len[s] <= 1; r_id[s] <= 0; r_seq[s] <= 0; r_vnet[s] <= 0;
      end
    end else begin
      for (int s = 0; s < NSRC; s++) begin
        if (r_busy[s] && src_ready[s]) begin
          if (r_seq[s] + 1 == r_len[s]) begin
            r_busy[s] <= 0; r_seq[s] <= 0;
            sent_pkts[s]++; sent_sum[s] += r_id[s];
          end else r_seq[s] <= r_seq[s] + 1;
        end else if (!r_busy[s] &&
                     ((lone_mode && lone_go && s == 0) ||
                      (!lone_mode && ($urandom % 1000) < rate))) begin
          r_busy[s] <= 1;
          r_vnet[s] <= lone_mode ? 1 : $urandom % VNETS;
          r_len[s]  <= lone_mode ? 1 : (($urandom % 3 == 2) ? 3 : 1);
          r_id[s]   <= r_id[s] + 1;
          r_seq[s]  <= 0;
        end
      end
    end
  end

  // ------------------------------------------------------------ NIC messages
  int unsigned n_id [VNETS];
  always_comb
    for (int n = 0; n < VNETS; n++) begin
      msg_len[n]  = (n == 2) ? 4'd3 : 4'd1;   // one data VNET with 3-flit packets
      msg_data[n] = mkdata(NSRC + n, msg_len[n], n_id[n], 0);
    end
  always @(posedge clk) begin
    for (int n = 0; n < VNETS; n++) begin
      if (!rst_n) begin
        msg_valid[n] <= 0; n_id[n] <= 1;
      end else begin
        if (msg_valid[n] && msg_ready[n]) begin
          sent_pkts[NSRC+n]++; sent_sum[NSRC+n] += n_id[n];
          n_id[n] <= n_id[n] + 1;
          msg_valid[n] <= 0;
        end else if (!msg_valid[n] && !lone_mode && ($urandom % 1000) < rate)
          msg_valid[n] <= 1;
      end
    end
  end

  // --------------------------------------------------- downstream buffer pops
  flit_t last [2][NVC];
  always_comb
    for (int i = 0; i < 2; i++)
      for (int p = 0; p < NVC; p++)
        buf_pop[i][p] = buf_valid[i][p] && popdice[i][p];
  logic popdice [2][NVC];
  always @(negedge clk)
    for (int i = 0; i < 2; i++)
      for (int p = 0; p < NVC; p++)
        popdice[i][p] = ($urandom % 100) < pop_rate;

  int lone_lat = -1;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 2; i++)
      for (int p = 0; p < NVC; p++)
        if (buf_pop[i][p]) begin
          flit_t f;
          int unsigned s, len, id, seq;
          f = buf_flit[i][p];
          s = f.data[31:28]; len = f.data[27:24]; id = f.data[23:8]; seq = f.data[7:0];
          check(s < NS_ALL && ((i == 0) == (s >= NSRC)), "flit on the wrong port");
          check(f.head == (seq == 0) && f.tail == (seq + 1 == len), "head/tail flags");
          if (!f.head)
            check(f.data == last[i][p].data + 1 && f.vc == last[i][p].vc && !last[i][p].tail,
                  $sformatf("packet continuity in port %0d buffer %0d", i, p));
          last[i][p] <= f;
          if (f.tail && s < NS_ALL) begin
            recv_pkts[s]++; recv_sum[s] += id;
          end
          if (lone_mode && lone_lat < 0) lone_lat = int'(cycle - lone_start);
        end
  end

  // -------------------------------------------------------- mechanism counts
  int n_local_on, n_wake, n_abort, n_sleep, n_keep_last, n_stall, n_navca, n_bind, n_remap;
  longint unsigned st_cycles [4];
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 2; i++) begin
      n_local_on  += int'(ev_local_on[i]);
      n_wake      += int'(ev_wake[i]);
      n_abort     += int'(ev_abort[i]);
      n_sleep     += int'(ev_sleep[i]);
      n_keep_last += int'(ev_keep_last[i]);
      n_stall     += int'(ev_va_stall[i]);
      n_bind      += int'(ev_bind[i]);
      for (int p = 0; p < NVC; p++) st_cycles[buf_state[i][p]]++;
    end
    n_navca += int'(ev_navca);
  end

  // ----------------------------------------------------------------- phases
  task automatic run(int unsigned cycles, int unsigned r, int unsigned pr);
    rate = r; pop_rate = pr;
    repeat (cycles) @(posedge clk);
  endtask

  task automatic drain();
    rate = 0; pop_rate = 100;
    repeat (300) @(posedge clk);
  endtask

  initial begin
    for (int s = 0; s < NS_ALL; s++) begin
      sent_pkts[s] = 0; recv_pkts[s] = 0; sent_sum[s] = 0; recv_sum[s] = 0;
    end
    rate = 0; pop_rate = 100; lone_mode = 1; lone_go = 0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    // directed: one lonely packet after a long idle period
    repeat (50) @(posedge clk);
    check(up_vc_on[1] == '0, "all upstream VCs off after idle");
    check(buf_state[1][0] == PG_ON && buf_state[1][1] == PG_OFF, "one buffer kept on");
    lone_go = 1; lone_start = cycle + 1;
    @(posedge clk); lone_go = 0;
    repeat (30) @(posedge clk);
    check(lone_lat == 5, $sformatf("lonely packet latency %0d, expected 5", lone_lat));
    lone_mode = 0;
    // random phases: bursts, quiet, moderate, with slow and fast drains
    for (int k = 0; k < 6; k++) begin
      run(1500, 400, 60);
      run(600, 0, 100);
      run(1500, 120, 30);
      run(400, 700, 15);
      run(600, 20, 100);
    end
    drain();
    for (int s = 0; s < NS_ALL; s++) begin
      check(sent_pkts[s] > 0 && sent_pkts[s] == recv_pkts[s] && sent_sum[s] == recv_sum[s],
            $sformatf("source %0d sent %0d received %0d", s, sent_pkts[s], recv_pkts[s]));
    end
    check(up_vc_on[0] == '0 && up_vc_on[1] == '0, "all VCs gated after drain");
    $display("mechanisms: local_on=%0d wake=%0d abort=%0d sleep=%0d keep_last=%0d va_stall=%0d navca=%0d bind=%0d",
             n_local_on, n_wake, n_abort, n_sleep, n_keep_last, n_stall, n_navca, n_bind);
    $display("buffer-cycles: OFF=%0d OFF->ON=%0d ON=%0d ON->OFF=%0d",
             st_cycles[PG_OFF], st_cycles[PG_OFF_TO_ON], st_cycles[PG_ON], st_cycles[PG_ON_TO_OFF]);
    check(n_local_on  > 0, "local first-VC wake-up never happened");
    check(n_wake      > 0, "buffer wake-up never happened");
    check(n_abort     > 0, "aborted wake-up never happened");
    check(n_sleep     > 0, "buffer sleep never happened");
    check(n_keep_last > 0, "last-buffer keep never happened");
    check(n_stall     > 0, "VA stall never happened");
    check(n_navca     > 0, "NAVCA reuse never happened");
    check(n_bind      > 0, "late binding never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
