// tb_apnea_outport: upstream router output port with a modelled downstream.
//
// Directed: a lonely packet leaves 3 cycles after it appears (BW, VA, SA)
// without any command (the first VC is switched on locally); three
// simultaneous packets of one VNET show the flow-balance wake-up (ACT_ON on
// the second VC of the VNET one cycle after the first flit goes), non-atomic
// reuse of the first VC, and the third packet leaving on the woken VC exactly
// T_ON+1 cycles after the command. Random: five sources, credits returned by
// a randomly draining downstream. Checks: per-source flit order, VC within
// the flit's VNET and powered, never more than BUF_DEPTH flits outstanding,
// no flit on a VC earlier than T_ON+1 cycles after its ACT_ON, commands
// consistent with the power view, everything delivered, all VCs off at the
// end.
module tb_apnea_outport;
  import apnea_pkg::*;
  localparam int unsigned NSRC = 5, DEPTH = 4, T_ON = 2;
  logic clk = 0, rst_n = 0;
  logic src_valid [NSRC]; flit_t src_flit [NSRC]; cnt_t src_queued [NSRC]; logic src_ready [NSRC];
  logic src_sa_ok [NSRC] = '{default: 1'b1}; logic src_sa_req [NSRC];
  logic out_valid; flit_t out_flit; pg_cmd_t out_cmd;
  logic [NVC-1:0] credit_in, vc_on;
  logic ev_va_stall, ev_navca, ev_local_on;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  apnea_outport #(.NSRC(NSRC), .IS_NIC(1'b0), .BUF_DEPTH(DEPTH), .T_ON(T_ON)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic expect_ok(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL @%0d %s", cyc, s); end
  endtask

  // ------------------------------------------------------------ sources
  bit          busy [NSRC];
  int unsigned len [NSRC], seq [NSRC], vnet [NSRC], nflit [NSRC];
  int unsigned rate = 0;
  always_comb
    for (int s = 0; s < NSRC; s++) begin
      src_valid[s] = busy[s];
      src_flit[s] = '0;
      src_flit[s].head = (seq[s] == 0);
      src_flit[s].tail = (seq[s] + 1 == len[s]);
      src_flit[s].vnet = vnet_t'(vnet[s]);
      src_flit[s].data = {4'(s), 28'(nflit[s])};
      src_queued[s] = '0;
    end
  task automatic start(int s, int v, int l);
    busy[s] = 1; vnet[s] = v; len[s] = l; seq[s] = 0;
  endtask
  always @(posedge clk) if (rst_n)
    for (int s = 0; s < NSRC; s++) begin
      if (busy[s] && src_ready[s]) begin
        nflit[s] <= nflit[s] + 1;
        if (seq[s] + 1 == len[s]) begin busy[s] <= 0; seq[s] <= 0; end
        else seq[s] <= seq[s] + 1;
      end else if (!busy[s] && ($urandom % 1000) < rate) begin
        busy[s] <= 1; vnet[s] <= $urandom % VNETS; len[s] <= 1 + $urandom % 3; seq[s] <= 0;
      end
    end

  // ------------------------------------------------- downstream model
  int unsigned outst [NVC];
  int unsigned pop_rate = 100;
  int unsigned exp_flit [NSRC];
  int          on_cmd_cyc [NVC];
  bit          first_after_on [NVC];
  int n_on_cmd = 0, n_off_cmd = 0, n_stall = 0, n_navca = 0, n_local = 0;
  int last_on_cmd = -1, first_vc1_flit = -1;

  always @(negedge clk) begin
    for (int v = 0; v < NVC; v++)
      credit_in[v] = (outst[v] != 0) && (($urandom % 100) < pop_rate);
  end

  always @(posedge clk) if (rst_n) begin
    for (int v = 0; v < NVC; v++) if (credit_in[v]) outst[v]--;
    n_stall += int'(ev_va_stall); n_navca += int'(ev_navca); n_local += int'(ev_local_on);
    if (out_cmd.action == ACT_ON) begin
      n_on_cmd++; last_on_cmd = int'(cyc);
      on_cmd_cyc[out_cmd.vc] = int'(cyc); first_after_on[out_cmd.vc] = 1;
      expect_ok(vc_on[out_cmd.vc], "ACT_ON target is on in the upstream view");
    end
    if (out_cmd.action == ACT_OFF) begin
      n_off_cmd++;
      expect_ok(!vc_on[out_cmd.vc] && outst[out_cmd.vc] == 0, "ACT_OFF target is off and drained");
    end
    if (out_valid) begin
      int s;
      s = out_flit.data[31:28];
      expect_ok(out_flit.data[27:0] == 28'(exp_flit[s]), $sformatf("source %0d flit order", s));
      exp_flit[s]++;
      expect_ok(int'(out_flit.vc) / VCS_PER_VNET == int'(out_flit.vnet), "VC in the flit's VNET");
      expect_ok(vc_on[out_flit.vc], "flit on a powered VC");
      outst[out_flit.vc]++;
      expect_ok(outst[out_flit.vc] <= DEPTH, "credit overflow");
      if (first_after_on[out_flit.vc]) begin
        expect_ok(int'(cyc) - on_cmd_cyc[out_flit.vc] >= T_ON + 1, "flit before the buffer is awake");
        first_after_on[out_flit.vc] = 0;
      end
      if (out_flit.vc == 1 && first_vc1_flit < 0) first_vc1_flit = int'(cyc);
    end
  end

  int n0;
  initial begin
    for (int s = 0; s < NSRC; s++) begin busy[s] = 0; len[s] = 1; seq[s] = 0; vnet[s] = 0; nflit[s] = 0; exp_flit[s] = 0; end
    for (int v = 0; v < NVC; v++) begin outst[v] = 0; first_after_on[v] = 0; on_cmd_cyc[v] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    // directed 1: a lonely packet
    @(negedge clk); start(0, 1, 1); n0 = int'(cyc);
    while (!out_valid) @(negedge clk);
    expect_ok(int'(cyc) - n0 == 3, $sformatf("lonely packet took %0d cycles, expected 3", int'(cyc) - n0));
    expect_ok(n_on_cmd == 0 && n_local == 1, "first VC switched on locally");
    busy[0] = 0;
    repeat (20) @(negedge clk);
    expect_ok(vc_on == '0 && n_off_cmd == 1, "idle VC switched off");
    // directed 2: three packets of VNET 0 at once
    @(negedge clk); start(1, 0, 1); start(2, 0, 1); start(3, 0, 1); n0 = int'(cyc);
    repeat (12) @(negedge clk);
    expect_ok(n_on_cmd == 1 && last_on_cmd - n0 == 3, $sformatf("ACT_ON at +%0d, expected +3", last_on_cmd - n0));
    expect_ok(first_vc1_flit - last_on_cmd == T_ON + 1,
              $sformatf("woken VC used %0d cycles after ACT_ON", first_vc1_flit - last_on_cmd));
    expect_ok(n_navca >= 1, "NAVCA reuse of VC 0");
    // random
    for (int ph = 0; ph < 8; ph++) begin
      rate = (ph % 2) ? 600 : 80; pop_rate = (ph % 3 == 0) ? 20 : 90;
      repeat (2000) @(negedge clk);
    end
    rate = 0; pop_rate = 100;
    repeat (200) @(negedge clk);
    for (int s = 0; s < NSRC; s++) expect_ok(exp_flit[s] == nflit[s] && !busy[s], "all flits sent");
    expect_ok(vc_on == '0, "all VCs off after traffic");
    expect_ok(n_stall > 0 && n_on_cmd > 10 && n_off_cmd > 10, "stalls and commands seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
