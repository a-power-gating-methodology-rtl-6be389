// tb_apnea_nic: network interface with a modelled downstream.
//
// Messages of 1 to 4 flits are queued on the three VNETs, in bursts and with
// pauses, while credits come back at random. Checks: flits of each VNET leave
// in message order with payload + index, head/tail on the first/last flit,
// one VNET never interleaves two messages, VCs stay in the VNET and powered,
// credits never overflow, queue-full backpressure, the lonely-message
// latency (3 cycles: wake-up decision, VA, LA; a NIC has no BW stage to hide the decision in), wake commands and,
// once traffic stops, every VC switched off.
module tb_apnea_nic;
  import apnea_pkg::*;
  localparam int unsigned QDEPTH = 4, DEPTH = 4, T_ON = 2;
  logic clk = 0, rst_n = 0;
  logic msg_valid [VNETS]; logic [3:0] msg_len [VNETS]; logic [FLIT_W-1:0] msg_data [VNETS];
  logic msg_ready [VNETS];
  logic out_valid; flit_t out_flit; pg_cmd_t out_cmd;
  logic [NVC-1:0] credit_in, vc_on;
  logic ev_va_stall, ev_local_on;
  int checks = 0, failures = 0;
  int unsigned cyc = 0;

  apnea_nic #(.QDEPTH(QDEPTH), .LEN_W(4), .BUF_DEPTH(DEPTH), .T_ON(T_ON)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic expect_ok(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL @%0d %s", cyc, s); end
  endtask

  typedef struct { int unsigned len; logic [FLIT_W-1:0] data; } msg_t;
  msg_t exp_q [VNETS][$];
  int unsigned exp_seq [VNETS];
  int unsigned rate = 0, pop_rate = 100, outst [NVC];
  int n_full = 0, n_on = 0, n_off = 0;

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < VNETS; n++) begin
      if (msg_valid[n] && msg_ready[n]) exp_q[n].push_back('{len: msg_len[n], data: msg_data[n]});
      if (msg_valid[n] && !msg_ready[n]) n_full++;
    end
    for (int v = 0; v < NVC; v++) if (credit_in[v]) outst[v]--;
    n_on += int'(out_cmd.action == ACT_ON); n_off += int'(out_cmd.action == ACT_OFF);
    if (out_valid) begin
      int n;
      n = out_flit.vnet;
      expect_ok(exp_q[n].size() > 0, "unexpected flit");
      if (exp_q[n].size() > 0) begin
        msg_t m;
        m = exp_q[n][0];
        expect_ok(out_flit.data == m.data + exp_seq[n], $sformatf("VNET %0d payload", n));
        expect_ok(out_flit.head == (exp_seq[n] == 0) && out_flit.tail == (exp_seq[n] + 1 == m.len), "head/tail");
        if (exp_seq[n] + 1 == m.len) begin exp_seq[n] = 0; void'(exp_q[n].pop_front()); end
        else exp_seq[n]++;
      end
      expect_ok(int'(out_flit.vc) / VCS_PER_VNET == n && vc_on[out_flit.vc], "VC of the VNET, powered");
      outst[out_flit.vc]++;
      expect_ok(outst[out_flit.vc] <= DEPTH, "credit overflow");
    end
  end

  always @(negedge clk) begin
    for (int v = 0; v < NVC; v++) credit_in[v] = (outst[v] != 0) && (($urandom % 100) < pop_rate);
  end

  bit rand_on = 0;
  always @(negedge clk) if (rst_n && rand_on)
    for (int n = 0; n < VNETS; n++)
      if (!msg_valid[n] || msg_ready[n]) begin
        msg_valid[n] = ($urandom % 1000) < rate;
        msg_len[n]   = 4'(1 + $urandom % 4);
        msg_data[n]  = {$urandom} & 32'hFFFF_FF00;
      end

  int n0;
  initial begin
    for (int n = 0; n < VNETS; n++) begin msg_valid[n] = 0; msg_len[n] = 1; msg_data[n] = '0; exp_seq[n] = 0; end
    for (int v = 0; v < NVC; v++) outst[v] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(negedge clk);
    // lonely 1-flit message on VNET 2: local wake-up decision, VA, LA
    msg_valid[2] = 1; msg_len[2] = 1; msg_data[2] = 32'hABCD_0000;
    @(negedge clk); msg_valid[2] = 0; n0 = int'(cyc);
    while (!out_valid) @(negedge clk);
    expect_ok(int'(cyc) - n0 == 3, $sformatf("lonely message took %0d cycles after queueing, expected 3", int'(cyc) - n0));
    expect_ok(out_flit.vc == 3'd4, "lowest VC of VNET 2");
    rand_on = 1;
    for (int ph = 0; ph < 8; ph++) begin
      rate = (ph % 2) ? 700 : 60; pop_rate = (ph % 3 == 0) ? 15 : 90;
      repeat (2000) @(negedge clk);
    end
    rate = 0; pop_rate = 100;
    repeat (300) @(negedge clk);
    for (int n = 0; n < VNETS; n++) expect_ok(exp_q[n].size() == 0, "all messages delivered");
    expect_ok(vc_on == '0, "all VCs off after traffic");
    expect_ok(n_full > 0 && n_on > 5 && n_off > 5, "backpressure and commands seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
