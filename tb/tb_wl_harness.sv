// tb_wl_harness: traffic harness around one tb_chan_pair for workload runs.
//
// Drives both channels with packets whose VNET is random: in mode 0 every
// packet is 1 flit, in mode 1 VNETs 0 and 1 carry 1-flit packets and VNET 2
// 3-flit packets. `rate` is the per-source injection probability in 1/1000
// per cycle; the downstream router reads every non-empty buffer each cycle.
// It checks packet integrity and counts, per run: packets, summed latency
// (head offered to tail read), buffer-cycles per power state and failures.
// `clear` restarts the statistics.
module tb_wl_harness
  import apnea_pkg::*;
#(
  parameter int unsigned T_ON      = 2,
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  int unsigned rate,
  input  bit          mode,
  output longint unsigned n_pkts,
  output longint unsigned lat_sum,
  output longint unsigned st_cyc [4],
  output int unsigned     n_fail,
  output int unsigned     n_pend
);
  localparam int unsigned NSRC = 5;
  localparam int unsigned NS_ALL = NSRC + VNETS;

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

  tb_chan_pair #(.T_ON(T_ON), .BUF_DEPTH(BUF_DEPTH)) dut (.*);

  int unsigned cyc;
  always @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  // start cycle of the packet offered by each source (one at a time per source)
  int unsigned t0 [NS_ALL];
  int unsigned pend [NS_ALL];

  function automatic int unsigned plen(int unsigned vn);
    return (mode && vn == 2) ? 3 : 1;
  endfunction

  // router sources
  bit          r_busy [NSRC];
  int unsigned r_len [NSRC], r_seq [NSRC], r_vnet [NSRC], r_id [NSRC];
  always_comb
    for (int s = 0; s < NSRC; s++) begin
      src_valid[s]     = r_busy[s];
      src_flit[s]      = '0;
      src_flit[s].head = (r_seq[s] == 0);
      src_flit[s].tail = (r_seq[s] + 1 == r_len[s]);
      src_flit[s].vnet = vnet_t'(r_vnet[s]);
      src_flit[s].data = {4'(s), 4'(r_len[s]), 16'(r_id[s]), 8'(r_seq[s])};
      src_queued[s]    = '0;
    end
  always @(posedge clk)
    if (!rst_n) begin
      for (int s = 0; s < NSRC; s++) begin r_busy[s] <= 0; r_seq[s] <= 0; r_len[s] <= 1; r_vnet[s] <= 0; r_id[s] <= 0; end
    end else
      for (int s = 0; s < NSRC; s++) begin
        if (r_busy[s] && src_ready[s]) begin
          if (r_seq[s] + 1 == r_len[s]) begin r_busy[s] <= 0; r_seq[s] <= 0; end
          else r_seq[s] <= r_seq[s] + 1;
        end else if (!r_busy[s] && ($urandom % 1000) < rate && pend[s] == 0) begin
          int unsigned vn;
          vn = $urandom % VNETS;
          r_busy[s] <= 1; r_vnet[s] <= vn; r_len[s] <= plen(vn); r_seq[s] <= 0;
          r_id[s] <= r_id[s] + 1;
          t0[s] = cyc + 1; pend[s]++;
        end
      end

  // NIC messages (one outstanding per VNET for latency accounting)
  int unsigned n_id [VNETS];
  always_comb
    for (int n = 0; n < VNETS; n++) begin
      msg_len[n]  = 4'(plen(n));
      msg_data[n] = {4'(NSRC + n), 4'(plen(n)), 16'(n_id[n]), 8'd0};
    end
  always @(posedge clk)
    for (int n = 0; n < VNETS; n++)
      if (!rst_n) begin msg_valid[n] <= 0; n_id[n] <= 0; end
      else if (msg_valid[n] && msg_ready[n]) begin msg_valid[n] <= 0; n_id[n] <= n_id[n] + 1; end
      else if (!msg_valid[n] && pend[NSRC+n] == 0 && ($urandom % 1000) < rate) begin
        msg_valid[n] <= 1; t0[NSRC+n] = cyc + 1; pend[NSRC+n]++;
      end

  // downstream reads and statistics
  flit_t last [2][NVC];
  always_comb
    for (int i = 0; i < 2; i++)
      for (int p = 0; p < NVC; p++) buf_pop[i][p] = buf_valid[i][p];

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < NS_ALL; s++) begin pend[s] = 0; t0[s] = 0; end
    end
    if (clear || !rst_n) begin
      n_pkts = 0; lat_sum = 0; n_fail = 0;
      for (int k = 0; k < 4; k++) st_cyc[k] = 0;
    end else begin
      for (int i = 0; i < 2; i++)
        for (int p = 0; p < NVC; p++) begin
          st_cyc[buf_state[i][p]] = st_cyc[buf_state[i][p]] + 1;
          if (buf_pop[i][p]) begin
            flit_t f;
            int unsigned s, len, seq;
            f = buf_flit[i][p];
            s = f.data[31:28]; len = f.data[27:24]; seq = f.data[7:0];
            if (f.head != (seq == 0) || f.tail != (seq + 1 == len) ||
                (!f.head && f.data != last[i][p].data + 1) || s >= NS_ALL) n_fail = n_fail + 1;
            last[i][p] <= f;
            if (f.tail && s < NS_ALL) begin
              n_pkts  = n_pkts + 1;
              lat_sum = lat_sum + longint'(cyc - t0[s]);
              pend[s]--;
            end
          end
        end
    end
  end
  always_comb begin
    n_pend = 0;
    for (int s = 0; s < NS_ALL; s++) n_pend += pend[s];
  end
endmodule
