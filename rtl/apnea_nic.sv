// apnea_nic: network interface with an APNEA upstream controller.
//
// Each VNET has a queue of QDEPTH messages (a length in flits and a 32-bit
// payload word). The message at the head of a queue is cut into flits: flit i
// carries payload + i, the first is marked head and the last tail (a 1-flit
// message is head and tail). The per-VNET flit streams feed an apnea_outport
// in NIC mode, which allocates output VCs, arbitrates the link (LA) and runs
// the NIC variant of the power-gating policy: the messages waiting behind the
// head of a queue count as incoming traffic.
//
// Simplification of this design: a VNET sends one message at a time, so a
// VNET holds at most one output VC at a time; the queue depth and message
// format are not given by the document.
module apnea_nic
  import apnea_pkg::*;
#(
  parameter int unsigned QDEPTH    = 4,
  parameter int unsigned LEN_W     = 4,
  parameter int unsigned BUF_DEPTH = 4,
  parameter int unsigned T_ON      = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  // message injection from the node
  input  logic             msg_valid [VNETS],
  input  logic [LEN_W-1:0] msg_len   [VNETS],   // flits, >= 1
  input  logic [FLIT_W-1:0] msg_data [VNETS],
  output logic             msg_ready [VNETS],
  // link to the router
  output logic             out_valid,
  output flit_t            out_flit,
  output pg_cmd_t          out_cmd,
  input  logic [NVC-1:0]   credit_in,
  // status
  output logic [NVC-1:0]   vc_on,
  output logic             ev_va_stall,
  output logic             ev_local_on
);
  localparam int unsigned QP_W = (QDEPTH > 1) ? $clog2(QDEPTH) : 1;
  localparam int unsigned QC_W = $clog2(QDEPTH + 1);

  logic [LEN_W-1:0]  q_len  [VNETS][QDEPTH];
  logic [FLIT_W-1:0] q_data [VNETS][QDEPTH];
  logic [QP_W-1:0]   q_wr [VNETS], q_rd [VNETS];
  logic [QC_W-1:0]   q_cnt [VNETS];
  logic [LEN_W-1:0]  seq [VNETS];

  logic  src_valid  [VNETS];
  flit_t src_flit   [VNETS];
  cnt_t  src_queued [VNETS];
  logic  src_ready  [VNETS];
  logic  ev_navca_unused;
  logic  sa_ok      [VNETS];
  logic  sa_req     [VNETS];

  // the NIC's link allocation has no crossbar input to share
  always_comb for (int unsigned n = 0; n < VNETS; n++) sa_ok[n] = 1'b1;

  always_comb begin
    for (int unsigned n = 0; n < VNETS; n++) begin
      logic [LEN_W-1:0] len;
      len = q_len[n][q_rd[n]];
      msg_ready[n]       = (q_cnt[n] != QC_W'(QDEPTH));
      src_valid[n]       = (q_cnt[n] != '0);
      src_flit[n].head   = (seq[n] == '0);
      src_flit[n].tail   = (seq[n] + 1'b1 >= len);
      src_flit[n].vnet   = vnet_t'(n);
      src_flit[n].vc     = '0;
      src_flit[n].data   = q_data[n][q_rd[n]] + FLIT_W'(seq[n]);
      src_queued[n]      = (q_cnt[n] > 1) ? cnt_t'(q_cnt[n] - 1'b1) : '0;
    end
  end

  always_ff @(posedge clk) begin
    for (int unsigned n = 0; n < VNETS; n++) begin
      if (!rst_n) begin
        q_wr[n] <= '0; q_rd[n] <= '0; q_cnt[n] <= '0; seq[n] <= '0;
      end else begin
        logic push, pop;
        push = msg_valid[n] && msg_ready[n];
        pop  = src_ready[n] && src_flit[n].tail;
        if (push) begin
          q_len[n][q_wr[n]]  <= msg_len[n];
          q_data[n][q_wr[n]] <= msg_data[n];
          q_wr[n] <= (q_wr[n] == QP_W'(QDEPTH - 1)) ? '0 : q_wr[n] + 1'b1;
        end
        if (pop) begin
          q_rd[n] <= (q_rd[n] == QP_W'(QDEPTH - 1)) ? '0 : q_rd[n] + 1'b1;
          seq[n]  <= '0;
        end else if (src_ready[n]) begin
          seq[n]  <= seq[n] + 1'b1;
        end
        q_cnt[n] <= q_cnt[n] + QC_W'(push) - QC_W'(pop);
      end
    end
  end

  apnea_outport #(.NSRC(VNETS), .IS_NIC(1'b1), .BUF_DEPTH(BUF_DEPTH), .T_ON(T_ON)) u_out (
    .clk, .rst_n,
    .src_valid, .src_flit, .src_queued, .src_ready,
    .src_sa_ok (sa_ok), .src_sa_req (sa_req),
    .out_valid, .out_flit, .out_cmd, .credit_in,
    .vc_on, .ev_va_stall, .ev_navca(ev_navca_unused), .ev_local_on
  );
endmodule
