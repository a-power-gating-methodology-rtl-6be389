// apnea_link: point-to-point link between an upstream output port and a
// downstream input port.
//
// Forward it carries one flit and one APNEA command per cycle, backward one
// credit per virtual channel per cycle. Both directions are LATENCY register
// stages deep (the document assumes a single-cycle link traversal). The
// command travels in step with the flits, so a power-off never overtakes a
// flit sent before it.
module apnea_link
  import apnea_pkg::*;
#(
  parameter int unsigned LATENCY = 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           up_valid,
  input  flit_t          up_flit,
  input  pg_cmd_t        up_cmd,
  output logic [NVC-1:0] up_credit,
  output logic           dn_valid,
  output flit_t          dn_flit,
  output pg_cmd_t        dn_cmd,
  input  logic [NVC-1:0] dn_credit
);
  logic           v_q [LATENCY+1];
  flit_t          f_q [LATENCY+1];
  pg_cmd_t        c_q [LATENCY+1];
  logic [NVC-1:0] k_q [LATENCY+1];

  always_comb begin
    v_q[0] = up_valid; f_q[0] = up_flit; c_q[0] = up_cmd; k_q[0] = dn_credit;
  end

  always_ff @(posedge clk) begin
    for (int unsigned i = 1; i <= LATENCY; i++) begin
      if (!rst_n) begin
        v_q[i] <= 1'b0; f_q[i] <= '0; c_q[i] <= '{action: ACT_NONE, vc: '0}; k_q[i] <= '0;
      end else begin
        v_q[i] <= v_q[i-1]; f_q[i] <= f_q[i-1]; c_q[i] <= c_q[i-1]; k_q[i] <= k_q[i-1];
      end
    end
  end

  assign dn_valid  = v_q[LATENCY];
  assign dn_flit   = f_q[LATENCY];
  assign dn_cmd    = c_q[LATENCY];
  assign up_credit = k_q[LATENCY];
endmodule
