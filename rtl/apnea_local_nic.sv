// apnea_local_nic: local (per VNET) decision of a network interface (NIC).
//
// A NIC has no BW stage: its incoming traffic is the messages waiting in the
// VNET's queue (r_va) and its active traffic the packets holding a VC and
// competing for the link (r_sa). With a usable (idle) VC the decision is
// DOWN when r_va < r_sa, or when the NIC holds no traffic at all for the
// VNET. With no usable VC it is UP when r_va >= r_sa and there is some
// traffic. Otherwise KEEP. This is the document's NIC rule; combinational.
module apnea_local_nic
  import apnea_pkg::*;
(
  input  cnt_t      r_va,      // messages waiting in the queue
  input  cnt_t      r_sa,      // packets ready for link allocation
  input  cnt_t      w_usable,  // idle VCs
  output decision_e dec
);
  logic no_traffic;

  always_comb begin
    no_traffic = (r_va == '0) && (r_sa == '0);
    if (w_usable != '0)
      dec = ((r_va < r_sa) || no_traffic) ? DEC_DOWN : DEC_KEEP;
    else
      dec = ((r_va >= r_sa) && !no_traffic) ? DEC_UP : DEC_KEEP;
  end
endmodule
