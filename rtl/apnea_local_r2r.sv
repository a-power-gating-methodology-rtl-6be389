// apnea_local_r2r: local (per VNET) decision of a router output port.
//
// Flow balance: requests in buffer write (BW) and VC allocation (VA) are the
// traffic about to need channels, requests in switch allocation (SA) the
// traffic already holding one. If some channel is usable (idle, or reusable
// in non-atomic VC allocation mode) and incoming <= active, one channel may
// go (DOWN). If none is usable and incoming > active, one more is needed
// (UP). Otherwise KEEP. This is the document's router rule; the module is
// purely combinational and is evaluated every cycle on values registered the
// cycle before.
module apnea_local_r2r
  import apnea_pkg::*;
(
  input  cnt_t      r_bw,      // requests in BW for this output port and VNET
  input  cnt_t      r_va,      // requests in VA
  input  cnt_t      r_sa,      // requests in SA
  input  cnt_t      w_usable,  // idle + NAVCA-allocatable VCs
  output decision_e dec
);
  logic [CNT_W:0] incoming;

  always_comb begin
    incoming = {1'b0, r_bw} + {1'b0, r_va};
    if (w_usable != '0)
      dec = (incoming <= {1'b0, r_sa}) ? DEC_DOWN : DEC_KEEP;
    else
      dec = (incoming >  {1'b0, r_sa}) ? DEC_UP   : DEC_KEEP;
  end
endmodule
