// apnea_global_decision: output-port decision and target VC selection.
//
// Merges the per-VNET decisions into one command per cycle. Turning on has
// priority: if any VNET asks UP, the lowest-numbered such VNET that still has
// a powered-off VC gets its lowest-numbered powered-off VC switched on.
// Otherwise, if a VNET asks DOWN and owns an idle, fully powered VC, the
// lowest-numbered such VNET loses its highest-numbered idle VC (the
// selection loop of the document keeps the last match, which leaves traffic
// packed in the low-numbered channels). Otherwise nothing happens.
// Purely combinational; VC v belongs to VNET v / VCS_PER_VNET.
module apnea_global_decision
  import apnea_pkg::*;
(
  input  decision_e        dec   [VNETS],
  input  logic [NVC-1:0]   vc_off,       // VC powered off (upstream view)
  input  logic [NVC-1:0]   vc_idle_on,   // VC powered, ready and idle
  output decision_e        gdec,         // global decision R_j
  output vc_t              target        // VC the decision applies to
);
  always_comb begin
    logic found, any_up;
    any_up = 1'b0;
    gdec   = DEC_KEEP;
    target = '0;
    found  = 1'b0;
    // Algorithm 3: UP wins.
    for (int unsigned n = 0; n < VNETS; n++) begin
      if (!found && dec[n] == DEC_UP) begin
        for (int unsigned k = 0; k < VCS_PER_VNET; k++) begin
          if (!found && vc_off[n*VCS_PER_VNET + k]) begin
            found  = 1'b1;
            gdec   = DEC_UP;
            target = vc_t'(n*VCS_PER_VNET + k);
          end
        end
      end
    end
    // Algorithm 4: DOWN only if no VNET asked UP.
    if (!found) begin
      for (int unsigned n = 0; n < VNETS; n++)
        if (dec[n] == DEC_UP) any_up = 1'b1;
      if (!any_up) begin
        for (int unsigned n = 0; n < VNETS; n++) begin
          if (!found && dec[n] == DEC_DOWN) begin
            for (int unsigned k = 0; k < VCS_PER_VNET; k++) begin
              if (vc_idle_on[n*VCS_PER_VNET + k]) begin
                found  = 1'b1;
                gdec   = DEC_DOWN;
                target = vc_t'(n*VCS_PER_VNET + k);
              end
            end
          end
        end
      end
    end
  end
endmodule
