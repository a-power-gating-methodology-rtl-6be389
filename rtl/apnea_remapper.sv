// apnea_remapper: late binding of upstream virtual channels to physical
// buffers in a downstream input port.
//
// The upstream allocates packets on virtual channels; which physical buffer
// actually stores them is decided here, when the first flit of a VC arrives.
// A flit on an unbound VC binds that VC to the lowest-numbered physical
// buffer that is powered ON and not bound to another VC (the document's
// rule, which packs traffic into the low-numbered buffers). The binding then
// lasts, across packets, until the upstream powers that VC off (`unbind`),
// which it only does when the VC is idle and its buffer therefore empty.
// A released binding is gone from the next cycle on.
//
// Outputs: the buffer for the arriving flit (combinational), the bound-buffer
// mask the power actuator must respect (release and new binding of this
// cycle already applied) and, per buffer, the VC it serves (for credits).
module apnea_remapper
  import apnea_pkg::*;
#(
  parameter int unsigned NPHYS = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  vc_t              in_vc,
  input  logic [NPHYS-1:0] powered,
  input  logic             unbind,
  input  vc_t              unbind_vc,
  output logic             map_ok,
  output logic [$clog2(NPHYS)-1:0] map_phys,
  output logic             map_new,
  output logic [NPHYS-1:0] bound_eff,
  output vc_t              phys_vc [NPHYS]
);
  localparam int unsigned PH_W = $clog2(NPHYS);

  logic             vc_bound  [NVC];
  logic [PH_W-1:0]  vc_map    [NVC];
  logic [NPHYS-1:0] ph_bound;

  always_comb begin
    logic found;
    found    = 1'b0;
    map_phys = '0;
    map_new  = 1'b0;
    if (vc_bound[in_vc]) begin
      found    = 1'b1;
      map_phys = vc_map[in_vc];
    end else begin
      for (int unsigned p = 0; p < NPHYS; p++)
        if (!found && powered[p] && !ph_bound[p]) begin
          found    = 1'b1;
          map_phys = PH_W'(p);
          map_new  = in_valid;
        end
    end
    map_ok = found;
    bound_eff = ph_bound;
    if (unbind && vc_bound[unbind_vc]) bound_eff[vc_map[unbind_vc]] = 1'b0;
    if (map_new) bound_eff[map_phys] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned v = 0; v < NVC; v++) begin
        vc_bound[v] <= 1'b0; vc_map[v] <= '0;
      end
      ph_bound <= '0;
      for (int unsigned p = 0; p < NPHYS; p++) phys_vc[p] <= '0;
    end else begin
      if (unbind && vc_bound[unbind_vc]) begin
        vc_bound[unbind_vc]         <= 1'b0;
        ph_bound[vc_map[unbind_vc]] <= 1'b0;
      end
      if (map_new) begin
        vc_bound[in_vc]   <= 1'b1;
        vc_map[in_vc]     <= map_phys;
        ph_bound[map_phys] <= 1'b1;
        phys_vc[map_phys]  <= in_vc;
      end
    end
  end

  a_map: assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> map_ok)
    else $error("flit arrived with no powered buffer to hold it");
  a_unbind: assert property (@(posedge clk) disable iff (!rst_n)
                             (in_valid && unbind) |-> (in_vc != unbind_vc))
    else $error("flit on a VC that is being powered off");
endmodule
