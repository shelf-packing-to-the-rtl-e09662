// tam_mux: inner and outer-level MUX of the external TAM output.
//
// Inner level: the output wires of the cores of one group occupy disjoint
// slices of the W_EXT-wire group bus (VC_OFS[i], ceil(w/R) wires each); they
// are merged into that bus. Outer level: the bus of the group numbered sel_m
// drives WPO while en is high; WPO is zero otherwise. vc_out[i] must hold
// core i's wires in its low bits. Combinational. Merging by OR of disjoint
// slices is this design's choice.
module tam_mux #(
  parameter int unsigned W_EXT    = tgmf_pkg::W_EXT,
  parameter int unsigned N_GROUPS = tgmf_pkg::N_GROUPS,
  parameter int unsigned N_VC     = tgmf_pkg::N_VC,
  parameter int unsigned VC_GROUP [N_VC] = tgmf_pkg::VC_GROUP,
  parameter int unsigned VC_OFS   [N_VC] = tgmf_pkg::VC_OFS,
  parameter int unsigned VC_NW    [N_VC] = '{default: 1},
  localparam int unsigned GW = (N_GROUPS > 1) ? $clog2(N_GROUPS) : 1
) (
  input  logic             en,
  input  logic [GW-1:0]    sel_m,
  input  logic [W_EXT-1:0] vc_out [N_VC],
  output logic [W_EXT-1:0] wpo
);
  logic [W_EXT-1:0] grp_bus [N_GROUPS];

  always_comb begin
    for (int g = 0; g < N_GROUPS; g++) grp_bus[g] = '0;
    for (int i = 0; i < N_VC; i++) begin
      logic [W_EXT-1:0] mask;
      mask = W_EXT'((1 << VC_NW[i]) - 1);
      grp_bus[VC_GROUP[i]] |= (vc_out[i] & mask) << VC_OFS[i];
    end
    wpo = '0;
    for (int g = 0; g < N_GROUPS; g++)
      if (en && sel_m == GW'(g)) wpo = grp_bus[g];
  end
endmodule
