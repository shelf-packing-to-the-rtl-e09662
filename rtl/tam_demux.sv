// tam_demux: outer-level DeMUX of the external TAM input.
//
// The W_EXT external wires (WPI) are handed to one group of virtual cores at a
// time: grp_bus[g] carries WPI when the group number sel_d equals g and en is
// high, and is all zero otherwise, so idle groups see constant inputs. Inside
// a group each core takes its own slice of the bus (the inner level).
// Combinational. Zeroing the unselected outputs is this design's choice.
module tam_demux #(
  parameter int unsigned W_EXT    = tgmf_pkg::W_EXT,
  parameter int unsigned N_GROUPS = tgmf_pkg::N_GROUPS,
  localparam int unsigned GW = (N_GROUPS > 1) ? $clog2(N_GROUPS) : 1
) (
  input  logic             en,
  input  logic [GW-1:0]    sel_d,
  input  logic [W_EXT-1:0] wpi,
  output logic [W_EXT-1:0] grp_bus [N_GROUPS]
);
  always_comb begin
    for (int g = 0; g < N_GROUPS; g++)
      grp_bus[g] = (en && sel_d == GW'(g)) ? wpi : '0;
  end
endmodule
