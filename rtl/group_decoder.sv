// group_decoder: turns the number of the group under test into one-hot group
// gating signals.
//
// The capture FSM presents the active group as a binary number (the decoder's
// D inputs); the decoder raises exactly one of G[0..N_GROUPS-1] while en is
// high and none otherwise. The same binary number drives the DeMUX/MUX selects
// (sel_d / sel_m). Purely combinational. The binary encoding of D is this
// design's choice.
module group_decoder #(
  parameter int unsigned N_GROUPS = tgmf_pkg::N_GROUPS,
  localparam int unsigned GW = (N_GROUPS > 1) ? $clog2(N_GROUPS) : 1
) (
  input  logic                en,
  input  logic [GW-1:0]       d,
  output logic [N_GROUPS-1:0] g
);
  always_comb begin
    g = '0;
    for (int i = 0; i < N_GROUPS; i++)
      if (en && d == GW'(i)) g[i] = 1'b1;
  end

  always_comb assert (!$isunknown(d) && $onehot0(g));
endmodule
