// vc_model: behavioural model of one virtual core as seen by its wrapper, for
// testbenches only (the embedded core itself is not part of the wrapper).
//
// Internal scan: chain k has NB[k] flip-flops (none when NB[k] = 0), clocked
// by clk when clk_en is high. With scan_en high a segment shifts: flop 0 takes
// seg_si[k], flop i takes flop i-1, seg_so[k] is the last flop. With scan_en
// low a clock is a functional (capture) clock and every flop takes
// ~(own ^ next), next being flop (i+1) mod NB[k]; two capture clocks are thus
// distinguishable from one. Combinational logic: core_out[j] =
// core_in[j mod NIT] ^ (j mod 2). It also counts shift and capture clocks and
// the spacing, in clk cycles, of the last two capture clocks.
module vc_model #(
  parameter int unsigned W   = 2,
  parameter int unsigned NB [7] = '{default: 4},
  parameter int unsigned NIT = 1,
  parameter int unsigned NOT = 1,
  localparam int unsigned NIW = (NIT > 0) ? NIT : 1,
  localparam int unsigned NOW = (NOT > 0) ? NOT : 1
) (
  input  logic           clk,
  input  logic           clk_en,
  input  logic           scan_en,
  input  logic [W-1:0]   seg_si,
  output logic [W-1:0]   seg_so,
  input  logic [NIW-1:0] core_in,
  output logic [NOW-1:0] core_out
);
  logic [1023:0] ch [W];
  int unsigned  n_shift = 0, n_cap = 0, cap_gap = 0;
  longint unsigned cyc = 0, last_cap = 0;

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (clk_en) begin
      if (scan_en) begin
        n_shift <= n_shift + 1;
        for (int k = 0; k < W; k++) ch[k] <= {ch[k][1022:0], seg_si[k]};
      end else begin
        n_cap    <= n_cap + 1;
        cap_gap  <= int'(cyc - last_cap);
        last_cap <= cyc;
        for (int k = 0; k < W; k++)
          for (int i = 0; i < NB[k]; i++)
            ch[k][i] <= ~(ch[k][i] ^ ch[k][(i + 1) % NB[k]]);
      end
    end
  end

  always_comb begin
    for (int k = 0; k < W; k++) seg_so[k] = (NB[k] > 0) ? ch[k][NB[k] - 1] : 1'b0;
    for (int j = 0; j < NOW; j++)
      core_out[j] = ((NIT > 0) ? core_in[j % NIW] : 1'b0) ^ j[0];
  end
endmodule
