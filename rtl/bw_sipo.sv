// bw_sipo: input-side bandwidth matching of one virtual core.
//
// A core with W wrapper scan chains shifted at f_t / R (R = 2^DIVLOG) takes
// E = ceil(W / R) TAM wires at the full rate f_t. Each wire is converted from
// serial to parallel: the bit that arrives in TAM cycle t (t = 0..R-1) of a
// frame feeds chain j*R + t of wire j. The last R-1 bits are held in a shift
// register that moves on every TAM strobe (ft_en); the word is complete, and
// presented combinationally on chain_si, in the TAM cycle that ends the frame,
// which is the cycle the core's shift pulse falls in. For R = 1 the wires go
// straight to the chains. Bit-to-chain order is this design's choice; the
// document gives the bandwidth-matching rule sum(w_i * f_s) <= W_TAM * f_t.
module bw_sipo #(
  parameter int unsigned W      = 5,
  parameter int unsigned DIVLOG = 3,
  localparam int unsigned R = 1 << DIVLOG,
  localparam int unsigned E = tgmf_pkg::ext_wires(W, DIVLOG)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ft_en,
  input  logic [E-1:0] tam_in,
  output logic [W-1:0] chain_si
);
  if (R == 1) begin : g_direct
    assign chain_si = tam_in;
  end else begin : g_conv
    logic [R-2:0] hold [E];
    logic [R-1:0] word [E];

    for (genvar j = 0; j < E; j++) begin : g_wire
      logic [R-2:0] nxt;
      if (R == 2) begin : g_r2
        assign nxt = tam_in[j];
      end else begin : g_rn
        assign nxt = {tam_in[j], hold[j][R-2:1]};
      end
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) hold[j] <= '0;
        else if (ft_en) hold[j] <= nxt;
      end
      assign word[j] = {tam_in[j], hold[j]};
    end

    always_comb begin
      for (int k = 0; k < W; k++) chain_si[k] = word[k / R][k % R];
    end
  end
endmodule
