// clock_division: derives the TAM rate and the trial shift rates from the PLL clock.
//
// Everything in the wrapper runs on the PLL clock; derived clocks are carried
// as one-cycle enable strobes. ft_en is high one PLL cycle in every T_DIV and
// marks one TAM (tester) cycle f_t. A frame counter counts TAM cycles and
// fs_en[k] is high on the TAM strobe that ends a frame of 2^k TAM cycles, i.e.
// a shift clock at f_t / 2^k (k = 0 is f_t itself). sync restarts the frame so
// that the next TAM strobe is position 0 of every frame; the TAM strobe itself
// keeps its phase so the tester never sees a jump. Deriving clocks as enables
// is this design's choice; the document only names a clock-division block.
module clock_division #(
  parameter int unsigned T_DIV   = tgmf_pkg::T_DIV,
  parameter int unsigned N_RATES = tgmf_pkg::N_RATES
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sync,
  output logic               ft_en,
  output logic [N_RATES-1:0] fs_en
);
  localparam int unsigned TW = tgmf_pkg::cnt_w(T_DIV - 1);
  localparam int unsigned FW = (N_RATES > 1) ? N_RATES - 1 : 1;

  logic [TW-1:0] tcnt;
  logic [FW-1:0] frame;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tcnt <= '0;
    else if (tcnt == TW'(T_DIV - 1)) tcnt <= '0;
    else tcnt <= tcnt + 1'b1;
  end

  assign ft_en = (tcnt == TW'(T_DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) frame <= '0;
    else if (sync) frame <= '0;
    else if (ft_en) frame <= frame + 1'b1;
  end

  always_comb begin
    for (int k = 0; k < N_RATES; k++) begin
      logic all_ones;
      all_ones = 1'b1;
      for (int b = 0; b < k; b++) all_ones &= frame[b];
      fs_en[k] = ft_en && !sync && all_ones;
    end
  end
endmodule
