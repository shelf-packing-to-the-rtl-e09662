// wbr_cell: one wrapper boundary cell.
//
// A single flip-flop with a functional path (CFI in, CFO out) and a test path
// (CTI in, CTO out). The flop is clocked by the core's gated clock (clk with
// clk_en). With scan_en high it shifts CTI; with scan_en low an output cell
// (CAPTURES = 1) captures CFI, the core's output, while an input cell
// (CAPTURES = 0) holds the value it drives into the core. In interconnect
// mode (extest) the roles swap: an output cell holds the value it drives onto
// the wrapper pin, and an input cell captures what arrives on its pin. In
// either test mode CFO is the flop, isolating the core from its surroundings;
// otherwise CFO is CFI (functional mode). CTO is the flop. test_mode and
// extest are never high together. The three modes and the port names follow the document's
// IEEE 1500 cell; hold-versus-capture per cell type is this design's choice.
module wbr_cell #(
  parameter bit CAPTURES = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clk_en,
  input  logic scan_en,
  input  logic test_mode,
  input  logic extest,
  input  logic cfi,
  input  logic cti,
  output logic cfo,
  output logic cto
);
  logic q;
  // a cell captures on the side under test and holds on the other
  logic cap_sel;
  assign cap_sel = CAPTURES ? !extest : extest;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else if (clk_en) begin
      if (scan_en) q <= cti;
      else if (cap_sel) q <= cfi;
    end
  end

  assign cto = q;
  assign cfo = (test_mode || extest) ? q : cfi;
endmodule
