// vc_wsc: the wrapper scan chains of one virtual core.
//
// W balanced wrapper scan chains; chain k runs wsi[k] -> NI[k] input cells ->
// the core's internal scan segment (seg_si[k] out, seg_so[k] back, NB[k]
// flops on the core side) -> NO[k] output cells -> wso[k]. A chain without an
// internal segment (NB[k] = 0) links its cells directly and ignores
// seg_so[k]; a chain without input or output cells passes straight through
// on that side. Input cells sit between the wrapper pins pi and the core's
// inputs core_in, output cells between core_out and the wrapper pins po; the
// cells of chain k take the pin indices after those of chains 0..k-1. All
// cells use the core's gated clock and scan_en, so they shift and capture
// together with its internal chains; test_mode (core test) and extest
// (interconnect test) set the cells' mode. The partition of cells and scan chains
// follows the balanced wrapper scan chain design; the pin-to-chain order is
// this design's choice.
module vc_wsc #(
  parameter int unsigned W      = 2,
  parameter int unsigned NI [tgmf_pkg::W_MAX] = '{default: 1},
  parameter int unsigned NB [tgmf_pkg::W_MAX] = '{default: 4},
  parameter int unsigned NO [tgmf_pkg::W_MAX] = '{default: 1},
  localparam int unsigned NI_T = tgmf_pkg::ch_sum(NI, W),
  localparam int unsigned NO_T = tgmf_pkg::ch_sum(NO, W),
  localparam int unsigned NI_W = (NI_T > 0) ? NI_T : 1,
  localparam int unsigned NO_W = (NO_T > 0) ? NO_T : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clk_en,
  input  logic            scan_en,
  input  logic            test_mode,
  input  logic            extest,
  input  logic [W-1:0]    wsi,
  output logic [W-1:0]    wso,
  output logic [W-1:0]    seg_si,
  input  logic [W-1:0]    seg_so,
  input  logic [NI_W-1:0] pi,
  output logic [NI_W-1:0] core_in,
  input  logic [NO_W-1:0] core_out,
  output logic [NO_W-1:0] po
);
  logic [NI_W-1:0] in_q;
  logic [NO_W-1:0] out_q;

  if (NI_T == 0) begin : g_no_in
    assign core_in = pi;
    assign in_q    = '0;
  end
  if (NO_T == 0) begin : g_no_out
    assign po    = core_out;
    assign out_q = '0;
  end

  for (genvar k = 0; k < W; k++) begin : g_ch
    localparam int unsigned IO = tgmf_pkg::ch_sum(NI, k);
    localparam int unsigned OO = tgmf_pkg::ch_sum(NO, k);
    logic head;   // what enters the output-cell side of the chain

    // input cells
    for (genvar c = 0; c < NI[k]; c++) begin : g_in
      wbr_cell #(.CAPTURES(1'b0)) u_cell (
        .clk, .rst_n, .clk_en, .scan_en, .test_mode, .extest,
        .cfi(pi[IO + c]), .cti((c == 0) ? wsi[k] : in_q[IO + c - 1]),
        .cfo(core_in[IO + c]), .cto(in_q[IO + c])
      );
    end
    if (NI[k] == 0) begin : g_si_direct
      assign seg_si[k] = wsi[k];
    end else begin : g_si_cell
      assign seg_si[k] = in_q[IO + NI[k] - 1];
    end

    if (NB[k] == 0) begin : g_no_seg
      assign head = seg_si[k];
    end else begin : g_seg
      assign head = seg_so[k];
    end

    // output cells
    for (genvar c = 0; c < NO[k]; c++) begin : g_out
      wbr_cell #(.CAPTURES(1'b1)) u_cell (
        .clk, .rst_n, .clk_en, .scan_en, .test_mode, .extest,
        .cfi(core_out[OO + c]), .cti((c == 0) ? head : out_q[OO + c - 1]),
        .cfo(po[OO + c]), .cto(out_q[OO + c])
      );
    end
    if (NO[k] == 0) begin : g_so_direct
      assign wso[k] = head;
    end else begin : g_so_cell
      assign wso[k] = out_q[OO + NO[k] - 1];
    end
  end
endmodule
