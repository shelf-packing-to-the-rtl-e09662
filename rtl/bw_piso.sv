// bw_piso: output-side bandwidth matching of one virtual core.
//
// The mirror of bw_sipo: on the core's shift pulse (load, which falls on a
// TAM strobe) the scan-out bits of chains j*R .. j*R+R-1 are loaded into the
// R-bit register of TAM wire j; on every other TAM strobe the register shifts
// by one, so wire j shows chain j*R + t during TAM cycle t after the load.
// With R = 1 this is a one-TAM-cycle output register. Unused chain slots (when
// W is not a multiple of R) read as 0. Order and one-cycle latency are this
// design's choices.
module bw_piso #(
  parameter int unsigned W      = 5,
  parameter int unsigned DIVLOG = 3,
  localparam int unsigned R = 1 << DIVLOG,
  localparam int unsigned E = tgmf_pkg::ext_wires(W, DIVLOG)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ft_en,
  input  logic         load,
  input  logic [W-1:0] chain_so,
  output logic [E-1:0] tam_out
);
  logic [R-1:0] sreg [E];
  logic [E*R-1:0] padded;

  assign padded = (E*R)'(chain_so);

  for (genvar j = 0; j < E; j++) begin : g_wire
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) sreg[j] <= '0;
      else if (ft_en) begin
        if (load) sreg[j] <= padded[j*R +: R];
        else sreg[j] <= sreg[j] >> 1;
      end
    end
    assign tam_out[j] = sreg[j][0];
  end
endmodule
