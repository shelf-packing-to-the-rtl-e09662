// shift_gate: gates the shift clock of one virtual core.
//
// While its group is selected (grp_en) the core receives its chosen shift rate
// (fs_en strobes) until it has shifted LEN times in the current shift phase;
// then its clock stays off until start opens the next phase. A core that needs
// less time than the slowest core of its group thus idles, clock gated, for
// the rest of the phase. shift_pulse is combinational, coincident with the
// fs_en strobe; done is high once LEN pulses have been given. Counting the
// pulses per core is this design's way of realising the gating the document
// describes.
module shift_gate #(
  parameter int unsigned LEN = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic grp_en,
  input  logic fs_en,
  output logic shift_pulse,
  output logic done
);
  localparam int unsigned CW = tgmf_pkg::cnt_w(LEN);
  logic [CW-1:0] cnt;

  assign done        = (cnt == CW'(LEN));
  assign shift_pulse = grp_en && fs_en && !done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= CW'(LEN);
    else if (start) cnt <= '0;
    else if (shift_pulse) cnt <= cnt + 1'b1;
  end
endmodule
