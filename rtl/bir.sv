// bir: wrapper instruction register.
//
// A shift stage and an update stage, both clocked by TCK, in the manner of an
// IEEE 1500 wrapper instruction register. With shift_en the shift stage takes
// WSI at its top and shifts toward bir_so (LSB first out); capture_en loads the
// current instruction back into the shift stage; update_en copies the shift
// stage into the instruction, which resets to INSTR_BYPASS. tgmf_mode is high
// while the instruction is INSTR_TGMF, the time-gated parallel test of the
// core, and extest_mode while it is INSTR_EXTEST, the interconnect test. Width,
// encodings and control names are this design's choices: the document only
// names the register.
module bir #(
  parameter int unsigned IR_W = 3
) (
  input  logic            tck,
  input  logic            rst_n,
  input  logic            shift_en,
  input  logic            capture_en,
  input  logic            update_en,
  input  logic            wsi,
  output logic            bir_so,
  output logic [IR_W-1:0] instr,
  output logic            tgmf_mode,
  output logic            extest_mode
);
  logic [IR_W-1:0] sreg;

  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n) sreg <= '0;
    else if (capture_en) sreg <= instr;
    else if (shift_en) sreg <= {wsi, sreg[IR_W-1:1]};
  end

  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n) instr <= IR_W'(tgmf_pkg::INSTR_BYPASS);
    else if (update_en) instr <= sreg;
  end

  assign bir_so    = sreg[0];
  assign tgmf_mode   = (instr == IR_W'(tgmf_pkg::INSTR_TGMF));
  assign extest_mode = (instr == IR_W'(tgmf_pkg::INSTR_EXTEST));
endmodule
