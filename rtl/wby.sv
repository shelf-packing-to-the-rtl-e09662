// wby: one-bit wrapper bypass register.
//
// Clocked by the serial test clock TCK. While shift_en is high (bypass
// selected and ShiftWR active) it takes WSI; its output feeds the WSO
// multiplexer, giving a one-TCK path from WSI to WSO that skips the wrapper.
// Asynchronous reset to 0. The shift-enable name is this design's choice.
module wby (
  input  logic tck,
  input  logic rst_n,
  input  logic shift_en,
  input  logic wsi,
  output logic wby_so
);
  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n) wby_so <= 1'b0;
    else if (shift_en) wby_so <= wsi;
  end
endmodule
