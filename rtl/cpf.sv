// cpf: clock pulse filter of one virtual core; produces its gated clock.
//
// While scan_en is high the CPF passes the gated shift clock (shift_pulse) to
// the core. While scan_en is low it blocks shifting and, when cap_go is
// pulsed, issues exactly two pulses taken from the fast PLL clock: a launch
// pulse one PLL cycle after cap_go and a capture pulse C_DIV PLL cycles later,
// i.e. at the core's functional (at-speed) period. cap_done then stays high
// until the next cap_go or until scan_en rises. gclk_en is the core's clock
// as a one-PLL-cycle enable strobe. The scan_en control and the at-speed
// launch/capture pair follow the document's description and its launch-from-
// capture waveform; the exact pulse placement is this design's choice.
module cpf #(
  parameter int unsigned C_DIV = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic scan_en,
  input  logic shift_pulse,
  input  logic cap_go,
  output logic gclk_en,
  output logic cap_done
);
  localparam int unsigned CW = tgmf_pkg::cnt_w(C_DIV);

  typedef enum logic [1:0] {C_IDLE, C_LAUNCH, C_WAIT, C_DONE} cstate_e;
  cstate_e       st;
  logic [CW-1:0] cnt;
  logic          cap_pulse;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st  <= C_IDLE;
      cnt <= '0;
    end else if (scan_en) begin
      st  <= C_IDLE;
      cnt <= '0;
    end else begin
      unique case (st)
        C_IDLE:   if (cap_go) st <= C_LAUNCH;
        C_LAUNCH: begin st <= C_WAIT; cnt <= CW'(1); end
        C_WAIT:   if (cnt == CW'(C_DIV)) st <= C_DONE;
                  else cnt <= cnt + 1'b1;
        C_DONE:   if (cap_go) st <= C_LAUNCH;
        default:  st <= C_IDLE;
      endcase
    end
  end

  assign cap_pulse = !scan_en && ((st == C_LAUNCH) || (st == C_WAIT && cnt == CW'(C_DIV)));
  assign gclk_en   = scan_en ? shift_pulse : cap_pulse;
  assign cap_done  = !scan_en && (st == C_DONE);
endmodule
