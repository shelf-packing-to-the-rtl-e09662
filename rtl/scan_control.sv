// scan_control: clock generation and control of the time-gated wrapper.
//
// Holds the clock division, the group decoder, the capture FSM and, for every
// virtual core, a shift-clock gate and a clock pulse filter (CPF). The capture
// FSM picks the group under test; the decoder turns it into one-hot group
// enables, so only the cores of that group receive shift clocks. Each core's
// gate passes the core's own shift rate f_t / 2^VC_DIVLOG[i] for VC_LEN[i]
// pulses per shift phase; its CPF passes those pulses while scan_en is high and
// replaces them by an at-speed launch/capture pair, VC_CDIV[i] PLL cycles
// apart, in the capture window. Outputs per core: vc_clk_en (its gated clock,
// as an enable strobe of the PLL clock), vc_scan_en, and vc_shift (a shift
// pulse, used by the bandwidth-matching converters). The structure follows the
// document's clock generation figure; the PLL itself is outside (clk).
module scan_control #(
  parameter int unsigned N_VC     = tgmf_pkg::N_VC,
  parameter int unsigned N_GROUPS = tgmf_pkg::N_GROUPS,
  parameter int unsigned N_RATES  = tgmf_pkg::N_RATES,
  parameter int unsigned T_DIV    = tgmf_pkg::T_DIV,
  parameter int unsigned PAT_W    = tgmf_pkg::PAT_W,
  parameter int unsigned VC_DIVLOG [N_VC] = tgmf_pkg::VC_DIVLOG,
  parameter int unsigned VC_GROUP  [N_VC] = tgmf_pkg::VC_GROUP,
  parameter int unsigned VC_LEN    [N_VC] = tgmf_pkg::VC_LEN,
  parameter int unsigned VC_CDIV   [N_VC] = tgmf_pkg::VC_CDIV,
  localparam int unsigned GW = (N_GROUPS > 1) ? $clog2(N_GROUPS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             start,
  input  logic [PAT_W-1:0] n_patterns,
  output logic             ft_en,
  output logic [GW-1:0]    grp,
  output logic             grp_valid,
  output logic             shift_ph,
  output logic [N_VC-1:0]  vc_clk_en,
  output logic [N_VC-1:0]  vc_scan_en,
  output logic [N_VC-1:0]  vc_shift,
  output logic             busy,
  output logic             done
);
  typedef int unsigned grp_arr_t [N_GROUPS];

  // TAM cycles of a group's shift phase: slowest core's LEN shifts plus one
  // extra shift period to drain its output converter.
  function automatic grp_arr_t calc_grp_cyc();
    grp_arr_t c;
    for (int g = 0; g < N_GROUPS; g++) c[g] = 1;
    for (int i = 0; i < N_VC; i++)
      if (((VC_LEN[i] + 1) << VC_DIVLOG[i]) > c[VC_GROUP[i]])
        c[VC_GROUP[i]] = (VC_LEN[i] + 1) << VC_DIVLOG[i];
    return c;
  endfunction

  localparam grp_arr_t GRP_CYC = calc_grp_cyc();

  logic               sync, cap_win, cap_go, grp_cap_done;
  logic [N_RATES-1:0] fs_en;
  logic [N_GROUPS-1:0] g_en;
  logic [N_VC-1:0]    shift_pulse, cap_done, in_grp;

  clock_division #(.T_DIV(T_DIV), .N_RATES(N_RATES)) u_div (
    .clk, .rst_n, .sync, .ft_en, .fs_en
  );

  group_decoder #(.N_GROUPS(N_GROUPS)) u_dec (
    .en(grp_valid), .d(grp), .g(g_en)
  );

  capture_fsm #(
    .N_GROUPS(N_GROUPS), .PAT_W(PAT_W), .CYC_W(16), .GRP_CYC(GRP_CYC)
  ) u_fsm (
    .clk, .rst_n, .enable, .start, .n_patterns, .ft_en, .grp_cap_done,
    .grp, .grp_valid, .sync, .shift_ph, .cap_win, .cap_go, .busy, .done
  );

  for (genvar i = 0; i < N_VC; i++) begin : g_vc
    assign in_grp[i] = g_en[VC_GROUP[i]];

    shift_gate #(.LEN(VC_LEN[i])) u_gate (
      .clk, .rst_n, .start(sync), .grp_en(in_grp[i] && shift_ph),
      .fs_en(fs_en[VC_DIVLOG[i]]), .shift_pulse(shift_pulse[i]), .done()
    );

    assign vc_scan_en[i] = !(in_grp[i] && cap_win);

    cpf #(.C_DIV(VC_CDIV[i])) u_cpf (
      .clk, .rst_n, .scan_en(vc_scan_en[i]), .shift_pulse(shift_pulse[i]),
      .cap_go(cap_go && in_grp[i]), .gclk_en(vc_clk_en[i]), .cap_done(cap_done[i])
    );
  end

  assign vc_shift     = shift_pulse;
  assign grp_cap_done = &(cap_done | ~in_grp);

  // Only cores of the selected group ever receive a clock.
  assert property (@(posedge clk) disable iff (!rst_n) (vc_clk_en & ~in_grp) == '0);
endmodule
