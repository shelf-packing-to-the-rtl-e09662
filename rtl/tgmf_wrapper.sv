// tgmf_wrapper: time-gated multi-frequency serial-parallel test wrapper.
//
// The wrapper splits an IP core into virtual cores (VCs) and tests them group
// by group. Only one group is clocked at a time (the others are clock gated),
// so the external TAM bandwidth W_EXT * f_t and the power budget are shared
// only among the cores of that group. Inside a group each core shifts its
// W wrapper scan chains at its own rate f_t / 2^DIVLOG and reaches the TAM
// through bandwidth-matching converters (bw_sipo / bw_piso) on
// ceil(W / 2^DIVLOG) wires; the outer DeMUX / MUX pair hands the whole TAM to
// the active group. Scan control (clock division, group decoder, capture
// FSM, shift gates and CPFs) sequences shift and at-speed capture. A bypass
// register (WBY) and an instruction register (BIR) sit on the serial port
// WSI / WSO, clocked by TCK; the parallel test runs only under the
// INSTR_TGMF instruction (core test) or INSTR_EXTEST (the same scan sequence
// with the boundary cells in interconnect mode).
//
// Interface: clk_pll is the (PLL) clock of everything but WBY/BIR; ft_en marks
// each TAM cycle (one PLL cycle in T_DIV) and the tester applies WPI and
// samples WPO on those strobes. tam_shift is high during the TAM cycles of a
// shift phase and tam_group names the group under test. test_start begins a
// test of n_patterns patterns per group; test_done stays high until
// test_start falls. Each virtual core i connects through its internal scan
// segments (vc_seg_si / vc_seg_so, wrapper chain k on bit k), its functional
// pins (vc_pi -> wrapper input cells -> vc_core_in, vc_core_out -> output
// cells -> vc_po), vc_clk_en (its gated clock as an enable of clk_pll) and
// vc_scan_en. The boundary cells isolate the core while INSTR_TGMF or
// INSTR_EXTEST is loaded and are transparent otherwise. At elaboration the schedule parameters are
// checked against the TAM width and against the average-power budget P_AVE of
// a group (each VC draws VC_POW * f_s / f_t); the hardware itself does not
// measure power. The architecture follows the document; timing
// details and encodings are this design's choices (see the sub-blocks).
module tgmf_wrapper #(
  parameter int unsigned N_VC     = tgmf_pkg::N_VC,
  parameter int unsigned N_GROUPS = tgmf_pkg::N_GROUPS,
  parameter int unsigned W_EXT    = tgmf_pkg::W_EXT,
  parameter int unsigned W_MAX    = tgmf_pkg::W_MAX,
  parameter int unsigned N_RATES  = tgmf_pkg::N_RATES,
  parameter int unsigned T_DIV    = tgmf_pkg::T_DIV,
  parameter int unsigned PAT_W    = tgmf_pkg::PAT_W,
  parameter int unsigned VC_W      [N_VC] = tgmf_pkg::VC_W,
  parameter int unsigned VC_DIVLOG [N_VC] = tgmf_pkg::VC_DIVLOG,
  parameter int unsigned VC_GROUP  [N_VC] = tgmf_pkg::VC_GROUP,
  parameter int unsigned VC_OFS    [N_VC] = tgmf_pkg::VC_OFS,
  parameter int unsigned VC_LEN    [N_VC] = tgmf_pkg::VC_LEN,
  parameter int unsigned VC_CDIV   [N_VC] = tgmf_pkg::VC_CDIV,
  parameter int unsigned VC_POW    [N_VC] = tgmf_pkg::VC_POW,
  parameter int unsigned P_AVE    = tgmf_pkg::P_AVE,
  parameter int unsigned MAX_NI   = tgmf_pkg::MAX_NI,
  parameter int unsigned MAX_NO   = tgmf_pkg::MAX_NO,
  parameter int unsigned VC_NI [N_VC][W_MAX] = tgmf_pkg::VC_NI,
  parameter int unsigned VC_NB [N_VC][W_MAX] = tgmf_pkg::VC_NB,
  parameter int unsigned VC_NO [N_VC][W_MAX] = tgmf_pkg::VC_NO,
  localparam int unsigned GW = (N_GROUPS > 1) ? $clog2(N_GROUPS) : 1
) (
  input  logic             clk_pll,
  input  logic             rst_n,
  // serial port (IEEE 1500 style)
  input  logic             tck,
  input  logic             wsi,
  output logic             wso,
  input  logic             select_wir,
  input  logic             shift_wr,
  input  logic             capture_wr,
  input  logic             update_wr,
  // parallel TAM
  input  logic [W_EXT-1:0] wpi,
  output logic [W_EXT-1:0] wpo,
  output logic             ft_en,
  output logic             tam_shift,
  output logic [GW-1:0]    tam_group,
  // test control
  input  logic             test_start,
  input  logic [PAT_W-1:0] n_patterns,
  output logic             test_busy,
  output logic             test_done,
  // virtual cores: internal scan segments and functional pins
  output logic [W_MAX-1:0]  vc_seg_si   [N_VC],
  input  logic [W_MAX-1:0]  vc_seg_so   [N_VC],
  input  logic [MAX_NI-1:0] vc_pi       [N_VC],
  output logic [MAX_NI-1:0] vc_core_in  [N_VC],
  input  logic [MAX_NO-1:0] vc_core_out [N_VC],
  output logic [MAX_NO-1:0] vc_po       [N_VC],
  output logic [N_VC-1:0]   vc_clk_en,
  output logic [N_VC-1:0]   vc_scan_en
);
  typedef int unsigned vc_arr_t [N_VC];

  function automatic vc_arr_t calc_nw();
    vc_arr_t n;
    for (int i = 0; i < N_VC; i++) n[i] = tgmf_pkg::ext_wires(VC_W[i], VC_DIVLOG[i]);
    return n;
  endfunction
  localparam vc_arr_t VC_NW = calc_nw();

  typedef int unsigned ch_arr_t [W_MAX];
  typedef enum int {ROW_NI, ROW_NB, ROW_NO} row_e;
  // one core's row of the chain partition tables
  function automatic ch_arr_t row(row_e which, int i);
    ch_arr_t r;
    for (int k = 0; k < W_MAX; k++)
      r[k] = (which == ROW_NI) ? VC_NI[i][k] : (which == ROW_NB) ? VC_NB[i][k] : VC_NO[i][k];
    return r;
  endfunction
  function automatic int unsigned row_sum(row_e which, int i, int unsigned upto);
    int unsigned s = 0;
    for (int k = 0; k < W_MAX; k++)
      if (k < upto) s += (which == ROW_NI) ? VC_NI[i][k] : VC_NO[i][k];
    return s;
  endfunction

  // ---------------- serial port: WBY, BIR, WSO ----------------
  logic       wby_so, bir_so, tgmf_mode, extest_mode;
  logic [2:0] instr;

  wby u_wby (
    .tck, .rst_n, .shift_en(shift_wr && !select_wir), .wsi, .wby_so
  );

  bir #(.IR_W(3)) u_bir (
    .tck, .rst_n,
    .shift_en(shift_wr && select_wir), .capture_en(capture_wr && select_wir),
    .update_en(update_wr && select_wir), .wsi, .bir_so, .instr, .tgmf_mode,
    .extest_mode
  );

  assign wso = select_wir ? bir_so : wby_so;

  // instruction bits into the PLL clock domain (static while a test runs)
  logic [1:0] tgmf_sync, ext_sync;
  logic       core_test, ic_test;
  always_ff @(posedge clk_pll or negedge rst_n) begin
    if (!rst_n) begin
      tgmf_sync <= '0;
      ext_sync  <= '0;
    end else begin
      tgmf_sync <= {tgmf_sync[0], tgmf_mode};
      ext_sync  <= {ext_sync[0], extest_mode};
    end
  end
  assign core_test = tgmf_sync[1];
  assign ic_test   = ext_sync[1];

  // ---------------- scan control ----------------
  logic            grp_valid;
  logic [N_VC-1:0] vc_shift;

  scan_control #(
    .N_VC(N_VC), .N_GROUPS(N_GROUPS), .N_RATES(N_RATES), .T_DIV(T_DIV), .PAT_W(PAT_W),
    .VC_DIVLOG(VC_DIVLOG), .VC_GROUP(VC_GROUP), .VC_LEN(VC_LEN), .VC_CDIV(VC_CDIV)
  ) u_ctrl (
    .clk(clk_pll), .rst_n, .enable(core_test || ic_test), .start(test_start), .n_patterns,
    .ft_en, .grp(tam_group), .grp_valid, .shift_ph(tam_shift),
    .vc_clk_en, .vc_scan_en, .vc_shift, .busy(test_busy), .done(test_done)
  );

  // ---------------- TAM DeMUX / MUX and bandwidth matching ----------------
  logic [W_EXT-1:0] grp_in [N_GROUPS];
  logic [W_EXT-1:0] vc_out [N_VC];

  tam_demux #(.W_EXT(W_EXT), .N_GROUPS(N_GROUPS)) u_demux (
    .en(grp_valid), .sel_d(tam_group), .wpi, .grp_bus(grp_in)
  );

  for (genvar i = 0; i < N_VC; i++) begin : g_vc
    localparam int unsigned W = VC_W[i];
    localparam int unsigned E = VC_NW[i];
    localparam int unsigned NIT = row_sum(ROW_NI, i, W);
    localparam int unsigned NOT = row_sum(ROW_NO, i, W);
    localparam int unsigned NIW = (NIT > 0) ? NIT : 1;
    localparam int unsigned NOW = (NOT > 0) ? NOT : 1;
    logic [E-1:0]   tin, tout;
    logic [W-1:0]   si, so, seg_si;
    logic [NIW-1:0] core_in;
    logic [NOW-1:0] po;

    assign tin = grp_in[VC_GROUP[i]][VC_OFS[i] +: E];

    bw_sipo #(.W(W), .DIVLOG(VC_DIVLOG[i])) u_sipo (
      .clk(clk_pll), .rst_n, .ft_en, .tam_in(tin), .chain_si(si)
    );

    bw_piso #(.W(W), .DIVLOG(VC_DIVLOG[i])) u_piso (
      .clk(clk_pll), .rst_n, .ft_en, .load(vc_shift[i]), .chain_so(so),
      .tam_out(tout)
    );

    vc_wsc #(.W(W), .NI(row(ROW_NI, i)), .NB(row(ROW_NB, i)), .NO(row(ROW_NO, i))) u_wsc (
      .clk(clk_pll), .rst_n, .clk_en(vc_clk_en[i]), .scan_en(vc_scan_en[i]),
      .test_mode(core_test), .extest(ic_test), .wsi(si), .wso(so),
      .seg_si, .seg_so(vc_seg_so[i][W-1:0]),
      .pi(vc_pi[i][NIW-1:0]), .core_in, .core_out(vc_core_out[i][NOW-1:0]), .po
    );

    assign vc_seg_si[i]  = W_MAX'(seg_si);
    assign vc_core_in[i] = MAX_NI'(core_in);
    assign vc_po[i]      = MAX_NO'(po);
    assign vc_out[i]     = W_EXT'(tout);
  end

  tam_mux #(
    .W_EXT(W_EXT), .N_GROUPS(N_GROUPS), .N_VC(N_VC),
    .VC_GROUP(VC_GROUP), .VC_OFS(VC_OFS), .VC_NW(VC_NW)
  ) u_mux (
    .en(grp_valid), .sel_m(tam_group), .vc_out, .wpo
  );

  // Static checks of the schedule: every core fits the TAM, and in every group
  // the cores' wire slices neither overlap nor exceed W_EXT (bandwidth
  // matching: sum of w_i * f_s,i <= W_EXT * f_t).
  function automatic bit schedule_ok();
    longint pw;
    for (int i = 0; i < N_VC; i++) begin
      if (VC_W[i] > W_MAX || VC_OFS[i] + VC_NW[i] > W_EXT || VC_GROUP[i] >= N_GROUPS) return 0;
      if (row_sum(ROW_NI, i, VC_W[i]) > MAX_NI || row_sum(ROW_NO, i, VC_W[i]) > MAX_NO) return 0;
      // every chain must be shifted through within VC_LEN shifts
      for (int k = 0; k < W_MAX; k++)
        if (k < VC_W[i] && (VC_NI[i][k] + VC_NB[i][k] > VC_LEN[i] ||
                            VC_NB[i][k] + VC_NO[i][k] > VC_LEN[i])) return 0;
      // average power of the group: sum of Pow * f_s / f_t, scaled by 2^(N_RATES-1)
      pw = 0;
      for (int k = 0; k < N_VC; k++)
        if (VC_GROUP[k] == VC_GROUP[i]) pw += longint'(VC_POW[k]) << (N_RATES - 1 - VC_DIVLOG[k]);
      if (pw > (longint'(P_AVE) << (N_RATES - 1)) || VC_DIVLOG[i] >= N_RATES) return 0;
      for (int k = 0; k < N_VC; k++)
        if (k != i && VC_GROUP[k] == VC_GROUP[i] &&
            VC_OFS[k] < VC_OFS[i] + VC_NW[i] && VC_OFS[i] < VC_OFS[k] + VC_NW[k]) return 0;
    end
    return 1;
  endfunction

  if (!schedule_ok()) begin : g_bad_schedule
    $error("tgmf_wrapper: schedule overlaps or exceeds the TAM, or a group exceeds P_AVE");
  end
endmodule
