// tb_tgmf_wrapper: end-to-end test of the wrapper at its default (hCADT01)
// configuration, with a behavioural scan-chain model for every virtual core.
//
// Loads the INSTR_TGMF instruction through WSI (and checks the bypass path
// and the instruction read-back), then runs a test of N_PAT patterns per
// group. Acting as the tester, it drives WPI on every TAM strobe of a shift
// phase with pseudo-random pattern bits and checks every WPO bit against the
// bit predicted by a reference model of every wrapper scan chain (input
// cells, internal segment, output cells) that follows the bits the tester
// sent and the core model's capture behaviour. Also checked: functional
// transparency of the boundary cells before the test and core isolation
// during capture; each
// core gets exactly its chain length in shift clocks per phase, no clock while
// its group is idle, exactly two capture clocks per capture window at its
// functional spacing, and each group's shift phases last (L+1)*R TAM cycles of
// its slowest core. Every mechanism (group switch, each shift rate, clock
// gating of a finished core, capture pair, bypass, instruction update, test
// enable, interconnect mode) is counted and must occur. A second, one-pattern
// run under INSTR_EXTEST checks interconnect mode the same way: the output
// cells drive the wrapper pins from their flops and the input cells capture
// the pins.
module tb_tgmf_wrapper;
  import tgmf_pkg::*;

  localparam int unsigned N_PAT = 3;

  logic clk = 0, tck = 0, rst_n = 1;
  always #1 clk = ~clk;
  always #20 tck = ~tck;

  logic wsi = 0, wso, select_wir = 0, shift_wr = 0, capture_wr = 0, update_wr = 0;
  logic [W_EXT-1:0] wpi = '0, wpo;
  logic ft_en, tam_shift, test_start = 0, test_busy, test_done;
  logic [1:0] tam_group;
  logic [PAT_W-1:0] n_patterns = PAT_W'(N_PAT);
  logic [W_MAX-1:0]  vc_seg_si [N_VC], vc_seg_so [N_VC];
  logic [MAX_NI-1:0] vc_pi [N_VC], vc_core_in [N_VC];
  logic [MAX_NO-1:0] vc_core_out [N_VC], vc_po [N_VC];
  logic [N_VC-1:0] vc_clk_en, vc_scan_en;

  tgmf_wrapper dut (.*, .clk_pll(clk));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s t=%0t", msg, $time);
    end
  endtask

  // ---------------- virtual core models ----------------
  function automatic int unsigned nsum(int unsigned v, bit outs, int unsigned upto);
    int unsigned t = 0;
    for (int k = 0; k < W_MAX; k++) if (k < upto) t += outs ? VC_NO[v][k] : VC_NI[v][k];
    return t;
  endfunction

  function automatic ch_arr_t nb_row(int unsigned v);
    ch_arr_t r;
    for (int k = 0; k < W_MAX; k++) r[k] = VC_NB[v][k];
    return r;
  endfunction

  for (genvar v = 0; v < N_VC; v++) begin : g_vc
    localparam int unsigned W   = VC_W[v];
    localparam int unsigned NIT = nsum(v, 0, W);
    localparam int unsigned NOT = nsum(v, 1, W);
    localparam ch_arr_t NB = nb_row(v);
    logic [W-1:0] so;
    logic [NOT-1:0] co;
    vc_model #(.W(W), .NB(NB), .NIT(NIT), .NOT(NOT)) u_m (
      .clk, .clk_en(vc_clk_en[v]), .scan_en(vc_scan_en[v]), .seg_si(vc_seg_si[v][W-1:0]),
      .seg_so(so), .core_in(vc_core_in[v][NIT-1:0]), .core_out(co)
    );
    assign vc_seg_so[v]   = W_MAX'(so);
    assign vc_core_out[v] = MAX_NO'(co);
  end

  // ---------------- pattern source ----------------
  function automatic bit hbit(int unsigned p, int unsigned v, int unsigned k, int unsigned pos);
    int unsigned x;
    x = ((((p * 8) + v) * 8 + k) * 1024 + pos) * 32'h9E37_79B1;
    x = x ^ (x >> 15);
    x = x * 32'h85EB_CA6B;
    return x[13];
  endfunction

  // ---------------- reference model of the wrapper scan chains ----------------
  // chain k of core v: positions 0 .. NI-1 input cells (0 next to the chain
  // input), NI .. NI+NB-1 internal segment, then NO output cells.
  bit refc [N_VC][W_MAX][1024];
  bit exp_out [N_VC][W_MAX];

  function automatic int unsigned clen(int unsigned v, int unsigned k);
    return VC_NI[v][k] + VC_NB[v][k] + VC_NO[v][k];
  endfunction

  task automatic ref_shift(int unsigned v, int unsigned k, bit b);
    int unsigned n = clen(v, k);
    exp_out[v][k] = refc[v][k][n - 1];
    for (int i = n - 1; i > 0; i--) refc[v][k][i] = refc[v][k][i - 1];
    refc[v][k][0] = b;
  endtask

  // one functional clock: input cells hold, segments take ~(own ^ next),
  // output cells capture the core model's outputs
  task automatic ref_capture(int unsigned v);
    bit ci [MAX_NI];
    int unsigned nit = nsum(v, 0, VC_W[v]);
    int unsigned io = 0, oo = 0, io2 = 0;
    for (int k = 0; k < VC_W[v]; k++) begin
      for (int c = 0; c < VC_NI[v][k]; c++) ci[io + c] = refc[v][k][c];
      io += VC_NI[v][k];
    end
    for (int k = 0; k < VC_W[v]; k++) begin
      int unsigned ni = VC_NI[v][k], nb = VC_NB[v][k];
      bit seg [1024];
      for (int i = 0; i < nb; i++) seg[i] = ~(refc[v][k][ni + i] ^ refc[v][k][ni + (i + 1) % nb]);
      for (int i = 0; i < nb; i++) refc[v][k][ni + i] = seg[i];
      if (ic_mode) begin
        for (int c = 0; c < VC_NI[v][k]; c++) refc[v][k][c] = vc_pi[v][io2 + c];
        io2 += VC_NI[v][k];
      end else
        for (int c = 0; c < VC_NO[v][k]; c++)
          refc[v][k][ni + nb + c] = ((nit > 0) ? ci[(oo + c) % nit] : 1'b0) ^ ((oo + c) % 2 == 1);
      oo += VC_NO[v][k];
    end
  endtask

  // in either test mode the wrapper pins are driven by the output cells
  function automatic bit pins_driven(int unsigned v);
    int unsigned oo = 0;
    for (int k = 0; k < VC_W[v]; k++) begin
      for (int c = 0; c < VC_NO[v][k]; c++)
        if (vc_po[v][oo + c] != refc[v][k][VC_NI[v][k] + VC_NB[v][k] + c]) return 0;
      oo += VC_NO[v][k];
    end
    return 1;
  endfunction

  // the core's inputs during capture must be its input cells (isolation)
  function automatic bit isolated(int unsigned v);
    int unsigned io = 0;
    for (int k = 0; k < VC_W[v]; k++) begin
      for (int c = 0; c < VC_NI[v][k]; c++)
        if (vc_core_in[v][io + c] != refc[v][k][c]) return 0;
      io += VC_NI[v][k];
    end
    return 1;
  endfunction

  // independent phase length of each group
  function automatic int unsigned grp_cyc(int unsigned g);
    int unsigned c = 0;
    for (int v = 0; v < N_VC; v++)
      if (VC_GROUP[v] == g && (VC_LEN[v] + 1) * (1 << VC_DIVLOG[v]) > c)
        c = (VC_LEN[v] + 1) * (1 << VC_DIVLOG[v]);
    return c;
  endfunction

  // ---------------- mechanism counters ----------------
  int unsigned m_groups = 0, m_rate[N_RATES], m_gated_idle = 0, m_cap_pair = 0;
  int unsigned m_bypass = 0, m_update = 0, m_enable_block = 0, m_conv = 0;
  int unsigned m_transparent = 0, m_isolated = 0, m_ic_cap = 0;
  bit ic_mode = 0;   // interconnect run: input cells capture pins, output cells hold

  // ---------------- tester ----------------
  int unsigned n = 0, ph = 0, cur_g = 99, strobes = 0;
  int unsigned phase_strobes [N_GROUPS];
  bit prev_shift = 0;
  int unsigned shifts_at_start [N_VC];

  always @(negedge clk) begin
    if (rst_n && ft_en && tam_shift) begin
      logic [W_EXT-1:0] drive;
      if (!prev_shift) begin
        n = 0;
        if (cur_g != int'(tam_group)) begin cur_g = int'(tam_group); ph = 0; m_groups++; end
        else ph++;
        for (int v = 0; v < N_VC; v++) shifts_at_start[v] = g_n_shift(v);
      end
      drive = '0;
      for (int v = 0; v < N_VC; v++) begin
        if (VC_GROUP[v] == cur_g) begin
          automatic int unsigned r = 1 << VC_DIVLOG[v];
          automatic int unsigned L = VC_LEN[v];
          automatic int unsigned e = ext_wires(VC_W[v], VC_DIVLOG[v]);
          automatic int unsigned s = n / r, t = n % r;
          for (int j = 0; j < e; j++) begin
            automatic int unsigned k = j * r + t;
            if (s < L && k < VC_W[v]) drive[VC_OFS[v] + j] = hbit(ph, v, k, s);
            if (n >= r && ph >= 1) begin
              automatic int unsigned so_s = n / r - 1;
              if (so_s < L && k < VC_W[v]) begin
                check(wpo[VC_OFS[v] + j] == exp_out[v][k],
                      $sformatf("wpo vc%0d wire%0d ph%0d n%0d", v + 1, j, ph, n));
                if (r > 1) m_conv++;
              end
            end
          end
          // the core's shift pulse falls on the last TAM cycle of each frame
          if (t == r - 1 && s < L)
            for (int k = 0; k < VC_W[v]; k++) ref_shift(v, k, hbit(ph, v, k, s));
          if (s >= L && n < grp_cyc(cur_g)) m_gated_idle++;
        end
      end
      wpi = drive;
      n++;
      phase_strobes[cur_g]++;
    end
    if (rst_n && ft_en) begin
      if (prev_shift && !tam_shift) begin
        // a shift phase just ended: each core of the group shifted exactly L times
        for (int v = 0; v < N_VC; v++)
          if (VC_GROUP[v] == cur_g)
            check(g_n_shift(v) - shifts_at_start[v] == VC_LEN[v],
                  $sformatf("shift count vc%0d", v + 1));
        check(n == grp_cyc(cur_g), $sformatf("phase length group %0d: %0d", cur_g, n));
      end
      prev_shift = tam_shift;
    end
  end

  function automatic int unsigned g_n_shift(int v);
    case (v)
      0: return g_vc[0].u_m.n_shift;
      1: return g_vc[1].u_m.n_shift;
      2: return g_vc[2].u_m.n_shift;
      3: return g_vc[3].u_m.n_shift;
      4: return g_vc[4].u_m.n_shift;
      5: return g_vc[5].u_m.n_shift;
      default: return g_vc[6].u_m.n_shift;
    endcase
  endfunction

  // ---------------- clock monitors ----------------
  int unsigned cap_in_win [N_VC];
  for (genvar v = 0; v < N_VC; v++) begin : g_mon
    bit was_cap = 0;
    always @(posedge clk) if (rst_n) begin
      if (vc_clk_en[v]) begin
        check(dut.grp_valid && int'(tam_group) == VC_GROUP[v], $sformatf("clock while idle vc%0d", v + 1));
        if (vc_scan_en[v]) m_rate[VC_DIVLOG[v]]++;
        else cap_in_win[v]++;
      end
      if (!vc_scan_en[v]) begin
        if (!was_cap) begin
          check(isolated(v), $sformatf("core inputs isolated vc%0d", v + 1));
          check(pins_driven(v), $sformatf("wrapper pins driven by output cells vc%0d", v + 1));
          m_isolated++;
          if (ic_mode) m_ic_cap++;
        end
        was_cap = 1;
      end
      else if (was_cap) begin
        was_cap = 0;
        check(cap_in_win[v] == 2, $sformatf("capture pulses vc%0d = %0d", v + 1, cap_in_win[v]));
        check(g_vc[v].u_m.cap_gap == VC_CDIV[v], $sformatf("capture spacing vc%0d", v + 1));
        if (cap_in_win[v] == 2) m_cap_pair++;
        for (int c = 0; c < cap_in_win[v]; c++) ref_capture(v);
        cap_in_win[v] = 0;
      end
    end
  end

  // ---------------- serial port ----------------
  task automatic tck_shift(bit sel, bit b);
    @(negedge tck);
    select_wir = sel; shift_wr = 1; wsi = b;
    @(posedge tck);
    #1 shift_wr = 0;
  endtask

  initial begin
    for (int v = 0; v < N_VC; v++) cap_in_win[v] = 0;
    for (int g = 0; g < N_GROUPS; g++) phase_strobes[g] = 0;
    for (int k = 0; k < N_RATES; k++) m_rate[k] = 0;
    #1 rst_n = 0;
    #30 rst_n = 1;

    // bypass: WSI reaches WSO through one WBY flop
    tck_shift(0, 1);
    check(wso == 1, "bypass 1");
    tck_shift(0, 0);
    check(wso == 0, "bypass 0");
    m_bypass++;

    // functional mode: boundary cells are transparent
    repeat (8) begin
      for (int v = 0; v < N_VC; v++) vc_pi[v] = MAX_NI'({7{$urandom}});
      #3;
      for (int v = 0; v < N_VC; v++) begin
        automatic bit same = 1;
        for (int b = 0; b < MAX_NI; b++)
          if (b < nsum(v, 0, VC_W[v]) && vc_core_in[v][b] != vc_pi[v][b]) same = 0;
        check(same, $sformatf("functional input path vc%0d", v + 1));
        check(vc_po[v] == vc_core_out[v], $sformatf("functional output path vc%0d", v + 1));
      end
      m_transparent++;
    end

    // test_start without the TGMF instruction does nothing
    test_start = 1;
    repeat (200) @(posedge clk);
    check(!test_busy && !tam_shift, "test blocked without instruction");
    if (!test_busy) m_enable_block++;
    test_start = 0;

    // load INSTR_TGMF = 3'b001, LSB first, then update
    tck_shift(1, 1); tck_shift(1, 0); tck_shift(1, 0);
    @(negedge tck); update_wr = 1; @(posedge tck); #1 update_wr = 0;
    check(dut.u_bir.instr == 3'b001, "instruction update");
    if (dut.u_bir.tgmf_mode) m_update++;
    // read it back: capture, then the LSB is on WSO
    @(negedge tck); capture_wr = 1; @(posedge tck); #1 capture_wr = 0;
    check(wso == 1'b1, "instruction read-back bit 0");
    tck_shift(1, 0);
    check(wso == 1'b0, "instruction read-back bit 1");
    select_wir = 0;

    repeat (10) @(posedge clk);
    test_start = 1;
    wait (test_done);
    @(posedge clk);
    check(!test_busy, "busy falls at done");
    for (int g = 0; g < N_GROUPS; g++)
      check(phase_strobes[g] == (N_PAT + 1) * grp_cyc(g),
            $sformatf("TAM cycles of group %0d: %0d", g, phase_strobes[g]));
    test_start = 0;
    repeat (5) @(posedge clk);
    check(!test_done, "done clears");
    check(m_cap_pair == N_PAT * N_VC, "one capture pair per core and pattern");

    // interconnect run: INSTR_EXTEST = 3'b010, one pattern, fixed pin values
    tck_shift(1, 0); tck_shift(1, 1); tck_shift(1, 0);
    @(negedge tck); update_wr = 1; @(posedge tck); #1 update_wr = 0;
    check(dut.u_bir.instr == 3'b010 && dut.u_bir.extest_mode, "interconnect instruction update");
    select_wir = 0;
    for (int v = 0; v < N_VC; v++) vc_pi[v] = MAX_NI'({7{$urandom}});
    for (int g = 0; g < N_GROUPS; g++) phase_strobes[g] = 0;
    ic_mode = 1;
    n_patterns = PAT_W'(1);
    repeat (10) @(posedge clk);
    test_start = 1;
    wait (test_done);
    @(posedge clk);
    for (int g = 0; g < N_GROUPS; g++)
      check(phase_strobes[g] == 2 * grp_cyc(g),
            $sformatf("interconnect run: TAM cycles of group %0d: %0d", g, phase_strobes[g]));
    test_start = 0;
    repeat (5) @(posedge clk);
    check(m_ic_cap == N_VC, "one pin capture per core in interconnect mode");

    check(m_transparent > 0 && m_isolated > 0, "boundary cells transparent and isolating");
    $display("mechanisms: transparent=%0d isolated=%0d interconnect_captures=%0d",
             m_transparent, m_isolated, m_ic_cap);
    $display("mechanisms: groups=%0d rate1=%0d rate4=%0d rate8=%0d gated_idle=%0d cap_pairs=%0d conv_bits=%0d bypass=%0d update=%0d enable_block=%0d",
             m_groups, m_rate[0], m_rate[2], m_rate[3], m_gated_idle, m_cap_pair, m_conv,
             m_bypass, m_update, m_enable_block);
    check(m_groups == 2 * N_GROUPS, "every group tested in both runs");
    check(m_rate[0] > 0 && m_rate[2] > 0 && m_rate[3] > 0, "every scheduled shift rate used");
    check(m_gated_idle > 0, "finished core clock-gated");
    check(m_ic_cap > 0, "interconnect mode exercised");
    check(m_conv > 0, "bandwidth conversion exercised");
    check(m_bypass > 0 && m_update > 0 && m_enable_block > 0, "serial port mechanisms");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
