// tb_scan_control: a three-core, two-group configuration (cores 0 and 1 in
// group 0 at f_t and f_t/2, core 2 alone in group 1 at f_t/4), T_DIV = 4,
// two patterns. Checks per core: LEN shift clocks per shift phase spaced
// T_DIV * 2^DIVLOG PLL cycles, (n+1) * LEN in total, clocks only while its
// group is active, two capture clocks per capture window VC_CDIV apart, and
// scan_en low only in its own group's capture windows.
module tb_scan_control;
  localparam int unsigned NV = 3, NG = 2, TD = 4, NP = 2;
  localparam int unsigned DL  [NV] = '{0, 1, 2};
  localparam int unsigned GR  [NV] = '{0, 0, 1};
  localparam int unsigned LN  [NV] = '{6, 3, 5};
  localparam int unsigned CDV [NV] = '{2, 3, 4};

  logic clk = 0, rst_n = 1, enable = 1, start = 0;
  logic [15:0] n_patterns = 16'(NP);
  logic ft_en, grp_valid, shift_ph, busy, done;
  logic [0:0] grp;
  logic [NV-1:0] vc_clk_en, vc_scan_en, vc_shift;
  always #1 clk = ~clk;

  scan_control #(
    .N_VC(NV), .N_GROUPS(NG), .N_RATES(3), .T_DIV(TD), .PAT_W(16),
    .VC_DIVLOG(DL), .VC_GROUP(GR), .VC_LEN(LN), .VC_CDIV(CDV)
  ) dut (.*);

  int checks = 0, failures = 0;
  int unsigned cyc = 0;
  int unsigned n_sh [NV], n_ph [NV], last_sh [NV], n_cap [NV], last_cap [NV], wins [NV];
  bit prev_shift = 0;
  int unsigned ph_grp = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int v = 0; v < NV; v++) begin
      if (vc_clk_en[v]) begin
        checks++;
        if (!(grp_valid && int'(grp) == GR[v])) begin failures++; $display("FAIL clock idle core %0d", v); end
        if (vc_scan_en[v]) begin
          if (n_ph[v] > 0) begin
            checks++;
            if (cyc - last_sh[v] != TD << DL[v]) begin failures++; $display("FAIL spacing core %0d: %0d", v, cyc - last_sh[v]); end
          end
          last_sh[v] = cyc; n_sh[v]++; n_ph[v]++;
        end else begin
          if (n_cap[v] == 1) begin
            checks++;
            if (cyc - last_cap[v] != CDV[v]) begin failures++; $display("FAIL cap spacing core %0d", v); end
          end
          last_cap[v] = cyc; n_cap[v]++;
        end
      end
      if (!vc_scan_en[v]) begin
        checks++;
        if (!(int'(grp) == GR[v] && !shift_ph)) begin failures++; $display("FAIL scan_en core %0d", v); end
      end else if (n_cap[v] != 0) begin
        checks++; wins[v]++;
        if (n_cap[v] != 2) begin failures++; $display("FAIL capture count core %0d: %0d", v, n_cap[v]); end
        n_cap[v] = 0;
      end
    end
    if (prev_shift && !shift_ph) begin
      for (int v = 0; v < NV; v++)
        if (GR[v] == ph_grp) begin
          checks++;
          if (n_ph[v] != LN[v]) begin failures++; $display("FAIL phase shifts core %0d: %0d", v, n_ph[v]); end
        end
      for (int v = 0; v < NV; v++) n_ph[v] = 0;
    end
    if (shift_ph) ph_grp = int'(grp);
    prev_shift = shift_ph;
  end

  initial begin
    for (int v = 0; v < NV; v++) begin n_sh[v] = 0; n_ph[v] = 0; n_cap[v] = 0; wins[v] = 0; last_sh[v] = 0; last_cap[v] = 0; end
    #1 rst_n = 0;
    #30 rst_n = 1;
    repeat (7) @(posedge clk);
    start = 1;
    wait (done);
    repeat (2) @(posedge clk);
    for (int v = 0; v < NV; v++) begin
      checks += 2;
      if (n_sh[v] != (NP + 1) * LN[v]) begin failures++; $display("FAIL total shifts core %0d: %0d", v, n_sh[v]); end
      if (wins[v] != NP) begin failures++; $display("FAIL capture windows core %0d: %0d", v, wins[v]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
