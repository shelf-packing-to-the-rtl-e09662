// tb_capture_fsm: three groups with shift phases of 5, 3 and 7 TAM cycles and
// two patterns each. A CPF stand-in answers cap_go with cap_done a few cycles
// later. Checks the sequence group 0, 1, 2; three shift phases of the right
// length per group; two capture windows per group, each with one cap_go; no
// start while enable is low; and done until start falls.
module tb_capture_fsm;
  localparam int unsigned NG = 3;
  localparam int unsigned CYC [NG] = '{5, 3, 7};
  logic clk = 0, rst_n = 1, enable = 0, start = 0, ft_en, grp_cap_done = 0;
  logic [15:0] n_patterns = 16'd2;
  logic [1:0] grp;
  logic grp_valid, sync, shift_ph, cap_win, cap_go, busy, done;
  always #1 clk = ~clk;

  capture_fsm #(.N_GROUPS(NG), .PAT_W(16), .CYC_W(16), .GRP_CYC(CYC)) dut (.*);

  int unsigned tc = 0;
  always @(posedge clk) tc <= (tc == 3) ? 0 : tc + 1;
  assign ft_en = (tc == 3);

  int checks = 0, failures = 0;
  int unsigned phases [NG], caps [NG], gos = 0, len = 0, order_err = 0, last_grp = 0;
  bit prev_shift = 0, prev_win = 0;
  int unsigned cd = 0;

  always @(posedge clk) if (rst_n) begin
    // CPF stand-in: done 3 cycles after cap_go, cleared when the window closes
    if (cap_go) begin cd = 3; gos++; end
    else if (cd > 0) cd--;
    grp_cap_done <= cap_win && cd == 1 ? 1'b1 : (cap_win ? grp_cap_done : 1'b0);
    if (shift_ph && ft_en) len++;
    if (prev_shift && !shift_ph) begin
      checks++;
      if (len != CYC[last_grp]) begin failures++; $display("FAIL phase len %0d group %0d", len, last_grp); end
      phases[last_grp]++;
      len = 0;
    end
    if (shift_ph) begin
      if (int'(grp) < last_grp) order_err++;
      last_grp = int'(grp);
    end
    if (cap_win && !prev_win) caps[grp]++;
    prev_shift = shift_ph;
    prev_win = cap_win;
  end

  initial begin
    for (int g = 0; g < NG; g++) begin phases[g] = 0; caps[g] = 0; end
    #1 rst_n = 0;
    #30 rst_n = 1;
    start = 1;
    repeat (50) @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL started without enable"); end
    start = 0; enable = 1;
    repeat (5) @(posedge clk);
    start = 1;
    wait (done);
    repeat (3) @(posedge clk);
    for (int g = 0; g < NG; g++) begin
      checks += 2;
      if (phases[g] != 3) begin failures++; $display("FAIL phases g%0d = %0d", g, phases[g]); end
      if (caps[g] != 2) begin failures++; $display("FAIL caps g%0d = %0d", g, caps[g]); end
    end
    checks += 3;
    if (gos != 2 * NG) begin failures++; $display("FAIL cap_go count %0d", gos); end
    if (order_err != 0) begin failures++; $display("FAIL group order"); end
    if (!done || busy) begin failures++; $display("FAIL done/busy"); end
    start = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL done held"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
