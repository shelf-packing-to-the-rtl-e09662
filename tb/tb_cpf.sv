// tb_cpf: in shift mode the CPF output must equal the shift pulses; with
// scan_en low it must block them and give exactly two pulses per cap_go, one
// PLL cycle after cap_go and C_DIV cycles apart, then raise cap_done.
module tb_cpf;
  localparam int unsigned C_DIV = 5;
  logic clk = 0, rst_n = 1, scan_en = 1, shift_pulse = 0, cap_go = 0, gclk_en, cap_done;
  always #1 clk = ~clk;
  cpf #(.C_DIV(C_DIV)) dut (.*);
  int checks = 0, failures = 0;
  int unsigned cyc = 0, go_cyc = 0, npulse = 0;
  int unsigned pcyc [2];

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (scan_en) begin
      checks++;
      if (gclk_en != shift_pulse) begin failures++; $display("FAIL shift pass"); end
    end else if (gclk_en) begin
      if (npulse < 2) pcyc[npulse] = cyc;
      npulse++;
    end
    if (cap_go) begin go_cyc = cyc; npulse = 0; end
  end

  initial begin
    #1 rst_n = 0;
    #30 rst_n = 1;
    repeat (50) begin
      @(negedge clk); shift_pulse = ($urandom % 2) == 1;
    end
    for (int r = 0; r < 4; r++) begin
      @(negedge clk); scan_en = 0; shift_pulse = 1;
      repeat (3) @(negedge clk);
      cap_go = 1; @(negedge clk); cap_go = 0;
      repeat (C_DIV + 6) begin
        shift_pulse = ($urandom % 2) == 1; @(negedge clk);
      end
      checks += 4;
      if (npulse != 2) begin failures++; $display("FAIL pulses %0d", npulse); end
      if (pcyc[0] != go_cyc + 1) begin failures++; $display("FAIL launch at %0d go %0d", pcyc[0], go_cyc); end
      if (pcyc[1] - pcyc[0] != C_DIV) begin failures++; $display("FAIL spacing %0d", pcyc[1] - pcyc[0]); end
      if (!cap_done) begin failures++; $display("FAIL cap_done"); end
      scan_en = 1; @(negedge clk);
      checks++;
      if (cap_done) begin failures++; $display("FAIL cap_done after scan_en"); end
      repeat (20) begin
        @(negedge clk); shift_pulse = ($urandom % 2) == 1;
      end
    end
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
