// tb_shift_gate: random fs_en / grp_en stimulus; the gate must pass exactly
// the first LEN strobes that arrive while grp_en is high after each start,
// and block everything else.
module tb_shift_gate;
  localparam int unsigned LEN = 13;
  logic clk = 0, rst_n = 1, start = 0, grp_en = 0, fs_en = 0, shift_pulse, done;
  always #1 clk = ~clk;
  shift_gate #(.LEN(LEN)) dut (.*);
  int checks = 0, failures = 0;
  int unsigned given = LEN;

  always @(posedge clk) if (rst_n) begin
    bit exp;
    exp = !start && grp_en && fs_en && given < LEN;
    checks++;
    if (shift_pulse != exp) begin failures++; $display("FAIL pulse given=%0d", given); end
    checks++;
    if (done != (given == LEN)) begin failures++; $display("FAIL done given=%0d", given); end
    if (start) given = 0;
    else if (exp) given++;
  end

  initial begin
    #1 rst_n = 0;
    #30 rst_n = 1;
    for (int round = 0; round < 6; round++) begin
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      repeat (120) begin
        grp_en = ($urandom % 4) != 0;
        fs_en  = ($urandom % 3) == 0;
        @(negedge clk);
      end
      grp_en = 0; fs_en = 0;
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
