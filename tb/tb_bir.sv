// tb_bir: shifts random instructions into the BIR, updates them, checks the
// instruction output, the tgmf_mode and extest_mode decodes, that shifting alone does not
// change the instruction, and the capture / shift-out read-back.
module tb_bir;
  logic tck = 0, rst_n = 1, shift_en = 0, capture_en = 0, update_en = 0, wsi = 0, bir_so, tgmf_mode, extest_mode;
  logic [2:0] instr;
  always #5 tck = ~tck;
  bir #(.IR_W(3)) dut (.*);
  int checks = 0, failures = 0;

  task automatic pulse_shift(bit b);
    @(negedge tck); shift_en = 1; wsi = b; @(posedge tck); #1 shift_en = 0;
  endtask

  initial begin
    logic [2:0] v, prev;
    #1 rst_n = 0;
    #30 rst_n = 1;
    checks++; if (instr != 3'b000 || tgmf_mode || extest_mode) begin failures++; $display("FAIL reset"); end
    prev = 3'b000;
    for (int r = 0; r < 24; r++) begin
      v = (r % 3 == 0) ? 3'b001 : 3'($urandom);
      for (int b = 0; b < 3; b++) pulse_shift(v[b]);
      checks++; if (instr != prev) begin failures++; $display("FAIL instr changed by shift"); end
      @(negedge tck); update_en = 1; @(posedge tck); #1 update_en = 0;
      checks += 2;
      if (instr != v) begin failures++; $display("FAIL instr %b != %b", instr, v); end
      if (tgmf_mode != (v == 3'b001)) begin failures++; $display("FAIL mode"); end
      checks++;
      if (extest_mode != (v == 3'b010)) begin failures++; $display("FAIL extest mode"); end
      prev = v;
      @(negedge tck); capture_en = 1; @(posedge tck); #1 capture_en = 0;
      for (int b = 0; b < 3; b++) begin
        checks++;
        if (bir_so != v[b]) begin failures++; $display("FAIL readback bit %0d", b); end
        pulse_shift(0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
