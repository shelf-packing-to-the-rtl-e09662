// tb_group_decoder: exhaustive check of the one-hot group decode, with and
// without enable, for 3 and 4 groups.
module tb_group_decoder;
  logic en;
  logic [1:0] d;
  logic [3:0] g4;
  logic [2:0] g3;
  group_decoder #(.N_GROUPS(4)) dut4 (.en, .d, .g(g4));
  group_decoder #(.N_GROUPS(3)) dut3 (.en, .d, .g(g3));
  int checks = 0, failures = 0;
  initial begin
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 4; i++) begin
        en = e[0]; d = i[1:0];
        #1;
        checks++;
        if (g4 != (e != 0 ? 4'(1 << i) : 4'b0)) begin failures++; $display("FAIL g4 en=%0d d=%0d g=%b", e, i, g4); end
        if (i < 3) begin
          checks++;
          if (g3 != (e != 0 ? 3'(1 << i) : 3'b0)) begin failures++; $display("FAIL g3 en=%0d d=%0d", e, i); end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
