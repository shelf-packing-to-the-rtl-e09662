// tb_tam_mux: with the default seven-core schedule, random core outputs (with
// garbage above each core's wire count) must appear on WPO at each core's wire
// offset when its group is selected; WPO is zero when disabled.
module tb_tam_mux;
  import tgmf_pkg::*;
  localparam vc_arr_t NW = '{4, 1, 2, 7, 6, 7, 1};
  logic en; logic [1:0] sel_m; logic [6:0] vc_out [7]; logic [6:0] wpo;
  tam_mux #(.VC_NW(NW)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (400) begin
      logic [6:0] exp;
      en = ($urandom % 5) != 0; sel_m = 2'($urandom);
      for (int i = 0; i < 7; i++) vc_out[i] = 7'($urandom);
      #1;
      exp = '0;
      if (en)
        for (int i = 0; i < 7; i++)
          if (VC_GROUP[i] == int'(sel_m))
            for (int b = 0; b < NW[i]; b++) exp[VC_OFS[i] + b] = vc_out[i][b];
      checks++;
      if (wpo != exp) begin failures++; $display("FAIL wpo %b exp %b", wpo, exp); end
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
