// tb_tam_demux: random WPI, group select and enable; only the selected group's
// bus may carry WPI, all others must be zero.
module tb_tam_demux;
  logic en; logic [1:0] sel_d; logic [6:0] wpi; logic [6:0] grp_bus [4];
  tam_demux #(.W_EXT(7), .N_GROUPS(4)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (300) begin
      en = ($urandom % 5) != 0; sel_d = 2'($urandom); wpi = 7'($urandom);
      #1;
      for (int g = 0; g < 4; g++) begin
        checks++;
        if (grp_bus[g] != ((en && int'(sel_d) == g) ? wpi : 7'd0)) begin failures++; $display("FAIL g%0d", g); end
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
