// tb_wby: random bits through the bypass register; WSO-side output must equal
// the bit shifted one TCK earlier and hold while shift_en is low.
module tb_wby;
  logic tck = 0, rst_n = 1, shift_en = 0, wsi = 0, wby_so;
  always #5 tck = ~tck;
  wby dut (.*);
  int checks = 0, failures = 0;
  bit exp = 0;
  initial begin
    #1 rst_n = 0;
    #30 rst_n = 1;
    checks++; if (wby_so != 0) failures++;
    repeat (200) begin
      @(negedge tck);
      shift_en = ($urandom % 4) != 0; wsi = 1'($urandom);
      @(posedge tck); #1;
      if (shift_en) exp = wsi;
      checks++;
      if (wby_so != exp) begin failures++; $display("FAIL wby"); end
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
