// tb_bw_piso: loads random chain scan-out words at frame ends and checks that
// TAM wire j shows chain j*R + t in TAM cycle t after the load (unused chain
// slots read 0), for R = 4 with W = 6 and for R = 1 with W = 3.
module tb_bw_piso;
  logic clk = 0, rst_n = 1, ft_en = 0;
  always #1 clk = ~clk;
  int checks = 0, failures = 0;
  int unsigned strobe = 0;

  logic loada, loadc;
  logic [5:0] soa; logic [1:0] outa;
  logic [2:0] soc; logic [2:0] outc;
  bw_piso #(.W(6), .DIVLOG(2)) ua (.clk, .rst_n, .ft_en, .load(loada), .chain_so(soa), .tam_out(outa));
  bw_piso #(.W(3), .DIVLOG(0)) uc (.clk, .rst_n, .ft_en, .load(loadc), .chain_so(soc), .tam_out(outc));

  logic [7:0] worda = '0;
  logic [2:0] wordc = '0;
  bit loaded = 0;

  initial begin
    loada = 0; loadc = 0; soa = '0; soc = '0;
    #1 rst_n = 0;
    #30 rst_n = 1;
    repeat (400) begin
      @(negedge clk);
      // outputs in this TAM cycle, before the strobe
      if (loaded) begin
        for (int j = 0; j < 2; j++) begin
          checks++;
          if (outa[j] != worda[j * 4 + (strobe % 4)]) begin failures++; $display("FAIL A wire %0d t %0d", j, strobe % 4); end
        end
        checks++;
        if (outc != wordc) begin failures++; $display("FAIL C"); end
      end
      ft_en = 1;
      soa = 6'($urandom); soc = 3'($urandom);
      loada = (strobe % 4 == 3); loadc = 1;
      if (loada) begin worda = {2'b00, soa}; end
      wordc = soc;
      if (strobe % 4 == 3) loaded = 1;
      @(negedge clk); ft_en = 0; loada = 0; loadc = 0;
      soa = 6'($urandom);
      strobe++;
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
