// tb_bw_sipo: for three ratio / width cases, sends random bits on the TAM
// wires at every TAM strobe and checks, at each frame end, that chain j*R + t
// receives the bit that arrived on wire j in TAM cycle t of the frame.
module tb_bw_sipo;
  logic clk = 0, rst_n = 1, ft_en = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned strobe = 0;

  // case A: W=5, R=8 (one wire); case B: W=4, R=2 (two wires); case C: W=3, R=1
  logic [0:0] ina; logic [4:0] sia;
  logic [1:0] inb; logic [3:0] sib;
  logic [2:0] inc; logic [2:0] sic;
  bw_sipo #(.W(5), .DIVLOG(3)) ua (.clk, .rst_n, .ft_en, .tam_in(ina), .chain_si(sia));
  bw_sipo #(.W(4), .DIVLOG(1)) ub (.clk, .rst_n, .ft_en, .tam_in(inb), .chain_si(sib));
  bw_sipo #(.W(3), .DIVLOG(0)) uc (.clk, .rst_n, .ft_en, .tam_in(inc), .chain_si(sic));

  logic [0:0] ha [8];
  logic [1:0] hb [2];

  initial begin
    #1 rst_n = 0;
    #30 rst_n = 1;
    repeat (400) begin
      repeat (2) @(negedge clk);
      ft_en = 1;
      ina = 1'($urandom); inb = 2'($urandom); inc = 3'($urandom);
      ha[strobe % 8] = ina; hb[strobe % 2] = inb;
      #2;
      if (strobe % 8 == 7) begin
        for (int k = 0; k < 5; k++) begin
          checks++;
          if (sia[k] != ha[k][0]) begin failures++; $display("FAIL A chain %0d", k); end
        end
      end
      if (strobe % 2 == 1) begin
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (sib[k] != hb[k % 2][k / 2]) begin failures++; $display("FAIL B chain %0d", k); end
        end
      end
      checks++;
      if (sic != inc) begin failures++; $display("FAIL C"); end
      @(negedge clk); ft_en = 0;
      ina = 1'($urandom); inb = 2'($urandom);   // ignored between strobes
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
