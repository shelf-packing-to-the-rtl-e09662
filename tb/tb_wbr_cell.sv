// tb_wbr_cell: random control of an input-type and an output-type cell;
// checks shift, capture (output cell) or hold (input cell), clock enable,
// and the CFO mux in functional, test and interconnect mode (where the
// input cell captures its pin and the output cell holds).
module tb_wbr_cell;
  logic clk = 0, rst_n = 1, clk_en = 0, scan_en = 0, test_mode = 0, extest = 0, cfi = 0, cti = 0;
  logic cfo_i, cto_i, cfo_o, cto_o;
  always #5 clk = ~clk;
  wbr_cell #(.CAPTURES(1'b0)) u_in  (.clk, .rst_n, .clk_en, .scan_en, .test_mode, .extest, .cfi, .cti, .cfo(cfo_i), .cto(cto_i));
  wbr_cell #(.CAPTURES(1'b1)) u_out (.clk, .rst_n, .clk_en, .scan_en, .test_mode, .extest, .cfi, .cti, .cfo(cfo_o), .cto(cto_o));
  int checks = 0, failures = 0;
  bit qi = 0, qo = 0;
  initial begin
    #1 rst_n = 0;
    #30 rst_n = 1;
    repeat (500) begin
      @(negedge clk);
      clk_en = 1'($urandom); scan_en = 1'($urandom); begin : mode
        automatic int unsigned m = $urandom_range(2);
        test_mode = (m == 1); extest = (m == 2);
      end
      cfi = 1'($urandom); cti = 1'($urandom);
      #1;
      checks += 2;
      if (cfo_i != ((test_mode || extest) ? qi : cfi)) begin failures++; $display("FAIL cfo in"); end
      if (cfo_o != ((test_mode || extest) ? qo : cfi)) begin failures++; $display("FAIL cfo out"); end
      if (clk_en) begin
        if (scan_en) begin qi = cti; qo = cti; end
        else if (extest) qi = cfi;
        else qo = cfi;
      end
      @(posedge clk); #1;
      checks += 2;
      if (cto_i != qi) begin failures++; $display("FAIL cto in"); end
      if (cto_o != qo) begin failures++; $display("FAIL cto out"); end
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
