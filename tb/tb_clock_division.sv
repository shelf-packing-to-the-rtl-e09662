// tb_clock_division: checks the TAM strobe period T_DIV and that fs_en[k]
// fires on every 2^k-th TAM strobe counted from the last sync, and never on
// the strobe that coincides with sync.
module tb_clock_division;
  localparam int unsigned T_DIV = 5, N_RATES = 4;
  logic clk = 0, rst_n = 1, sync = 0, ft_en;
  logic [N_RATES-1:0] fs_en;
  always #1 clk = ~clk;

  clock_division #(.T_DIV(T_DIV), .N_RATES(N_RATES)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned cyc = 0, last_ft = 0, nstrobe = 0, nft = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ft_en) begin
      nft++;
      if (nft > 1) begin
        checks++;
        if (cyc - last_ft != T_DIV) begin failures++; $display("FAIL period %0d", cyc - last_ft); end
      end
      last_ft = cyc;
      if (sync) begin
        nstrobe = 0;
        checks++;
        if (fs_en != '0) begin failures++; $display("FAIL fs on sync strobe"); end
      end else begin
        for (int k = 0; k < N_RATES; k++) begin
          checks++;
          if (fs_en[k] != ((nstrobe % (1 << k)) == (1 << k) - 1)) begin
            failures++; $display("FAIL fs_en[%0d] strobe %0d", k, nstrobe);
          end
        end
        nstrobe++;
      end
    end else begin
      checks++;
      if (fs_en != '0) begin failures++; $display("FAIL fs without ft"); end
    end
  end

  initial begin
    #1 rst_n = 0;
    #30 rst_n = 1;
    repeat (400) @(posedge clk);
    // sync on a strobe, then again off a strobe
    @(negedge clk); while (!ft_en) @(negedge clk);
    sync = 1; @(negedge clk); sync = 0;
    repeat (137) @(posedge clk);
    @(negedge clk); while (!ft_en) @(negedge clk);
    sync = 1; @(negedge clk); sync = 0;
    repeat (400) @(posedge clk);
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
