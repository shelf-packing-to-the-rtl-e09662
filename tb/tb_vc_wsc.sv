// tb_vc_wsc: a three-chain wrapper (chain 0: 2 input cells, 3-bit core
// segment, 1 output cell; chain 1: no segment, 2 output cells; chain 2: 1
// input cell, 2-bit segment, no output cell). A small core model sits on the
// segment and functional ports. Checks functional transparency outside test
// mode, isolation in test and interconnect mode, and, over random shift /
// capture sequences in both modes, every wso bit against a reference model of
// the whole chains.
module tb_vc_wsc;
  localparam int unsigned W = 3;
  localparam int unsigned NI [7] = '{2, 0, 1, 0, 0, 0, 0};
  localparam int unsigned NB [7] = '{3, 0, 2, 0, 0, 0, 0};
  localparam int unsigned NO [7] = '{1, 2, 0, 0, 0, 0, 0};
  localparam int unsigned NIT = 3, NOT = 3;

  logic clk = 0, rst_n = 1, clk_en = 0, scan_en = 1, test_mode = 0, extest = 0;
  logic [W-1:0] wsi = '0, wso, seg_si, seg_so;
  logic [NIT-1:0] pi = '0, core_in;
  logic [NOT-1:0] core_out, po;
  always #5 clk = ~clk;

  vc_wsc #(.W(W), .NI(NI), .NB(NB), .NO(NO)) dut (.*);

  // core model: segment 0 is 3 flops, segment 2 is 2 flops
  logic [2:0] s0;
  logic [1:0] s2;
  assign core_out = {core_in[0] ^ core_in[2], ~core_in[1], core_in[2]};
  assign seg_so = {s2[1], 1'b0, s0[2]};
  always_ff @(posedge clk or negedge rst_n) if (!rst_n) begin
    s0 <= '0; s2 <= '0;
  end else if (clk_en) begin
    if (scan_en) begin s0 <= {s0[1:0], seg_si[0]}; s2 <= {s2[0], seg_si[2]}; end
    else begin s0 <= ~s0 ^ {s0[0], s0[2:1]}; s2 <= {s2[0], ~s2[1]}; end
  end

  // reference: per chain, positions from wsi to wso
  // chain0: in0 in1 s0[0] s0[1] s0[2] out0 ; chain1: out1 out2 ; chain2: in2 s2[0] s2[1]
  bit r0 [6], r1 [2], r2 [3];
  int checks = 0, failures = 0;

  function automatic logic [2:0] ref_core_out();
    logic [2:0] ci;
    ci = {r2[0], r0[1], r0[0]};   // input cells 2, 1, 0
    return {ci[0] ^ ci[2], ~ci[1], ci[2]};
  endfunction

  task automatic do_shift();
    logic [W-1:0] b;
    b = W'($urandom);
    @(negedge clk);
    wsi = b; clk_en = 1; scan_en = 1;
    checks++;
    if (wso != {r2[2], r1[1], r0[5]}) begin failures++; $display("FAIL wso %b exp %b%b%b", wso, r2[2], r1[1], r0[5]); end
    for (int i = 5; i > 0; i--) r0[i] = r0[i-1]; r0[0] = b[0];
    r1[1] = r1[0]; r1[0] = b[1];
    r2[2] = r2[1]; r2[1] = r2[0]; r2[0] = b[2];
    @(negedge clk); clk_en = 0;
  endtask

  task automatic do_capture();
    logic [2:0] co, n0; logic [1:0] n2;
    @(negedge clk);
    scan_en = 0; clk_en = 1;
    co = ref_core_out();
    checks++;
    if (po != {r1[1], r1[0], r0[5]}) begin failures++; $display("FAIL po isolated in test mode"); end
    n0 = ~{r0[4], r0[3], r0[2]} ^ {r0[2], r0[4], r0[3]};
    n2 = {r2[1], ~r2[2]};
    {r0[4], r0[3], r0[2]} = n0; {r2[2], r2[1]} = n2;
    if (extest) begin
      // interconnect mode: input cells capture the pins, output cells hold
      r0[0] = pi[0]; r0[1] = pi[1]; r2[0] = pi[2];
    end else begin
      r0[5] = co[0]; r1[0] = co[1]; r1[1] = co[2];
    end
    @(negedge clk); clk_en = 0; scan_en = 1;
  endtask

  initial begin
    #1 rst_n = 0;
    #30 rst_n = 1;
    // functional mode: transparent
    repeat (20) begin
      @(negedge clk); pi = 3'($urandom); #1;
      checks += 2;
      if (core_in != pi) begin failures++; $display("FAIL core_in transparent"); end
      if (po != core_out) begin failures++; $display("FAIL po transparent"); end
    end
    test_mode = 1;
    // fill the chains so the reference is known
    for (int i = 0; i < 6; i++) r0[i] = 0;
    r1[0] = 0; r1[1] = 0; for (int i = 0; i < 3; i++) r2[i] = 0;
    // reset state: all cells and the model flops start at 0
    for (int p = 0; p < 60; p++) begin
      if (p == 30) begin test_mode = 0; extest = 1; end
      repeat (1 + $urandom % 7) do_shift();
      @(negedge clk); pi = 3'($urandom); #1;
      checks++;
      if (core_in != {r2[0], r0[1], r0[0]}) begin failures++; $display("FAIL isolation"); end
      do_capture();
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
