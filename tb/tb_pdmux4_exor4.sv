// tb_pdmux4_exor4: self-checking testbench for the primitive PDMUX4/EXOR4
// configuration.
//
// Clock period T = 10 ns, samples 2 ns after every edge. Checks that clk_out
// is 0 while reset is held; that after reset is released while clk is low,
// clk_out equals clk for many cycles, every edge of clk being reproduced;
// that after a release while clk is high, clk_out equals the inverse of clk;
// and that pclk keeps following the valid codeword cycle, computed here from
// a step counter, in both cases, and that each phase equals the XOR of the
// (polarity-corrected) clock and the other three phases. A watchdog ends a hung run with a failure.
module tb_pdmux4_exor4;
  import pdmux4_pkg::*;

  localparam time T = 10ns;

  logic      clk = 1'b0;
  logic      reset = 1'b1;
  codeword_t pclk;
  logic      rstflag;
  logic      clk_out;

  int checks = 0;
  int failures = 0;
  int n_same = 0;
  int n_inverted = 0;

  pdmux4_exor4 dut (.clk(clk), .reset(reset), .pclk(pclk), .rstflag(rstflag), .clk_out(clk_out));

  always #(T/2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  function automatic codeword_t ref_word(input int p);
    codeword_t cw;
    for (int i = 1; i <= 4; i++) cw[i] = (p >= i) && (p <= i + 3);
    return cw;
  endfunction

  // n half periods from position p0; inv selects the expected polarity.
  task automatic run_steps(input int p0, input int n, input bit inv);
    for (int k = 0; k < n; k++) begin
      check(pclk == ref_word((p0 + k) % 8), $sformatf("pclk=%b expected %b", pclk, ref_word((p0 + k) % 8)));
      check(clk_out == (clk ^ inv), $sformatf("clk_out=%b clk=%b inv=%b", clk_out, clk, inv));
      // Transposition: each phase is the XOR of the clock and the other three.
      for (int i = 1; i <= 4; i++) begin
        logic others;
        others = 1'b0;
        for (int j = 1; j <= 4; j++) if (j != i) others ^= pclk[j];
        check(pclk[i] == ((clk ^ inv) ^ others), $sformatf("pclk[%0d] != clk ^ other phases", i));
      end
      if (clk_out == (clk ^ inv)) begin
        if (inv) n_inverted++;
        else     n_same++;
      end
      @(clk);
      #2ns;
    end
  endtask

  initial begin
    #(1000 * T);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #2ns;
    for (int k = 0; k < 6; k++) begin
      check(clk_out == 1'b0 && rstflag, "clk_out 0 and rstflag set during reset");
      @(clk); #2ns;
    end
    // Release while clk is low.
    @(negedge clk); #2ns;
    reset = 1'b0;
    #0.5ns;
    run_steps(4, 8 * 8, 1'b0);
    // Release while clk is high.
    reset = 1'b1;
    repeat (2) @(posedge clk);
    #2ns;
    reset = 1'b0;
    #0.5ns;
    run_steps(0, 8 * 4, 1'b1);
    check(n_same == 64 && n_inverted == 32, "both release polarities exercised");
    $display("clk_out=clk for %0d half periods, clk_out=~clk for %0d", n_same, n_inverted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
