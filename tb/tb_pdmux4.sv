// tb_pdmux4: self-checking testbench for the PDMUX4 cell.
//
// Drives clk with period T = 10 ns and checks, half period by half period,
// the word on pclk against a reference computed here from a step counter:
// at cycle position p (0..7) phased clock i is 1 exactly when i <= p <= i+3.
// Covers: the reset state (pclk alternates 0000 / 1111 with clk, rstflag
// high); release of reset while clk is low and while clk is high (both must
// continue the valid cycle without a jump); the timing of every phased clock
// (period 4T, high and low width 2T, clock i+1 rising T/2 after clock i);
// and an invalid codeword put into the rising-edge register, which must
// raise rstflag and be left within one clock period. A watchdog ends the
// run with a failure if it hangs.
module tb_pdmux4;
  import pdmux4_pkg::*;

  localparam time T = 10ns;

  logic      clk = 1'b0;
  logic      reset = 1'b1;
  codeword_t pclk;
  logic      rstflag;

  int checks = 0;
  int failures = 0;
  bit timing_on = 1'b0;
  int n_rise_periods = 0;
  int n_lags = 0;
  int n_invalid = 0;

  pdmux4 dut (.clk(clk), .reset(reset), .pclk(pclk), .rstflag(rstflag));

  always #(T/2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // Reference word at cycle position p.
  function automatic codeword_t ref_word(input int p);
    codeword_t cw;
    for (int i = 1; i <= 4; i++) cw[i] = (p >= i) && (p <= i + 3);
    return cw;
  endfunction

  // Sample n half periods, 2 ns after each edge; p0 is the expected position
  // in the half period where sampling starts.
  task automatic run_steps(input int p0, input int n);
    for (int k = 0; k < n; k++) begin
      check(pclk == ref_word((p0 + k) % 8),
            $sformatf("step %0d: pclk=%b expected %b", k, pclk, ref_word((p0 + k) % 8)));
      check(rstflag == 1'b0, "rstflag set in normal operation");
      @(clk);
      #2ns;
    end
  endtask

  // Phased clock timing.
  time last_rise [1:4] = '{default: 0};
  time last_fall [1:4] = '{default: 0};
  for (genvar gi = 1; gi <= 4; gi++) begin : g_timing
    always @(posedge pclk[gi]) begin
      if (timing_on && last_rise[gi] != 0 && last_fall[gi] != 0) begin
        check($time - last_rise[gi] == 4*T, $sformatf("pclk%0d period %0t", gi, $time - last_rise[gi]));
        check($time - last_fall[gi] == 2*T, $sformatf("pclk%0d low width %0t", gi, $time - last_fall[gi]));
        n_rise_periods++;
      end
      if (timing_on && gi > 1 && last_rise[gi-1] != 0) begin
        check($time - last_rise[gi-1] == T/2, $sformatf("pclk%0d lag %0t", gi, $time - last_rise[gi-1]));
        n_lags++;
      end
      last_rise[gi] = $time;
    end
    always @(negedge pclk[gi]) begin
      if (timing_on && last_rise[gi] != 0)
        check($time - last_rise[gi] == 2*T, $sformatf("pclk%0d high width %0t", gi, $time - last_rise[gi]));
      last_fall[gi] = $time;
    end
  end

  initial begin
    #(2000 * T);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Reset state: 0000 while clk is high, 1111 while low.
    @(posedge clk); #2ns;
    for (int k = 0; k < 8; k++) begin
      check(pclk == (clk ? 4'b0000 : 4'b1111), $sformatf("reset word %b with clk=%b", pclk, clk));
      check(rstflag == 1'b1, "rstflag low during reset");
      @(clk); #2ns;
    end
    // Release while clk is low: the word on show is 1111, position 4.
    @(negedge clk); #2ns;
    reset = 1'b0;
    #0.5ns;
    for (int i = 1; i <= 4; i++) begin last_rise[i] = 0; last_fall[i] = 0; end
    timing_on = 1'b1;
    run_steps(4, 8 * 6);
    timing_on = 1'b0;
    check(n_rise_periods >= 16 && n_lags >= 12, "timing checks were exercised");

    // Release while clk is high: the word on show is 0000, position 0.
    reset = 1'b1;
    repeat (3) @(posedge clk);
    #2ns;
    check(pclk == 4'b0000 && rstflag, "reset word while clk high");
    reset = 1'b0;
    #0.5ns;
    run_steps(0, 8 * 3);

    // Invalid codeword in the rising-edge register while it is on show.
    @(negedge clk); #2ns;
    force dut.d_rise = 4'b0101;
    @(posedge clk); #0.5ns;
    release dut.d_rise;
    #1.5ns;
    check(pclk == 4'b0101, "invalid word on show");
    check(rstflag == 1'b1, "rstflag flags the invalid word");
    if (rstflag) n_invalid++;
    @(negedge clk); #2ns;
    // Recovery: the falling-edge register takes codeword 1 (position 0).
    run_steps(0, 8 * 2);
    check(n_invalid == 1, "invalid codeword case exercised");

    $display("reset/release/timing/invalid: periods=%0d lags=%0d invalid=%0d", n_rise_periods, n_lags, n_invalid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
