// tb_pdmux4x4_exor: end-to-end testbench of the 2-level expanded
// PDMUX4/EXOR4 configuration, at its only (default) size.
//
// Clock period T = 10 ns; the testbench samples 2 ns after every clock edge
// and compares with references computed here from step counters:
//   first level  a_dout at position p (0..7):  bit i = (i <= p <= i+3)
//   second level w at position q (0..31):      w_i   = (i <= q <= i+15)
// It exercises, and counts, each mechanism of the design:
//   reset hold      a_dout alternates 0000/1111, second level held in reset
//                   by rstflag_a, w alternates all-0/all-1, clk_out is 0;
//   release low     reset released while clk is low: full 16T cycles of w,
//                   w_{i+1} lagging w_i by T/2, clk_out equal to clk;
//   release high    reset released while clk is high: same, clk_out = ~clk;
//   invalid at a    an invalid word forced into the first cell: rstflag_a
//                   rises, the second-level cells are held in reset, then
//                   every cell returns to a valid cycle and clk_out keeps
//                   reproducing every clock edge;
//   invalid at b2   an invalid word in second-level cell 2: rstflag_b[2]
//                   rises, the other cells are not affected.
// The w period (16T) is also timed directly on w1 and w16.
module tb_pdmux4x4_exor;
  import pdmux4_pkg::*;

  localparam time T = 10ns;

  logic                  clk = 1'b0;
  logic                  reset = 1'b1;
  codeword_t             a_dout;
  logic                  rstflag_a;
  codeword_t [4:1]       b_dout;
  logic      [4:1]       rstflag_b;
  logic      [16:1]      w;
  logic                  clk_out;

  int checks = 0;
  int failures = 0;
  int n_reset_hold = 0;
  int n_release_low = 0;
  int n_release_high = 0;
  int n_invalid_a = 0;
  int n_invalid_b = 0;
  int n_invalid_a_recovered = 0;
  int n_w_periods = 0;

  pdmux4x4_exor dut (
    .clk(clk), .reset(reset), .a_dout(a_dout), .rstflag_a(rstflag_a),
    .b_dout(b_dout), .rstflag_b(rstflag_b), .w(w), .clk_out(clk_out)
  );

  always #(T/2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  function automatic codeword_t ref_a(input int p);
    codeword_t cw;
    for (int i = 1; i <= 4; i++) cw[i] = (p >= i) && (p <= i + 3);
    return cw;
  endfunction

  function automatic logic [16:1] ref_w(input int q);
    logic [16:1] v;
    for (int i = 1; i <= 16; i++) v[i] = (q >= i) && (q <= i + 15);
    return v;
  endfunction

  function automatic bit is_valid_word(input codeword_t cw);
    for (int p = 0; p < 8; p++) if (ref_a(p) == cw) return 1'b1;
    return 1'b0;
  endfunction

  // n half periods; a from position p0, w from q0, clk_out polarity inv.
  task automatic run_steps(input int p0, input int q0, input int n, input bit inv, output int ok_steps);
    ok_steps = 0;
    for (int k = 0; k < n; k++) begin
      bit ok;
      ok = (a_dout == ref_a((p0 + k) % 8)) && (w == ref_w((q0 + k) % 32)) &&
           (clk_out == (clk ^ inv)) && !rstflag_a && (rstflag_b == 4'b0000);
      check(a_dout == ref_a((p0 + k) % 8), $sformatf("a_dout=%b expected %b", a_dout, ref_a((p0 + k) % 8)));
      check(w == ref_w((q0 + k) % 32), $sformatf("w=%b expected %b", w, ref_w((q0 + k) % 32)));
      check(clk_out == (clk ^ inv), $sformatf("clk_out=%b clk=%b", clk_out, clk));
      check(!rstflag_a && rstflag_b == 4'b0000, "reset flags set in normal operation");
      // w is b_dout interleaved
      for (int i = 1; i <= 4; i++)
        for (int j = 1; j <= 4; j++)
          check(w[(j-1)*4 + i] == b_dout[i][j], "w ordering");
      if (ok) ok_steps++;
      @(clk);
      #2ns;
    end
  endtask

  // w period on w1 and w16
  bit  timing_on = 1'b0;
  time last_w1 = 0;
  time last_w16 = 0;
  always @(posedge w[1]) begin
    if (timing_on && last_w1 != 0) begin
      check($time - last_w1 == 16*T, $sformatf("w1 period %0t", $time - last_w1));
      n_w_periods++;
    end
    last_w1 = $time;
  end
  always @(posedge w[16]) begin
    if (timing_on && last_w16 != 0) begin
      check($time - last_w16 == 16*T, $sformatf("w16 period %0t", $time - last_w16));
      check($time - last_w1 == 15*T/2, $sformatf("w16 lag behind w1 %0t", $time - last_w1));
      n_w_periods++;
    end
    last_w16 = $time;
  end

  initial begin
    #(3000 * T);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ok_steps;

    // Reset hold.
    @(posedge clk); #2ns;
    for (int k = 0; k < 8; k++) begin
      bit ok;
      ok = (a_dout == (clk ? 4'b0000 : 4'b1111)) && rstflag_a && (rstflag_b == 4'b1111) &&
           (w == (clk ? 16'hFFFF : 16'h0000)) && (clk_out == 1'b0);
      check(ok, $sformatf("reset hold: a=%b w=%h flags=%b/%b clk_out=%b", a_dout, w, rstflag_a, rstflag_b, clk_out));
      if (ok) n_reset_hold++;
      @(clk); #2ns;
    end

    // Release while clk is low: a shows 1111 (p=4), w is all 0 (q=0).
    @(negedge clk); #2ns;
    reset = 1'b0;
    #0.5ns;
    last_w1 = 0;
    last_w16 = 0;
    timing_on = 1'b1;
    run_steps(4, 0, 32 * 4, 1'b0, ok_steps);
    timing_on = 1'b0;
    n_release_low = ok_steps;

    // Release while clk is high: a shows 0000 (p=0), w is all 1 (q=16).
    reset = 1'b1;
    repeat (2) @(posedge clk);
    #2ns;
    reset = 1'b0;
    #0.5ns;
    run_steps(0, 16, 32 * 2, 1'b1, ok_steps);
    n_release_high = ok_steps;

    // Invalid word in the first-level cell during a high phase.
    @(negedge clk); #2ns;
    force dut.u_pdmux4a.d_rise = 4'b0101;
    @(posedge clk); #0.5ns;
    release dut.u_pdmux4a.d_rise;
    #1.5ns;
    check(a_dout == 4'b0101 && rstflag_a, "invalid word at cell a flagged");
    check(rstflag_b == 4'b1111, "second level held in reset by rstflag_a");
    if (a_dout == 4'b0101 && rstflag_a && rstflag_b == 4'b1111) n_invalid_a++;
    // One clock period to recover. The first cell then runs its valid cycle
    // and every second-level cell leaves reset and runs a valid cycle of its
    // own; clk_out keeps reproducing every clock edge. The second-level cells
    // whose clocks switch at the very moment rstflag_a falls may start one
    // step ahead of the others, so the 16-phase order is not checked here.
    repeat (2) @(clk);
    #2ns;
    begin
      int p;
      bit inv;
      int good;
      p = -1;
      for (int i = 0; i < 8; i++) if (ref_a(i) == a_dout) p = i;
      check(p >= 0 && !rstflag_a, $sformatf("cell a recovered: %b", a_dout));
      inv = clk ^ clk_out;
      good = 0;
      for (int k = 0; k < 64; k++) begin
        bit ok;
        ok = (a_dout == ref_a((p + k) % 8)) && !rstflag_a && (rstflag_b == 4'b0000) &&
             (clk_out == (clk ^ inv));
        for (int i = 1; i <= 4; i++) ok &= is_valid_word(b_dout[i]);
        check(ok, $sformatf("after recovery: a=%b b=%h flags=%b/%b", a_dout, b_dout, rstflag_a, rstflag_b));
        if (ok) good++;
        @(clk);
        #2ns;
      end
      if (good == 64) n_invalid_a_recovered++;
    end

    // Invalid word in second-level cell 2 while its clock y2 is high.
    wait (a_dout[2] == 1'b0);
    force dut.g_level2[2].u_pdmux4b.u_pdmux4.d_rise = 4'b1010;
    @(posedge a_dout[2]); #0.5ns;
    release dut.g_level2[2].u_pdmux4b.u_pdmux4.d_rise;
    #1.5ns;
    check(b_dout[2] == 4'b1010 && rstflag_b[2] && !rstflag_a && rstflag_b[1] == 1'b0 &&
          rstflag_b[3] == 1'b0 && rstflag_b[4] == 1'b0, "invalid word at cell b2 flagged alone");
    if (b_dout[2] == 4'b1010 && rstflag_b[2]) n_invalid_b++;
    // A global reset brings the whole tree back in phase.
    reset = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk); #2ns;
    reset = 1'b0;
    #0.5ns;
    run_steps(4, 0, 32 * 2, 1'b0, ok_steps);
    check(ok_steps == 64, "tree back in phase after reset");

    $display("mechanisms: reset_hold=%0d release_low=%0d release_high=%0d invalid_a=%0d (recovered %0d) invalid_b=%0d w_periods=%0d",
             n_reset_hold, n_release_low, n_release_high, n_invalid_a, n_invalid_a_recovered, n_invalid_b, n_w_periods);
    check(n_reset_hold > 0, "reset hold exercised");
    check(n_release_low == 128, "release while clk low exercised");
    check(n_release_high == 64, "release while clk high exercised");
    check(n_invalid_a > 0 && n_invalid_a_recovered > 0, "invalid codeword at cell a exercised");
    check(n_invalid_b > 0, "invalid codeword at a second-level cell exercised");
    check(n_w_periods >= 4, "w period timed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
