// pdmux4: 1:4 phased demultiplexer cell (PDMUX4).
//
// Splits the clock clk (period T) into four phased clocks pclk[1..4] of
// period 4T and 50 % duty cycle, pclk[i+1] lagging pclk[i] by T/2. The cell
// advances one step through the eight valid codewords of pdmux4_pkg at every
// rising and every falling edge of clk, so the output word is a 4-bit twisted
// ring pattern that changes one bit per half period.
//
// Structure, as the document describes it: two 4-bit state registers,
// state_rise clocked by the rising edge and state_fall by the falling edge,
// each loading the codeword that follows the one the other register holds.
// pclk shows state_rise between a rising and a falling edge and state_fall
// between a falling and a rising edge. RESET (asynchronous, active high)
// loads codeword 1 (0000) into state_rise and codeword 5 (1111) into
// state_fall, so while reset is held pclk alternates 0000 / 1111 with clk.
// After release the first edge loads the successor of the word on show, so
// the valid cycle starts without a jump whichever level clk has at release.
//
// rstflag = reset OR (pclk is not a valid codeword). It is meant to drive
// the reset of cells clocked from pclk, holding them until pclk is valid.
// An invalid word is followed by codeword 1, so the cell recovers by itself
// within one clock period (this recovery rule is this design's choice).
//
// Output select: the document selects with the level of clk. Here the select
// is a half-period phase bit, phase = rise_tgl ^ fall_tgl, made by two small
// unreset toggle registers on the two edges of clk; it is 1 after a rising
// and 0 after a falling edge. pclk therefore changes only when registers
// change, and never shows the previous contents of the register that is just
// being loaded, which would put spurious edges on the clocks of cells
// downstream. This is this design's choice and adds two flip-flops to the
// eight state flip-flops (four with asynchronous reset, four with asynchronous
// set). The phase bit is correct after the first clock edge from power-up.
//
// Interface: clk, reset in; pclk[4:1], rstflag out. Timing: pclk changes
// right after every edge of clk; rstflag is combinational from reset and
// the registers.
module pdmux4
  import pdmux4_pkg::*;
(
  input  logic      clk,
  input  logic      reset,
  output codeword_t pclk,
  output logic      rstflag
);

  // Table entries loaded by reset into the rising-edge and falling-edge registers.
  localparam int unsigned RISE_RESET_INDEX = 1;
  localparam int unsigned FALL_RESET_INDEX = 5;

  codeword_t state_rise;  // present state loaded at the rising edge
  codeword_t state_fall;  // present state loaded at the falling edge
  logic      rise_tgl;
  logic      fall_tgl;
  codeword_t d_rise;      // next state of state_rise
  codeword_t d_fall;      // next state of state_fall
  logic      phase;       // 1 between a rising and the next falling edge

  assign d_rise = next_codeword(state_fall);
  assign d_fall = next_codeword(state_rise);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) state_rise <= PHASED_OUTPUT[RISE_RESET_INDEX];
    else       state_rise <= d_rise;
  end

  always_ff @(negedge clk or posedge reset) begin
    if (reset) state_fall <= PHASED_OUTPUT[FALL_RESET_INDEX];
    else       state_fall <= d_fall;
  end

  // Half-period phase: after a rising edge rise_tgl != fall_tgl, after a
  // falling edge they are equal.
  always_ff @(posedge clk) rise_tgl <= ~fall_tgl;
  always_ff @(negedge clk) fall_tgl <= rise_tgl;

  always_comb begin
    phase   = rise_tgl ^ fall_tgl;
    pclk    = phase ? state_rise : state_fall;
    rstflag = reset | ~is_valid(pclk);
  end

endmodule
