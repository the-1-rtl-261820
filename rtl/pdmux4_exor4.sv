// pdmux4_exor4: primitive PDMUX4/EXOR4 configuration.
//
// A PDMUX4 cell followed by an EXOR4 gate on its four phased outputs. The
// phased clocks change one at a time, one change per half period of clk, so
// their XOR changes at every edge of clk and clk_out is a copy of clk
// (possibly inverted, see below) rebuilt from the four phases:
// clk_out = pclk[1] ^ pclk[2] ^ pclk[3] ^ pclk[4].
//
// Polarity: the words shown after a rising edge all have the same parity.
// If reset is released while clk is low, clk_out equals clk; if it is
// released while clk is high, clk_out equals the inverse of clk. While
// reset is held, pclk alternates 0000 / 1111 and clk_out is 0.
//
// Interface: clk, reset in; the cell's pclk[4:1] and rstflag brought out,
// and clk_out. The composition follows the document; the polarity analysis
// is this design's.
module pdmux4_exor4
  import pdmux4_pkg::*;
(
  input  logic      clk,
  input  logic      reset,
  output codeword_t pclk,
  output logic      rstflag,
  output logic      clk_out
);

  pdmux4 u_pdmux4 (
    .clk     (clk),
    .reset   (reset),
    .pclk    (pclk),
    .rstflag (rstflag)
  );

  exor4 u_exor4 (
    .a1 (pclk[1]),
    .a2 (pclk[2]),
    .a3 (pclk[3]),
    .a4 (pclk[4]),
    .z  (clk_out)
  );

endmodule
