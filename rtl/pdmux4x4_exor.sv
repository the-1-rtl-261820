// pdmux4x4_exor: 2-level expanded PDMUX4/EXOR4 configuration (top).
//
// Level 1: cell PDMUX4a splits clk (period T) into the phased clocks
// y1..y4 = a_dout[1..4] (period 4T, spaced T/2).
// Level 2: each y_i clocks its own PDMUX4 cell b_i, giving b_i's four
// outputs of period 16T. Interleaved as
//   w1..w16 = b1DOUT1, b2DOUT1, b3DOUT1, b4DOUT1, b1DOUT2, ..., b4DOUT4
// they are 16 phased signals, w_{i+1} lagging w_i by T/2: a 16-bit twisted
// ring pattern that changes one bit per half period of clk.
// Aggregation: an EXOR4 per second-level cell and a final EXOR4 (an inverse
// tree) give clk_out = w1 ^ ... ^ w16, which changes at every edge of clk,
// a replica of clk. Its polarity equals that of the level-1 XOR: clk_out is
// clk if reset is released while clk is low, its inverse otherwise.
//
// Reset: reset drives cell a only. Cell a's RSTFLAG (rstflag_a) drives the
// reset of the four second-level cells, so they stay in reset while reset is
// high or while cell a shows an invalid codeword, and all four leave reset
// together. The second-level RSTFLAGs are brought out as rstflag_b.
//
// The structure, instance roles and signal order follow the document's
// block diagram; the port names and the grouping of each second-level cell
// with its EXOR4 (as a pdmux4_exor4 instance) are this design's.
module pdmux4x4_exor
  import pdmux4_pkg::*;
(
  input  logic                  clk,
  input  logic                  reset,
  output codeword_t             a_dout,
  output logic                  rstflag_a,
  output codeword_t [PHASES:1]  b_dout,
  output logic      [PHASES:1] rstflag_b,
  output logic [PHASES*PHASES:1] w,
  output logic                  clk_out
);

  logic [PHASES:1] b_clk_out;

  pdmux4 u_pdmux4a (
    .clk     (clk),
    .reset   (reset),
    .pclk    (a_dout),
    .rstflag (rstflag_a)
  );

  for (genvar i = 1; i <= PHASES; i++) begin : g_level2
    pdmux4_exor4 u_pdmux4b (
      .clk     (a_dout[i]),
      .reset   (rstflag_a),
      .pclk    (b_dout[i]),
      .rstflag (rstflag_b[i]),
      .clk_out (b_clk_out[i])
    );
    // w_{(j-1)*4+i} = b_i DOUT_j
    for (genvar j = 1; j <= PHASES; j++) begin : g_w
      assign w[(j-1)*PHASES + i] = b_dout[i][j];
    end
  end

  exor4 u_exor4a (
    .a1 (b_clk_out[1]),
    .a2 (b_clk_out[2]),
    .a3 (b_clk_out[3]),
    .a4 (b_clk_out[4]),
    .z  (clk_out)
  );

endmodule
