// pdmux4_pkg: types, constants and codeword functions shared by the
// 1:4 phased demultiplexer (PDMUX4) cell and the configurations built from it.
//
// A PDMUX4 cell shows one 4-bit codeword per half period of its input clock.
// The eight valid codewords form the cyclic sequence below, written as
// PCLK[4..1] (bit 1 is the first phased clock, bit 4 the last):
//
//   index : 1    2    3    4    5    6    7    8
//   word  : 0000 0001 0011 0111 1111 1110 1100 1000
//
// Read as (PCLK1,PCLK2,PCLK3,PCLK4) this is 0000 -> 1000 -> 1100 -> 1110 ->
// 1111 -> 0111 -> 0011 -> 0001: each step changes exactly one bit, so each
// phased clock lags the previous one by half a clock period. The sequence,
// its indexing from 1 and the reset entries used by the cell (1 for the rising-edge register,
// 5 for the falling-edge register) follow the document. Sending an invalid
// codeword to entry 1 is this design's own choice.
package pdmux4_pkg;

  // Number of phased outputs of one cell.
  localparam int unsigned PHASES = 4;
  // Length of the valid codeword cycle (2 * PHASES half periods).
  localparam int unsigned NUM_CODEWORDS = 2 * PHASES;

  typedef logic [PHASES:1] codeword_t;
  typedef codeword_t codeword_table_t [1:NUM_CODEWORDS];

  // The valid codewords in the order the cell steps through them.
  localparam codeword_table_t PHASED_OUTPUT = '{
    4'b0000, 4'b0001, 4'b0011, 4'b0111,
    4'b1111, 4'b1110, 4'b1100, 4'b1000
  };

  // 1 when cw is one of the eight valid codewords.
  function automatic logic is_valid(input codeword_t cw);
    logic found;
    found = 1'b0;
    for (int unsigned i = 1; i <= NUM_CODEWORDS; i++) begin
      if (cw == PHASED_OUTPUT[i]) found = 1'b1;
    end
    return found;
  endfunction

  // Codeword that follows cw in the cycle; an invalid codeword is followed by
  // entry 1, so the cell re-enters the valid cycle within one clock period.
  function automatic codeword_t next_codeword(input codeword_t cw);
    codeword_t nxt;
    nxt = PHASED_OUTPUT[1];
    for (int unsigned i = 1; i <= NUM_CODEWORDS; i++) begin
      if (cw == PHASED_OUTPUT[i]) nxt = PHASED_OUTPUT[(i % NUM_CODEWORDS) + 1];
    end
    return nxt;
  endfunction

endpackage
