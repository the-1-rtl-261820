// exor4: four-input exclusive-OR gate, Z = A1 ^ A2 ^ A3 ^ A4.
//
// Aggregates four phased clocks back into one signal. Because consecutive
// phased clocks change at different clock edges, every change of any input
// flips Z, so the XOR of a cell's four outputs changes at every edge of the
// cell's input clock. The gate and its pin names (A1..A4, Z) follow the
// document. Purely combinational, no clock, no state.
module exor4 (
  input  logic a1,
  input  logic a2,
  input  logic a3,
  input  logic a4,
  output logic z
);

  always_comb z = a1 ^ a2 ^ a3 ^ a4;

endmodule
