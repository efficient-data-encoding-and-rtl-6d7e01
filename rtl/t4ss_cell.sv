// t4ss_cell: T4** detector for one pair of adjacent link lines (a "T4**" block).
//
// Outputs 1 when neither line switches and the two lines differ (01->01 or 10->10).
// This is the Type IV case that full inversion would turn into a Type II transition,
// so it counts against full inversion. The document names the block and its role;
// identifying it as the unequal-pair Type IV case is this design's reading. x is the
// next value, y the current value. Combinational.
module t4ss_cell (
  input  logic [1:0] x,
  input  logic [1:0] y,
  output logic       z
);
  always_comb z = (x == y) & (y[0] ^ y[1]);
endmodule
