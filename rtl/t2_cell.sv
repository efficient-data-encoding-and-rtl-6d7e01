// t2_cell: Type II transition detector for one pair of adjacent link lines (a "T2" block).
//
// Outputs 1 when both lines switch in opposite directions (01->10 or 10->01), the
// transition with the largest coupling activity. Full inversion of the pair turns it
// into Type IV. x is the next value, y the current value. Combinational.
module t2_cell (
  input  logic [1:0] x,
  input  logic [1:0] y,
  output logic       z
);
  always_comb z = (x[0] ^ y[0]) & (x[1] ^ y[1]) & (y[0] ^ y[1]);
endmodule
