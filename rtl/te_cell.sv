// te_cell: even-inversion benefit detector for one pair of adjacent link lines (a "Te" block).
//
// Mirror image of ty_cell for even inversion. x is the pair's next value before any
// inversion, y its value on the link now. The output is 1 for the transitions counted by
// Te = T2 + T1 - T1*:
//   - Type II (becomes Type I under even inversion),
//   - the even line switches while the odd line holds (becomes Type IV),
//   - the odd line switches while the even line holds and the lines were equal before
//     (becomes Type III).
// The odd line switching from an unequal pair (would become Type II) and Types III and IV
// are not flagged. ODD_BIT names the odd-indexed bit of the pair as in ty_cell. The
// classification follows the document's even-inversion table. Combinational.
module te_cell #(
  parameter bit ODD_BIT = 1'b1
) (
  input  logic [1:0] x,
  input  logic [1:0] y,
  output logic       z
);
  logic xo, xe, yo, ye, so, se, yneq;

  always_comb begin
    xo   = x[ODD_BIT];
    xe   = x[~ODD_BIT];
    yo   = y[ODD_BIT];
    ye   = y[~ODD_BIT];
    so   = xo ^ yo;
    se   = xe ^ ye;
    yneq = yo ^ ye;
    z    = (so & se & yneq)    // Type II
         | (se & ~so)          // even line switches alone
         | (so & ~se & ~yneq); // odd line switches alone from an equal pair
  end
endmodule
