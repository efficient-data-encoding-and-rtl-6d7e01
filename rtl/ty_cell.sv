// ty_cell: odd-inversion benefit detector for one pair of adjacent link lines (a "Ty" block).
//
// x is the pair's next value before any inversion, y the value the pair holds on the link
// now. The cell outputs 1 when inverting the odd-indexed line of the pair would lower the
// pair's coupling activity, i.e. for the transitions counted by Ty = T2 + T1 - T1***:
//   - Type II (both lines switch in opposite directions; odd inversion leaves Type I),
//   - the odd line switches while the even line holds (becomes Type IV),
//   - the even line switches while the odd line holds and the two lines were equal
//     before (becomes Type III).
// Not flagged: the even line switching from an unequal pair (would become Type II) and
// Types III and IV. ODD_BIT names which bit of x/y is the odd-indexed line: 1 for a pair
// starting on an even line, 0 for a pair starting on an odd line. The sub-type split
// follows the document's odd-inversion table; extending it to mirrored pairs is this
// design's reading. Purely combinational.
module ty_cell #(
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
    so   = xo ^ yo;           // odd line switches
    se   = xe ^ ye;           // even line switches
    yneq = yo ^ ye;           // lines differ before the transition
    z    = (so & se & yneq)   // Type II
         | (so & ~se)         // T1**: odd line switches alone
         | (se & ~so & ~yneq);// T1*: even line switches alone from an equal pair
  end
endmodule
