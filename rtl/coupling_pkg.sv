// coupling_pkg: types and helpers shared by the coupling-aware flit encoders and decoders.
//
// The inversion action is a 2-bit code {odd, even}: 2'b10 inverts the odd-indexed link
// lines, 2'b01 the even-indexed lines, 2'b11 all lines (full inversion) and 2'b00 none.
// The code values follow the output coding of the scheme III decision block; the masks
// are plain helpers of this implementation.
package coupling_pkg;

  typedef enum logic [1:0] {
    INV_NONE = 2'b00,
    INV_EVEN = 2'b01,
    INV_ODD  = 2'b10,
    INV_FULL = 2'b11
  } inv_action_e;

  localparam int unsigned MAX_LINES = 64;

  // Mask with ones on the odd-indexed lines (1, 3, 5, ...) of an n-line word.
  function automatic logic [MAX_LINES-1:0] odd_mask(input int unsigned n);
    logic [MAX_LINES-1:0] m;
    m = '0;
    for (int unsigned i = 1; i < n; i += 2) m[i] = 1'b1;
    return m;
  endfunction

  // Mask with ones on the even-indexed lines (0, 2, 4, ...) of an n-line word.
  function automatic logic [MAX_LINES-1:0] even_mask(input int unsigned n);
    logic [MAX_LINES-1:0] m;
    m = '0;
    for (int unsigned i = 0; i < n; i += 2) m[i] = 1'b1;
    return m;
  endfunction

  // Mask for an inversion action on an n-line word.
  function automatic logic [MAX_LINES-1:0] action_mask(input inv_action_e a, input int unsigned n);
    logic [MAX_LINES-1:0] m;
    m = '0;
    if (a[1]) m |= odd_mask(n);
    if (a[0]) m |= even_mask(n);
    return m;
  endfunction

endpackage
