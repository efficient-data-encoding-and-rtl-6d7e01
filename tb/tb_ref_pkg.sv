// tb_ref_pkg: reference models for the coupling-coding testbenches.
//
// Everything here is computed from the definitions of the transition types, not from the
// gate equations of the RTL: a pair detector is modelled by classifying the pair's
// transition before and after the candidate inversion and checking whether the type got
// better. Words are handled as 64-bit vectors with an explicit line count n.
package tb_ref_pkg;

  // Coupling transition type (1..4) of two adjacent lines going from p to c.
  function automatic int ptype(input logic [1:0] p, input logic [1:0] c);
    logic [1:0] d;
    d = p ^ c;
    if (d == 2'b00) return 4;
    if (d == 2'b11) return (p[0] == p[1]) ? 3 : 2;
    return 1;
  endfunction

  // 1 when flipping the lines selected by m (2-bit) turns the pair's transition into a
  // better one: Type II -> Type I, or Type I -> Type III/IV.
  function automatic bit helps(input logic [1:0] p, input logic [1:0] c, input logic [1:0] m);
    int b, a;
    b = ptype(p, c);
    a = ptype(p, c ^ m);
    return (b == 2 && a == 1) || (b == 1 && (a == 3 || a == 4));
  endfunction

  // T4**: no switching now, but full inversion would make a Type II transition.
  function automatic bit t4ss(input logic [1:0] p, input logic [1:0] c);
    return ptype(p, c) == 4 && ptype(p, ~c) == 2;
  endfunction

  function automatic logic [1:0] pair_of(input logic [63:0] w, input int i);
    return {w[i+1], w[i]};
  endfunction

  // Mask of a pair's odd-indexed line inside the 2-bit pair starting at line i.
  function automatic logic [1:0] odd_in_pair(input int i);
    return (i % 2 == 0) ? 2'b10 : 2'b01;
  endfunction

  function automatic int cnt_ty(input logic [63:0] p, input logic [63:0] c, input int n);
    int k = 0;
    for (int i = 0; i < n - 1; i++) k += int'(helps(pair_of(p, i), pair_of(c, i), odd_in_pair(i)));
    return k;
  endfunction

  function automatic int cnt_te(input logic [63:0] p, input logic [63:0] c, input int n);
    int k = 0;
    for (int i = 0; i < n - 1; i++) k += int'(helps(pair_of(p, i), pair_of(c, i), ~odd_in_pair(i)));
    return k;
  endfunction

  function automatic int cnt_t2(input logic [63:0] p, input logic [63:0] c, input int n);
    int k = 0;
    for (int i = 0; i < n - 1; i++) k += int'(ptype(pair_of(p, i), pair_of(c, i)) == 2);
    return k;
  endfunction

  function automatic int cnt_t4ss(input logic [63:0] p, input logic [63:0] c, input int n);
    int k = 0;
    for (int i = 0; i < n - 1; i++) k += int'(t4ss(pair_of(p, i), pair_of(c, i)));
    return k;
  endfunction

  function automatic logic [63:0] oddm(input int n);
    logic [63:0] m = '0;
    for (int i = 1; i < n; i += 2) m[i] = 1'b1;
    return m;
  endfunction

  function automatic logic [63:0] allm(input int n);
    return (n >= 64) ? '1 : ((64'd1 << n) - 64'd1);
  endfunction

  // Actions: 0 none, 1 odd, 2 even, 3 full.
  function automatic int scheme1_action(input logic [63:0] p, input logic [63:0] c, input int n);
    return (2 * cnt_ty(p, c, n) > n - 1) ? 1 : 0;
  endfunction

  function automatic int scheme2_action(input logic [63:0] p, input logic [63:0] c, input int n);
    int np = n - 1;
    int ty = cnt_ty(p, c, n);
    int g  = 2 * (cnt_t2(p, c, n) - cnt_t4ss(p, c, n));
    bit full_ok = 2 * cnt_ty(p, ~c & allm(n), n) > np;
    if (g > 2 * ty - np && g > 0 && full_ok) return 3;
    if (g < 2 * ty - np && 2 * ty > np) return 1;
    return 0;
  endfunction

  // Full inversion condition met but refused because it would not decode.
  function automatic bit scheme2_full_refused(input logic [63:0] p, input logic [63:0] c, input int n);
    int np = n - 1;
    int ty = cnt_ty(p, c, n);
    int g  = 2 * (cnt_t2(p, c, n) - cnt_t4ss(p, c, n));
    return g > 2 * ty - np && g > 0 && !(2 * cnt_ty(p, ~c & allm(n), n) > np);
  endfunction

  function automatic int scheme3_action(input logic [63:0] p, input logic [63:0] c, input int n);
    int np = n - 1;
    int ty = cnt_ty(p, c, n);
    int te = cnt_te(p, c, n);
    int g  = 2 * (cnt_t2(p, c, n) - cnt_t4ss(p, c, n));
    if (2 * te > np && te > ty && g < 2 * te - np) return 2;
    if (g > 2 * ty - np && g > 0) return 3;
    if (g < 2 * ty - np && 2 * ty > np && te < ty) return 1;
    return 0;
  endfunction

  function automatic logic [63:0] apply(input logic [63:0] c, input int act, input int n);
    case (act)
      1: return c ^ oddm(n);
      2: return c ^ (allm(n) & ~oddm(n));
      3: return c ^ allm(n);
      default: return c;
    endcase
  endfunction

  // Weighted coupling activity of a word transition: Type I counts 1, Type II counts 2,
  // Types III and IV count 0 (the relative ranking used by the pair detectors).
  function automatic int coupling_cost(input logic [63:0] p, input logic [63:0] c, input int n);
    int k = 0;
    for (int i = 0; i < n - 1; i++) begin
      case (ptype(pair_of(p, i), pair_of(c, i)))
        1: k += 1;
        2: k += 2;
        default: ;
      endcase
    end
    return k;
  endfunction

endpackage
