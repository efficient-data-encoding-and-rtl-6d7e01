// module_a: scheme II inversion decision.
//
// From the counts of pairs flagged by the Ty, T2 and T4** blocks over NP pairs it decides
// between odd (half) inversion, full inversion and no inversion:
//   odd  when 2(T2 - T4**) < 2Ty - NP and Ty > NP/2,
//   full when 2(T2 - T4**) > 2Ty - NP and T2 > T4**,
// the two inequalities of the document with w-1 = NP. NP is odd, so the two comparisons
// against 2Ty - NP never tie and at most one output is 1.
// ty_full_ok is this design's addition: it must be 1 for full inversion to be chosen. The
// scheme II decoder tells full from odd inversion by a Ty majority over the received word,
// and the encoder feeds this input with exactly that majority evaluated on the fully
// inverted word, so every word the encoder sends decodes correctly. Combinational.
module module_a #(
  parameter int unsigned NP = 17,
  localparam int unsigned CW = $clog2(NP + 1)
) (
  input  logic [CW-1:0] ty_cnt,
  input  logic [CW-1:0] t2_cnt,
  input  logic [CW-1:0] t4_cnt,
  input  logic          ty_full_ok,
  output logic          hi,
  output logic          fi
);
  int signed ty, t2, t4, gain_full, gain_odd;

  always_comb begin
    ty        = int'(ty_cnt);
    t2        = int'(t2_cnt);
    t4        = int'(t4_cnt);
    gain_full = 2 * (t2 - t4);
    gain_odd  = 2 * ty - int'(NP);
    hi = (gain_full < gain_odd) && (gain_odd > 0);
    fi = (gain_full > gain_odd) && (t2 > t4) && ty_full_ok;
  end
endmodule
