// module_c: scheme III inversion decision.
//
// From the Ty, Te, T2 and T4** counts over NP pairs it picks one of four actions, output
// as {oi, ei}: 2'b10 odd inversion, 2'b01 even inversion, 2'b11 full inversion, 2'b00 none.
//   even when Te > NP/2, Te > Ty and 2(T2 - T4**) < 2Te - NP,
//   full when 2(T2 - T4**) > 2Ty - NP and T2 > T4**,
//   odd  when 2(T2 - T4**) < 2Ty - NP, Ty > NP/2 and Te < Ty.
// The conditions are the document's. It gives no order when the even and full conditions
// both hold; this design lets even win, since its condition already states that even
// inversion saves more than full inversion. Combinational.
module module_c
  import coupling_pkg::*;
#(
  parameter int unsigned NP = 17,
  localparam int unsigned CW = $clog2(NP + 1)
) (
  input  logic [CW-1:0] ty_cnt,
  input  logic [CW-1:0] te_cnt,
  input  logic [CW-1:0] t2_cnt,
  input  logic [CW-1:0] t4_cnt,
  output logic          oi,
  output logic          ei
);
  int signed ty, te, t2, t4, gain_full;
  logic even_c, full_c, odd_c;
  inv_action_e act;

  always_comb begin
    ty        = int'(ty_cnt);
    te        = int'(te_cnt);
    t2        = int'(t2_cnt);
    t4        = int'(t4_cnt);
    gain_full = 2 * (t2 - t4);
    even_c = (2 * te > int'(NP)) && (te > ty) && (gain_full < 2 * te - int'(NP));
    full_c = (gain_full > 2 * ty - int'(NP)) && (t2 > t4);
    odd_c  = (gain_full < 2 * ty - int'(NP)) && (2 * ty > int'(NP)) && (te < ty);
    if (even_c)      act = INV_EVEN;
    else if (full_c) act = INV_FULL;
    else if (odd_c)  act = INV_ODD;
    else             act = INV_NONE;
    {oi, ei} = act;
  end
endmodule
