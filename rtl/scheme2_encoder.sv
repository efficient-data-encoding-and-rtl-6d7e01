// scheme2_encoder: scheme II coupling-aware flit encoder (odd, full or no inversion).
//
// A DATA_W-bit body flit travels on an N = DATA_W+1 line link whose top line is the
// invert flag. The flit, with 0 in the flag position, is compared with the word now on
// the link over its N-1 adjacent-line pairs by three rows of pair detectors: ty_cell
// (odd inversion helps), t2_cell (Type II, full inversion helps) and t4ss_cell (T4**,
// full inversion hurts). Three ones_counters count each row and module_a picks the
// action. Odd inversion flips lines 1, 3, ..., N-1; full inversion flips every line.
// Either way the flag line N-1 (odd, so DATA_W must be odd) becomes 1.
//
// The decoder cannot read from one flag which inversion was used; it decides by a Ty
// majority over the received word against the previous one. Odd inversion always reads
// as odd there. So that full inversion always reads as full, this design adds a fourth
// row of ty_cells over (previous word, fully inverted word) and a majority_voter whose
// output gates module_a's full decision. The three detector rows, the counters and
// module_a are the document's; this guard, the valid qualifier and the reset are not.
//
// Timing: link_o is the previous-word register; a flit with valid_i appears on link_o
// one clock later with valid_o. The link holds its value between flits. Synchronous
// active-low reset clears it.
module scheme2_encoder
  import coupling_pkg::*;
#(
  parameter int unsigned DATA_W = 17,
  localparam int unsigned N = DATA_W + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid_i,
  input  logic [DATA_W-1:0] data_i,
  output logic              valid_o,
  output logic [N-1:0]      link_o
);
  if (N % 2 != 0) begin : g_bad_width
    $error("scheme2_encoder: DATA_W must be odd");
  end

  localparam int unsigned NP = N - 1;
  localparam int unsigned CW = $clog2(NP + 1);

  logic [N-1:0]  x, xf, z;
  logic [NP-1:0] ty_f, t2_f, t4_f, tyf_f;
  logic [CW-1:0] ty_c, t2_c, t4_c;
  logic          full_ok, hi, fi;

  always_comb begin
    x  = {1'b0, data_i};
    xf = ~x;
  end

  for (genvar i = 0; i < NP; i++) begin : g_pair
    ty_cell   #(.ODD_BIT(i % 2 == 0)) u_ty  (.x(x[i+1:i]),  .y(link_o[i+1:i]), .z(ty_f[i]));
    t2_cell                           u_t2  (.x(x[i+1:i]),  .y(link_o[i+1:i]), .z(t2_f[i]));
    t4ss_cell                         u_t4  (.x(x[i+1:i]),  .y(link_o[i+1:i]), .z(t4_f[i]));
    ty_cell   #(.ODD_BIT(i % 2 == 0)) u_tyf (.x(xf[i+1:i]), .y(link_o[i+1:i]), .z(tyf_f[i]));
  end

  ones_counter #(.N(NP)) u_cnt_ty (.v(ty_f), .cnt(ty_c));
  ones_counter #(.N(NP)) u_cnt_t2 (.v(t2_f), .cnt(t2_c));
  ones_counter #(.N(NP)) u_cnt_t4 (.v(t4_f), .cnt(t4_c));
  majority_voter #(.N(NP)) u_full_ok (.v(tyf_f), .q(full_ok));

  module_a #(.NP(NP)) u_dec (
    .ty_cnt(ty_c), .t2_cnt(t2_c), .t4_cnt(t4_c), .ty_full_ok(full_ok), .hi(hi), .fi(fi)
  );

  always_comb begin
    if (fi)      z = xf;
    else if (hi) z = x ^ odd_mask(N)[N-1:0];
    else         z = x;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      link_o  <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) link_o <= z;
    end
  end

  a_one_action: assert property (@(posedge clk) disable iff (!rst_n) !(hi && fi));
endmodule
