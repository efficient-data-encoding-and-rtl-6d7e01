// scheme3_encoder: scheme III coupling-aware flit encoder (odd, even, full or no inversion).
//
// A DATA_W-bit body flit travels on an N = DATA_W+2 line link. The two top lines are
// control lines: line DATA_W (even index) and line DATA_W+1 (odd index), both 0 in the
// uninverted word. The word is compared with the one now on the link over its N-1
// adjacent-line pairs by four rows of pair detectors (ty_cell, te_cell, t2_cell,
// t4ss_cell), counted by four ones_counters; module_c picks the action. Odd inversion
// flips the odd-indexed lines, even inversion the even-indexed lines and full inversion
// both. Because one control line is odd and the other even, the pair {line N-1, line N-2}
// ends up holding module_c's code itself: 10 odd, 01 even, 11 full, 00 none. DATA_W must
// be even. The detector rows, counters, decision rules and the two control lines are the
// document's; the valid qualifier and reset are this design's.
//
// Timing: link_o is the previous-word register; a flit with valid_i appears on link_o one
// clock later with valid_o. The link holds between flits. Synchronous active-low reset.
module scheme3_encoder
  import coupling_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  localparam int unsigned N = DATA_W + 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid_i,
  input  logic [DATA_W-1:0] data_i,
  output logic              valid_o,
  output logic [N-1:0]      link_o
);
  if (DATA_W % 2 != 0) begin : g_bad_width
    $error("scheme3_encoder: DATA_W must be even");
  end

  localparam int unsigned NP = N - 1;
  localparam int unsigned CW = $clog2(NP + 1);

  logic [N-1:0]  x, z;
  logic [NP-1:0] ty_f, te_f, t2_f, t4_f;
  logic [CW-1:0] ty_c, te_c, t2_c, t4_c;
  logic          oi, ei;
  inv_action_e   act;

  always_comb x = {2'b00, data_i};

  for (genvar i = 0; i < NP; i++) begin : g_pair
    ty_cell   #(.ODD_BIT(i % 2 == 0)) u_ty (.x(x[i+1:i]), .y(link_o[i+1:i]), .z(ty_f[i]));
    te_cell   #(.ODD_BIT(i % 2 == 0)) u_te (.x(x[i+1:i]), .y(link_o[i+1:i]), .z(te_f[i]));
    t2_cell                           u_t2 (.x(x[i+1:i]), .y(link_o[i+1:i]), .z(t2_f[i]));
    t4ss_cell                         u_t4 (.x(x[i+1:i]), .y(link_o[i+1:i]), .z(t4_f[i]));
  end

  ones_counter #(.N(NP)) u_cnt_ty (.v(ty_f), .cnt(ty_c));
  ones_counter #(.N(NP)) u_cnt_te (.v(te_f), .cnt(te_c));
  ones_counter #(.N(NP)) u_cnt_t2 (.v(t2_f), .cnt(t2_c));
  ones_counter #(.N(NP)) u_cnt_t4 (.v(t4_f), .cnt(t4_c));

  module_c #(.NP(NP)) u_dec (
    .ty_cnt(ty_c), .te_cnt(te_c), .t2_cnt(t2_c), .t4_cnt(t4_c), .oi(oi), .ei(ei)
  );

  always_comb begin
    act = inv_action_e'({oi, ei});
    z   = x ^ action_mask(act, N)[N-1:0];
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
endmodule
