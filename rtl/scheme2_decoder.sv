// scheme2_decoder: scheme II flit decoder.
//
// The top line of the N = DATA_W+1 line link says whether the word was inverted, not how.
// The decoder keeps the previous received word R and runs a row of ty_cells over
// (received word, R) into a majority_voter. With the flag set, no majority means odd
// (half) inversion and a majority means full inversion; the matching lines are inverted
// back. An odd-inverted word always shows no majority because odd inversion turns every
// flagged pair into an unflagged one and back; the encoder only sends full inversion when
// it shows a majority. The Ty row, the voter and the flag gating are the document's; the
// registers' reset and the output register are this design's.
//
// Timing: R loads on every valid word. data_o/valid_o are registered, one clock after
// link_i/valid_i. Synchronous active-low reset clears R to the encoder's reset value, 0.
module scheme2_decoder
  import coupling_pkg::*;
#(
  parameter int unsigned DATA_W = 17,
  localparam int unsigned N = DATA_W + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid_i,
  input  logic [N-1:0]      link_i,
  output logic              valid_o,
  output logic [DATA_W-1:0] data_o
);
  if (N % 2 != 0) begin : g_bad_width
    $error("scheme2_decoder: DATA_W must be odd");
  end

  localparam int unsigned NP = N - 1;

  logic [N-1:0]  r;
  logic [DATA_W-1:0] x;
  logic [NP-1:0] ty_f;
  logic          maj, half_inv, full_inv;

  for (genvar i = 0; i < NP; i++) begin : g_pair
    ty_cell #(.ODD_BIT(i % 2 == 0)) u_ty (.x(link_i[i+1:i]), .y(r[i+1:i]), .z(ty_f[i]));
  end

  majority_voter #(.N(NP)) u_maj (.v(ty_f), .q(maj));

  always_comb begin
    half_inv = link_i[N-1] & ~maj;
    full_inv = link_i[N-1] & maj;
    if (full_inv)      x = ~link_i[DATA_W-1:0];
    else if (half_inv) x = link_i[DATA_W-1:0] ^ odd_mask(N)[DATA_W-1:0];
    else               x = link_i[DATA_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r       <= '0;
      valid_o <= 1'b0;
      data_o  <= '0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) begin
        r      <= link_i;
        data_o <= x;
      end
    end
  end
endmodule
