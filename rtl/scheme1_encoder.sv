// scheme1_encoder: scheme I coupling-aware flit encoder (odd inversion or none).
//
// A DATA_W-bit body flit is sent on an N = DATA_W+1 line link whose top line is the
// invert flag. The flit, with a 0 in the flag position, is compared with the word now on
// the link, pair of adjacent lines by pair of lines (N-1 pairs). A ty_cell per pair flags
// the pairs where inverting the odd-indexed line lowers coupling activity, and when those
// pairs are a strict majority the odd-indexed lines (1, 3, ..., N-1) are inverted. Line
// N-1 is odd, so the flag becomes 1 exactly when the word was inverted. DATA_W must be
// odd. This structure is the document's; the valid qualifier and the reset are this
// design's.
//
// Timing: link_o is the register that also serves as the "previous word" input. A flit
// presented with valid_i is on link_o one clock later, with valid_o. Without valid_i the
// link holds its value (no transitions). Reset (synchronous, active low) clears it to 0.
module scheme1_encoder
  import coupling_pkg::*;
#(
  parameter int unsigned DATA_W = 17,
  localparam int unsigned N = DATA_W + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid_i,
  input  logic [DATA_W-1:0] data_i,
  output logic          valid_o,
  output logic [N-1:0]  link_o
);
  if (N % 2 != 0) begin : g_bad_width
    $error("scheme1_encoder: DATA_W must be odd");
  end

  logic [N-1:0] x, z;
  logic [N-2:0] ty_f;
  logic         half_inv;

  always_comb x = {1'b0, data_i};

  for (genvar i = 0; i < N - 1; i++) begin : g_pair
    ty_cell #(.ODD_BIT(i % 2 == 0)) u_ty (.x(x[i+1:i]), .y(link_o[i+1:i]), .z(ty_f[i]));
  end

  majority_voter #(.N(N - 1)) u_maj (.v(ty_f), .q(half_inv));

  always_comb z = x ^ (half_inv ? odd_mask(N)[N-1:0] : '0);

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
