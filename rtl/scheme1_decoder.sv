// scheme1_decoder: scheme I flit decoder.
//
// The top line of the N = DATA_W+1 line link is the invert flag. When it is 1 the
// odd-indexed data lines are inverted back; otherwise the data passes unchanged. This is
// the document's decoder; the output register is this design's.
//
// Timing: data_o and valid_o are registered, one clock after link_i/valid_i. Reset is
// synchronous and active low.
module scheme1_decoder
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
    $error("scheme1_decoder: DATA_W must be odd");
  end

  logic [DATA_W-1:0] x;

  always_comb x = link_i[DATA_W-1:0] ^ (link_i[N-1] ? odd_mask(N)[DATA_W-1:0] : '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      data_o  <= '0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) data_o <= x;
    end
  end
endmodule
