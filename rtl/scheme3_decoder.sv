// scheme3_decoder: scheme III flit decoder.
//
// Reads the inversion code from the two control lines of the N = DATA_W+2 line link,
// {line N-1, line N-2}: 10 odd, 01 even, 11 full, 00 none, and inverts the matching data
// lines back. The document presents this decoder as the scheme II one (a Ty majority
// gated by the top line); that cannot tell even from odd inversion in general, so this
// design reads the second control line that the scheme III encoder already drives.
//
// Timing: data_o/valid_o are registered, one clock after link_i/valid_i. Synchronous
// active-low reset.
module scheme3_decoder
  import coupling_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  localparam int unsigned N = DATA_W + 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid_i,
  input  logic [N-1:0]      link_i,
  output logic              valid_o,
  output logic [DATA_W-1:0] data_o
);
  if (DATA_W % 2 != 0) begin : g_bad_width
    $error("scheme3_decoder: DATA_W must be even");
  end

  inv_action_e  act;
  logic [DATA_W-1:0] x;

  always_comb begin
    act = inv_action_e'(link_i[N-1:N-2]);
    x   = link_i[DATA_W-1:0] ^ action_mask(act, N)[DATA_W-1:0];
  end

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
