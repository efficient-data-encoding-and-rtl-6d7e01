// majority_voter: strict majority of N flags.
//
// q is 1 when more than N/2 of the inputs are 1, i.e. Ty > (w-1)/2 when fed with the w-1
// Ty flags of a w-line link. Built on ones_counter. Combinational.
module majority_voter #(
  parameter int unsigned N = 17
) (
  input  logic [N-1:0] v,
  output logic         q
);
  localparam int unsigned CW = $clog2(N + 1);
  logic [CW-1:0] cnt;

  ones_counter #(.N(N)) u_cnt (.v(v), .cnt(cnt));

  always_comb q = (32'(cnt) * 2) > N;
endmodule
