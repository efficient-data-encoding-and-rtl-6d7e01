// ones_counter: population count of the pair flags (a "Ones" block).
//
// cnt is the number of ones in v, width $clog2(N+1). Written as a loop of adders; a
// synthesis tool builds an adder tree from it. Combinational. N defaults to the 17
// pairs of the document's 18-line link.
module ones_counter #(
  parameter int unsigned N  = 17,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  v,
  output logic [CW-1:0] cnt
);
  always_comb begin
    cnt = '0;
    for (int unsigned i = 0; i < N; i++) cnt += CW'(v[i]);
  end
endmodule
