// link_pipe: end-to-end network path of encoded flits.
//
// Between the source and destination network interfaces a flit crosses HOPS routers.
// Under wormhole switching the routers forward body flits of a packet in order and
// unchanged, so for the encoder/decoder pair the path is a pipeline of HOPS registers,
// one per hop, each holding its value between flits exactly like a physical link. The
// routers themselves are not part of this design.
//
// Timing: d_o/valid_o follow d_i/valid_i by HOPS clocks. Synchronous active-low reset
// clears every stage to 0, matching the encoder's reset value.
module link_pipe #(
  parameter int unsigned W    = 18,
  parameter int unsigned HOPS = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid_i,
  input  logic [W-1:0] d_i,
  output logic         valid_o,
  output logic [W-1:0] d_o
);
  logic [W-1:0] stage_d [HOPS+1];
  logic         stage_v [HOPS+1];

  always_comb begin
    stage_d[0] = d_i;
    stage_v[0] = valid_i;
  end

  for (genvar h = 1; h <= HOPS; h++) begin : g_hop
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        stage_d[h] <= '0;
        stage_v[h] <= 1'b0;
      end else begin
        stage_v[h] <= stage_v[h-1];
        if (stage_v[h-1]) stage_d[h] <= stage_d[h-1];
      end
    end
  end

  always_comb begin
    d_o     = stage_d[HOPS];
    valid_o = stage_v[HOPS];
  end
endmodule
