// noc_coding_top: end-to-end coupling-aware link coding between two network interfaces.
//
// The source interface encodes each body flit before it enters the network and the
// destination interface decodes it; the routers in between (link_pipe, HOPS stages)
// carry the encoded words unchanged. The three proposed coding schemes are built as
// three parallel channels fed with the same flits:
//   scheme I   odd inversion or none,              17 data lines + 1 flag line,
//   scheme II  odd, full or no inversion,          17 data lines + 1 flag line,
//   scheme III odd, even, full or no inversion,    16 data lines + 2 control lines
// (scheme III takes data_i[15:0]). The link words are brought out so that their
// switching can be observed. The three-line coupling classifier, the document's
// extension of the transition types to three lines, stands beside them with its own
// ports.
//
// Timing: a flit presented with valid_i is on the link outputs after 1 clock and on the
// decoded outputs, with valid_o, after HOPS + 2 clocks. Synchronous active-low reset.
module noc_coding_top #(
  parameter int unsigned HOPS = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid_i,
  input  logic [16:0] data_i,
  output logic [17:0] link1_o,
  output logic [17:0] link2_o,
  output logic [17:0] link3_o,
  output logic        valid_o,
  output logic [16:0] data1_o,
  output logic [16:0] data2_o,
  output logic [15:0] data3_o,
  input  logic [2:0]  c3_x_i,
  input  logic [2:0]  c3_y_i,
  output logic [3:0]  c3_type_o
);
  logic        v1e, v2e, v3e, v1l, v2l, v3l, v1d, v2d, v3d;
  logic [17:0] l1, l2, l3;

  // Scheme I
  scheme1_encoder #(.DATA_W(17)) u_enc1 (
    .clk, .rst_n, .valid_i, .data_i(data_i), .valid_o(v1e), .link_o(link1_o));
  link_pipe #(.W(18), .HOPS(HOPS)) u_net1 (
    .clk, .rst_n, .valid_i(v1e), .d_i(link1_o), .valid_o(v1l), .d_o(l1));
  scheme1_decoder #(.DATA_W(17)) u_dec1 (
    .clk, .rst_n, .valid_i(v1l), .link_i(l1), .valid_o(v1d), .data_o(data1_o));

  // Scheme II
  scheme2_encoder #(.DATA_W(17)) u_enc2 (
    .clk, .rst_n, .valid_i, .data_i(data_i), .valid_o(v2e), .link_o(link2_o));
  link_pipe #(.W(18), .HOPS(HOPS)) u_net2 (
    .clk, .rst_n, .valid_i(v2e), .d_i(link2_o), .valid_o(v2l), .d_o(l2));
  scheme2_decoder #(.DATA_W(17)) u_dec2 (
    .clk, .rst_n, .valid_i(v2l), .link_i(l2), .valid_o(v2d), .data_o(data2_o));

  // Scheme III
  scheme3_encoder #(.DATA_W(16)) u_enc3 (
    .clk, .rst_n, .valid_i, .data_i(data_i[15:0]), .valid_o(v3e), .link_o(link3_o));
  link_pipe #(.W(18), .HOPS(HOPS)) u_net3 (
    .clk, .rst_n, .valid_i(v3e), .d_i(link3_o), .valid_o(v3l), .d_o(l3));
  scheme3_decoder #(.DATA_W(16)) u_dec3 (
    .clk, .rst_n, .valid_i(v3l), .link_i(l3), .valid_o(v3d), .data_o(data3_o));

  // The three channels have equal latency, so one valid serves all decoded outputs.
  always_comb valid_o = v1d;

  coupling3_classifier u_c3 (
    .x(c3_x_i), .y(c3_y_i),
    .t1(c3_type_o[0]), .t2(c3_type_o[1]), .t3(c3_type_o[2]), .t4(c3_type_o[3]));

  a_equal_latency: assert property (@(posedge clk) disable iff (!rst_n) (v1d == v2d) && (v2d == v3d));
endmodule
