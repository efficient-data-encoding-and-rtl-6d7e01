// tb_scheme1_encoder: directed and random check of the scheme I encoder alone.
//
// Directed: from the reset word 0, the flit 17'b1_0101_0101_0101_0101 makes every pair
// an even-line switch from an equal pair, so the flit must be odd-inverted into an
// all-ones word with the flag set (the document's 18-bit example). Random flits are
// compared with the reference encoder, with one clock of latency, and a held link is
// checked during idle cycles. A 4-line instance checks the 4-bit example, 3'b101 from
// the reset word giving 4'hf.
module tb_scheme1_encoder;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, valid_i = 1'b0;
  logic [16:0] data_i = '0;
  logic valid_o;
  logic [17:0] link_o;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scheme1_encoder #(.DATA_W(17)) dut (.clk, .rst_n, .valid_i, .data_i, .valid_o, .link_o);

  // 4-line instance for the document's 4-bit example: 3'b101 from 0 gives 4'hf.
  logic [2:0] d4 = '0;
  logic v4_o;
  logic [3:0] l4;
  scheme1_encoder #(.DATA_W(3)) dut4 (.clk, .rst_n, .valid_i, .data_i(d4), .valid_o(v4_o), .link_o(l4));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [16:0] d, input logic v);
    @(negedge clk);
    data_i = d; valid_i = v;
    @(negedge clk);
    valid_i = 1'b0;
  endtask

  initial begin
    logic [63:0] prev, x, e;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    checks++;
    if (link_o !== '0) failures++;
    d4 = 3'b101;
    send(17'h15555, 1'b1);
    checks += 3;
    if (l4 !== 4'hf) begin failures++; $display("FAIL 4-line example: link=%b", l4); end
    if (link_o !== 18'h3ffff) begin failures++; $display("FAIL example: link=%b", link_o); end
    if (valid_o !== 1'b1) failures++;  // valid follows one clock later
    // idle: link holds
    send(17'h00000, 1'b0);
    checks++;
    if (link_o !== 18'h3ffff) failures++;
    prev = 64'h3ffff;
    for (int t = 0; t < 3000; t++) begin
      x = 64'(17'($urandom));
      e = apply(x, scheme1_action(prev, x, 18), 18);
      @(negedge clk);
      data_i = x[16:0]; valid_i = 1'b1;
      @(posedge clk); #1;
      checks += 2;
      if (64'(link_o) != e) begin failures++; if (failures < 10) $display("FAIL link=%h exp=%h", link_o, e); end
      if (valid_o !== 1'b1) failures++;
      prev = e;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
