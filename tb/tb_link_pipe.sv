// tb_link_pipe: a 3-hop path must deliver each valid word 3 clocks later, in order, and
// hold its output between words.
module tb_link_pipe;
  logic clk = 1'b0, rst_n = 1'b0, valid_i = 1'b0;
  logic [17:0] d_i = '0, d_o;
  logic valid_o;
  int checks = 0, failures = 0;
  logic [17:0] dq [$];
  logic vq [$];
  logic [17:0] held = '0;

  always #5 clk = ~clk;

  link_pipe #(.W(18), .HOPS(3)) dut (.clk, .rst_n, .valid_i, .d_i, .valid_o, .d_o);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      valid_i = ($urandom_range(0, 3) != 0);
      d_i = 18'($urandom);
      dq.push_back(d_i); vq.push_back(valid_i);
      @(posedge clk); #1;
      if (dq.size() == 3) begin
        logic [17:0] d;
        logic v;
        d = dq.pop_front(); v = vq.pop_front();
        if (v) held = d;
        checks++;
        if (valid_o !== v || d_o !== held) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d d_o=%h exp=%h v=%b/%b", t, d_o, held, valid_o, v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
