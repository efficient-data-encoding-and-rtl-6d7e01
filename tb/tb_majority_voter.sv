// tb_majority_voter: strict-majority check on 17 and on 4 inputs.
//
// The 4-input case includes the printed example 4'h1 -> 0 and the tie 4'h3 -> 0.
module tb_majority_voter;
  logic [16:0] v;
  logic [3:0] v4;
  logic q, q4;
  int checks = 0, failures = 0;

  majority_voter #(.N(17)) dut (.v(v), .q(q));
  majority_voter #(.N(4)) dut4 (.v(v4), .q(q4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      v = 17'($urandom);
      v4 = 4'($urandom);
      if (t == 0) v = 17'h000ff;  // 8 ones: no majority
      if (t == 1) v = 17'h001ff;  // 9 ones: majority
      if (t == 2) v4 = 4'h1;
      if (t == 3) v4 = 4'h3;
      #1;
      checks += 2;
      if (q !== ($countones(v) > 8)) begin failures++; $display("FAIL v=%b q=%b", v, q); end
      if (q4 !== ($countones(v4) > 2)) begin failures++; $display("FAIL v4=%b q=%b", v4, q4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
