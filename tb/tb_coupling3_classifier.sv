// tb_coupling3_classifier: exhaustive check of the three-line transition types.
//
// The reference counts rising and falling lines. Also checks the printed examples
// (x=3'h4, y=3'h0 is Type I; x=3'h5, y=3'h2 is Type II).
module tb_coupling3_classifier;
  logic [2:0] x, y;
  logic t1, t2, t3, t4;
  int checks = 0, failures = 0;

  coupling3_classifier dut (.x(x), .y(y), .t1(t1), .t2(t2), .t3(t3), .t4(t4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nr, nf;
    logic [3:0] e;
    for (int i = 0; i < 64; i++) begin
      y = i[5:3]; x = i[2:0];
      nr = 0; nf = 0;
      for (int b = 0; b < 3; b++) begin
        if (!y[b] && x[b]) nr++;
        if (y[b] && !x[b]) nf++;
      end
      e = '0;
      e[0] = (nr + nf == 1);
      e[1] = (nr > 0 && nf > 0);
      e[2] = (nr == 3 || nf == 3);
      e[3] = (nr + nf == 0);
      #1;
      checks++;
      if ({t4, t3, t2, t1} !== e) begin failures++; $display("FAIL x=%b y=%b got %b exp %b", x, y, {t4,t3,t2,t1}, e); end
    end
    x = 3'h4; y = 3'h0; #1; checks++; if (t1 !== 1'b1) failures++;
    x = 3'h5; y = 3'h2; #1; checks++; if (t2 !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
