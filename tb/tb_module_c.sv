// tb_module_c: exhaustive check of the scheme III decision for 17 pairs, and the printed
// 3-pair example (Ty=2, Te=3, T2=2, T4**=2 gives even inversion, {oi,ei}=01).
module tb_module_c;
  logic [4:0] ty, te, t2, t4;
  logic oi, ei;
  logic [1:0] ty3, te3, t23, t43;
  logic oi3, ei3;
  int checks = 0, failures = 0;

  module_c #(.NP(17)) dut (.ty_cnt(ty), .te_cnt(te), .t2_cnt(t2), .t4_cnt(t4), .oi(oi), .ei(ei));
  module_c #(.NP(3)) dut3 (.ty_cnt(ty3), .te_cnt(te3), .t2_cnt(t23), .t4_cnt(t43), .oi(oi3), .ei(ei3));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g;
    logic [1:0] e;
    for (int a = 0; a <= 17; a++)
      for (int d = 0; d <= 17; d++)
        for (int b = 0; b <= 17; b++)
          for (int c = 0; c <= 17; c++) begin
            ty = 5'(a); te = 5'(d); t2 = 5'(b); t4 = 5'(c);
            g = 2 * (b - c);
            if (2 * d > 17 && d > a && g < 2 * d - 17)      e = 2'b01;
            else if (g > 2 * a - 17 && b > c)               e = 2'b11;
            else if (g < 2 * a - 17 && 2 * a > 17 && d < a) e = 2'b10;
            else                                            e = 2'b00;
            #1;
            checks++;
            if ({oi, ei} !== e) begin
              failures++;
              if (failures < 10) $display("FAIL ty=%0d te=%0d t2=%0d t4=%0d got %b exp %b", a, d, b, c, {oi,ei}, e);
            end
          end
    ty3 = 2'd2; te3 = 2'd3; t23 = 2'd2; t43 = 2'd2; #1;
    checks++;
    if ({oi3, ei3} !== 2'b01) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
