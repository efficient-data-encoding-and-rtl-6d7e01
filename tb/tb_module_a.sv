// tb_module_a: exhaustive check of the scheme II decision for 17 pairs, and the printed
// 3-pair example (Ty=3, T2=3, T4**=0 gives full inversion).
module tb_module_a;
  logic [4:0] ty, t2, t4;
  logic ok, hi, fi;
  logic [1:0] ty3, t23, t43;
  logic hi3, fi3;
  int checks = 0, failures = 0;

  module_a #(.NP(17)) dut (.ty_cnt(ty), .t2_cnt(t2), .t4_cnt(t4), .ty_full_ok(ok), .hi(hi), .fi(fi));
  module_a #(.NP(3)) dut3 (.ty_cnt(ty3), .t2_cnt(t23), .t4_cnt(t43), .ty_full_ok(1'b1), .hi(hi3), .fi(fi3));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int g, o;
    bit ehi, efi;
    for (int a = 0; a <= 17; a++)
      for (int b = 0; b <= 17; b++)
        for (int c = 0; c <= 17; c++)
          for (int k = 0; k < 2; k++) begin
            ty = 5'(a); t2 = 5'(b); t4 = 5'(c); ok = k[0];
            g = 2 * (b - c); o = 2 * a - 17;
            ehi = (g < o) && (2 * a > 17);
            efi = (g > o) && (b > c) && ok;
            #1;
            checks++;
            if (hi !== ehi || fi !== efi) begin
              failures++;
              if (failures < 10) $display("FAIL ty=%0d t2=%0d t4=%0d ok=%0d hi=%b fi=%b", a, b, c, ok, hi, fi);
            end
          end
    ty3 = 2'd3; t23 = 2'd3; t43 = 2'd0; #1;
    checks++;
    if (hi3 !== 1'b0 || fi3 !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
