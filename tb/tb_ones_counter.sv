// tb_ones_counter: random and corner vectors into a 17-input ones counter.
module tb_ones_counter;
  logic [16:0] v;
  logic [4:0] cnt;
  int checks = 0, failures = 0;

  ones_counter #(.N(17)) dut (.v(v), .cnt(cnt));

  function automatic int ref_cnt(input logic [16:0] a);
    int k = 0;
    for (int i = 0; i < 17; i++) if (a[i]) k++;
    return k;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      case (t)
        0: v = '0;
        1: v = '1;
        default: v = 17'($urandom);
      endcase
      #1;
      checks++;
      if (int'(cnt) != ref_cnt(v)) begin failures++; $display("FAIL v=%b cnt=%0d", v, cnt); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
