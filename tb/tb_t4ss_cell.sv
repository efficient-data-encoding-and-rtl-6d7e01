// tb_t4ss_cell: exhaustive check of t4ss_cell against the T4** definition (Type IV that full inversion makes Type II).
module tb_t4ss_cell;
  import tb_ref_pkg::*;
  logic [1:0] x, y;
  logic z;
  int checks = 0, failures = 0;

  t4ss_cell dut (.x(x), .y(y), .z(z));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      y = i[3:2]; x = i[1:0];
      #1;
      checks++;
      if (z !== t4ss(y, x)) begin failures++; $display("FAIL x=%b y=%b z=%b", x, y, z); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
