// tb_te_cell: exhaustive check of te_cell for both pair orientations.
//
// Every (x, y) pair value is applied to a cell whose odd line is bit 1 and to one whose
// odd line is bit 0; the expected flag is whether flipping the even line improves the
// pair's transition type. Also checks the printed example x=2'h2, y=2'h0 -> z=1.
module tb_te_cell;
  import tb_ref_pkg::*;
  logic [1:0] x, y;
  logic z_hi, z_lo;
  int checks = 0, failures = 0;

  te_cell #(.ODD_BIT(1'b1)) dut_hi (.x(x), .y(y), .z(z_hi));
  te_cell #(.ODD_BIT(1'b0)) dut_lo (.x(x), .y(y), .z(z_lo));

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
      checks += 2;
      if (z_hi !== helps(y, x, 2'b01)) begin failures++; $display("FAIL hi x=%b y=%b z=%b", x, y, z_hi); end
      if (z_lo !== helps(y, x, 2'b10)) begin failures++; $display("FAIL lo x=%b y=%b z=%b", x, y, z_lo); end
    end
    x = 2'h2; y = 2'h0; #1;
    checks++;
    if (z_hi !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
