// tb_noc_coding_top: end-to-end run of the three coded channels at default parameters.
//
// A stream of body flits with idle cycles goes into the top. For each scheme the link word
// is compared every clock with a reference encoder (tb_ref_pkg), and each decoded flit,
// HOPS + 2 = 4 clocks after it entered, with the flit sent. The test counts every mechanism
// the design has and fails if one never happened: no/odd inversion (scheme I), no/odd/full
// inversion and a refused full inversion (scheme II), no/odd/even/full inversion (scheme
// III), idle cycles on which the links hold, and the four three-line transition types.
// It also prints the weighted coupling activity of the raw and coded streams.
module tb_noc_coding_top;
  import tb_ref_pkg::*;
  localparam int LAT = 4;

  logic clk = 1'b0, rst_n = 1'b0, valid_i = 1'b0;
  logic [16:0] data_i = '0;
  logic [17:0] link1_o, link2_o, link3_o;
  logic valid_o;
  logic [16:0] data1_o, data2_o;
  logic [15:0] data3_o;
  logic [2:0] c3_x_i = '0, c3_y_i = '0;
  logic [3:0] c3_type_o;

  int checks = 0, failures = 0;
  int a1 [4] = '{default: 0};
  int a2 [4] = '{default: 0};
  int a3 [4] = '{default: 0};
  int refused = 0, idles = 0;
  int c3n [4] = '{default: 0};
  longint cost_raw = 0, cost1 = 0, cost2 = 0, cost3 = 0;

  always #5 clk = ~clk;

  noc_coding_top dut (
    .clk, .rst_n, .valid_i, .data_i, .link1_o, .link2_o, .link3_o, .valid_o,
    .data1_o, .data2_o, .data3_o, .c3_x_i, .c3_y_i, .c3_type_o);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] p1 = '0, p2 = '0, p3 = '0, praw = '0;
  logic [16:0] lastd = '0;
  logic [16:0] dq [$];
  logic vq [$];
  logic [16:0] held = '0;

  function automatic logic [16:0] pick(input int t);
    case ($urandom_range(0, 5))
      0: return ~lastd;
      1: return ~lastd ^ (17'd1 << $urandom_range(0, 16));
      2: return lastd ^ (17'd1 << $urandom_range(0, 16));
      3: return (t % 2 != 0) ? 17'h0aaaa : 17'h15555;
      default: return 17'($urandom);
    endcase
  endfunction

  initial begin
    int k;
    logic [63:0] x, x3, e1, e2, e3;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      valid_i = ($urandom_range(0, 7) != 0);
      data_i = pick(t);
      c3_x_i = 3'($urandom);
      c3_y_i = 3'($urandom);
      #1;
      if      (c3_type_o == 4'b0001) c3n[0]++;
      else if (c3_type_o == 4'b0010) c3n[1]++;
      else if (c3_type_o == 4'b0100) c3n[2]++;
      else if (c3_type_o == 4'b1000) c3n[3]++;
      @(posedge clk);
      if (valid_i) begin
        x  = 64'(data_i);
        x3 = 64'(data_i[15:0]);
        k = scheme1_action(p1, x, 18);  a1[k]++; e1 = apply(x, k, 18);
        if (scheme2_full_refused(p2, x, 18)) refused++;
        k = scheme2_action(p2, x, 18);  a2[k]++; e2 = apply(x, k, 18);
        k = scheme3_action(p3, x3, 18); a3[k]++; e3 = apply(x3, k, 18);
        cost_raw += longint'(coupling_cost(praw, x, 17));
        cost1 += longint'(coupling_cost(p1, e1, 18));
        cost2 += longint'(coupling_cost(p2, e2, 18));
        cost3 += longint'(coupling_cost(p3, e3, 18));
        p1 = e1; p2 = e2; p3 = e3; praw = x;
        lastd = data_i;
      end else begin
        idles++;
      end
      dq.push_back(data_i); vq.push_back(valid_i);
      #1;
      checks += 3;
      if (64'(link1_o) != p1) begin failures++; if (failures < 10) $display("FAIL t=%0d link1=%h exp=%h", t, link1_o, p1); end
      if (64'(link2_o) != p2) begin failures++; if (failures < 10) $display("FAIL t=%0d link2=%h exp=%h", t, link2_o, p2); end
      if (64'(link3_o) != p3) begin failures++; if (failures < 10) $display("FAIL t=%0d link3=%h exp=%h", t, link3_o, p3); end
      if (dq.size() == LAT) begin
        logic [16:0] d;
        logic v;
        d = dq.pop_front(); v = vq.pop_front();
        if (v) held = d;
        checks += 4;
        if (valid_o !== v) failures++;
        if (data1_o !== held) begin failures++; if (failures < 10) $display("FAIL t=%0d data1=%h exp=%h", t, data1_o, held); end
        if (data2_o !== held) begin failures++; if (failures < 10) $display("FAIL t=%0d data2=%h exp=%h", t, data2_o, held); end
        if (data3_o !== held[15:0]) begin failures++; if (failures < 10) $display("FAIL t=%0d data3=%h exp=%h", t, data3_o, held[15:0]); end
      end
    end
    $display("scheme I   none=%0d odd=%0d", a1[0], a1[1]);
    $display("scheme II  none=%0d odd=%0d full=%0d refused_full=%0d", a2[0], a2[1], a2[3], refused);
    $display("scheme III none=%0d odd=%0d even=%0d full=%0d", a3[0], a3[1], a3[2], a3[3]);
    $display("idle cycles=%0d  three-line types I=%0d II=%0d III=%0d IV=%0d", idles, c3n[0], c3n[1], c3n[2], c3n[3]);
    $display("weighted coupling activity raw=%0d schemeI=%0d schemeII=%0d schemeIII=%0d", cost_raw, cost1, cost2, cost3);
    begin
      int ev [14];
      ev = '{a1[0], a1[1], a2[0], a2[1], a2[3], refused, a3[0], a3[1], a3[2], a3[3], idles, c3n[0], c3n[1], c3n[2]};
      foreach (ev[i]) begin
        checks++;
        if (ev[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
      checks++;
      if (c3n[3] == 0) begin failures++; $display("FAIL three-line Type IV never happened"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
