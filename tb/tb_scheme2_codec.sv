// tb_scheme2_codec: scheme 2 encoder and decoder, back to back, at the default widths.
//
// Random flits, with idle cycles and patterns chosen to provoke every inversion action,
// go into scheme2_encoder whose link word feeds scheme2_decoder directly. Each cycle the
// link word is compared with a reference encoder built from the transition-type
// definitions (tb_ref_pkg), and the decoded flit, two clocks after the input, with the
// flit sent. Counts how often each inversion action occurred and fails if one never did;
// also reports the weighted coupling activity with and without coding.
module tb_scheme2_codec;
  import tb_ref_pkg::*;
  localparam int DW = 17;
  localparam int N  = 18;
  localparam int ACTS [3] = '{0, 1, 3};

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid_i = 1'b0;
  logic [DW-1:0] data_i = '0;
  logic ev, dv;
  logic [N-1:0] link;
  logic [DW-1:0] data_o;
  int checks = 0, failures = 0;
  int act_count [4] = '{default: 0};
  int refused = 0;
  longint cost_raw = 0, cost_enc = 0;

  always #5 clk = ~clk;

  scheme2_encoder #(.DATA_W(DW)) u_enc (.clk, .rst_n, .valid_i, .data_i, .valid_o(ev), .link_o(link));
  scheme2_decoder #(.DATA_W(DW)) u_dec (.clk, .rst_n, .valid_i(ev), .link_i(link), .valid_o(dv), .data_o(data_o));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] prev_link = '0, prev_raw = '0;
  logic [DW-1:0] last = '0;
  logic [DW-1:0] sent_q [$];
  logic sent_v_q [$];

  function automatic logic [DW-1:0] pick(input int t, input logic [DW-1:0] lastd);
    logic [DW-1:0] r;
    r = DW'({$urandom, $urandom});
    case ($urandom_range(0, 5))
      0: return ~lastd;
      1: return ~lastd ^ (DW'(1) << $urandom_range(0, DW - 1));
      2: return lastd ^ (DW'(1) << $urandom_range(0, DW - 1));
      3: return (t % 2 != 0) ? DW'({4{16'haaaa}}) : DW'({4{16'h5555}});
      default: return r;
    endcase
  endfunction

  initial begin
    int act;
    logic [63:0] x, exp_link;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      valid_i = ($urandom_range(0, 9) != 0);
      data_i  = pick(t, last);
      @(posedge clk);
      if (valid_i) begin
        x = 64'(data_i);
        act = scheme2_action(prev_link, x, N);
        if (2 == 2 && scheme2_full_refused(prev_link, x, N)) refused++;
        exp_link = apply(x, act, N);
        act_count[act]++;
        cost_raw += longint'(coupling_cost(prev_raw, x, DW));
        cost_enc += longint'(coupling_cost(prev_link, exp_link, N));
        prev_link = exp_link;
        prev_raw = x;
        last = data_i;
      end
      sent_q.push_back(data_i);
      sent_v_q.push_back(valid_i);
      #1;
      checks++;
      if (64'(link) != prev_link) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d link=%h exp=%h", t, link, prev_link);
      end
      if (ev !== valid_i) failures++;
      // decoded output appears one clock after the link word
      if (sent_q.size() == 2) begin
        logic [DW-1:0] d;
        logic v;
        d = sent_q.pop_front();
        v = sent_v_q.pop_front();
        checks++;
        if (dv !== v || (v && data_o !== d)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d decoded=%h exp=%h v=%b/%b", t, data_o, d, dv, v);
        end
      end
    end
    $display("actions none=%0d odd=%0d even=%0d full=%0d refused_full=%0d",
             act_count[0], act_count[1], act_count[2], act_count[3], refused);
    $display("weighted coupling activity raw=%0d coded=%0d", cost_raw, cost_enc);
    foreach (ACTS[i]) begin
      checks++;
      if (act_count[ACTS[i]] == 0) begin failures++; $display("FAIL action %0d never occurred", ACTS[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
