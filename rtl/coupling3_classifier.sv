// coupling3_classifier: coupling transition type of three adjacent lines.
//
// x is the lines' next value, y their current value. Outputs are one-hot or all zero:
//   t1  exactly one line switches,
//   t2  at least one line rises while another falls,
//   t3  all three lines switch in the same direction,
//   t4  no line switches.
// Two lines switching the same way while the third holds belongs to none of the four
// types described and sets no output; that choice is this design's. The four types are
// the document's three-line extension of the two-line classification. Combinational.
module coupling3_classifier (
  input  logic [2:0] x,
  input  logic [2:0] y,
  output logic       t1,
  output logic       t2,
  output logic       t3,
  output logic       t4
);
  logic [2:0] rise, fall, sw;

  always_comb begin
    rise = x & ~y;
    fall = ~x & y;
    sw   = rise | fall;
    t4   = (sw == 3'b000);
    t1   = (sw == 3'b001) || (sw == 3'b010) || (sw == 3'b100);
    t2   = (rise != 3'b000) && (fall != 3'b000);
    t3   = (rise == 3'b111) || (fall == 3'b111);
  end
endmodule
