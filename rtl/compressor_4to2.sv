// compressor_4to2: one-bit 4:2 compressor made of two 3:2 counters.
//
// Adds four bits x0..x3 of weight 1 and a lateral carry cin coming from the
// neighbouring lower bit. The first counter reduces x0, x1, x2 to t and cout;
// cout (weight 2) goes to the next higher bit and does not depend on cin, so
// the lateral carry never ripples further than one bit. The second counter
// adds t, x3 and cin into s (weight 1) and c (weight 2):
//   x0 + x1 + x2 + x3 + cin = s + 2*(c + cout).
// Purely combinational.
module compressor_4to2 (
  input  logic x0,
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic cin,
  output logic s,
  output logic c,
  output logic cout
);

  logic t;

  full_adder u_fa0 (.a(x0), .b(x1), .c(x2),  .s(t), .co(cout));
  full_adder u_fa1 (.a(t),  .b(x3), .c(cin), .s(s), .co(c));

endmodule
