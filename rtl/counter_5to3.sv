// counter_5to3: one-bit cell of the ternary (5:3) carry-save stage.
//
// Adds five bits of equal weight: the regular inputs a, b, c and the two
// carry inputs cai, cbi. It returns a sum bit s (weight 1) and two carry
// bits cao, cbo (weight 2 each), so a + b + c + cai + cbi = s + 2*(cao + cbo).
// Inside, a first 3:2 counter reduces a, b, c to x and y (y is cao); a second
// 3:2 counter adds x, cai and cbi into s and cbo. This is the structure of a
// LUT-plus-carry-chain ternary adder bit, with cbo as the chained carry; the
// exact split is this design's choice. Purely combinational.
module counter_5to3 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic cai,
  input  logic cbi,
  output logic s,
  output logic cao,
  output logic cbo
);

  logic x;

  full_adder u_fa_abc (.a(a), .b(b),   .c(c),   .s(x), .co(cao));
  full_adder u_fa_chn (.a(x), .b(cai), .c(cbi), .s(s), .co(cbo));

endmodule
