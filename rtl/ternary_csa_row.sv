// ternary_csa_row: W-bit 5:3 carry-save stage built on ternary-adder cells.
//
// A row of W counter_5to3 cells. It reduces five words, three regular ones
// (a, b, c) and two carry words (cai, cbi), to a sum word s and two carry
// words cao and cbo, so a + b + c + cai + cbi = s + cao + cbo modulo 2^W.
// Each stage therefore removes two words. The carry words leave already
// shifted one place left (bit 0 is 0, the carry of bit W-1 is dropped), so
// they plug straight into the carry inputs of the next stage; the two carry
// words play the role of the two carry paths of a ternary adder.
//
// Interface: a, b, c, cai, cbi in; s, cao, cbo out; all W bits. Combinational.
module ternary_csa_row #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] cai,
  input  logic [W-1:0] cbi,
  output logic [W-1:0] s,
  output logic [W-1:0] cao,
  output logic [W-1:0] cbo
);

  logic [W-1:0] ca, cb;  // unshifted carries of each bit

  for (genvar i = 0; i < W; i++) begin : g_bit
    counter_5to3 u_cnt (
      .a  (a[i]),
      .b  (b[i]),
      .c  (c[i]),
      .cai(cai[i]),
      .cbi(cbi[i]),
      .s  (s[i]),
      .cao(ca[i]),
      .cbo(cb[i])
    );
  end

  assign cao = {ca[W-2:0], 1'b0};
  assign cbo = {cb[W-2:0], 1'b0};

endmodule
