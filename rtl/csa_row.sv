// csa_row: W-bit 3:2 carry-save adder (CSA).
//
// A row of W full adders. Bit i adds a[i], b[i] and ci[i] without any carry
// propagation, so the row costs one full-adder delay whatever its width. The
// carry of bit i has weight 2^(i+1), so the carry word is returned already
// shifted one place left: bit 0 of co is 0 and the carry of bit W-1 is
// dropped. Hence s + co = a + b + ci modulo 2^W.
//
// In the linear array the ci input of one CSA is the co output of the CSA
// before it, so the carry passes diagonally from bit i of one row to bit i+1
// of the next; on an FPGA that path is meant to ride the dedicated carry
// chain. Inputs a and b are the two "regular" inputs. This RTL describes the
// logic only; the mapping onto lookup tables and carry chains is left to
// synthesis.
//
// Interface: a, b, ci in; s, co out; all W bits. Combinational.
module csa_row #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] ci,
  output logic [W-1:0] s,
  output logic [W-1:0] co
);

  logic [W-1:0] carry;  // unshifted carry of each bit

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .c (ci[i]),
      .s (s[i]),
      .co(carry[i])
    );
  end

  assign co = {carry[W-2:0], 1'b0};

endmodule
