// linear_array_3to2: Nop:2 carry-save compressor tree as a linear array of CSAs.
//
// The tree is a chain of Nop-2 W-bit CSAs (csa_row). The carry word of every
// CSA feeds the carry input ci of the next one, so a single carry chain runs
// from the first operand I0 to the final carry word Cf. Only the two regular
// inputs (a, b) of each CSA carry data between chain positions:
//   * CSA 0 takes a = I2, b = I1, ci = I0;
//   * the following CSAs take, two at a time, the remaining operands I3, I4, ...
//     and then the partial sum words S0, S1, ... in the order they were made.
// With Nop = 9 this gives the documented 9:2 array: (I4,I3), (I6,I5), (I8,I7),
// (S0,S1), (S2,S3), (S4,S5). With an even Nop the last operand is paired with
// S0. If the carry path is taken as free (as it is on a fast carry chain),
// the array behaves like a tree of ceil(log2(Nop-1)) levels.
//
// The pairing rule is realised as a first-in first-out list of words: entry j
// for j < Nop-3 is operand I(j+3), entry Nop-3+k is the sum word of CSA k.
// CSA k (k >= 1) reads entries 2k-2 and 2k-1. The sum of the last CSA is Sf.
//
// Operands are unsigned and zero-extended to W = N + ceil(log2 Nop) bits, so
// sf + cf (taken modulo 2^W) is the exact sum of all operands. The wider
// buses are this design's choice; the documented figure draws N-bit buses.
//
// Interface: ops[Nop] of N bits in; sf, cf of W bits out (cf already aligned).
// Combinational, no clock.
module linear_array_3to2
  import mop_pkg::*;
#(
  parameter int unsigned NOP = 9,
  parameter int unsigned N   = DEFAULT_N,
  parameter int unsigned W   = cs_width(N, NOP)
) (
  input  logic [N-1:0] ops [NOP],
  output logic [W-1:0] sf,
  output logic [W-1:0] cf
);

  localparam int unsigned NCSA   = NOP - 2;        // each CSA removes one word
  localparam int unsigned NITEMS = 2 * NOP - 5;    // operands I3.. plus all sums

  if (NOP < 3) begin : g_bad_nop
    $error("linear_array_3to2 needs NOP >= 3");
  end

  logic [W-1:0] item  [NITEMS];  // the first-in first-out word list
  logic [W-1:0] carry [NCSA];    // carry word leaving each CSA

  // Operands I3.. enter the list first.
  for (genvar j = 0; j + 3 < NOP; j++) begin : g_in
    assign item[j] = W'(ops[j+3]);
  end

  // CSA 0: three operands, I0 on the carry input.
  csa_row #(.W(W)) u_csa0 (
    .a (W'(ops[2])),
    .b (W'(ops[1])),
    .ci(W'(ops[0])),
    .s (item[NOP-3]),
    .co(carry[0])
  );

  // CSA k: the next two words of the list plus the carry of CSA k-1.
  for (genvar k = 1; k < NCSA; k++) begin : g_csa
    csa_row #(.W(W)) u_csa (
      .a (item[2*k-2]),
      .b (item[2*k-1]),
      .ci(carry[k-1]),
      .s (item[NOP-3+k]),
      .co(carry[k])
    );
  end

  assign sf = item[NITEMS-1];
  assign cf = carry[NCSA-1];

endmodule
