// linear_array_5to3: Nop:2 carry-save compressor tree as a linear array of
// ternary (5:3) stages.
//
// The ternary counterpart of linear_array_3to2. Every stage (ternary_csa_row)
// has three regular inputs and two carry inputs; the two carry words of a
// stage go straight to the carry inputs of the next, so two carry chains run
// through the whole array.
//   * Stage 0 takes a,b,c = I4,I3,I2 and cbi,cai = I1,I0 (five operands).
//   * Each further stage takes the next three words of a first-in first-out
//     list that holds the operands I5, I6, ... followed by the sum words S0,
//     S1, ... in the order they were made. For Nop = 11: (I5,I6,I7),
//     (I8,I9,I10), (S0,S1,S2).
//   * A last stage with a = b = 0 adds the final sum word and the two carry
//     words. With two zero inputs its cA carry is always 0, so it leaves just
//     two words: Sf and Cf.
// Every stage but the last removes two words. Nop is padded with zero operands
// up to the next odd number of at least 5, so the list always empties
// exactly; that padding is this design's own choice.
//
// Operands are unsigned and zero-extended to W = N + ceil(log2 Nop) bits, so
// sf + cf (modulo 2^W) is the exact sum.
//
// Interface: ops[Nop] of N bits in; sf, cf of W bits out (cf aligned).
// Combinational, no clock.
module linear_array_5to3
  import mop_pkg::*;
#(
  parameter int unsigned NOP = 11,
  parameter int unsigned N   = DEFAULT_N,
  parameter int unsigned W   = cs_width(N, NOP)
) (
  input  logic [N-1:0] ops [NOP],
  output logic [W-1:0] sf,
  output logic [W-1:0] cf
);

  // Padded operand count: odd and at least 5.
  localparam int unsigned NP     = ((NOP | 1) < 5) ? 5 : (NOP | 1);
  localparam int unsigned NMID   = (NP - 5) / 2;      // stages after stage 0
  localparam int unsigned NITEMS = (NP - 5) + NMID + 1;

  logic [W-1:0] opx   [NP];          // zero-extended, zero-padded operands
  logic [W-1:0] item  [NITEMS];      // the first-in first-out word list
  logic [W-1:0] ca    [NMID+1];      // carry words leaving each stage
  logic [W-1:0] cb    [NMID+1];
  logic [W-1:0] ca_last;             // cA carry of the closing stage

  for (genvar j = 0; j < NP; j++) begin : g_ext
    if (j < NOP) begin : g_op
      assign opx[j] = W'(ops[j]);
    end else begin : g_pad
      assign opx[j] = '0;
    end
  end

  for (genvar j = 0; j < NP - 5; j++) begin : g_in
    assign item[j] = opx[j+5];
  end

  ternary_csa_row #(.W(W)) u_stage0 (
    .a  (opx[4]),
    .b  (opx[3]),
    .c  (opx[2]),
    .cai(opx[0]),
    .cbi(opx[1]),
    .s  (item[NP-5]),
    .cao(ca[0]),
    .cbo(cb[0])
  );

  for (genvar k = 1; k <= NMID; k++) begin : g_stage
    ternary_csa_row #(.W(W)) u_stage (
      .a  (item[3*k-3]),
      .b  (item[3*k-2]),
      .c  (item[3*k-1]),
      .cai(ca[k-1]),
      .cbi(cb[k-1]),
      .s  (item[NP-5+k]),
      .cao(ca[k]),
      .cbo(cb[k])
    );
  end

  // Closing stage: two zero regular inputs, three words in, two words out.
  ternary_csa_row #(.W(W)) u_last (
    .a  ('0),
    .b  ('0),
    .c  (item[NITEMS-1]),
    .cai(ca[NMID]),
    .cbi(cb[NMID]),
    .s  (sf),
    .cao(ca_last),
    .cbo(cf)
  );

  // With a = b = 0 the first counter of every cell produces no carry.
  always_comb begin
    assert (ca_last == '0) else $error("closing 5:3 stage produced a cA carry");
  end

endmodule
