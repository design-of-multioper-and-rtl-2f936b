// multioperand_adders_top: the carry-save multioperand adders side by side.
//
// Five independent compressor trees, each with its own operand inputs and
// carry-save outputs (sum word + carry word; the binary result is sf + cf,
// left to a carry-propagate adder outside this design):
//   * la9  - 9:2 linear array of 3:2 CSAs with one chained carry word;
//   * la5  - 5:2 linear array of 3:2 CSAs;
//   * ta11 - 11:2 linear array of 5:3 (ternary-adder) stages with two chained
//            carry words;
//   * ta5  - 5:2 linear array of 5:3 stages (a single 5:3 stage plus the
//            closing stage);
//   * ct9  - 9:2 classic tree of 4:2 compressors, for comparison with la9.
// The operand counts are those of the reference drawings and result
// waveforms; the 9:2 size of the 4:2 tree is this design's choice. Operands
// are N-bit unsigned; each output is N + ceil(log2 Nop) bits wide so that it
// holds the exact sum.
//
// Everything is combinational: there is no clock, reset or handshake. Each
// output is valid one combinational delay after its operands change.
module multioperand_adders_top
  import mop_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N
) (
  input  logic [N-1:0]                 la9_ops  [9],
  output logic [cs_width(N, 9)-1:0]    la9_sf,
  output logic [cs_width(N, 9)-1:0]    la9_cf,

  input  logic [N-1:0]                 la5_ops  [5],
  output logic [cs_width(N, 5)-1:0]    la5_sf,
  output logic [cs_width(N, 5)-1:0]    la5_cf,

  input  logic [N-1:0]                 ta11_ops [11],
  output logic [cs_width(N, 11)-1:0]   ta11_sf,
  output logic [cs_width(N, 11)-1:0]   ta11_cf,

  input  logic [N-1:0]                 ta5_ops  [5],
  output logic [cs_width(N, 5)-1:0]    ta5_sf,
  output logic [cs_width(N, 5)-1:0]    ta5_cf,

  input  logic [N-1:0]                 ct9_ops  [9],
  output logic [cs_width(N, 9)-1:0]    ct9_sf,
  output logic [cs_width(N, 9)-1:0]    ct9_cf
);

  linear_array_3to2 #(.NOP(9), .N(N)) u_la9 (
    .ops(la9_ops), .sf(la9_sf), .cf(la9_cf)
  );

  linear_array_3to2 #(.NOP(5), .N(N)) u_la5 (
    .ops(la5_ops), .sf(la5_sf), .cf(la5_cf)
  );

  linear_array_5to3 #(.NOP(11), .N(N)) u_ta11 (
    .ops(ta11_ops), .sf(ta11_sf), .cf(ta11_cf)
  );

  linear_array_5to3 #(.NOP(5), .N(N)) u_ta5 (
    .ops(ta5_ops), .sf(ta5_sf), .cf(ta5_cf)
  );

  compressor_tree_4to2 #(.NOP(9), .N(N)) u_ct9 (
    .ops(ct9_ops), .sf(ct9_sf), .cf(ct9_cf)
  );

endmodule
