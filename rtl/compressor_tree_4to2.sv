// compressor_tree_4to2: classic Nop:2 carry-save tree of 4:2 compressors.
//
// The regular (non-linear) alternative to the linear arrays. Each W-bit 4:2
// compressor (compressor_4to2_row) turns four words into two, so the tree
// uses ceil(Nop/2) - 1 compressors; an odd Nop is padded with one zero
// operand. The compressors are arranged through a first-in first-out list of
// words: entries 0..NP-1 are the (padded) operands, and compressor m reads
// entries 4m..4m+3 and appends its sum and carry words as entries NP+2m and
// NP+2m+1. Taking words in that order fills the tree level by level, so it
// has about log2(Nop/2) levels of compressors; the exact shape is this
// design's choice, as only the compressor count is fixed.
//
// Operands are unsigned and zero-extended to W = N + ceil(log2 Nop) bits, so
// sf + cf (modulo 2^W) is the exact sum.
//
// Interface: ops[Nop] of N bits in; sf, cf of W bits out (cf aligned).
// Combinational, no clock.
module compressor_tree_4to2
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

  // Padded operand count: even and at least 4.
  localparam int unsigned NP     = (NOP + (NOP % 2) < 4) ? 4 : NOP + (NOP % 2);
  localparam int unsigned NCMP   = NP / 2 - 1;
  localparam int unsigned NITEMS = NP + 2 * NCMP;

  logic [W-1:0] item [NITEMS];

  for (genvar j = 0; j < NP; j++) begin : g_in
    if (j < NOP) begin : g_op
      assign item[j] = W'(ops[j]);
    end else begin : g_pad
      assign item[j] = '0;
    end
  end

  for (genvar m = 0; m < NCMP; m++) begin : g_cmp
    compressor_4to2_row #(.W(W)) u_cmp (
      .x0(item[4*m]),
      .x1(item[4*m+1]),
      .x2(item[4*m+2]),
      .x3(item[4*m+3]),
      .s (item[NP+2*m]),
      .c (item[NP+2*m+1])
    );
  end

  assign sf = item[NITEMS-2];
  assign cf = item[NITEMS-1];

endmodule
