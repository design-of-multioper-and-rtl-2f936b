// compressor_4to2_row: W-bit 4:2 compressor.
//
// Adds two carry-save numbers, i.e. four words x0..x3, into one carry-save
// number (s, c) with x0 + x1 + x2 + x3 = s + c modulo 2^W. It is a row of W
// compressor_4to2 cells; the lateral carry of bit i enters bit i+1 and bit 0
// gets 0. The carry word is returned already shifted one place left; carries
// out of bit W-1 are dropped. Delay is that of two full adders whatever W is.
//
// Interface: x0..x3 in; s, c out; all W bits. Combinational.
module compressor_4to2_row #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x0,
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] x3,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  logic [W:0]   lat;    // lateral carry into each bit; lat[W] is dropped
  logic [W-1:0] carry;  // unshifted carry of each bit

  assign lat[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_bit
    compressor_4to2 u_cmp (
      .x0  (x0[i]),
      .x1  (x1[i]),
      .x2  (x2[i]),
      .x3  (x3[i]),
      .cin (lat[i]),
      .s   (s[i]),
      .c   (carry[i]),
      .cout(lat[i+1])
    );
  end

  assign c = {carry[W-2:0], 1'b0};

endmodule
